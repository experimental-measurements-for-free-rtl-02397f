// tb_bit_to_bit_adder: compares the ROM/adder-tree population count with a
// bit-by-bit loop on all-zero, all-one, single-bit and random words.
`include "tb_check.svh"
module tb_bit_to_bit_adder;
  `TB_COUNTERS
  logic [19:0] bits;
  logic [4:0]  ones;
  bit_to_bit_adder dut (.bits, .ones);

  function automatic int count_ref(logic [19:0] v);
    int c = 0;
    for (int i = 0; i < 20; i++) c += int'(v[i]);
    return c;
  endfunction

  initial begin
    #1000000;
    failures++;
    `TB_FINISH
  end

  initial begin
    bits = '0; #1 `CHECK(ones == 0, "all zeros")
    bits = '1; #1 `CHECK(ones == 20, "all ones")
    for (int i = 0; i < 20; i++) begin
      bits = 20'(1) << i; #1 `CHECK(ones == 1, $sformatf("single bit %0d", i))
    end
    for (int n = 0; n < 2000; n++) begin
      bits = 20'($urandom);
      #1 `CHECK(int'(ones) == count_ref(bits), $sformatf("random %h", bits))
    end
    `TB_FINISH
  end
endmodule
