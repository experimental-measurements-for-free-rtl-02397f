// tb_bit_counter: checks +20 per gated word, the two-clock gate delay that
// matches the error counter, and the synchronous clear.
`include "tb_check.svh"
module tb_bit_counter;
  `TB_COUNTERS
  logic clk = 0, rst_n = 0, clear = 0, gate = 0;
  logic [63:0] cnt;
  always #4 clk = ~clk;
  bit_counter dut (.clk, .rst_n, .clear, .gate, .numbit_rec(cnt));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    `TB_FINISH
  end

  initial begin
    int gated;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    gate <= 1; @(posedge clk); gate <= 0;   // gate sampled at this edge
    #1 `CHECK(cnt == 0, "not counted at the sampling edge")
    @(posedge clk); #1 `CHECK(cnt == 0, "not counted one clock after")
    @(posedge clk); #1 `CHECK(cnt == 20, "20 bits two clocks after sampling")
    gated = 1;
    for (int n = 0; n < 5000; n++) begin
      logic g;
      g = 1'($urandom % 2);
      gate <= g;
      gated += int'(g);
      @(posedge clk);
    end
    gate <= 0; repeat (3) @(posedge clk);
    #1 `CHECK(cnt == 64'(gated) * 20, "random gating count")
    clear <= 1; @(posedge clk); clear <= 0; #1
    `CHECK(cnt == 0, "clear")
    `TB_FINISH
  end
endmodule
