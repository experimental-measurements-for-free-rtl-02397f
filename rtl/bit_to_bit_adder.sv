// bit_to_bit_adder: counts the ones in a 20-bit comparison word.
//
// The word is cut into four 5-bit groups; each group addresses a 32 x 3-bit
// ROM whose entry is the number of ones in its address. Two adders sum the
// group counts pairwise and a third adds the pair sums, giving 0 to 20 on a
// 5-bit output. The tree is balanced, so every input sees the same depth.
// Purely combinational. ROM contents are computed (entry a = ones in a).
module bit_to_bit_adder (
  input  logic [19:0] bits,
  output logic [4:0]  ones
);
  function automatic logic [3*32-1:0] ones_rom();
    logic [3*32-1:0] r;
    for (int a = 0; a < 32; a++) r[a*3 +: 3] = 3'($countones(5'(a)));
    return r;
  endfunction

  localparam logic [3*32-1:0] ROM = ones_rom();

  logic [2:0] g [4];
  logic [3:0] s01, s23;

  always_comb begin
    for (int k = 0; k < 4; k++) g[k] = ROM[bits[k*5 +: 5]*3 +: 3];
    s01  = 4'(g[0]) + 4'(g[1]);
    s23  = 4'(g[2]) + 4'(g[3]);
    ones = 5'(s01) + 5'(s23);
  end
endmodule
