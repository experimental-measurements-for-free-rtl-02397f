// tb_error_counter: feeds word pairs with a known number of differing bits
// and checks the 64-bit total, the per-word count, the two-clock latency,
// that words outside the gate are not counted, and the synchronous clear.
`include "tb_check.svh"
module tb_error_counter;
  `TB_COUNTERS
  logic clk = 0, rst_n = 0, clear = 0, gate = 0;
  logic [19:0] rec = 0, gen = 0;
  logic [4:0]  werr;
  logic [63:0] total;
  always #4 clk = ~clk;

  error_counter dut (.clk, .rst_n, .clear, .gate, .rec_data(rec),
    .gen_data(gen), .word_errors(werr), .numbit_err(total));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    `TB_FINISH
  end

  initial begin
    longint expect_total;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // latency: one word with 3 errors
    gate <= 1; gen <= 20'h12345; rec <= 20'h12345 ^ 20'h00007;
    @(posedge clk);
    // the word is sampled at this edge
    gate <= 0; rec <= gen;
    #1 `CHECK(werr == 0, "word count not at the sampling edge")
    @(posedge clk); #1 `CHECK(werr == 3, "word error count one clock after sampling")
    `CHECK(total == 0, "total not one clock after sampling")
    @(posedge clk); #1 `CHECK(total == 3, "total two clocks after sampling")
    // random run with gate toggling
    expect_total = 3;
    for (int n = 0; n < 3000; n++) begin
      logic [19:0] e;
      logic g;
      e = 20'($urandom) & 20'($urandom) & 20'($urandom);
      g = ($urandom % 4) != 0;
      gen  <= 20'($urandom);
      @(negedge clk);
      rec  <= gen ^ e;
      gate <= g;
      if (g) expect_total += $countones(e);
      @(posedge clk);
    end
    gate <= 0;
    repeat (4) @(posedge clk);
    #1 `CHECK(total == 64'(expect_total), $sformatf("random total %0d vs %0d", total, expect_total))
    // words outside the gate
    gen <= 0; rec <= '1; repeat (10) @(posedge clk);
    #1 `CHECK(total == 64'(expect_total), "no counting outside the gate")
    clear <= 1; @(posedge clk); clear <= 0; @(posedge clk);
    #1 `CHECK(total == 0, "clear")
    `TB_FINISH
  end
endmodule
