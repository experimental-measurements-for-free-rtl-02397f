// tb_pattern_hw: checks the 20-bit pattern generation hardware.
// For every PRBS the output stream (bit 19 first) is checked against the
// recurrence s[k] = s[k-N] xor s[k-T] of its polynomial, the 2^7-1 stream
// for its period of 127 words, and the four fixed patterns for their
// constant words. Also checks the one-clock register latency and that a
// disabled generator holds its word.
`include "tb_check.svh"
module tb_pattern_hw;
  import bert_pkg::*;
  `TB_COUNTERS
  logic clk = 0, rst_n = 0, en = 0, load = 0;
  logic [3:0] sel;
  logic [19:0] seed, pout;
  always #4 clk = ~clk;

  pattern_hw #(.PRBS_ONLY(1'b0)) dut (.clk, .rst_n, .pat_sel(sel), .seed,
    .en, .load, .pattern_out(pout));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    `TB_FINISH
  end

  int unsigned NN [9] = '{7, 9, 10, 11, 15, 20, 23, 29, 31};
  int unsigned TT [9] = '{6, 5, 7, 9, 14, 3, 18, 27, 28};
  bit stream [$];
  logic [19:0] words [$];

  initial begin
    sel = PAT_PRBS7; seed = 20'h12345;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int p = 0; p < 9; p++) begin
      int bad;
      sel  <= 4'(4 + p);
      seed <= 20'h9A5C3 ^ 20'(p * 77);
      load <= 1; en <= 0;
      @(posedge clk); @(posedge clk);
      load <= 0; en <= 1;
      @(posedge clk);
      stream.delete(); words.delete();
      for (int w = 0; w < 300; w++) begin
        @(posedge clk); #1;
        words.push_back(pout);
        for (int b = 19; b >= 0; b--) stream.push_back(pout[b]);
      end
      bad = 0;
      for (int k = 40; k < stream.size(); k++)
        if (stream[k] != (stream[k-NN[p]] ^ stream[k-TT[p]])) bad++;
      `CHECK(bad == 0, $sformatf("PRBS 2^%0d-1 recurrence, %0d bad bits", NN[p], bad))
      `CHECK(words[5] != 0, "PRBS word not zero")
      if (p == 0) begin
        bad = 0;
        for (int w = 2; w < 150; w++) if (words[w] != words[w+127]) bad++;
        `CHECK(bad == 0, "PRBS 2^7-1 period of 127 words")
        bad = 0;
        for (int w = 2; w < 100; w++) if (words[w] == words[w+1]) bad++;
        `CHECK(bad < 3, "PRBS 2^7-1 words change")
      end
    end
    // fixed patterns
    en <= 1;
    sel <= PAT_ZEROS;   @(posedge clk); @(posedge clk); #1 `CHECK(pout == 20'h00000, "zeros")
    sel <= PAT_CLKDIV2; #1 `CHECK(pout == 20'h00000, "registered output")
    @(posedge clk); #1 `CHECK(pout == 20'hAAAAA, "clock/2")
    sel <= PAT_5ONES;   @(posedge clk); @(posedge clk); #1 `CHECK(pout == 20'hF83E0, "5 ones 5 zeros")
    sel <= PAT_10ONES;  @(posedge clk); @(posedge clk); #1 `CHECK(pout == 20'hFFC00, "10 ones 10 zeros")
    sel <= 4'd14;       @(posedge clk); @(posedge clk); #1 `CHECK(pout == 20'h0, "unused code gives zeros")
    // hold when disabled
    sel <= PAT_PRBS15; @(posedge clk); @(posedge clk); @(posedge clk);
    en <= 0; @(posedge clk); #1;
    begin
      logic [19:0] held;
      held = pout;
      repeat (5) @(posedge clk);
      #1 `CHECK(pout == held, "disabled output holds")
    end
    `TB_FINISH
  end
endmodule
