// tb_pattern_generator: loads the seed, runs PRBS 2^15-1 and 2^31-1 with
// error insertion every 500 clocks, and compares every output word with a
// reference stream extended from the first word by the polynomial
// recurrence. Checks that words differ from the reference only in bit 19
// (the first bit on the line), exactly once every 500 words, and that with
// insertion off the stream is error-free; also checks a fixed pattern.
`include "tb_check.svh"
module tb_pattern_generator;
  import bert_pkg::*;
  `TB_COUNTERS
  logic clk = 0, rst_n = 0, en = 0, load = 0, ins = 0;
  logic [3:0] sel = PAT_PRBS15;
  logic [2:0] ratio = 3'd6;
  logic [19:0] pout;
  always #4 clk = ~clk;
  pattern_generator dut (.clk, .rst_n, .prbs_sel(sel), .enable(en),
    .load_seed(load), .insert_errors(ins), .err_ratio(ratio), .pattern_out(pout));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    `TB_FINISH
  end

  task automatic run(input int n, input int t, input bit with_err);
    bit s [$];
    int diffs, bad_bits, bad_gap, last;
    logic [19:0] w, r;
    en <= 0; ins <= 0; load <= 1;
    @(posedge clk); @(posedge clk);
    load <= 0; en <= 1; ins <= with_err;
    @(posedge clk); @(posedge clk); #1;
    diffs = 0; bad_bits = 0; bad_gap = 0; last = -1;
    for (int k = 0; k < 2600; k++) begin
      w = pout;
      if (k < 2) begin
        for (int b = 19; b >= 0; b--) s.push_back(w[b]);
      end else begin
        for (int b = 19; b >= 0; b--) begin
          int i = s.size();
          s.push_back(s[i-n] ^ s[i-t]);
          r[b] = s[i];
        end
        if (w != r) begin
          diffs++;
          if ((w ^ r) != 20'h80000) bad_bits++;
          if (last >= 0 && k - last != 500) bad_gap++;
          last = k;
        end
      end
      @(posedge clk); #1;
    end
    if (with_err) begin
      `CHECK(diffs == 5, $sformatf("PRBS %0d: %0d corrupted words in 2600", n, diffs))
      `CHECK(bad_bits == 0, "only bit 19 inverted")
      `CHECK(bad_gap == 0, "one error every 500 words")
    end else begin
      `CHECK(diffs == 0, $sformatf("PRBS %0d error free", n))
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    sel <= PAT_PRBS15; run(15, 14, 1);
    sel <= PAT_PRBS31; run(31, 28, 1);
    sel <= PAT_PRBS7;  run(7, 6, 0);
    sel <= PAT_10ONES; ins <= 0; repeat (3) @(posedge clk); #1
    `CHECK(pout == 20'hFFC00, "fixed pattern passes")
    `TB_FINISH
  end
endmodule
