// tb_error_detector: feeds the detector a PRBS stream made by a serial
// reference generator in the testbench (20 bits per clock, bit 19 first)
// with a 200-word sync window and a fast 1 Hz wave. Checks:
//  - synchronization on enable, then no errors over a clean gating period,
//    and a bit count of exactly 20 per gated word;
//  - injected bit errors counted exactly;
//  - a slip of the stream gives a syncloss and, with autosync on, a
//    resynchronization after which counting is clean again;
//  - the gating time counts the 1 Hz ticks; a new gating clears the counts;
//  - the error indicator after a window with few errors.
`include "tb_check.svh"
module tb_error_detector;
  import bert_pkg::*;
  `TB_COUNTERS
  logic clk = 0, rst_n = 0, en = 0, sg = 0, hz = 0, autosync = 1;
  logic [3:0] sel = PAT_PRBS23;
  logic [1:0] sthr = 2'd2;           // 25 errors per window
  logic [19:0] rx_word = 0;
  logic gating, syncloss, sl_ind, er_ind, sload;
  logic [63:0] errors, bits;
  bcd_time_t gtime;
  always #4 clk = ~clk;

  error_detector #(.WINDOW_WORDS(200)) dut (.clk, .rst_n, .enable(en),
    .prbs_sel(sel), .autosync_en(autosync), .sync_thresh(sthr),
    .start_gating(sg), .clk_1hz(hz), .rx_word, .gating, .errors, .bits,
    .gated_time(gtime), .syncloss, .syncloss_ind(sl_ind), .error_ind(er_ind),
    .sync_load(sload));

  // reference serial PRBS 2^23-1: s[k] = s[k-23] ^ s[k-18]
  logic [22:0] lfsr = 23'h5A5A5;   // lfsr[0] newest
  logic [19:0] inject = 0;
  bit slip = 0;
  int syncloss_count = 0;
  always @(posedge clk) if (syncloss) syncloss_count++;

  function automatic logic next_bit();
    logic b;
    b = lfsr[22] ^ lfsr[17];
    lfsr = {lfsr[21:0], b};
    return b;
  endfunction

  always @(negedge clk) begin
    logic [19:0] w;
    for (int b = 19; b >= 0; b--) w[b] = next_bit();
    if (slip) begin void'(next_bit()); slip = 0; end
    rx_word <= w ^ inject;
    inject = 0;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    `TB_FINISH
  end

  task automatic gate_words(input int n);
    sg <= 1; repeat (n) @(posedge clk); sg <= 0; repeat (8) @(posedge clk);
  endtask

  initial begin
    int injected;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    en <= 1;
    repeat (600) @(posedge clk);
    `CHECK(syncloss_count == 0, "synchronized on enable, no syncloss")
    // clean gating period
    sg <= 1; repeat (3) @(posedge clk);   // start_gating crosses two flops
    repeat (2000) @(posedge clk);
    sg <= 0; repeat (8) @(posedge clk); #1
    `CHECK(errors == 0, $sformatf("clean stream: %0d errors", errors))
    `CHECK(bits % 20 == 0 && bits >= 2000*20 && bits <= 2003*20,
           $sformatf("bit count %0d", bits))
    // injected errors during a new gating
    sg <= 1; repeat (10) @(posedge clk);
    #1 `CHECK(errors == 0 && bits < 200, "new gating clears the counters")
    sthr <= 2'd0;                    // 2500 errors per window
    injected = 0;
    for (int k = 0; k < 100; k++) begin
      @(negedge clk);
      inject = 20'(1) << ($urandom % 20);
      if (k % 10 == 0) inject |= 20'h00100;
      injected += $countones(inject);
      repeat (3) @(posedge clk);
    end
    repeat (20) @(posedge clk);
    sg <= 0; repeat (8) @(posedge clk); #1
    `CHECK(errors == 64'(injected), $sformatf("injected %0d counted %0d", injected, errors))
    `CHECK(syncloss_count == 0, "errors below threshold keep sync")
    repeat (400) @(posedge clk); #1
    `CHECK(er_ind && !sl_ind, "error indicator on after a window with errors")
    // slip -> syncloss -> autosync
    sthr <= 2'd2;
    repeat (400) @(posedge clk);
    slip = 1;
    repeat (800) @(posedge clk);
    `CHECK(syncloss_count >= 1, $sformatf("slip detected (%0d syncloss)", syncloss_count))
    `CHECK(sl_ind, "syncloss indicator on")
    sg <= 1; repeat (3) @(posedge clk);
    repeat (1000) @(posedge clk);
    sg <= 0; repeat (8) @(posedge clk); #1
    `CHECK(errors == 0, $sformatf("clean after resync: %0d errors", errors))
    // gating time: 3 ticks of a fast 1 Hz wave
    sg <= 1; repeat (5) @(posedge clk);
    for (int s = 0; s < 3; s++) begin
      hz <= 1; repeat (20) @(posedge clk); hz <= 0; repeat (20) @(posedge clk);
    end
    #1 `CHECK(gtime.s0 == 4'd3 && gtime.s1 == 0 && gtime.m0 == 0, "gating time 3 s")
    sg <= 0; repeat (8) @(posedge clk);
    `TB_FINISH
  end
endmodule
