// tb_patgen_ctrl: runs the pattern generator start-up against a model of
// the frequency programmer (finish drops one clock after load, rises 20
// clocks later) and of the DCM (locked 30 clocks after its reset is
// released). Checks the order: load request, S_LOAD for HOLD clocks, DCM
// reset, lock, seed load for HOLD clocks, run; that the DCM is in reset
// until S_LOAD has ended; that a new bit rate reprograms; that a lost lock
// restarts at the DCM reset; and that disabling stops at once.
`include "tb_check.svh"
module tb_patgen_ctrl;
  `TB_COUNTERS
  localparam int HOLD = 16;
  logic clk = 0, rst_n = 0, en = 0, locked = 0, finish = 1;
  logic [4:0] br = 5'd3, pbr;
  logic load, sload, rdcm, seed, run;
  always #5 clk = ~clk;
  patgen_ctrl #(.HOLD(HOLD)) dut (.clk, .rst_n, .enable(en), .bitrate(br),
    .dcm_locked(locked), .finish_prog(finish), .load_freq(load), .s_load(sload),
    .rst_dcm(rdcm), .load_seed(seed), .pg_enable(run), .prog_bitrate(pbr));

  // programmer and DCM models
  int prog_count = 0, lock_cnt = 0, prog_cnt = 0;
  bit force_unlock = 0;
  always @(posedge clk) begin
    if (load && finish) begin finish <= 0; prog_cnt <= 20; prog_count++; end
    else if (!finish) begin
      if (prog_cnt == 0) finish <= 1; else prog_cnt <= prog_cnt - 1;
    end
    if (rdcm || force_unlock) begin locked <= 0; lock_cnt <= 30; end
    else if (lock_cnt != 0) lock_cnt <= lock_cnt - 1;
    else locked <= 1;
  end

  // counters of each phase
  int sload_len = 0, seed_len = 0, sload_seen = 0;
  bit order_ok = 1;
  always @(posedge clk) begin
    if (sload) begin sload_len++; sload_seen = 1; if (!rdcm) order_ok = 0; end
    if (seed) seed_len++;
    if (seed && !locked) order_ok = 0;
    if (run && (rdcm || !locked)) order_ok = 0;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    `TB_FINISH
  end

  initial begin
    int t;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    repeat (5) @(posedge clk);
    `CHECK(!run && rdcm && !load, "off: DCM held in reset")
    en <= 1;
    t = 0;
    while (!run) begin @(posedge clk); t++; end
    `CHECK(prog_count == 1, "synthesizer programmed once")
    `CHECK(pbr == 5'd3, "programmed bit rate")
    `CHECK(sload_len == HOLD, $sformatf("S_LOAD for %0d clocks", sload_len))
    `CHECK(seed_len == HOLD, $sformatf("seed load for %0d clocks", seed_len))
    `CHECK(order_ok, "start-up order")
    repeat (50) @(posedge clk);
    `CHECK(run && !seed && !load && !sload, "stays running")
    // new bit rate
    sload_len = 0; seed_len = 0;
    br <= 5'd9;
    @(posedge clk); @(posedge clk);
    `CHECK(!run, "bit rate change leaves run")
    while (!run) @(posedge clk);
    `CHECK(prog_count == 2 && pbr == 5'd9, "reprogrammed with the new bit rate")
    `CHECK(sload_len == HOLD && seed_len == HOLD && order_ok, "second start-up")
    // lost lock
    force_unlock = 1; @(posedge clk); force_unlock = 0;
    @(posedge clk); @(posedge clk);
    `CHECK(!run && rdcm, "lost lock: back to DCM reset")
    while (!run) @(posedge clk);
    `CHECK(prog_count == 2, "no reprogramming after lost lock")
    en <= 0; @(posedge clk); @(posedge clk);
    `CHECK(!run && rdcm, "disable stops")
    `TB_FINISH
  end
endmodule
