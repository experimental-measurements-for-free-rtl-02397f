// tb_errdet_ctrl: runs the error detector start-up against a model of the
// frequency programmer and the DCM (as in tb_patgen_ctrl). Checks the
// order: programming, S_LOAD for HOLD clocks, DCM reset and lock, receiver
// enabled HOLD clocks before the detector; that start gating passes only in
// run; that a new bit rate reprograms and a lost lock re-locks; and that
// disabling stops the detector and the receiver.
`include "tb_check.svh"
module tb_errdet_ctrl;
  `TB_COUNTERS
  localparam int HOLD = 16;
  logic clk = 0, rst_n = 0, en = 0, locked = 0, finish = 1, sg_req = 0;
  logic [4:0] br = 5'd4, pbr;
  logic load, sload, rdcm, rxen, run, sg;
  always #5 clk = ~clk;
  errdet_ctrl #(.HOLD(HOLD)) dut (.clk, .rst_n, .enable(en), .bitrate(br),
    .start_gating_req(sg_req), .dcm_locked(locked), .finish_prog(finish),
    .load_freq(load), .s_load(sload), .rst_dcm(rdcm), .enable_receptor(rxen),
    .enable_errdet(run), .start_gating(sg), .prog_bitrate(pbr));

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

  int sload_len = 0, rx_only = 0;
  bit order_ok = 1;
  always @(posedge clk) begin
    if (sload) begin sload_len++; if (!rdcm) order_ok = 0; end
    if (rxen && !run) rx_only++;
    if (rxen && (rdcm || !locked)) order_ok = 0;
    if (run && !rxen) order_ok = 0;
    if (sg && !run) order_ok = 0;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    `TB_FINISH
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    sg_req <= 1;
    repeat (5) @(posedge clk);
    `CHECK(!run && !rxen && rdcm && !sg, "off: no gating, DCM in reset")
    en <= 1;
    while (!run) @(posedge clk);
    `CHECK(prog_count == 1 && pbr == 5'd4, "programmed once with the bit rate")
    `CHECK(sload_len == HOLD, "S_LOAD length")
    `CHECK(rx_only == HOLD, $sformatf("receiver settles %0d clocks", rx_only))
    `CHECK(order_ok, "start-up order")
    @(posedge clk); #1 `CHECK(sg, "start gating passed in run")
    sg_req <= 0; @(posedge clk); #1 `CHECK(!sg, "gating request withdrawn")
    sload_len = 0; rx_only = 0;
    br <= 5'd17; @(posedge clk); @(posedge clk);
    `CHECK(!run, "bit rate change leaves run")
    while (!run) @(posedge clk);
    `CHECK(prog_count == 2 && pbr == 5'd17 && sload_len == HOLD && order_ok,
           "reprogrammed with the new bit rate")
    force_unlock = 1; @(posedge clk); force_unlock = 0;
    @(posedge clk); @(posedge clk);
    `CHECK(!run && !rxen && rdcm, "lost lock: DCM reset")
    while (!run) @(posedge clk);
    `CHECK(prog_count == 2, "no reprogramming after lost lock")
    en <= 0; @(posedge clk); @(posedge clk);
    `CHECK(!run && !rxen && rdcm, "disable stops")
    `TB_FINISH
  end
endmodule
