// tb_finish_gating: checks the stop request in both modes: error-count mode
// for each threshold (stop at >= 10/100/1000/10000), time mode with a BCD
// stop time (including a carry across the minutes digit), zero stop time
// meaning no limit, and no stop while gating is off.
`include "tb_check.svh"
module tb_finish_gating;
  import bert_pkg::*;
  `TB_COUNTERS
  logic clk = 0, rst_n = 0, gating = 0, gtype = 1, stop;
  logic [1:0] thr = 0;
  bcd_time_t stop_time = '0, gated = '0;
  logic [63:0] errors = 0;
  always #5 clk = ~clk;
  finish_gating dut (.clk, .rst_n, .gating, .gating_type(gtype),
    .err_thresh(thr), .stop_time, .errors, .gated_time(gated), .stop);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    `TB_FINISH
  end

  task automatic expect_stop(input logic want, input string msg);
    @(posedge clk); @(posedge clk); #1
    `CHECK(stop == want, msg)
  endtask

  initial begin
    automatic longint lim [4] = '{10, 100, 1000, 10000};
    repeat (2) @(posedge clk);
    rst_n <= 1;
    gating <= 1; gtype <= 1;
    for (int k = 0; k < 4; k++) begin
      thr <= 2'(k);
      errors <= 64'(lim[k] - 1); expect_stop(0, $sformatf("below %0d", lim[k]));
      errors <= 64'(lim[k]);     expect_stop(1, $sformatf("at %0d", lim[k]));
      errors <= 64'(lim[k] + 7); expect_stop(1, $sformatf("above %0d", lim[k]));
    end
    gating <= 0; expect_stop(0, "no stop while not gating");
    // time mode: stop at 0 days 01:10:00
    gating <= 1; gtype <= 0; errors <= 64'd99999;
    stop_time <= '{d2:0, d1:0, d0:0, h1:0, h0:1, m1:1, m0:0, s1:0, s0:0};
    gated <= '{d2:0, d1:0, d0:0, h1:0, h0:1, m1:0, m0:9, s1:5, s0:9};
    expect_stop(0, "time 01:09:59 below 01:10:00");
    gated <= '{d2:0, d1:0, d0:0, h1:0, h0:1, m1:1, m0:0, s1:0, s0:0};
    expect_stop(1, "time 01:10:00 reached");
    gated <= '{d2:0, d1:0, d0:1, h1:0, h0:0, m1:0, m0:0, s1:0, s0:0};
    expect_stop(1, "one day is beyond");
    stop_time <= '0;
    expect_stop(0, "zero stop time means no limit");
    `TB_FINISH
  end
endmodule
