// tb_err_sync_counter: with a 100-word window, drives per-word error counts
// and checks: a window with errors above the threshold pulses syncloss once
// at the window end and lights both indicators; a window with errors at or
// below the threshold lights only the error indicator; a clean window lights
// neither; indicators go out on the second 1 Hz tick; restart and disable
// clear the window.
`include "tb_check.svh"
module tb_err_sync_counter;
  `TB_COUNTERS
  localparam int W = 100;
  logic clk = 0, rst_n = 0, en = 0, restart = 0, tick = 0;
  logic [4:0] werr = 0;
  logic [17:0] thr = 18'd25;
  logic sl, sl_ind, er_ind;
  int sl_pulses = 0;
  always #4 clk = ~clk;
  always @(posedge clk) if (sl) sl_pulses++;
  err_sync_counter #(.WINDOW_WORDS(W)) dut (.clk, .rst_n, .enable(en),
    .restart, .word_errors(werr), .threshold(thr), .tick_1hz(tick),
    .syncloss(sl), .syncloss_ind(sl_ind), .error_ind(er_ind));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    `TB_FINISH
  end

  task automatic window(input int total);
    // spread `total` errors over W words
    for (int w = 0; w < W; w++) begin
      werr <= (total > 0) ? 5'((total > 20) ? 20 : total) : 5'd0;
      if (total > 0) total -= (total > 20) ? 20 : total;
      @(posedge clk);
    end
    werr <= 0;
  endtask

  task automatic one_tick();
    tick <= 1; @(posedge clk); tick <= 0; @(posedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1; en <= 1;
    @(posedge clk);
    window(0); #1
    `CHECK(!sl_ind && !er_ind && sl_pulses == 0, "clean window: no indicator")
    @(posedge clk);
    window(26); @(posedge clk); #1
    `CHECK(sl_pulses == 1, "26 > 25 errors: one syncloss pulse")
    `CHECK(sl_ind && er_ind, "both indicators on")
    one_tick(); #1 `CHECK(sl_ind && er_ind, "still on after first tick")
    one_tick(); #1 `CHECK(!sl_ind && !er_ind, "off after second tick")
    // window now realigned: restart then errors at threshold
    restart <= 1; @(posedge clk); restart <= 0;
    window(25); @(posedge clk); #1
    `CHECK(sl_pulses == 1, "25 errors: no syncloss")
    `CHECK(!sl_ind && er_ind, "error indicator only")
    one_tick(); one_tick();
    // restart discards errors counted so far
    restart <= 1; @(posedge clk); restart <= 0;
    werr <= 20; repeat (5) @(posedge clk); werr <= 0;
    restart <= 1; @(posedge clk); restart <= 0;
    window(0); @(posedge clk); #1
    `CHECK(!er_ind && sl_pulses == 1, "restart discards earlier errors")
    // disable clears
    werr <= 20; repeat (50) @(posedge clk);
    en <= 0; werr <= 0; @(posedge clk); en <= 1;
    window(0); @(posedge clk); #1
    `CHECK(!er_ind && sl_pulses == 1, "disable clears the window")
    `TB_FINISH
  end
endmodule
