// tb_time_counter: counts ticks and compares the BCD time with a reference
// built from the number of seconds; checks the 59 s, 59 min and 23 h carries,
// that ticks outside the gate are ignored, and the clear.
`include "tb_check.svh"
module tb_time_counter;
  import bert_pkg::*;
  `TB_COUNTERS
  logic clk = 0, rst_n = 0, clear = 0, gate = 0, tick = 0;
  bcd_time_t t;
  always #4 clk = ~clk;
  time_counter dut (.clk, .rst_n, .clear, .gate, .tick, .gated_time(t));

  function automatic bcd_time_t to_bcd(longint s);
    bcd_time_t r;
    longint d, h, m, sec;
    sec = s % 60; m = (s / 60) % 60; h = (s / 3600) % 24; d = s / 86400;
    r.s0 = 4'(sec % 10); r.s1 = 4'(sec / 10);
    r.m0 = 4'(m % 10);   r.m1 = 4'(m / 10);
    r.h0 = 4'(h % 10);   r.h1 = 4'(h / 10);
    r.d0 = 4'(d % 10);   r.d1 = 4'((d / 10) % 10); r.d2 = 4'(d / 100);
    return r;
  endfunction

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    `TB_FINISH
  end

  initial begin
    longint secs;
    repeat (2) @(posedge clk);
    rst_n <= 1; gate <= 1;
    secs = 0;
    // run 1 day + 1 hour + 2 s, checking at selected points
    for (longint s = 1; s <= 90002; s++) begin
      tick <= 1; @(posedge clk);
      secs++;
      if (s == 59 || s == 60 || s == 3599 || s == 3600 || s == 86399 ||
          s == 86400 || s == 90002 || (s % 7919) == 0) begin
        tick <= 0; @(posedge clk); #1
        `CHECK(t == to_bcd(secs), $sformatf("time after %0d s: %h", secs, t))
      end
    end
    tick <= 0;
    gate <= 0;
    tick <= 1; repeat (5) @(posedge clk); tick <= 0; @(posedge clk); #1
    `CHECK(t == to_bcd(secs), "ticks outside the gate ignored")
    clear <= 1; @(posedge clk); clear <= 0; #1
    `CHECK(t == '0, "clear")
    `TB_FINISH
  end
endmodule
