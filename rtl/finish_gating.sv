// finish_gating: decides when a gating period is over.
//
// Two modes, chosen by gating_type: 1 compares the error count with the stop
// value picked by the 2-bit error threshold (10, 100, 1000 or 10000 errors);
// 0 compares the elapsed gating time with the programmed gating time. Both
// times are nine BCD digits, days first, so comparing them as one 36-bit
// number orders them correctly. stop is asserted (registered, one clock
// later) while gating is running and the measured value is greater than or
// equal to the stop value. A programmed time of zero is treated as "no
// limit" (this design's choice) so that a time gating with no time set runs
// until the PC stops it.
module finish_gating
  import bert_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        gating,        // a gating period is running
  input  logic        gating_type,
  input  logic [1:0]  err_thresh,
  input  bcd_time_t   stop_time,
  input  logic [63:0] errors,
  input  bcd_time_t   gated_time,
  output logic        stop
);
  logic hit;

  always_comb begin
    if (gating_type) hit = (errors >= err_stop_value(err_thresh));
    else             hit = (stop_time != '0) && (gated_time >= stop_time);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) stop <= 1'b0;
    else        stop <= gating && hit;
  end
endmodule
