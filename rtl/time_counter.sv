// time_counter: gating time counter in days, hours, minutes and seconds.
//
// Counts one-clock tick pulses (one per second) while gate is high, as nine
// BCD digits in the format of the programmed gating time: seconds 00-59,
// minutes 00-59, hours 00-23, days 000-999 (it stops at 999:23:59:59).
// Keeping the same format as the programmed stop time lets the finish-gating
// comparator compare the two directly. clear (synchronous) zeroes it before
// a gating period.
module time_counter
  import bert_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      clear,
  input  logic      gate,
  input  logic      tick,
  output bcd_time_t gated_time
);
  bcd_time_t t, n;

  always_comb begin
    n = t;
    if (t != {4'd9, 4'd9, 4'd9, 4'd2, 4'd3, 4'd5, 4'd9, 4'd5, 4'd9}) begin
      n.s0 = t.s0 + 1'b1;
      if (t.s0 == 4'd9) begin
        n.s0 = 0; n.s1 = t.s1 + 1'b1;
        if (t.s1 == 4'd5) begin
          n.s1 = 0; n.m0 = t.m0 + 1'b1;
          if (t.m0 == 4'd9) begin
            n.m0 = 0; n.m1 = t.m1 + 1'b1;
            if (t.m1 == 4'd5) begin
              n.m1 = 0; n.h0 = t.h0 + 1'b1;
              if (t.h1 == 4'd2 && t.h0 == 4'd3) begin
                n.h0 = 0; n.h1 = 0; n.d0 = t.d0 + 1'b1;
                if (t.d0 == 4'd9) begin
                  n.d0 = 0; n.d1 = t.d1 + 1'b1;
                  if (t.d1 == 4'd9) begin
                    n.d1 = 0; n.d2 = t.d2 + 1'b1;
                  end
                end
              end else if (t.h0 == 4'd9) begin
                n.h0 = 0; n.h1 = t.h1 + 1'b1;
              end
            end
          end
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            t <= '0;
    else if (clear)        t <= '0;
    else if (gate && tick) t <= n;
  end

  assign gated_time = t;
endmodule
