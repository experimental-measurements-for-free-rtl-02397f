// clk_gen_div: divides the 100 MHz board clock to a lower square-wave clock
// and produces a reset that is released once that clock runs.
//
// A counter runs from 0 to VALUE; when it equals VALUE it restarts and the
// output flip-flop toggles, so f_out = f_in / (2 * (VALUE + 1)). A second
// flip-flop, cleared by reset, drives rst_out (active low). It is set at the
// first falling edge of the divided clock, 2 * (VALUE + 1) input clocks after
// reset: logic on the divided clock thus sees reset asserted at its first
// rising edge and released half a period before its second, so reset
// release never coincides with a clock edge. rst_in is active low and
// asynchronous.
// The counter/comparator/two flip-flop structure follows the documented
// circuit; VALUE is this design's choice for each frequency.
module clk_gen_div #(
  parameter int unsigned VALUE = 433
) (
  input  logic clk_in,
  input  logic rst_in,
  output logic clk_out,
  output logic rst_out
);
  localparam int unsigned CW = $clog2(VALUE + 1) < 1 ? 1 : $clog2(VALUE + 1);
  logic [CW-1:0] count;
  logic          match;

  assign match = (count == CW'(VALUE));

  always_ff @(posedge clk_in or negedge rst_in) begin
    if (!rst_in) begin
      count   <= '0;
      clk_out <= 1'b0;
      rst_out <= 1'b0;
    end else if (match) begin
      count   <= '0;
      clk_out <= ~clk_out;
      if (clk_out) rst_out <= 1'b1;
    end else begin
      count   <= count + 1'b1;
    end
  end
endmodule
