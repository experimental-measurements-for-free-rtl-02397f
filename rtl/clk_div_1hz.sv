// clk_div_1hz: divides the 100 MHz board clock down to a 1 Hz square wave.
//
// A counter toggles clk_1hz every DIV/2 input cycles, so the period is DIV
// cycles (100000000 at 100 MHz = 1 s). The error detector re-times the wave
// into its own clock and uses its rising edge as the one-second tick of the
// gating time counter and of the error and syncloss indicators. Driving it
// from the fixed board clock (not from the bit-rate dependent user clock)
// is this design's choice.
module clk_div_1hz #(
  parameter int unsigned DIV = 100_000_000
) (
  input  logic clk,
  input  logic rst_n,
  output logic clk_1hz
);
  localparam int unsigned HALF = DIV / 2;
  logic [$clog2(HALF)-1:0] count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count   <= '0;
      clk_1hz <= 1'b0;
    end else if (count == $bits(count)'(HALF - 1)) begin
      count   <= '0;
      clk_1hz <= ~clk_1hz;
    end else begin
      count <= count + 1'b1;
    end
  end
endmodule
