// prog_freq: programs one external clock synthesizer over its serial port.
//
// A 32 x 11-bit ROM, addressed by the 5-bit bit-rate selection, holds the
// synthesizer word for each bit rate. When load is high and the block is not
// busy, the word is captured and 14 bits are shifted out on ser_output, most
// significant first: three leading zeros followed by the 11 ROM bits. Each
// bit is driven for one clk_694k period; prg_clk is the same clock inverted
// (180 degrees late, so the synthesizer samples mid-bit) and is gated to 0
// whenever no programming cycle is running. finish drops when a cycle starts
// and rises after the 14th shift; it stays high until the next load. It is
// also high after reset (no cycle pending), so a requester can wait for it
// to fall as the sign that its load was taken.
//
// The ROM, the 14 shift cycles, the finish flag and the gated, inverted
// programming clock follow the documented block. The synthesizer words
// themselves are not given: the default ROM_INIT below is a placeholder
// ({N[1:0] = 1, M[8:0] = 50 + 10*address}) and must be replaced by the words
// of the synthesizer on the board. The three leading zero bits are also this
// design's reading of "14 shift cycles" for an 11-bit word.
module prog_freq
  import bert_pkg::*;
#(
  parameter logic [32*11-1:0] ROM_INIT = prog_freq_default_rom()
) (
  input  logic       clk,          // 694 kHz
  input  logic       rst_n,
  input  logic [4:0] address,      // bit-rate selection
  input  logic       load,
  output logic       finish,
  output logic       prg_clk,
  output logic       ser_output
);
  localparam int unsigned NSHIFT = 14;

  logic [10:0]      rom [32];
  logic [NSHIFT-1:0] shreg;
  logic [3:0]       left;
  logic             busy;

  always_comb
    for (int k = 0; k < 32; k++) rom[k] = ROM_INIT[k*11 +: 11];

  assign busy = (left != 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg  <= '0;
      left   <= '0;
      finish <= 1'b1;
    end else if (!busy) begin
      if (load) begin
        shreg  <= {3'b000, rom[address]};
        left   <= 4'(NSHIFT);
        finish <= 1'b0;
      end
    end else begin
      shreg <= {shreg[NSHIFT-2:0], 1'b0};
      left  <= left - 1'b1;
      if (left == 4'd1) finish <= 1'b1;
    end
  end

  assign ser_output = busy & shreg[NSHIFT-1];
  assign prg_clk    = busy & ~clk;
endmodule
