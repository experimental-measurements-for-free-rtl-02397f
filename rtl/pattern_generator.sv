// pattern_generator: transmit-side test pattern source, one 20-bit word per
// transmit user clock (bit rate = 20 x clock).
//
// The pattern generation hardware produces the selected pattern; on enable
// it advances one word per clock, and load_seed copies the fixed SEED into
// its generators. The error insertion counter raises inserr once every N
// clocks while insert_errors is set, and the one-bit inverter then flips the
// most significant bit (bit 19, the first bit on the line) of that word.
// The pattern register adds one clock of latency after the generator state;
// the inverter is combinational. The seed value (all ones) is this design's
// choice: the block only needs a non-zero start.
module pattern_generator
  import bert_pkg::*;
#(
  parameter logic [19:0] SEED = 20'hFFFFF
) (
  input  logic        clk,           // transmit user clock
  input  logic        rst_n,
  input  logic [3:0]  prbs_sel,
  input  logic        enable,
  input  logic        load_seed,
  input  logic        insert_errors,
  input  logic [2:0]  err_ratio,
  output logic [19:0] pattern_out
);
  logic [19:0] pattern;
  logic        inserr;

  pattern_hw #(.PRBS_ONLY(1'b0)) u_hw (
    .clk(clk), .rst_n(rst_n), .pat_sel(prbs_sel), .seed(SEED),
    .en(enable), .load(load_seed), .pattern_out(pattern));

  err_insert u_ins (
    .clk(clk), .rst_n(rst_n), .en(insert_errors && enable), .sel(err_ratio),
    .inserr(inserr));

  // One bit inverter.
  assign pattern_out = pattern ^ {inserr, 19'b0};
endmodule
