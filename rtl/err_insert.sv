// err_insert: error insertion counter of the pattern generator.
//
// While en is high, a counter runs over N user-clock cycles and inserr is
// high for one of every N cycles (the last of each period). N is chosen by
// sel: 500000000, 50000000, 5000000, 500000, 50000, 5000 or 500 for sel = 0
// to 6 (sel = 7 also gives 500, this design's choice). With one inverted
// bit per 20-bit word these give error ratios of 1e-10 to 1e-4. Clearing en
// clears the counter, so the first error comes N cycles after en rises.
module err_insert
  import bert_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic [2:0] sel,
  output logic       inserr
);
  logic [28:0] count;
  logic [28:0] period;

  assign period = err_ins_period(sel);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count  <= '0;
      inserr <= 1'b0;
    end else if (!en) begin
      count  <= '0;
      inserr <= 1'b0;
    end else if (count >= period - 1'b1) begin
      count  <= '0;
      inserr <= 1'b1;
    end else begin
      count  <= count + 1'b1;
      inserr <= 1'b0;
    end
  end
endmodule
