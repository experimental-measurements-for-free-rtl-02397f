// pattern_hw: pattern generation hardware, 20 bits per user clock.
//
// Nine parallel PRBS generators (2^7-1 ... 2^31-1, polynomials in bert_pkg)
// and four fixed patterns feed a 16-to-1, 20-bit multiplexer addressed by
// pat_sel (codes in bert_pkg::pat_sel_e; codes 13 to 15 give zeros). A
// decoder enables only the selected PRBS generator. `load` copies `seed`
// into every generator's history, bypassing the feedback. The multiplexer
// output is registered (enabled by en) only to shorten the logic path, so
// the selected pattern appears one clock after the generator state.
// With PRBS_ONLY = 1 (the error detector's copy) the fixed patterns are
// left out of the multiplexer and read as zeros.
// Fixed patterns as 20-bit words (bit 19 first): clock/2 = 1010...,
// five ones/five zeros, ten ones/ten zeros.
module pattern_hw
  import bert_pkg::*;
#(
  parameter bit PRBS_ONLY = 1'b0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [3:0]  pat_sel,
  input  logic [19:0] seed,
  input  logic        en,
  input  logic        load,
  output logic [19:0] pattern_out
);
  logic [19:0] prbs_word [NUM_PRBS];
  logic [19:0] mux_out;

  for (genvar g = 0; g < NUM_PRBS; g++) begin : g_prbs
    prbs_par #(.N(PRBS_N[g]), .T(PRBS_T[g])) u_prbs (
      .clk(clk), .rst_n(rst_n),
      .en(en && (pat_sel == 4'(int'(PAT_PRBS7) + g))),
      .load(load), .seed(seed), .word(prbs_word[g]));
  end

  always_comb begin
    mux_out = '0;
    if (pat_sel >= PAT_PRBS7 && pat_sel <= PAT_PRBS31)
      mux_out = prbs_word[pat_sel - PAT_PRBS7];
    else if (!PRBS_ONLY) begin
      unique case (pat_sel)
        PAT_CLKDIV2: mux_out = 20'hAAAAA;
        PAT_5ONES:   mux_out = 20'b11111000001111100000;
        PAT_10ONES:  mux_out = 20'b11111111110000000000;
        default:     mux_out = '0;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  pattern_out <= '0;
    else if (en) pattern_out <= mux_out;
  end
endmodule
