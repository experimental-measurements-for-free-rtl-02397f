// error_counter: counts bit errors between the received and local words.
//
// Pipeline, one word per receive user clock:
//   stage 1: 20-bit comparison (xor) of rec_data and gen_data, registered;
//   stage 2: the bit-to-bit adder counts the differing bits, registered as
//            a 5-bit word error count (word_errors, also used by the sync
//            error counter);
//   stage 3: the count is added to the 64-bit total numbit_err.
// The two pipeline registers only split the combinational path. The gate
// travels down the pipeline with the data, so a word is added to the total
// exactly when it was compared while gate was high; the bit counter delays
// its gate by the same two clocks, keeping both counts aligned. clear
// (synchronous) zeroes the total before a gating period.
module error_counter (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        gate,
  input  logic [19:0] rec_data,
  input  logic [19:0] gen_data,
  output logic [4:0]  word_errors,
  output logic [63:0] numbit_err
);
  logic [19:0] diff_q;
  logic        gate1, gate2;
  logic [4:0]  ones;

  bit_to_bit_adder u_add (.bits(diff_q), .ones(ones));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      diff_q      <= '0;
      word_errors <= '0;
      gate1       <= 1'b0;
      gate2       <= 1'b0;
      numbit_err  <= '0;
    end else begin
      diff_q      <= rec_data ^ gen_data;
      gate1       <= gate;
      word_errors <= ones;
      gate2       <= gate1;
      if (clear)      numbit_err <= '0;
      else if (gate2) numbit_err <= numbit_err + 64'(word_errors);
    end
  end
endmodule
