// prbs_par: one PRBS generator producing 20 sequence bits per clock.
//
// The serial generator for x^N + x^T + 1 produces s[k] = s[k-N] xor s[k-T]
// (a shift register with the outputs of stages T and N fed back to stage 1).
// Here the feedback is unrolled 20 times so one clock yields the next 20
// bits. The state is a 40-bit history {previous word, current word}; the
// previous word is the extra register needed when N exceeds 20 (PRBS 2^23-1,
// 2^29-1, 2^31-1). Word bit 19 is the earliest bit in time.
//   en   : advance by one word per clock.
//   load : shift `seed` into the history instead of the next word, bypassing
//          the feedback; two consecutive loads fill the whole history, which
//          is how the error detector copies the received sequence.
// Reset fills the history with ones so the generator never sits in the
// all-zero lock-up state. The output word is the current history word.
module prbs_par #(
  parameter int unsigned N = 7,
  parameter int unsigned T = 6
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic        load,
  input  logic [19:0] seed,
  output logic [19:0] word
);
  logic [39:0] hist;
  logic [19:0] next;

  always_comb begin
    logic [59:0] ext;
    ext = {hist, 20'b0};
    for (int j = 0; j < 20; j++)
      ext[19-j] = ext[19-j+N] ^ ext[19-j+T];
    next = ext[19:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    hist <= '1;
    else if (load) hist <= {hist[19:0], seed};
    else if (en)   hist <= {hist[19:0], next};
  end

  assign word = hist[19:0];
endmodule
