// bit_counter: counts the bits received during a gating period.
//
// Adds 20 (one word) to a 64-bit register on every receive user clock whose
// gate, delayed by two flip-flops, is high. The two-clock delay matches the
// two pipeline registers of the error counter, so both totals cover the same
// words. clear (synchronous) zeroes the count. 2^64 - 1 bits last about
// 187 years at 3.125 Gb/s.
module bit_counter (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        gate,
  output logic [63:0] numbit_rec
);
  logic gate1, gate2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gate1      <= 1'b0;
      gate2      <= 1'b0;
      numbit_rec <= '0;
    end else begin
      gate1 <= gate;
      gate2 <= gate1;
      if (clear)      numbit_rec <= '0;
      else if (gate2) numbit_rec <= numbit_rec + 64'd20;
    end
  end
endmodule
