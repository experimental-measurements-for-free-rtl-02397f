// err_sync_counter: error counter used for synchronization and indicators.
//
// While enabled, it sums the per-word error counts over windows of
// WINDOW_WORDS words (12500 words = 250000 bits, the first whole number of
// 20-bit words not below the 249994 bits of the original window). At the end
// of each window:
//   errors > threshold : syncloss pulses for one clock, and both the syncloss
//                        and the error indicator are switched on;
//   0 < errors <= threshold : only the error indicator is switched on.
// An indicator, once switched on, stays on until the second 1 Hz tick after
// that (one to two seconds; the document asks for one second). restart
// (from a resynchronization) starts a new window. When disabled the block
// is held in reset.
module err_sync_counter #(
  parameter int unsigned WINDOW_WORDS = 12500
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  logic        restart,
  input  logic [4:0]  word_errors,
  input  logic [17:0] threshold,
  input  logic        tick_1hz,      // one-clock pulse per second
  output logic        syncloss,
  output logic        syncloss_ind,
  output logic        error_ind
);
  localparam int unsigned WW = $clog2(WINDOW_WORDS + 1);
  logic [WW-1:0] words;
  logic [18:0]   sum;       // at most 20 * WINDOW_WORDS, saturating
  logic [18:0]   sum_next;
  logic [1:0]    sl_timer, er_timer;
  logic          window_end;

  assign window_end = (words == WW'(WINDOW_WORDS - 1));
  assign sum_next   = (sum > 19'h7FFFF - 19'd20) ? 19'h7FFFF : sum + 19'(word_errors);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      words    <= '0;
      sum      <= '0;
      syncloss <= 1'b0;
      sl_timer <= '0;
      er_timer <= '0;
    end else if (!enable) begin
      words    <= '0;
      sum      <= '0;
      syncloss <= 1'b0;
      sl_timer <= '0;
      er_timer <= '0;
    end else begin
      syncloss <= 1'b0;
      if (tick_1hz) begin
        if (sl_timer != 0) sl_timer <= sl_timer - 1'b1;
        if (er_timer != 0) er_timer <= er_timer - 1'b1;
      end
      if (restart) begin
        words <= '0;
        sum   <= '0;
      end else if (window_end) begin
        words <= '0;
        sum   <= '0;
        if (sum_next > 19'(threshold)) begin
          syncloss <= 1'b1;
          sl_timer <= 2'd2;
          er_timer <= 2'd2;
        end else if (sum_next != 0) begin
          er_timer <= 2'd2;
        end
      end else begin
        words <= words + 1'b1;
        sum   <= sum_next;
      end
    end
  end

  assign syncloss_ind = (sl_timer != 0);
  assign error_ind    = (er_timer != 0);
endmodule
