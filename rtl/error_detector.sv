// error_detector: receive-side checker, one 20-bit word per receive user
// clock (the transceiver's recovered clock, bit rate / 20).
//
// The received word is registered and compared with a local copy of the
// pattern generation hardware (PRBS patterns only). To synchronize, the
// local generators are loaded with two consecutive received words, which
// fills their whole history; from the next clock on they predict the
// received sequence, and the comparison is aligned with two extra registers
// on the received side (the local word lags the received register by one
// clock for the generator history and one for the pattern register). A synchronization runs when the detector is enabled
// and, with autosync on, whenever the sync error counter reports a syncloss.
//
// Counters: the error counter (pipelined, 64 bits) and the bit counter
// (64 bits, +20 per word) count while gating; a rising start_gating zeroes
// them and the gating time counter. The sync error counter watches every
// window of 12500 words for the error and syncloss indicators.
//
// Clock crossings: start_gating (100 MHz domain) and the 1 Hz wave pass two
// flip-flops; the 1 Hz rising edge is the one-second tick. The counters are
// read by the other domains without a handshake (as in the original
// design); a reader may see a value torn between two words.
module error_detector
  import bert_pkg::*;
#(
  parameter int unsigned WINDOW_WORDS = 12500
) (
  input  logic        clk,           // receive user clock
  input  logic        rst_n,
  input  logic        enable,
  input  logic [3:0]  prbs_sel,
  input  logic        autosync_en,
  input  logic [1:0]  sync_thresh,
  input  logic        start_gating,  // asynchronous level
  input  logic        clk_1hz,       // asynchronous 1 Hz wave
  input  logic [19:0] rx_word,
  output logic        gating,
  output logic [63:0] errors,
  output logic [63:0] bits,
  output bcd_time_t   gated_time,
  output logic        syncloss,
  output logic        syncloss_ind,
  output logic        error_ind,
  output logic        sync_load       // local generators being loaded
);
  logic [19:0] rx_q, rx_d, rx_dd, local_word;
  logic [1:0]  sg_sync, hz_sync;
  logic        sg_prev, hz_prev, tick, clear;
  logic        en_prev;
  logic [2:0]  load_cnt;
  logic        resync;
  logic [4:0]  word_errors;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_q    <= '0;
      rx_d    <= '0;
      rx_dd   <= '0;
      sg_sync <= '0;
      hz_sync <= '0;
      sg_prev <= 1'b0;
      hz_prev <= 1'b0;
      en_prev <= 1'b0;
    end else begin
      rx_q    <= rx_word;
      rx_d    <= rx_q;
      rx_dd   <= rx_d;
      sg_sync <= {sg_sync[0], start_gating};
      hz_sync <= {hz_sync[0], clk_1hz};
      sg_prev <= sg_sync[1];
      hz_prev <= hz_sync[1];
      en_prev <= enable;
    end
  end

  assign gating = sg_sync[1] & enable;
  assign clear  = sg_sync[1] & ~sg_prev;
  assign tick   = hz_sync[1] & ~hz_prev;

  // Synchronization: two load cycles, then four more cycles in which the
  // sync window is held (the comparison pipeline still holds old words).
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) load_cnt <= '0;
    else if (!enable) load_cnt <= '0;
    else if ((enable && !en_prev) || (syncloss && autosync_en)) load_cnt <= 3'd6;
    else if (load_cnt != 0) load_cnt <= load_cnt - 1'b1;
  end
  assign sync_load = (load_cnt >= 3'd5);
  assign resync    = (load_cnt != 0);

  pattern_hw #(.PRBS_ONLY(1'b1)) u_local (
    .clk(clk), .rst_n(rst_n), .pat_sel(prbs_sel), .seed(rx_q),
    .en(enable), .load(sync_load), .pattern_out(local_word));

  error_counter u_errcnt (
    .clk(clk), .rst_n(rst_n), .clear(clear), .gate(gating),
    .rec_data(rx_dd), .gen_data(local_word),
    .word_errors(word_errors), .numbit_err(errors));

  bit_counter u_bitcnt (
    .clk(clk), .rst_n(rst_n), .clear(clear), .gate(gating),
    .numbit_rec(bits));

  err_sync_counter #(.WINDOW_WORDS(WINDOW_WORDS)) u_sync (
    .clk(clk), .rst_n(rst_n), .enable(enable), .restart(resync),
    .word_errors(word_errors), .threshold(sync_thresh_value(sync_thresh)),
    .tick_1hz(tick), .syncloss(syncloss), .syncloss_ind(syncloss_ind),
    .error_ind(error_ind));

  time_counter u_time (
    .clk(clk), .rst_n(rst_n), .clear(clear), .gate(gating), .tick(tick),
    .gated_time(gated_time));
endmodule
