// bert_top: compact bit error rate tester for a 0.7 to 2.5 Gb/s serial link.
//
// One transmit channel sends a test pattern (PRBS 2^7-1 ... 2^31-1 or a
// fixed pattern) as 20-bit words to a multi-gigabit transceiver; one
// independent receive channel compares the recovered words with a local,
// self-synchronizing copy of the PRBS and counts bits and bit errors. A PC
// sets every parameter over RS-232 (address byte, value byte) and receives
// an 18-byte result package every 3 ms while the error detector is enabled.
//
// Blocks: serial communication (clocks, UART, result packages), control
// logic (register bank, finish gating, two start-up sequencers), two
// frequency programmers (serial words for the external clock synthesizers
// of the transmit and receive reference clocks), the pattern generator and
// the error detector, plus the 1 Hz divider for gating time and indicators.
//
// Outside this RTL, reached through ports: the two DCMs (their output clocks
// come in as tx_usrclk/rx_usrclk with their lock flags; their resets go
// out), the transceivers (20-bit pattern words mapped onto TXDATA and the
// TXCHARDISP pins, received words taken from RXDATA, RXCHARISK and
// RXRUNDISP, with the 8B/10B coder bypassed; polarity inversion is the
// transceivers' own feature), and the clock synthesizers (serial data,
// clock and S_LOAD).
//
// Clock domains: clk_100M (control sequencers, dividers), clk_694k and
// clk_115p2k (serial port, register bank, synthesizer programming),
// tx_usrclk (pattern generator), rx_usrclk (error detector). Control levels
// entering the user clock domains pass two-flop synchronizers. The
// detector's counters, time and flags reach the serial-port domains as
// whole snapshots through a request/acknowledge handshake (snapshot_sync),
// so a package or a stop decision never sees a half-updated count. Each
// user clock domain is held in reset while its DCM is unlocked.
module bert_top
  import bert_pkg::*;
#(
  parameter int unsigned TX_VALUE     = 433,
  parameter int unsigned RX_VALUE     = 71,
  parameter int unsigned WAIT_CYCLES  = 346,
  parameter int unsigned HOLD         = 16,
  parameter int unsigned DIV_1HZ      = 100_000_000,
  parameter int unsigned WINDOW_WORDS = 12500
) (
  input  logic        clk_100M,
  input  logic        rst_n,
  // RS-232 port to the PC
  input  logic        serial_rx,
  output logic        serial_tx,
  // transmit channel
  input  logic        tx_usrclk,
  input  logic        tx_dcm_locked,
  output logic        tx_rst_dcm,
  output logic        tx_synth_sdata,
  output logic        tx_synth_sclk,
  output logic        tx_synth_sload,
  output rio_tx_t     rio_tx,
  output logic        tx_polarity,
  // receive channel
  input  logic        rx_usrclk,
  input  logic        rx_dcm_locked,
  output logic        rx_rst_dcm,
  output logic        rx_synth_sdata,
  output logic        rx_synth_sclk,
  output logic        rx_synth_sload,
  input  rio_rx_t     rio_rx,
  output logic        rx_polarity,
  output logic        rx_enable,
  // front panel indicators
  output logic        syncloss_led,
  output logic        error_led
);
  logic        clk_115p2k, clk_694k, rst_fromclks;
  logic [7:0]  rx_byte;
  logic        new_data_n;
  patgen_cfg_t pcfg;
  errdet_cfg_t ecfg;
  logic        en_pat, load_seed, load_freq_pat, fin_pat;
  logic        en_err, start_gating, load_freq_err, fin_err;
  logic [4:0]  br_pat, br_err;
  logic        clk_1hz;

  // error detector results
  logic        gating, syncloss, sync_load;
  logic [63:0] errors, bits;
  bcd_time_t   gated_time;
  // their consistent copies in the serial-port domains
  logic [63:0] pkg_errors, pkg_bits, fin_errors;
  logic        pkg_gating, pkg_sl_ind, pkg_er_ind, fin_gating;
  bcd_time_t   fin_time;
  logic        gating_q;

  serial_comm #(.TX_VALUE(TX_VALUE), .RX_VALUE(RX_VALUE),
                .WAIT_CYCLES(WAIT_CYCLES)) u_serial (
    .clk_100M(clk_100M), .rst_n(rst_n), .serial_rx(serial_rx),
    .serial_tx(serial_tx), .clk_115p2k(clk_115p2k), .clk_694k(clk_694k),
    .rst_fromclks(rst_fromclks), .received_data(rx_byte),
    .new_data_n(new_data_n), .errdet_enable(en_err), .errors(pkg_errors),
    .bits(pkg_bits), .gating(pkg_gating), .syncloss_ind(pkg_sl_ind),
    .error_ind(pkg_er_ind));

  control_logic #(.HOLD(HOLD)) u_ctrl (
    .clk_100M(clk_100M), .clk_694k(clk_694k), .rst_fromclks(rst_fromclks),
    .dcm_locked_err(rx_dcm_locked), .finish_prog_err(fin_err),
    .dcm_locked_pat(tx_dcm_locked), .finish_prog_pat(fin_pat),
    .new_data_n(new_data_n), .received_data(rx_byte),
    .gated_time(fin_gating ? fin_time : bcd_time_t'('0)),
    .errors_counted(fin_gating ? fin_errors : 64'd0),
    .errdet_cfg(ecfg), .errdet_start_gating(start_gating),
    .enable_errdet(en_err), .enable_receptor(rx_enable),
    .load_freq_err(load_freq_err), .rst_dcm_err(rx_rst_dcm),
    .s_load_err(rx_synth_sload), .prog_bitrate_err(br_err),
    .patgen_cfg(pcfg), .enable_patgen(en_pat), .load_freq_pat(load_freq_pat),
    .load_seed_pat(load_seed), .rst_dcm_pat(tx_rst_dcm),
    .s_load_pat(tx_synth_sload), .prog_bitrate_pat(br_pat));

  prog_freq u_prog_tx (
    .clk(clk_694k), .rst_n(rst_fromclks), .address(br_pat),
    .load(load_freq_pat), .finish(fin_pat), .prg_clk(tx_synth_sclk),
    .ser_output(tx_synth_sdata));

  prog_freq u_prog_rx (
    .clk(clk_694k), .rst_n(rst_fromclks), .address(br_err),
    .load(load_freq_err), .finish(fin_err), .prg_clk(rx_synth_sclk),
    .ser_output(rx_synth_sdata));

  clk_div_1hz #(.DIV(DIV_1HZ)) u_1hz (
    .clk(clk_100M), .rst_n(rst_fromclks), .clk_1hz(clk_1hz));

  // ---------------- transmit user clock domain ----------------
  logic        tx_rst_n;
  logic [2:0]  tx_ctl;
  logic [19:0] tx_word;

  assign tx_rst_n = rst_fromclks & tx_dcm_locked;

  sync2 #(.W(3)) u_sync_tx (
    .clk(tx_usrclk), .rst_n(tx_rst_n),
    .d({en_pat, load_seed, pcfg.insert_err}), .q(tx_ctl));

  pattern_generator u_patgen (
    .clk(tx_usrclk), .rst_n(tx_rst_n), .prbs_sel(pcfg.prbs_sel),
    .enable(tx_ctl[2]), .load_seed(tx_ctl[1]), .insert_errors(tx_ctl[0]),
    .err_ratio(pcfg.err_ratio), .pattern_out(tx_word));

  assign rio_tx      = word_to_rio_tx(tx_word);
  assign tx_polarity = pcfg.invert;

  // ---------------- receive user clock domain ----------------
  logic rx_rst_n;
  logic rx_en_sync;

  assign rx_rst_n    = rst_fromclks & rx_dcm_locked;
  assign rx_polarity = ecfg.invert;

  sync2 #(.W(1)) u_sync_rx (
    .clk(rx_usrclk), .rst_n(rx_rst_n), .d(en_err), .q(rx_en_sync));

  error_detector #(.WINDOW_WORDS(WINDOW_WORDS)) u_errdet (
    .clk(rx_usrclk), .rst_n(rx_rst_n), .enable(rx_en_sync),
    .prbs_sel(ecfg.prbs_sel), .autosync_en(ecfg.autosync_en),
    .sync_thresh(ecfg.sync_thresh), .start_gating(start_gating),
    .clk_1hz(clk_1hz), .rx_word(rio_rx_to_word(rio_rx)),
    .gating(gating), .errors(errors), .bits(bits), .gated_time(gated_time),
    .syncloss(syncloss), .syncloss_ind(syncloss_led), .error_ind(error_led),
    .sync_load(sync_load));

  // detector results into the package sender (115.2 kHz) and the finish
  // gating comparator (100 MHz), as whole snapshots
  snapshot_sync #(.W(131)) u_snap_pkg (
    .clk_src(rx_usrclk), .rst_src_n(rx_rst_n),
    .data_in({errors, bits, gating, syncloss_led, error_led}),
    .clk_dst(clk_115p2k), .rst_dst_n(rst_fromclks),
    .q({pkg_errors, pkg_bits, pkg_gating, pkg_sl_ind, pkg_er_ind}));

  // The finish comparator (100 MHz) sees the counts only once the detector
  // has cleared them for the new period (gating_q: one clock after gating
  // rose), and zeros before, so a stale count from the previous period can
  // never end a new one.
  always_ff @(posedge rx_usrclk or negedge rx_rst_n) begin
    if (!rx_rst_n) gating_q <= 1'b0;
    else           gating_q <= gating;
  end

  snapshot_sync #(.W(65 + $bits(bcd_time_t))) u_snap_fin (
    .clk_src(rx_usrclk), .rst_src_n(rx_rst_n),
    .data_in({errors, gated_time, gating & gating_q}),
    .clk_dst(clk_100M), .rst_dst_n(rst_fromclks),
    .q({fin_errors, fin_time, fin_gating}));
endmodule
