// control_logic: holds the test parameters and sequences the two channels.
//
// control_regs (on clk_694k) turns address/value byte pairs from the serial
// port into the pattern generator and error detector settings.
// finish_gating (on clk_100M) ends a gating period when the error count or
// the gating time reaches its stop value, clearing Start_gating.
// patgen_ctrl and errdet_ctrl (on clk_100M) bring each channel up in order:
// synthesizer programming, DCM reset and lock, seed load or receiver
// settling, then run. The settings leave this block as the bert_pkg config
// structs; the per-channel control strobes are separate ports. All parts are
// reset by rst_fromclks (active low). Signals between the two clock domains
// are levels that stay put for many clocks (register settings, finish and
// lock flags, the stop request).
module control_logic
  import bert_pkg::*;
#(
  parameter int unsigned HOLD = 16
) (
  input  logic        clk_100M,
  input  logic        clk_694k,
  input  logic        rst_fromclks,
  input  logic        dcm_locked_err,
  input  logic        finish_prog_err,
  input  logic        dcm_locked_pat,
  input  logic        finish_prog_pat,
  input  logic        new_data_n,
  input  logic [7:0]  received_data,
  input  bcd_time_t   gated_time,
  input  logic [63:0] errors_counted,
  // error detector side
  output errdet_cfg_t errdet_cfg,
  output logic        errdet_start_gating,
  output logic        enable_errdet,
  output logic        enable_receptor,
  output logic        load_freq_err,
  output logic        rst_dcm_err,
  output logic        s_load_err,
  output logic [4:0]  prog_bitrate_err,
  // pattern generator side
  output patgen_cfg_t patgen_cfg,
  output logic        enable_patgen,
  output logic        load_freq_pat,
  output logic        load_seed_pat,
  output logic        rst_dcm_pat,
  output logic        s_load_pat,
  output logic [4:0]  prog_bitrate_pat
);
  logic stop_gating;

  control_regs u_regs (
    .clk(clk_694k), .rst_n(rst_fromclks), .rx_data(received_data),
    .new_data_n(new_data_n), .stop_gating(stop_gating),
    .patgen_cfg(patgen_cfg), .errdet_cfg(errdet_cfg));

  finish_gating u_finish (
    .clk(clk_100M), .rst_n(rst_fromclks), .gating(errdet_start_gating),
    .gating_type(errdet_cfg.gating_type), .err_thresh(errdet_cfg.err_thresh),
    .stop_time(errdet_cfg.gate_time), .errors(errors_counted),
    .gated_time(gated_time), .stop(stop_gating));

  patgen_ctrl #(.HOLD(HOLD)) u_patctl (
    .clk(clk_100M), .rst_n(rst_fromclks), .enable(patgen_cfg.enable),
    .bitrate(patgen_cfg.bitrate), .dcm_locked(dcm_locked_pat),
    .finish_prog(finish_prog_pat), .load_freq(load_freq_pat),
    .s_load(s_load_pat), .rst_dcm(rst_dcm_pat), .load_seed(load_seed_pat),
    .pg_enable(enable_patgen), .prog_bitrate(prog_bitrate_pat));

  errdet_ctrl #(.HOLD(HOLD)) u_errctl (
    .clk(clk_100M), .rst_n(rst_fromclks), .enable(errdet_cfg.enable),
    .bitrate(errdet_cfg.bitrate), .start_gating_req(errdet_cfg.start_gating),
    .dcm_locked(dcm_locked_err), .finish_prog(finish_prog_err),
    .load_freq(load_freq_err), .s_load(s_load_err), .rst_dcm(rst_dcm_err),
    .enable_receptor(enable_receptor), .enable_errdet(enable_errdet),
    .start_gating(errdet_start_gating), .prog_bitrate(prog_bitrate_err));
endmodule
