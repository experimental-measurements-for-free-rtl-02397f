// tb_control_logic: drives the control logic with byte/new-data pairs on a
// 694 kHz clock and models of the two frequency programmers and DCMs.
// Checks that register writes reach the config outputs, that both channels
// start up (pattern generator runs, error detector and receiver enabled),
// that start gating passes through, and that finish gating ends the gating
// period both on the error count (threshold 10) and on the gating time.
`include "tb_check.svh"
module tb_control_logic;
  import bert_pkg::*;
  `TB_COUNTERS
  logic clk = 0, c694 = 0, rst_n = 0, nda_n = 1;
  logic [7:0] rx = 0;
  logic lk_e = 0, lk_p = 0, fin_e = 1, fin_p = 1;
  bcd_time_t gtime = '0;
  logic [63:0] errs = 0;
  errdet_cfg_t ec; patgen_cfg_t pc;
  logic sg, en_e, en_rx, lf_e, rd_e, sl_e, en_p, lf_p, ls_p, rd_p, sl_p;
  logic [4:0] br_e, br_p;
  always #5 clk = ~clk;
  always #720 c694 = ~c694;

  control_logic dut (.clk_100M(clk), .clk_694k(c694), .rst_fromclks(rst_n),
    .dcm_locked_err(lk_e), .finish_prog_err(fin_e), .dcm_locked_pat(lk_p),
    .finish_prog_pat(fin_p), .new_data_n(nda_n), .received_data(rx),
    .gated_time(gtime), .errors_counted(errs), .errdet_cfg(ec),
    .errdet_start_gating(sg), .enable_errdet(en_e), .enable_receptor(en_rx),
    .load_freq_err(lf_e), .rst_dcm_err(rd_e), .s_load_err(sl_e),
    .prog_bitrate_err(br_e), .patgen_cfg(pc), .enable_patgen(en_p),
    .load_freq_pat(lf_p), .load_seed_pat(ls_p), .rst_dcm_pat(rd_p),
    .s_load_pat(sl_p), .prog_bitrate_pat(br_p));

  // programmer models (694 kHz) and DCM models (100 MHz)
  int pc_e = 0, pc_p = 0;
  always @(posedge c694) begin
    if (lf_e && fin_e) begin fin_e <= 0; pc_e <= 14; end
    else if (!fin_e) begin if (pc_e == 0) fin_e <= 1; else pc_e <= pc_e - 1; end
    if (lf_p && fin_p) begin fin_p <= 0; pc_p <= 14; end
    else if (!fin_p) begin if (pc_p == 0) fin_p <= 1; else pc_p <= pc_p - 1; end
  end
  always @(posedge clk) begin
    lk_e <= !rd_e;
    lk_p <= !rd_p;
  end

  initial begin
    #40ms;
    failures++;
    `TB_FINISH
  end

  task automatic wr(input logic [7:0] a, input logic [7:0] v);
    @(posedge c694); rx <= a; nda_n <= 0; @(posedge c694); nda_n <= 1;
    repeat (3) @(posedge c694);
    rx <= v; nda_n <= 0; @(posedge c694); nda_n <= 1;
    repeat (3) @(posedge c694);
  endtask

  initial begin
    #3000 rst_n = 1;
    wr(8'h61, 8'h08); wr(8'h62, 8'h0C); wr(8'h67, 8'h08); wr(8'h68, 8'h0C);
    wr(8'h65, 8'h06); wr(8'h64, 8'h01); wr(8'h6C, 8'h01); wr(8'h76, 8'h00);
    `CHECK(pc.prbs_sel == 4'd8 && pc.bitrate == 5'd12 && pc.insert_err && pc.err_ratio == 3'd6,
           "pattern generator settings")
    `CHECK(ec.prbs_sel == 4'd8 && ec.bitrate == 5'd12 && ec.gating_type && ec.err_thresh == 0,
           "error detector settings")
    wr(8'h60, 8'h01); wr(8'h66, 8'h01);
    #200us;
    `CHECK(en_p && !rd_p && br_p == 5'd12, "pattern generator running")
    `CHECK(en_e && en_rx && !rd_e && br_e == 5'd12, "error detector running")
    wr(8'h6B, 8'h01);
    #10us;
    `CHECK(sg && ec.start_gating, "gating started")
    errs = 9; #20us;
    `CHECK(sg, "9 errors: still gating")
    errs = 10; #20us;
    `CHECK(!sg && !ec.start_gating, "10 errors: gating stopped")
    // time gating: stop at 00:00:05
    errs = 0;
    wr(8'h6C, 8'h00); wr(8'h75, 8'h05); wr(8'h6B, 8'h01);
    #10us;
    `CHECK(sg, "time gating started")
    gtime.s0 = 4; #20us;
    `CHECK(sg, "4 s: still gating")
    gtime.s0 = 5; #20us;
    `CHECK(!sg, "5 s: gating stopped")
    wr(8'h60, 8'h00);
    #20us;
    `CHECK(!en_p && rd_p, "pattern generator disabled")
    `TB_FINISH
  end
endmodule
