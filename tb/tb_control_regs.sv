// tb_control_regs: writes every register (address byte, value byte) with
// random values and checks that each field holds the value cut to its
// documented width and that other fields are untouched; checks that an
// invalid first byte is skipped, that bytes without the new-data flag are
// ignored, and that stop_gating clears Start_gating.
`include "tb_check.svh"
module tb_control_regs;
  import bert_pkg::*;
  `TB_COUNTERS
  logic clk = 0, rst_n = 0, nda_n = 1, stop = 0;
  logic [7:0] rx = 0;
  patgen_cfg_t pc, pc_ref;
  errdet_cfg_t ec, ec_ref;
  always #720 clk = ~clk;
  control_regs dut (.clk, .rst_n, .rx_data(rx), .new_data_n(nda_n),
    .stop_gating(stop), .patgen_cfg(pc), .errdet_cfg(ec));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    `TB_FINISH
  end

  task automatic put(input logic [7:0] b);
    rx <= b; nda_n <= 0; @(posedge clk); nda_n <= 1; rx <= 8'h5A;
    repeat (3) @(posedge clk);
  endtask

  task automatic write_ref(input logic [7:0] a, input logic [7:0] v);
    case (a)
      8'h60: pc_ref.enable = v[0];
      8'h61: pc_ref.prbs_sel = v[3:0];
      8'h62: pc_ref.bitrate = v[4:0];
      8'h63: pc_ref.invert = v[0];
      8'h64: pc_ref.insert_err = v[0];
      8'h65: pc_ref.err_ratio = v[2:0];
      8'h66: ec_ref.enable = v[0];
      8'h67: ec_ref.prbs_sel = v[3:0];
      8'h68: ec_ref.bitrate = v[4:0];
      8'h69: ec_ref.invert = v[0];
      8'h6A: ec_ref.autosync_en = v[0];
      8'h6B: ec_ref.start_gating = v[0];
      8'h6C: ec_ref.gating_type = v[0];
      8'h6D: ec_ref.gate_time.d2 = v[3:0];
      8'h6E: ec_ref.gate_time.d1 = v[3:0];
      8'h6F: ec_ref.gate_time.d0 = v[3:0];
      8'h70: ec_ref.gate_time.h1 = v[3:0];
      8'h71: ec_ref.gate_time.h0 = v[3:0];
      8'h72: ec_ref.gate_time.m1 = v[3:0];
      8'h73: ec_ref.gate_time.m0 = v[3:0];
      8'h74: ec_ref.gate_time.s1 = v[3:0];
      8'h75: ec_ref.gate_time.s0 = v[3:0];
      8'h76: ec_ref.err_thresh = v[1:0];
      8'h77: ec_ref.sync_thresh = v[1:0];
      default: ;
    endcase
  endtask

  initial begin
    pc_ref = '0; ec_ref = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    `CHECK(pc == '0 && ec == '0, "reset values")
    for (int pass = 0; pass < 3; pass++)
      for (int a = 'h60; a <= 'h77; a++) begin
        logic [7:0] v;
        v = 8'($urandom);
        put(8'(a)); put(v);
        write_ref(8'(a), v);
        `CHECK(pc == pc_ref && ec == ec_ref, $sformatf("after write %h = %h", a, v))
      end
    // invalid address byte is dropped, framing recovers
    put(8'h12); put(8'h62); put(8'h15);
    write_ref(8'h62, 8'h15);
    `CHECK(pc == pc_ref && ec == ec_ref, "invalid first byte skipped")
    // data without the flag is ignored
    rx <= 8'h61; repeat (5) @(posedge clk);
    put(8'h6B); put(8'h01); write_ref(8'h6B, 8'h01);
    `CHECK(ec.start_gating && ec == ec_ref, "start gating set")
    stop <= 1; @(posedge clk); stop <= 0; @(posedge clk);
    ec_ref.start_gating = 0;
    `CHECK(!ec.start_gating && ec == ec_ref, "stop gating clears start gating")
    `TB_FINISH
  end
endmodule
