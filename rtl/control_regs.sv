// control_regs: register bank holding every programmable test parameter.
//
// Bytes arrive from the serial port on the 694 kHz clock, each marked by the
// active-low new_data_n flag. They are taken in pairs: first the register
// address (0x60..0x77, see bert_pkg::reg_addr_e), then the value, of which
// only the register's documented width is kept. A first byte that is not a
// valid address is dropped and the next byte is again taken as an address,
// so the pair framing recovers after a stray byte (this design's choice).
// The only register hardware changes is Start_gating: it is cleared while
// stop_gating is high, which ends a gating period. The text around this
// register says it is "set to 1" by stop_gating; 1 would start a new
// period, so clearing is read as the intent. All registers reset to 0.
module control_regs
  import bert_pkg::*;
(
  input  logic        clk,          // 694 kHz
  input  logic        rst_n,
  input  logic [7:0]  rx_data,
  input  logic        new_data_n,
  input  logic        stop_gating,
  output patgen_cfg_t patgen_cfg,
  output errdet_cfg_t errdet_cfg
);
  logic       have_addr;
  logic [7:0] addr;

  function automatic logic is_reg(input logic [7:0] a);
    return (a >= 8'h60) && (a <= 8'h77);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_addr  <= 1'b0;
      addr       <= '0;
      patgen_cfg <= '0;
      errdet_cfg <= '0;
    end else begin
      if (!new_data_n) begin
        if (!have_addr) begin
          if (is_reg(rx_data)) begin
            addr      <= rx_data;
            have_addr <= 1'b1;
          end
        end else begin
          have_addr <= 1'b0;
          case (addr)
            A_PATGEN_EN:   patgen_cfg.enable      <= rx_data[0];
            A_TXPRBS_SEL:  patgen_cfg.prbs_sel    <= rx_data[3:0];
            A_TX_BR:       patgen_cfg.bitrate     <= rx_data[4:0];
            A_TX_INVERT:   patgen_cfg.invert      <= rx_data[0];
            A_INSERT_ERR:  patgen_cfg.insert_err  <= rx_data[0];
            A_ERR_RATIO:   patgen_cfg.err_ratio   <= rx_data[2:0];
            A_ERRDET_EN:   errdet_cfg.enable      <= rx_data[0];
            A_RXPRBS_SEL:  errdet_cfg.prbs_sel    <= rx_data[3:0];
            A_RX_BR:       errdet_cfg.bitrate     <= rx_data[4:0];
            A_RX_INVERT:   errdet_cfg.invert      <= rx_data[0];
            A_AUTOSYNC_EN: errdet_cfg.autosync_en <= rx_data[0];
            A_START_GATE:  errdet_cfg.start_gating <= rx_data[0];
            A_GATING_TYPE: errdet_cfg.gating_type <= rx_data[0];
            A_TIME_D2:     errdet_cfg.gate_time.d2 <= rx_data[3:0];
            A_TIME_D1:     errdet_cfg.gate_time.d1 <= rx_data[3:0];
            A_TIME_D0:     errdet_cfg.gate_time.d0 <= rx_data[3:0];
            A_TIME_H1:     errdet_cfg.gate_time.h1 <= rx_data[3:0];
            A_TIME_H0:     errdet_cfg.gate_time.h0 <= rx_data[3:0];
            A_TIME_M1:     errdet_cfg.gate_time.m1 <= rx_data[3:0];
            A_TIME_M0:     errdet_cfg.gate_time.m0 <= rx_data[3:0];
            A_TIME_S1:     errdet_cfg.gate_time.s1 <= rx_data[3:0];
            A_TIME_S0:     errdet_cfg.gate_time.s0 <= rx_data[3:0];
            A_ERR_THRESH:  errdet_cfg.err_thresh  <= rx_data[1:0];
            A_SYNC_THRESH: errdet_cfg.sync_thresh <= rx_data[1:0];
            default: ;
          endcase
        end
      end
      // Hardware clear of Start_gating has the last word.
      if (stop_gating) errdet_cfg.start_gating <= 1'b0;
    end
  end
endmodule
