// errdet_ctrl: start-up sequencer of the error detector.
//
// Runs on the 100 MHz board clock. When the error detector is enabled it
//   1. holds the receive DCM in reset and has the frequency programmer load
//      the reference-clock word for the selected bit rate into the receive
//      clock synthesizer (load_freq until finish_prog falls, then wait for
//      it to rise),
//   2. pulses the synthesizer's S_LOAD for HOLD cycles,
//   3. keeps the DCM in reset HOLD more cycles and waits for dcm_locked,
//   4. enables the receiver and gives its clock recovery HOLD cycles,
//   5. enables the error detector (RUN). Only in RUN is the PC's start
//      gating request passed on to the error detector.
// In RUN a cleared enable returns to OFF, a new bit rate restarts at step 1
// and a lost lock restarts at step 3. The ordered start-up and its signals
// follow the documented control logic; states and hold times are this
// design's own.
module errdet_ctrl #(
  parameter int unsigned HOLD = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       enable,
  input  logic [4:0] bitrate,
  input  logic       start_gating_req,
  input  logic       dcm_locked,
  input  logic       finish_prog,
  output logic       load_freq,
  output logic       s_load,
  output logic       rst_dcm,
  output logic       enable_receptor,
  output logic       enable_errdet,
  output logic       start_gating,
  output logic [4:0] prog_bitrate
);
  typedef enum logic [2:0] {
    OFF, LOAD_REQ, LOAD_WAIT, SLOAD, DCM_RST, LOCK_WAIT, RX_SETTLE, RUN
  } state_e;
  state_e state;
  logic [$clog2(HOLD+1)-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= OFF;
      cnt          <= '0;
      prog_bitrate <= '0;
    end else begin
      unique case (state)
        OFF: if (enable) begin
          state        <= LOAD_REQ;
          prog_bitrate <= bitrate;
        end
        LOAD_REQ:  if (!finish_prog) state <= LOAD_WAIT;
        LOAD_WAIT: if (finish_prog) begin state <= SLOAD; cnt <= '0; end
        SLOAD, DCM_RST, RX_SETTLE: begin
          if (cnt == HOLD[$bits(cnt)-1:0] - 1'b1) begin
            cnt <= '0;
            unique case (state)
              SLOAD:   state <= DCM_RST;
              DCM_RST: state <= LOCK_WAIT;
              default: state <= RUN;
            endcase
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        LOCK_WAIT: if (dcm_locked) begin state <= RX_SETTLE; cnt <= '0; end
        RUN: begin
          if (bitrate != prog_bitrate) begin
            state        <= LOAD_REQ;
            prog_bitrate <= bitrate;
          end else if (!dcm_locked) begin
            state <= DCM_RST;
            cnt   <= '0;
          end
        end
        default: state <= OFF;
      endcase
      if (!enable && state != OFF) state <= OFF;
    end
  end

  assign load_freq       = (state == LOAD_REQ);
  assign s_load          = (state == SLOAD);
  assign rst_dcm         = (state inside {OFF, LOAD_REQ, LOAD_WAIT, SLOAD, DCM_RST});
  assign enable_receptor = (state inside {RX_SETTLE, RUN});
  assign enable_errdet   = (state == RUN);
  assign start_gating    = (state == RUN) && start_gating_req;
endmodule
