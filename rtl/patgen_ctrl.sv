// patgen_ctrl: start-up sequencer of the pattern generator.
//
// Runs on the 100 MHz board clock. When the pattern generator is enabled it
//   1. holds the transmit DCM in reset and asks the frequency programmer to
//      shift the word for the selected bit rate into the clock synthesizer
//      (load_freq high until finish_prog falls, then wait for it to rise),
//   2. pulses the synthesizer's S_LOAD for HOLD cycles,
//   3. keeps the DCM in reset for HOLD more cycles, releases it and waits
//      for dcm_locked,
//   4. loads the seed into the pattern hardware for HOLD cycles (long
//      enough for the transmit user clock to see it),
//   5. enables the pattern generator (RUN).
// In RUN, a cleared enable returns to OFF, a new bit rate restarts at step 1
// and a lost DCM lock restarts at step 3. The need for an ordered start-up,
// and the signals involved, follow the documented control logic; the states
// and hold times are this design's own.
module patgen_ctrl #(
  parameter int unsigned HOLD = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       enable,
  input  logic [4:0] bitrate,
  input  logic       dcm_locked,
  input  logic       finish_prog,
  output logic       load_freq,
  output logic       s_load,
  output logic       rst_dcm,
  output logic       load_seed,
  output logic       pg_enable,
  output logic [4:0] prog_bitrate    // bit rate the synthesizer is set to
);
  typedef enum logic [2:0] {
    OFF, LOAD_REQ, LOAD_WAIT, SLOAD, DCM_RST, LOCK_WAIT, SEED, RUN
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
        SLOAD, DCM_RST, SEED: begin
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
        LOCK_WAIT: if (dcm_locked) begin state <= SEED; cnt <= '0; end
        RUN: begin
          if (!enable) state <= OFF;
          else if (bitrate != prog_bitrate) begin
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

  assign load_freq = (state == LOAD_REQ);
  assign s_load    = (state == SLOAD);
  assign rst_dcm   = (state inside {OFF, LOAD_REQ, LOAD_WAIT, SLOAD, DCM_RST});
  assign load_seed = (state == SEED);
  assign pg_enable = (state == RUN);
endmodule
