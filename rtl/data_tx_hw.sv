// data_tx_hw: sends the error detector's results to the PC.
//
// While `enable` (error detector enabled) is high, this block repeatedly
// sends an 18-byte package through the UART transmitter and then waits
// WAIT_CYCLES periods of its 115.2 kHz clock (346 periods = 3 ms) before the
// next package. Package layout, first byte first:
//   byte 0      : id/flags = {1, 0000, gating_off, syncloss_ind, error_ind}
//                 (0x80..0x87)
//   bytes 1..8  : error count, bits 63:56 first
//   bytes 9..16 : received bit count, bits 63:56 first
//   byte 17     : 0xAA end marker
// The counters and flags are captured once, at the start of a package, so
// all bytes of one package describe the same instant. The byte order and end
// marker follow the documented package; the flag encoding (bit 2 set when no
// gating is running, bit 1 syncloss, bit 0 error) is read from the host
// program's decoding of the first byte. The capture is a plain register:
// the counters come from the receive clock domain and are not synchronized.
//
// Handshake with uart_tx: a byte is offered by driving start_tx_n low for one
// clock while ready_to_tx is high; the next byte waits for ready_to_tx to
// fall and rise again.
module data_tx_hw #(
  parameter int unsigned WAIT_CYCLES = 346
) (
  input  logic        clk,          // 115.2 kHz
  input  logic        rst_n,
  input  logic        enable,
  input  logic [63:0] errors,
  input  logic [63:0] bits,
  input  logic        gating,
  input  logic        syncloss_ind,
  input  logic        error_ind,
  input  logic        ready_to_tx,
  output logic [7:0]  transmit_data,
  output logic        start_tx_n
);
  typedef enum logic [1:0] {S_IDLE, S_SEND, S_BUSY, S_WAIT} state_e;
  state_e        state;
  logic [4:0]    byte_idx;
  logic [8*18-1:0] pkg;
  logic [$clog2(WAIT_CYCLES+1)-1:0] wait_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      byte_idx      <= '0;
      pkg           <= '0;
      wait_cnt      <= '0;
      transmit_data <= '0;
      start_tx_n    <= 1'b1;
    end else begin
      start_tx_n <= 1'b1;
      unique case (state)
        S_IDLE: if (enable) begin
          pkg      <= {1'b1, 4'b0000, ~gating, syncloss_ind, error_ind,
                       errors, bits, 8'hAA};
          byte_idx <= '0;
          state    <= S_SEND;
        end
        S_SEND: if (ready_to_tx) begin
          transmit_data <= pkg[8*18-1 -: 8];
          pkg           <= {pkg[8*17-1:0], 8'h00};
          start_tx_n    <= 1'b0;
          state         <= S_BUSY;
        end
        S_BUSY: if (!ready_to_tx) begin
          if (byte_idx == 5'd17) begin
            state    <= S_WAIT;
            wait_cnt <= '0;
          end else begin
            byte_idx <= byte_idx + 1'b1;
            state    <= S_SEND;
          end
        end
        S_WAIT: begin
          // Counted once the last frame has left the line.
          if (ready_to_tx) begin
            if (wait_cnt == WAIT_CYCLES[$bits(wait_cnt)-1:0]) state <= S_IDLE;
            else wait_cnt <= wait_cnt + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
