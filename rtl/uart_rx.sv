// uart_rx: receive half of the RS-232 port (RX control machine, serial-in
// parallel-out shift register, 8-bit output register, new-data flag).
//
// Runs on the 694 kHz clock, about six samples per 115.2 kbit/s bit. After
// a two-flop synchronizer, the control machine waits for a falling edge,
// checks the start bit again three samples later (mid-bit), then samples
// each of the eight data bits (LSB first) six samples apart and finally the
// stop bit. With a valid stop bit the byte is loaded into the output
// register; new_data_n (active low) pulses for one 694 kHz period on the
// cycle after that load. A start bit that disappears before mid-bit, or a
// missing stop bit, drops the byte. The state diagram is this design's own;
// the register structure, six-times sampling and delayed load flag follow
// the documented block.
module uart_rx (
  input  logic       clk,       // 694 kHz
  input  logic       rst_n,
  input  logic       serial_in,
  output logic [7:0] rx_data,
  output logic       new_data_n
);
  typedef enum logic [1:0] {IDLE, START, DATA, STOP} rx_state_e;
  rx_state_e   state;
  logic [2:0]  sample_cnt;
  logic [2:0]  bit_cnt;
  logic [7:0]  sipo;
  logic        load;
  logic [1:0]  sync;
  logic        rxd;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sync <= 2'b11;
    else        sync <= {sync[0], serial_in};
  end
  assign rxd = sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= IDLE;
      sample_cnt <= '0;
      bit_cnt    <= '0;
      sipo       <= '0;
      load       <= 1'b0;
    end else begin
      load <= 1'b0;
      unique case (state)
        IDLE: if (!rxd) begin
          state      <= START;
          sample_cnt <= 3'd1;
        end
        START: begin
          if (sample_cnt == 3'd2) begin
            if (!rxd) begin
              state      <= DATA;
              sample_cnt <= '0;
              bit_cnt    <= '0;
            end else begin
              state <= IDLE;
            end
          end else begin
            sample_cnt <= sample_cnt + 1'b1;
          end
        end
        DATA: begin
          if (sample_cnt == 3'd5) begin
            sample_cnt <= '0;
            sipo       <= {rxd, sipo[7:1]};
            bit_cnt    <= bit_cnt + 1'b1;
            if (bit_cnt == 3'd7) state <= STOP;
          end else begin
            sample_cnt <= sample_cnt + 1'b1;
          end
        end
        STOP: begin
          if (sample_cnt == 3'd5) begin
            sample_cnt <= '0;
            state      <= IDLE;
            load       <= rxd;
          end else begin
            sample_cnt <= sample_cnt + 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_data    <= '0;
      new_data_n <= 1'b1;
    end else begin
      if (load) rx_data <= sipo;
      new_data_n <= ~load;
    end
  end
endmodule
