// uart_tx: parallel-in serial-out shift register of the RS-232 port.
//
// Runs on the 115.2 kHz bit clock. When start_n (active low) is seen while
// the port is idle, par_in is loaded and sent as 11 bits: a start bit (0),
// eight data bits least significant first, and two stop bits (1). tx_rdy is
// high while the port is idle and can accept a new byte; it drops on the
// clock edge that loads the byte and rises again after the second stop bit.
// The 11-bit frame and ready flag follow the documented block; the LSB-first
// order is the RS-232 convention.
module uart_tx (
  input  logic       clk,       // 115.2 kHz
  input  logic       rst_n,
  input  logic [7:0] par_in,
  input  logic       start_n,
  output logic       ser_out,
  output logic       tx_rdy
);
  logic [10:0] shreg;
  logic [3:0]  remaining;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg     <= '1;
      remaining <= '0;
    end else if (remaining == 0) begin
      if (!start_n) begin
        shreg     <= {2'b11, par_in, 1'b0};
        remaining <= 4'd11;
      end
    end else begin
      shreg     <= {1'b1, shreg[10:1]};
      remaining <= remaining - 1'b1;
    end
  end

  // The line shows shreg[0] only while a frame is being sent.
  assign ser_out = (remaining == 0) ? 1'b1 : shreg[0];
  assign tx_rdy  = (remaining == 0);
endmodule
