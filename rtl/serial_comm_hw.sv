// serial_comm_hw: RS-232 serial communication hardware.
//
// Transmit side: a parallel-in serial-out shift register on the 115.2 kHz
// clock (uart_tx) sends one 11-bit frame per start request (active low) and
// reports when it is ready for the next. Receive side: the RX control
// machine, shift register and output register (uart_rx) on the 694 kHz
// oversampling clock deliver each received byte with a one-period active-low
// new-data flag. Both halves are reset by rst_fromclks (active low).
module serial_comm_hw (
  input  logic       clk_115p2k,
  input  logic       clk_694k,
  input  logic       rst_fromclks,
  input  logic [7:0] transmit_data,
  input  logic       start_tx_n,
  input  logic       serial_data_rx,
  output logic [7:0] received_data,
  output logic       new_data_n,
  output logic       serial_data_tx,
  output logic       ready_to_tx
);
  uart_tx u_tx (
    .clk(clk_115p2k), .rst_n(rst_fromclks), .par_in(transmit_data),
    .start_n(start_tx_n), .ser_out(serial_data_tx), .tx_rdy(ready_to_tx));

  uart_rx u_rx (
    .clk(clk_694k), .rst_n(rst_fromclks), .serial_in(serial_data_rx),
    .rx_data(received_data), .new_data_n(new_data_n));
endmodule
