// serial_clock_gen: clock generator of the serial communication block.
//
// Two dividers of the 100 MHz board clock give the UART transmit clock
// (115.2 kHz, VALUE 433 -> 115.207 kHz) and the receive oversampling clock
// (about six times faster, VALUE 71 -> 694.4 kHz). rst_fromclks (active low)
// is released only when both dividers have released their own reset.
// rst (active low) is the asynchronous system reset.
module serial_clock_gen #(
  parameter int unsigned TX_VALUE = 433,
  parameter int unsigned RX_VALUE = 71
) (
  input  logic clk_100M,
  input  logic rst,
  output logic clk_115p2k,
  output logic clk_694k,
  output logic rst_fromclks
);
  logic rst_tx, rst_rx;

  clk_gen_div #(.VALUE(TX_VALUE)) u_tx_clk (
    .clk_in(clk_100M), .rst_in(rst), .clk_out(clk_115p2k), .rst_out(rst_tx));
  clk_gen_div #(.VALUE(RX_VALUE)) u_rx_clk (
    .clk_in(clk_100M), .rst_in(rst), .clk_out(clk_694k), .rst_out(rst_rx));

  assign rst_fromclks = rst_tx & rst_rx;
endmodule
