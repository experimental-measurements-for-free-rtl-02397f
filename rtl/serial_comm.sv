// serial_comm: serial communication block between the PC and the tester.
//
// Combines the clock generator (115.2 kHz bit clock and 694 kHz
// oversampling clock from the 100 MHz board clock), the RS-232 hardware and
// the data transmission hardware. Bytes received from the PC come out on
// received_data with the active-low new_data_n flag (one 694 kHz period) for
// the control logic; while the error detector is enabled, result packages
// are sent to the PC every 3 ms. The divided clocks and their reset are
// brought out because the control logic and the frequency programmers run
// on clk_694k.
module serial_comm #(
  parameter int unsigned TX_VALUE    = 433,
  parameter int unsigned RX_VALUE    = 71,
  parameter int unsigned WAIT_CYCLES = 346
) (
  input  logic        clk_100M,
  input  logic        rst_n,
  input  logic        serial_rx,
  output logic        serial_tx,
  output logic        clk_115p2k,
  output logic        clk_694k,
  output logic        rst_fromclks,
  output logic [7:0]  received_data,
  output logic        new_data_n,
  // results to report
  input  logic        errdet_enable,
  input  logic [63:0] errors,
  input  logic [63:0] bits,
  input  logic        gating,
  input  logic        syncloss_ind,
  input  logic        error_ind
);
  logic [7:0] tx_byte;
  logic       start_tx_n, ready_to_tx;

  serial_clock_gen #(.TX_VALUE(TX_VALUE), .RX_VALUE(RX_VALUE)) u_clkgen (
    .clk_100M(clk_100M), .rst(rst_n), .clk_115p2k(clk_115p2k),
    .clk_694k(clk_694k), .rst_fromclks(rst_fromclks));

  serial_comm_hw u_hw (
    .clk_115p2k(clk_115p2k), .clk_694k(clk_694k), .rst_fromclks(rst_fromclks),
    .transmit_data(tx_byte), .start_tx_n(start_tx_n), .serial_data_rx(serial_rx),
    .received_data(received_data), .new_data_n(new_data_n),
    .serial_data_tx(serial_tx), .ready_to_tx(ready_to_tx));

  data_tx_hw #(.WAIT_CYCLES(WAIT_CYCLES)) u_datatx (
    .clk(clk_115p2k), .rst_n(rst_fromclks), .enable(errdet_enable),
    .errors(errors), .bits(bits), .gating(gating), .syncloss_ind(syncloss_ind),
    .error_ind(error_ind), .ready_to_tx(ready_to_tx),
    .transmit_data(tx_byte), .start_tx_n(start_tx_n));
endmodule
