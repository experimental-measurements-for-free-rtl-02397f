// tb_serial_comm_hw: drives the receive line with RS-232 frames and checks
// every received byte and the one-period new-data pulse; loads bytes into
// the transmitter and decodes its line, checking data, start and two stop
// bits, and that ready_to_tx is low for exactly 11 bit clocks per byte.
`include "tb_check.svh"
module tb_serial_comm_hw;
  `TB_COUNTERS
  logic c115 = 0, c694 = 0, rst_n = 0;
  logic [7:0] tdata = 0, rdata;
  logic start_n = 1, nda_n, line_to_dut = 1, line_from_dut, rdy;
  always #4340 c115 = ~c115;
  always #720  c694 = ~c694;

  serial_comm_hw dut (.clk_115p2k(c115), .clk_694k(c694), .rst_fromclks(rst_n),
    .transmit_data(tdata), .start_tx_n(start_n), .serial_data_rx(line_to_dut),
    .received_data(rdata), .new_data_n(nda_n), .serial_data_tx(line_from_dut),
    .ready_to_tx(rdy));

  `include "tb_uart_tasks.svh"

  logic [7:0] rx_seen [$];
  int nda_low_cycles = 0, nda_pulses = 0;
  always @(posedge c694) begin
    if (!nda_n && rst_n) begin
      nda_low_cycles++;
      rx_seen.push_back(rdata);
    end
  end
  always @(negedge nda_n) nda_pulses++;

  initial begin
    #100ms;
    failures++;
    `TB_FINISH
  end

  initial begin
    logic [7:0] sent [$];
    logic [7:0] b;
    logic ok;
    int busy;
    #3000 rst_n = 1;
    #20000;
    // receive path
    sent = '{8'h60, 8'hA5, 8'h00, 8'hFF, 8'h3C};
    for (int i = 0; i < 20; i++) sent.push_back(8'($urandom));
    foreach (sent[i]) uart_send(sent[i]);
    #(20 * 1440);
    `CHECK(rx_seen.size() == sent.size(), $sformatf("%0d bytes received", rx_seen.size()))
    `CHECK(nda_low_cycles == sent.size() && nda_pulses == sent.size(),
           "new data flag low for one 694 kHz period per byte")
    foreach (sent[i]) if (i < rx_seen.size())
      `CHECK(rx_seen[i] == sent[i], $sformatf("rx byte %0d: %h vs %h", i, rx_seen[i], sent[i]))
    // transmit path
    for (int i = 0; i < 6; i++) begin
      logic [7:0] v;
      v = (i == 0) ? 8'hAA : 8'($urandom);
      @(posedge c115);
      `CHECK(rdy, "ready before load")
      tdata <= v; start_n <= 0;
      fork
        uart_recv(b, ok);
        begin
          @(posedge c115); start_n <= 1; tdata <= 0;
          busy = 0;
          #1;
          while (!rdy) begin @(posedge c115); #1 busy++; end
        end
      join
      `CHECK(b == v && ok, $sformatf("tx byte %h decoded %h stop %0d", v, b, ok))
      `CHECK(busy == 11, $sformatf("busy for %0d bit clocks", busy))
    end
    `TB_FINISH
  end
endmodule
