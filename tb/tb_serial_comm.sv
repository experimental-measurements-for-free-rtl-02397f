// tb_serial_comm: the whole serial block from the 100 MHz clock. Sends
// register-style bytes from a PC model and checks each received byte and
// its new-data flag; enables result reporting and decodes two packages
// from the transmit line, checking their contents and the 3 ms pause.
`include "tb_check.svh"
module tb_serial_comm;
  `TB_COUNTERS
  logic clk = 0, rst_n = 0, line_to_dut = 1, line_from_dut;
  logic c115, c694, rst_fc, nda_n;
  logic [7:0] rdata;
  logic en = 0;
  logic [63:0] errors = 64'd77, bits = 64'd123456789;
  always #5 clk = ~clk;

  serial_comm dut (.clk_100M(clk), .rst_n, .serial_rx(line_to_dut),
    .serial_tx(line_from_dut), .clk_115p2k(c115), .clk_694k(c694),
    .rst_fromclks(rst_fc), .received_data(rdata), .new_data_n(nda_n),
    .errdet_enable(en), .errors, .bits, .gating(1'b1), .syncloss_ind(1'b0),
    .error_ind(1'b1));

  `include "tb_uart_tasks.svh"

  logic [7:0] got [$];
  always @(posedge c694) if (!nda_n && rst_fc) got.push_back(rdata);

  initial begin
    #80ms;
    failures++;
    `TB_FINISH
  end

  initial begin
    logic [7:0] sent [$];
    logic [7:0] pkt [18];
    logic ok;
    time t_first_end, t_second;
    #100 rst_n = 1;
    #20us;
    sent = '{8'h60, 8'h01, 8'h61, 8'h04, 8'h77, 8'h03};
    foreach (sent[i]) uart_send(sent[i]);
    #50us;
    `CHECK(got.size() == sent.size(), $sformatf("%0d bytes", got.size()))
    foreach (sent[i]) if (i < got.size()) `CHECK(got[i] == sent[i], "byte value")
    en = 1;
    for (int p = 0; p < 2; p++) begin
      for (int i = 0; i < 18; i++) begin
        uart_recv(pkt[i], ok);
        if (p == 1 && i == 0) t_second = $time;
      end
      if (p == 0) t_first_end = $time;
      `CHECK(pkt[0] == 8'h81 && pkt[8] == 8'd77 && pkt[17] == 8'hAA, "package flags, errors, marker")
      `CHECK({pkt[9], pkt[10], pkt[11], pkt[12], pkt[13], pkt[14], pkt[15], pkt[16]} == bits,
             "package bit count")
    end
    `CHECK(t_second - t_first_end > 2.9ms && t_second - t_first_end < 3.2ms, "3 ms pause")
    `TB_FINISH
  end
endmodule
