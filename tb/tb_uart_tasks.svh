// tb_uart_tasks.svh: RS-232 line tasks for the testbenches, 115.2 kbit/s
// (bit time BIT_NS), 8 data bits LSB first. Expects a `logic` named by the
// includer: `line_to_dut` driven into the design and `line_from_dut` read.
localparam time BIT_NS = 8680;

task automatic uart_send(input logic [7:0] b);
  line_to_dut = 1'b0;
  #(BIT_NS);
  for (int i = 0; i < 8; i++) begin
    line_to_dut = b[i];
    #(BIT_NS);
  end
  line_to_dut = 1'b1;
  #(2 * BIT_NS);
endtask

// Waits for a start bit and samples mid-bit; stop_ok reports both stop bits.
// It first waits for an idle (high) line, so a line that is still low from
// power-up is not taken for a start bit.
task automatic uart_recv(output logic [7:0] b, output logic stop_ok);
  wait (line_from_dut === 1'b1);
  @(negedge line_from_dut);
  #(BIT_NS / 2);
  for (int i = 0; i < 8; i++) begin
    #(BIT_NS);
    b[i] = line_from_dut;
  end
  #(BIT_NS);
  stop_ok = line_from_dut;
  #(BIT_NS);
  stop_ok &= line_from_dut;
endtask
