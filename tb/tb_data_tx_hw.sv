// tb_data_tx_hw: connects the package sender to the UART transmitter and
// decodes the line. Checks the 18-byte package (flags, 8 error bytes and
// 8 bit-count bytes most significant first, 0xAA), the flag encoding for
// several gating/syncloss/error states, the pause of about 3 ms between
// packages, and silence while disabled.
`include "tb_check.svh"
module tb_data_tx_hw;
  `TB_COUNTERS
  logic c115 = 0, rst_n = 0, en = 0;
  logic [63:0] errors, bits;
  logic gating, sl, er;
  logic [7:0] tdata;
  logic start_n, rdy, line_from_dut, line_to_dut;
  always #4340 c115 = ~c115;

  data_tx_hw dut (.clk(c115), .rst_n, .enable(en), .errors, .bits, .gating,
    .syncloss_ind(sl), .error_ind(er), .ready_to_tx(rdy),
    .transmit_data(tdata), .start_tx_n(start_n));
  uart_tx u_tx (.clk(c115), .rst_n, .par_in(tdata), .start_n, .ser_out(line_from_dut),
    .tx_rdy(rdy));

  `include "tb_uart_tasks.svh"

  initial begin
    #200ms;
    failures++;
    `TB_FINISH
  end

  initial begin
    logic [7:0] pkt [18];
    logic ok, all_ok;
    time t_end, t_start;
    errors = 64'h0123_4567_89AB_CDEF; bits = 64'hFEDC_BA98_7654_3210;
    gating = 1; sl = 0; er = 1;
    #20000 rst_n = 1;
    #100000;
    `CHECK(line_from_dut === 1'b1, "line idle while disabled")
    en = 1;
    for (int p = 0; p < 4; p++) begin
      logic [7:0] want_flags;
      want_flags = {1'b1, 4'b0, ~gating, sl, er};
      all_ok = 1;
      for (int i = 0; i < 18; i++) begin
        uart_recv(pkt[i], ok);
        all_ok &= ok;
        if (i == 0) t_start = $time;
      end
      if (p > 0) `CHECK(t_start - t_end > 2.9ms && t_start - t_end < 3.2ms,
                        $sformatf("pause between packages %0t", t_start - t_end))
      t_end = $time;
      `CHECK(all_ok, "stop bits")
      `CHECK(pkt[0] == want_flags, $sformatf("flags %h want %h", pkt[0], want_flags))
      for (int i = 0; i < 8; i++) begin
        `CHECK(pkt[1+i] == errors[63-8*i -: 8], $sformatf("error byte %0d", i))
        `CHECK(pkt[9+i] == bits[63-8*i -: 8], $sformatf("bit byte %0d", i))
      end
      `CHECK(pkt[17] == 8'hAA, "end marker")
      // change the reported state for the next package
      errors = errors + 64'd12345; bits = {bits[31:0], bits[63:32]};
      gating = p[0]; sl = ~p[1]; er = 1;
    end
    en = 0;
    #(25 * BIT_NS * 18);
    begin
      static int edges;
      edges = 0;
      fork
        begin #(40 * BIT_NS); end
        forever begin @(negedge line_from_dut); edges++; end
      join_any
      disable fork;
      `CHECK(edges == 0, "no package after disable")
    end
    `TB_FINISH
  end
endmodule
