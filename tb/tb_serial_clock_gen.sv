// tb_serial_clock_gen: at the default divider values, checks the 115.2 kHz
// period (868 board clocks = 8680 ns), the 694 kHz period (144 board clocks
// = 1440 ns), 50 % duty, and that rst_fromclks is released only after the
// 115.2 kHz clock has made its first falling edge (868 board clocks).
`include "tb_check.svh"
module tb_serial_clock_gen;
  `TB_COUNTERS
  logic clk = 0, rst = 0, c115, c694, rst_out;
  always #5 clk = ~clk;
  serial_clock_gen dut (.clk_100M(clk), .rst, .clk_115p2k(c115),
    .clk_694k(c694), .rst_fromclks(rst_out));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    `TB_FINISH
  end

  initial begin
    time t0, t1, t2;
    int n;
    #22 rst = 1;
    n = 1;
    @(posedge clk); #1;
    `CHECK(!rst_out, "reset held after release of rst")
    while (!rst_out) begin @(posedge clk); #1 n++; end
    `CHECK(n == 868, $sformatf("rst_fromclks released after %0d clocks", n))
    @(posedge c115); t0 = $time; @(negedge c115); t1 = $time; @(posedge c115); t2 = $time;
    `CHECK(t2 - t0 == 8680, $sformatf("115.2k period %0t", t2 - t0))
    `CHECK(t1 - t0 == 4340, "115.2k duty")
    @(posedge c694); t0 = $time; @(negedge c694); t1 = $time; @(posedge c694); t2 = $time;
    `CHECK(t2 - t0 == 1440, $sformatf("694k period %0t", t2 - t0))
    `CHECK(t1 - t0 == 720, "694k duty")
    rst = 0; #1 `CHECK(!rst_out && !c115 && !c694, "asynchronous reset")
    `TB_FINISH
  end
endmodule
