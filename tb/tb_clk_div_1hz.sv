// tb_clk_div_1hz: with DIV reduced to 1000, checks that the output period
// is exactly DIV input clocks and the duty cycle is 50 %.
`include "tb_check.svh"
module tb_clk_div_1hz;
  `TB_COUNTERS
  localparam int DIV = 1000;
  logic clk = 0, rst_n = 0, o;
  always #5 clk = ~clk;
  clk_div_1hz #(.DIV(DIV)) dut (.clk, .rst_n, .clk_1hz(o));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    `TB_FINISH
  end

  initial begin
    time t_rise, t_fall, t_next;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge o);
    for (int p = 0; p < 5; p++) begin
      t_rise = $time;
      @(negedge o); t_fall = $time;
      @(posedge o); t_next = $time;
      `CHECK(t_next - t_rise == DIV * 10, $sformatf("period %0t", t_next - t_rise))
      `CHECK(t_fall - t_rise == DIV * 5, $sformatf("high time %0t", t_fall - t_rise))
    end
    `TB_FINISH
  end
endmodule
