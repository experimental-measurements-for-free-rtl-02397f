// tb_err_insert: for the two shortest periods (500 and 5000 clocks) checks
// that inserr is a single-clock pulse exactly once every N clocks, that the
// first comes N clocks after enabling, that sel 7 behaves as sel 6, that the
// table holds the documented periods, and that clearing en stops it.
`include "tb_check.svh"
module tb_err_insert;
  import bert_pkg::*;
  `TB_COUNTERS
  logic clk = 0, rst_n = 0, en = 0, inserr;
  logic [2:0] sel = 6;
  always #4 clk = ~clk;
  err_insert dut (.clk, .rst_n, .en, .sel, .inserr);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    `TB_FINISH
  end

  task automatic measure(input int n);
    int c;
    en <= 0; @(posedge clk); @(posedge clk);
    en <= 1;
    c = 0;
    do begin @(posedge clk); #1 c++; end while (!inserr);
    `CHECK(c == n, $sformatf("first error after %0d clocks (want %0d)", c, n))
    for (int k = 0; k < 4; k++) begin
      c = 0;
      do begin @(posedge clk); #1 c++; end while (!inserr);
      `CHECK(c == n, $sformatf("error period %0d (want %0d)", c, n))
    end
  endtask

  initial begin
    automatic int periods [7] = '{500000000, 50000000, 5000000, 500000, 50000, 5000, 500};
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int s = 0; s < 7; s++)
      `CHECK(err_ins_period(3'(s)) == 29'(periods[s]), $sformatf("period table %0d", s))
    sel <= 6; measure(500);
    sel <= 5; measure(5000);
    sel <= 7; measure(500);
    en <= 0; @(posedge clk);
    begin
      automatic int seen = 0;
      repeat (1200) begin @(posedge clk); #1 seen += int'(inserr); end
      `CHECK(seen == 0, "no errors when disabled")
    end
    `TB_FINISH
  end
endmodule
