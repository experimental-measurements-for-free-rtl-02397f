// tb_prog_freq: loads the synthesizer word for several addresses and
// captures ser_output on each rising edge of prg_clk, as the synthesizer
// would. Checks 14 programming clock pulses, the word (three zeros and the
// 11 ROM bits, MSB first), that prg_clk is 0 outside a cycle, and that
// finish drops at the start and rises at the end.
`include "tb_check.svh"
module tb_prog_freq;
  import bert_pkg::*;
  `TB_COUNTERS
  logic clk = 0, rst_n = 0, load = 0, finish, prg_clk, sdata;
  logic [4:0] addr = 0;
  always #720 clk = ~clk;
  localparam logic [32*11-1:0] ROMV = prog_freq_default_rom();

  prog_freq dut (.clk, .rst_n, .address(addr), .load, .finish, .prg_clk,
    .ser_output(sdata));

  logic [13:0] captured;
  int pulses;
  always @(posedge prg_clk) begin
    captured <= {captured[12:0], sdata};
    pulses++;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    `TB_FINISH
  end

  initial begin
    int idle_pulses;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int a = 0; a < 32; a += 9) begin
      addr <= 5'(a);
      pulses = 0;
      load <= 1; @(posedge clk); load <= 0;
      #1 `CHECK(!finish, "finish low during programming")
      wait (finish);
      @(posedge clk);
      `CHECK(pulses == 14, $sformatf("14 programming clocks (%0d)", pulses))
      `CHECK(captured == {3'b000, ROMV[a*11 +: 11]},
             $sformatf("word for address %0d: %b", a, captured))
      idle_pulses = pulses;
      repeat (5) @(posedge clk);
      `CHECK(pulses == idle_pulses && !prg_clk, "programming clock stopped when idle")
      `CHECK(finish, "finish stays high")
    end
    `TB_FINISH
  end
endmodule
