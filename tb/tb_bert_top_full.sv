// tb_bert_top_full: one complete test with every top parameter at its
// default (1 Hz from 100000000 board clocks, 12500-word sync window).
// The PC model sets PRBS 2^31-1 on both channels, enables them, runs a
// clean gating period, then inserts one error every 500 words and checks
// that the gating period ends at the 10-error threshold, and that the
// package reports the expected error ratio.
`include "tb_check.svh"
module tb_bert_top_full;
  `TB_COUNTERS
  `include "tb_bert_top_env.svh"

  bert_top dut (
    .clk_100M, .rst_n, .serial_rx(line_to_dut), .serial_tx(line_from_dut),
    .tx_usrclk(usrclk), .tx_dcm_locked(tx_locked), .tx_rst_dcm,
    .tx_synth_sdata(tx_sd), .tx_synth_sclk(tx_sc), .tx_synth_sload(tx_sl),
    .rio_tx, .tx_polarity(tx_pol),
    .rx_usrclk(usrclk), .rx_dcm_locked(rx_locked), .rx_rst_dcm,
    .rx_synth_sdata(rx_sd), .rx_synth_sclk(rx_sc), .rx_synth_sload(rx_sl),
    .rio_rx, .rx_polarity(rx_pol), .rx_enable(rx_en),
    .syncloss_led(sl_led), .error_led(er_led));

  initial begin
    #60ms;
    failures++;
    $display("watchdog");
    `TB_FINISH
  end

  initial begin
    #1000 rst_n = 1;
    #20us;
    wr(8'h61, 8'd12); wr(8'h67, 8'd12);       // PRBS 2^31-1
    wr(8'h65, 8'd6);  wr(8'h6A, 8'd1);
    wr(8'h6C, 8'd1);  wr(8'h76, 8'd0);        // stop at 10 errors
    wr(8'h60, 8'd1);  wr(8'h66, 8'd1);
    #300us;
    `CHECK(tx_words.size() == 1 && rx_words.size() == 1, "synthesizers programmed")
    wr(8'h6B, 8'd1);
    fresh_pkg();
    `CHECK(last_pkg.ok && last_pkg.flags[2] == 0 && last_pkg.errors == 0 && last_pkg.bits > 0,
           $sformatf("clean gating: flags %h, %0d errors in %0d bits", last_pkg.flags,
                     last_pkg.errors, last_pkg.bits))
    wr(8'h64, 8'd1);
    #200us;
    fresh_pkg();
    `CHECK(last_pkg.ok && last_pkg.flags[2] == 1, "gating ended by the error threshold")
    `CHECK(last_pkg.errors >= 10 && last_pkg.errors <= 11,
           $sformatf("%0d errors at the stop", last_pkg.errors))
    `CHECK(!sl_led, "no syncloss")
    `TB_FINISH
  end
endmodule
