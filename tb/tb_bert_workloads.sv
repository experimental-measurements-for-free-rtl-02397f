// tb_bert_workloads: the loopback measurements the tester was built for,
// run end to end through bert_top with a shortened second (1 Hz from 20000
// board clocks, so one gating "second" is 200 us = 25000 words at 2.5 Gb/s).
//  1. PRBS 2^7-1, 2^15-1, 2^29-1 and 2^31-1 at 2.5 Gb/s, no error
//     insertion, each gated for 3 s: no errors, bit count worth 2 to 3 s,
//     gating ended by time. The transmitted line stream is checked
//     against the polynomial's recurrence s[k] = s[k-N] ^ s[k-T], worked
//     out here independently of the RTL.
//  2. PRBS 2^15-1 with error insertion, the shortest ratio (one error per
//     500 words, 1e-4) standing in for 1e-9 and 1e-7, which would take
//     seconds of simulated time: errors / bits must equal the ratio.
//  3. PRBS 2^15-1 at 2.25 Gb/s (112.5 MHz user clock): clean gating.
// Each workload re-enables both channels, so each also exercises the
// start-up sequence, the seed load and the receiver's synchronisation.
`include "tb_check.svh"
module tb_bert_workloads;
  `TB_COUNTERS
  `include "tb_bert_top_env.svh"
  localparam int unsigned DIV_1HZ = 20000;
  localparam longint SEC_BITS = longint'(DIV_1HZ) * 10 / 8 * 20;   // at 2.5 Gb/s

  bert_top #(.DIV_1HZ(DIV_1HZ)) dut (
    .clk_100M, .rst_n, .serial_rx(line_to_dut), .serial_tx(line_from_dut),
    .tx_usrclk(usrclk), .tx_dcm_locked(tx_locked), .tx_rst_dcm,
    .tx_synth_sdata(tx_sd), .tx_synth_sclk(tx_sc), .tx_synth_sload(tx_sl),
    .rio_tx, .tx_polarity(tx_pol),
    .rx_usrclk(usrclk), .rx_dcm_locked(rx_locked), .rx_rst_dcm,
    .rx_synth_sdata(rx_sd), .rx_synth_sclk(rx_sc), .rx_synth_sload(rx_sl),
    .rio_rx, .rx_polarity(rx_pol), .rx_enable(rx_en),
    .syncloss_led(sl_led), .error_led(er_led));

  // line stream recorder: bit 19 of each word is sent first
  bit  rec_on = 0;
  bit  line_bits [$];
  always @(posedge usrclk)
    if (rec_on) begin
      logic [19:0] w;
      w = rio_tx_to_word_tb(rio_tx) ^ {20{tx_pol}};
      for (int i = 19; i >= 0; i--) line_bits.push_back(w[i]);
    end

  // number of positions where the recorded stream breaks the recurrence
  function automatic int recurrence_breaks(int n, int t);
    int bad = 0;
    for (int k = n; k < line_bits.size(); k++)
      if (line_bits[k] != (line_bits[k-n] ^ line_bits[k-t])) bad++;
    return bad;
  endfunction

  int n_workloads = 0;

  task automatic run_prbs(input int code, input int n, input int t, input int err_sel,
                          input string name);
    int bad;
    wr(8'h60, 8'd0); wr(8'h66, 8'd0);
    wr(8'h61, 8'(code)); wr(8'h67, 8'(code));
    wr(8'h64, err_sel >= 0 ? 8'd1 : 8'd0);
    if (err_sel >= 0) wr(8'h65, 8'(err_sel));
    wr(8'h60, 8'd1); wr(8'h66, 8'd1);
    #300us;
    // the recorder starts once the generator runs
    line_bits.delete();
    rec_on = 1;
    repeat (400) @(posedge usrclk);
    rec_on = 0;
    if (err_sel < 0) begin
      bad = recurrence_breaks(n, t);
      `CHECK(line_bits.size() >= 7900 && bad == 0,
             $sformatf("%s: line stream breaks x^%0d+x^%0d+1 at %0d of %0d bits",
                       name, n, t, bad, line_bits.size()))
    end
    wr(8'h6B, 8'd1);
    wait (dut.u_ctrl.errdet_cfg.start_gating == 1'b0);
    fresh_pkg();
    `CHECK(last_pkg.ok && last_pkg.flags[2] == 1, $sformatf("%s: gating ended by time", name))
    n_workloads++;
  endtask

  initial begin
    #400ms;
    failures++;
    $display("watchdog");
    `TB_FINISH
  end

  initial begin
    #1000 rst_n = 1;
    #20us;
    wr(8'h6A, 8'd1); wr(8'h6C, 8'd0); wr(8'h75, 8'd3);   // stop after 3 s

    run_prbs(4, 7, 6, -1, "PRBS 2^7-1");
    `CHECK(last_pkg.errors == 0 && last_pkg.bits >= 2 * SEC_BITS && last_pkg.bits <= 3 * SEC_BITS,
           $sformatf("PRBS 2^7-1: %0d errors in %0d bits", last_pkg.errors, last_pkg.bits))
    run_prbs(8, 15, 14, -1, "PRBS 2^15-1");
    `CHECK(last_pkg.errors == 0 && last_pkg.bits >= 2 * SEC_BITS && last_pkg.bits <= 3 * SEC_BITS,
           $sformatf("PRBS 2^15-1: %0d errors in %0d bits", last_pkg.errors, last_pkg.bits))
    run_prbs(11, 29, 27, -1, "PRBS 2^29-1");
    `CHECK(last_pkg.errors == 0 && last_pkg.bits >= 2 * SEC_BITS && last_pkg.bits <= 3 * SEC_BITS,
           $sformatf("PRBS 2^29-1: %0d errors in %0d bits", last_pkg.errors, last_pkg.bits))
    run_prbs(12, 31, 28, -1, "PRBS 2^31-1");
    `CHECK(last_pkg.errors == 0 && last_pkg.bits >= 2 * SEC_BITS && last_pkg.bits <= 3 * SEC_BITS,
           $sformatf("PRBS 2^31-1: %0d errors in %0d bits", last_pkg.errors, last_pkg.bits))

    run_prbs(8, 15, 14, 6, "PRBS 2^15-1, errors inserted");
    `CHECK(last_pkg.bits > 0 &&
           last_pkg.errors * 10000 >= last_pkg.bits - 10000 &&
           last_pkg.errors * 10000 <= last_pkg.bits + 10000,
           $sformatf("error ratio: %0d errors in %0d bits", last_pkg.errors, last_pkg.bits))
    `CHECK(!sl_led, "no syncloss at 1e-4")

    usr_225 = 1;                                         // 112.5 MHz
    run_prbs(8, 15, 14, -1, "PRBS 2^15-1 at 2.25 Gb/s");
    `CHECK(last_pkg.errors == 0 &&
           last_pkg.bits >= 2 * SEC_BITS * 9 / 10 && last_pkg.bits <= 3 * SEC_BITS * 9 / 10,
           $sformatf("2.25 Gb/s: %0d errors in %0d bits", last_pkg.errors, last_pkg.bits))

    $display("workloads=%0d packages=%0d", n_workloads, pkg_count);
    `CHECK(n_workloads == 6, "every workload ran")
    `CHECK(bad_pkgs == 0, "every package well formed")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
