// tb_bert_top: end-to-end test of the tester in a loopback, with the 1 Hz
// divider shortened to 20000 board clocks (a "second" of 200 us) and a
// 500-word sync window; everything else at its default. A PC model
// programs the registers over RS-232 and reads the result packages.
// Mechanisms exercised and counted: synthesizer programming (both
// channels, and again after a bit-rate change), start-up and seed load,
// error-free PRBS check, error insertion, error-count gating stop,
// gating-time stop, syncloss with autosync after a channel slip, polarity
// inversion on both sides, error and syncloss indicators, result packages.
`include "tb_check.svh"
module tb_bert_top;
  `TB_COUNTERS
  `include "tb_bert_top_env.svh"

  localparam int DIV_1HZ = 20000;
  bert_top #(.DIV_1HZ(DIV_1HZ), .WINDOW_WORDS(500)) dut (
    .clk_100M, .rst_n, .serial_rx(line_to_dut), .serial_tx(line_from_dut),
    .tx_usrclk(usrclk), .tx_dcm_locked(tx_locked), .tx_rst_dcm,
    .tx_synth_sdata(tx_sd), .tx_synth_sclk(tx_sc), .tx_synth_sload(tx_sl),
    .rio_tx, .tx_polarity(tx_pol),
    .rx_usrclk(usrclk), .rx_dcm_locked(rx_locked), .rx_rst_dcm,
    .rx_synth_sdata(rx_sd), .rx_synth_sclk(rx_sc), .rx_synth_sload(rx_sl),
    .rio_rx, .rx_polarity(rx_pol), .rx_enable(rx_en),
    .syncloss_led(sl_led), .error_led(er_led));

  localparam logic [32*11-1:0] ROMV = prog_freq_default_rom();

  // mechanism counters
  int n_prog = 0, n_seed = 0, n_inserr = 0, n_err_stop = 0, n_time_stop = 0;
  int n_syncloss = 0, n_resync = 0, n_sl_led = 0, n_er_led = 0, n_pol = 0;
  always @(posedge usrclk) begin
    if (dut.u_patgen.inserr) n_inserr++;
    if (dut.u_errdet.syncloss) n_syncloss++;
  end
  always @(posedge dut.u_errdet.sync_load) n_resync++;
  always @(posedge dut.load_seed) n_seed++;
  always @(posedge sl_led) n_sl_led++;
  always @(posedge er_led) n_er_led++;

  initial begin
    #150ms;
    failures++;
    $display("watchdog");
    `TB_FINISH
  end

  initial begin
    #1000 rst_n = 1;
    #20us;
    // configuration: PRBS 2^15-1 at bit-rate code 12 on both channels
    wr(8'h61, 8'd8);  wr(8'h62, 8'd12);
    wr(8'h67, 8'd8);  wr(8'h68, 8'd12);
    wr(8'h65, 8'd6);  wr(8'h6A, 8'd1);  wr(8'h77, 8'd2);
    wr(8'h6C, 8'd1);  wr(8'h76, 8'd0);
    wr(8'h60, 8'd1);  wr(8'h66, 8'd1);
    #300us;
    `CHECK(tx_words.size() == 1 && rx_words.size() == 1, "both synthesizers programmed once")
    if (tx_words.size() > 0) `CHECK(tx_words[0] == {3'b0, ROMV[12*11 +: 11]}, "TX synthesizer word")
    if (rx_words.size() > 0) `CHECK(rx_words[0] == {3'b0, ROMV[12*11 +: 11]}, "RX synthesizer word")
    n_prog = tx_words.size() + rx_words.size();
    `CHECK(dut.en_pat && dut.en_err && rx_en, "both channels running")

    // 1. clean gating (stops only at 10 errors, none expected)
    wr(8'h6B, 8'd1);
    fresh_pkg();
    `CHECK(last_pkg.ok && last_pkg.flags[2] == 0, "package shows gating running")
    `CHECK(last_pkg.errors == 0 && last_pkg.bits > 0, $sformatf("clean link: %0d errors in %0d bits",
           last_pkg.errors, last_pkg.bits))

    // 2. error insertion: 1 per 500 words, gating stops at 10 errors
    wr(8'h64, 8'd1);
    #500us;
    fresh_pkg();
    `CHECK(last_pkg.flags[2] == 1, "gating stopped by error count")
    if (last_pkg.flags[2]) n_err_stop++;
    `CHECK(last_pkg.errors >= 10 && last_pkg.errors <= 11,
           $sformatf("stopped at %0d errors", last_pkg.errors))
    wr(8'h64, 8'd0);

    // 3. error insertion measured rate over a 3 s time gating
    wr(8'h6C, 8'd0); wr(8'h75, 8'd3);
    wr(8'h64, 8'd1);
    wr(8'h6B, 8'd1);
    #1000us;
    fresh_pkg();
    `CHECK(last_pkg.flags[2] == 1, "gating stopped by time")
    if (last_pkg.flags[2]) n_time_stop++;
    begin
      // the gating clock counts whole 1 Hz ticks, the first of which can come
      // at any time after the start: the period lasts between 2 and 3 s
      longint sec_bits;
      sec_bits = longint'(DIV_1HZ) * 10 / 8 * 20;
      `CHECK(last_pkg.bits >= sec_bits * 2 && last_pkg.bits <= sec_bits * 3 + 1000,
             $sformatf("3 s of bits: %0d (one second is %0d)", last_pkg.bits, sec_bits))
      `CHECK(last_pkg.errors * 10000 == last_pkg.bits || last_pkg.errors * 10000 + 10000 >= last_pkg.bits
             && last_pkg.errors * 10000 <= last_pkg.bits + 10000,
             $sformatf("inserted ratio 1e-4: %0d errors in %0d bits", last_pkg.errors, last_pkg.bits))
    end
    wr(8'h64, 8'd0);

    // 4. channel slip: syncloss, autosync, clean again
    wr(8'h75, 8'd0);                 // time gating with no limit
    slip_req = 1;
    #400us;
    `CHECK(n_syncloss >= 1, "slip caused a syncloss")
    `CHECK(n_sl_led >= 1, "syncloss indicator lit")
    wr(8'h6B, 8'd1);
    fresh_pkg();
    `CHECK(last_pkg.errors == 0 && last_pkg.flags[2] == 0,
           $sformatf("resynchronized: %0d errors", last_pkg.errors))

    // 5. polarity inverted on both sides: still clean
    wr(8'h63, 8'd1); wr(8'h69, 8'd1);
    #200us;
    wr(8'h6B, 8'd0); wr(8'h6B, 8'd1);
    fresh_pkg();
    `CHECK(tx_pol && rx_pol, "both polarities inverted")
    `CHECK(last_pkg.errors == 0, $sformatf("inverted link clean: %0d errors", last_pkg.errors))
    if (tx_pol && rx_pol && last_pkg.errors == 0) n_pol++;
    wr(8'h6B, 8'd0);

    // 6. bit-rate change reprograms the transmit synthesizer
    wr(8'h62, 8'd5);
    #300us;
    `CHECK(tx_words.size() == 2 && tx_words[$] == {3'b0, ROMV[5*11 +: 11]}, "TX reprogrammed for code 5")
    n_prog = tx_words.size() + rx_words.size();

    // mechanism summary
    $display("programming=%0d seed=%0d inserted=%0d err_stop=%0d time_stop=%0d syncloss=%0d resync=%0d sl_led=%0d er_led=%0d pol=%0d slips=%0d packages=%0d",
             n_prog, n_seed, n_inserr, n_err_stop, n_time_stop, n_syncloss, n_resync,
             n_sl_led, n_er_led, n_pol, slips, pkg_count);
    `CHECK(n_prog >= 3, "synthesizer programming happened")
    `CHECK(n_seed >= 2, "seed load happened")
    `CHECK(n_inserr >= 10, "error insertion happened")
    `CHECK(n_err_stop >= 1, "error-count stop happened")
    `CHECK(n_time_stop >= 1, "time stop happened")
    `CHECK(n_syncloss >= 1 && n_resync >= 2, "syncloss and resync happened")
    `CHECK(n_sl_led >= 1 && n_er_led >= 1, "indicators lit")
    `CHECK(n_pol >= 1, "polarity inversion exercised")
    `CHECK(pkg_count >= 6 && bad_pkgs == 0, $sformatf("%0d packages, %0d bad", pkg_count, bad_pkgs))
    `TB_FINISH
  end
endmodule
