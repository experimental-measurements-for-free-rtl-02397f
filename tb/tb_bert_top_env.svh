// tb_bert_top_env.svh: environment shared by the top-level testbenches,
// included inside the testbench module after `TB_COUNTERS.
//  - 100 MHz board clock; a 125 MHz user clock (2.5 Gb/s / 20), or 112.5 MHz
//    (2.25 Gb/s) when usr_225 is set, shared by both channels: in a
//    loopback the receiver recovers the transmit clock.
//  - DCM models: lock LOCK_CYCLES user clocks after their reset is released.
//  - Synthesizer models: capture the 14 serial bits on each programming
//    clock rising edge and record the word when S_LOAD pulses.
//  - Loopback channel: the transmit word, through both transceivers'
//    polarity inversion, optionally slipped by one bit, to the receiver.
//  - PC model: writes registers over RS-232 and decodes result packages.
// Expects the DUT instance `dut` with its ports wired to the signals below.
import bert_pkg::*;

logic clk_100M = 0, rst_n = 0, usrclk = 0;
logic line_to_dut = 1, line_from_dut;
logic tx_locked = 0, rx_locked = 0, tx_rst_dcm, rx_rst_dcm;
logic tx_sd, tx_sc, tx_sl, rx_sd, rx_sc, rx_sl, tx_pol, rx_pol, rx_en;
logic sl_led, er_led;
rio_tx_t rio_tx;
rio_rx_t rio_rx;
always #5 clk_100M = ~clk_100M;
bit usr_225 = 0;   // 1: 112.5 MHz user clock (2.25 Gb/s)
always begin
  if (usr_225) #4.444ns; else #4ns;
  usrclk = ~usrclk;
end

`include "tb_uart_tasks.svh"

// DCM models
int tx_lock_cnt = 0, rx_lock_cnt = 0;
localparam int LOCK_CYCLES = 50;
always @(posedge usrclk) begin
  if (tx_rst_dcm) begin tx_locked <= 0; tx_lock_cnt <= 0; end
  else if (tx_lock_cnt == LOCK_CYCLES) tx_locked <= 1;
  else tx_lock_cnt <= tx_lock_cnt + 1;
  if (rx_rst_dcm) begin rx_locked <= 0; rx_lock_cnt <= 0; end
  else if (rx_lock_cnt == LOCK_CYCLES) rx_locked <= 1;
  else rx_lock_cnt <= rx_lock_cnt + 1;
end

// synthesizer models
logic [13:0] tx_shift = 0, rx_shift = 0;
logic [13:0] tx_words [$], rx_words [$];
always @(posedge tx_sc) tx_shift <= {tx_shift[12:0], tx_sd};
always @(posedge rx_sc) rx_shift <= {rx_shift[12:0], rx_sd};
always @(posedge tx_sl) tx_words.push_back(tx_shift);
always @(posedge rx_sl) rx_words.push_back(rx_shift);

// loopback channel, one word of delay, optional one-bit slip
bit   slip_req = 0;
int   slips = 0;
logic [39:0] chan_hist = 0;
int   chan_shift = 0;
always @(posedge usrclk) begin
  logic [19:0] w;
  w = rio_tx_to_word_tb(rio_tx) ^ {20{tx_pol}};
  chan_hist = {chan_hist[19:0], w};
  if (slip_req) begin chan_shift = (chan_shift + 1) % 20; slip_req = 0; slips++; end
  rio_rx <= word_to_rio_rx_tb(20'(chan_hist >> chan_shift) ^ {20{rx_pol}});
end

function automatic logic [19:0] rio_tx_to_word_tb(rio_tx_t t);
  // line order from the transmit pin layout: slot 0 first
  return {t.txchardispmode[1], t.txchardispval[1], t.txdata[15:8],
          t.txchardispmode[0], t.txchardispval[0], t.txdata[7:0]};
endfunction

function automatic rio_rx_t word_to_rio_rx_tb(logic [19:0] w);
  rio_rx_t r;
  r.rxcharisk[1] = w[19]; r.rxrundisp[1] = w[18]; r.rxdata[15:8] = w[17:10];
  r.rxcharisk[0] = w[9];  r.rxrundisp[0] = w[8];  r.rxdata[7:0]  = w[7:0];
  return r;
endfunction

// PC model: package reader
typedef struct {
  logic [7:0]  flags;
  logic [63:0] errors;
  logic [63:0] bits;
  bit          ok;
} pkg_t;
pkg_t last_pkg;
int   pkg_count = 0, bad_pkgs = 0;
initial begin
  forever begin
    logic [7:0] b [18];
    logic ok, all_ok;
    all_ok = 1;
    for (int i = 0; i < 18; i++) begin uart_recv(b[i], ok); all_ok &= ok; end
    last_pkg.flags  = b[0];
    last_pkg.errors = {b[1], b[2], b[3], b[4], b[5], b[6], b[7], b[8]};
    last_pkg.bits   = {b[9], b[10], b[11], b[12], b[13], b[14], b[15], b[16]};
    last_pkg.ok     = all_ok && b[17] == 8'hAA && b[0][7:3] == 5'b10000;
    if (!last_pkg.ok) bad_pkgs++;
    pkg_count++;
  end
end

task automatic wr(input logic [7:0] a, input logic [7:0] v);
  uart_send(a);
  uart_send(v);
endtask

// waits for the next complete package
task automatic next_pkg();
  int n;
  n = pkg_count;
  wait (pkg_count > n);
endtask

// a fresh package taken after everything up to now has settled
task automatic fresh_pkg();
  next_pkg();
  next_pkg();
endtask
