# A 2.5 Gb/s bit error rate tester in one FPGA

This design measures the bit error rate of a serial link running at 0.7 to 2.5 Gb/s. It was built for
testing free-space optical links. It has two independent halves:

- **Pattern generator.** It sends a pseudo-random bit sequence (PRBS 2^7-1 up to 2^31-1) or a fixed
  pattern into a multi-gigabit transmitter. It can invert one bit at a fixed ratio to inject errors.
- **Error detector.** It takes the words from a multi-gigabit receiver and locks a local copy of the
  same PRBS onto them. It then counts every received bit and every wrong bit in 64-bit counters.

A PC controls both halves over a plain RS-232 line. It writes registers as address/value byte pairs.
While the detector is enabled, the FPGA sends back an 18-byte result package every few milliseconds.
A measurement period ("gating") ends after a programmed time or a programmed number of errors. Two
LEDs show loss of synchronisation and recent errors.

The transceivers, clock managers and clock synthesizers are vendor or board parts. The RTL stops at
their pins, and the top module brings those pins out as ports.

## Clocks

Five clocks are used. Every block belongs to exactly one of them.

| Clock | Source | Used by |
|---|---|---|
| `clk_100M` | board oscillator | serial clock dividers, the two start-up sequencers, the finish-gating comparator, the 1 Hz divider |
| `clk_694k` | 100 MHz / 144 | UART receiver, register bank, synthesizer programmers |
| `clk_115p2k` | 100 MHz / 868 | UART transmitter, result package sender |
| `tx_usrclk` | bit rate / 20, from the transmit DCM | pattern generator |
| `rx_usrclk` | bit rate / 20, recovered by the receiver | error detector |

The two serial clocks come from counter dividers (`clk_gen_div`). Each divider also makes a reset,
and the two resets are combined into `rst_fromclks`. That reset is released on a falling edge of the
divided clock, half a period away from any rising edge. Logic on the divided clock therefore sees
reset at its first edge and a clean release before its second.

At 2.5 Gb/s both user clocks run at 125 MHz, an 8 ns cycle. The counters and PRBS logic are
pipelined with that period in mind. No timing analysis is part of this repository.

Control levels entering a user-clock domain pass two-flop synchronizers (`sync2`). These are the
enables, the seed load and the gating start. The 1 Hz wave is synchronised the same way. Each user
domain is held in reset until its DCM reports lock.

The detector's results travel the other way: 64-bit counts, BCD time and flags. They change every
user clock, so bit-by-bit synchronizers would tear them. `snapshot_sync` moves them as whole
snapshots instead, using a toggle handshake:

1. The slow side flips a request.
2. The fast side sees the request through two flip-flops. It copies the value into a hold register
   and flips its acknowledge.
3. The slow side sees the acknowledge through two flip-flops. It takes the hold register, which has
   been still for at least two of its clocks, and asks again.

Two instances are used. One feeds the result package sender (115.2 kHz), refreshed about every
40 µs. The other feeds the finish-gating comparator (100 MHz), refreshed about every 60 ns.

## Twenty bits per clock: the PRBS engine

The transceivers run in 20-bit mode with 8B/10B coding bypassed, so every user clock carries 20 line
bits. None of the PRBS lengths divides by 20, so a simple "one shift register per bit lane" generator
cannot be used. Instead, each generator (`prbs_par`) evaluates the serial LFSR recurrence twenty times
in one clock:

    s[k] = s[k-N] xor s[k-T]

N and T come from the polynomial x^N + x^T + 1:

| PRBS | 2^7-1 | 2^9-1 | 2^10-1 | 2^11-1 | 2^15-1 | 2^20-1 | 2^23-1 | 2^29-1 | 2^31-1 |
|---|---|---|---|---|---|---|---|---|---|
| N, T | 7, 6 | 9, 5 | 10, 7 | 11, 9 | 15, 14 | 20, 3 | 23, 18 | 29, 27 | 31, 28 |
| code | 4 | 5 | 6 | 7 | 8 | 9 | 10 | 11 | 12 |

The generator keeps a 40-bit history: the previous word and the current word. The longest tap, 31 bits
back, therefore always reaches into stored bits. For N up to 20 only the current word matters. For
2^23, 2^29 and 2^31 the previous word supplies the remaining taps.

Bit 19 of every word is the earliest bit on the line, in both the generator and the detector.

**Seed load and resynchronisation.** When `load` is high, the history shifts by one word and takes the
`seed` input as the new current word. The PRBS step is skipped for that clock.

- On the transmit side, the seed is a constant (all ones).
- On the receive side, the seed is the received word itself.

After two consecutive loads the history holds 40 genuine received bits. That is enough to continue any
of the nine sequences. From then on the local generator predicts the next word. If the channel was
error-free during those two words, it matches the received data exactly.

`pattern_hw` holds the nine generators and the four fixed patterns:

| Code | Pattern |
|---|---|
| 0 | all zeros |
| 1 | 1010… |
| 2 | five ones, five zeros |
| 3 | ten ones, ten zeros |
| 13–15 | all zeros |

A registered multiplexer selects the output. Only the selected generator is clocked. The detector's
copy is built with `PRBS_ONLY = 1`, which drops the fixed patterns.

### Mapping a word onto the transceiver pins

In 20-bit mode the transmitter takes 16 data bits plus two pairs of "character display" control bits.
The receiver returns 16 data bits plus two pairs of status bits. `bert_pkg::word_to_rio_tx` and
`rio_rx_to_word` place them in this order:

| Word bits | 19 | 18 | 17..10 | 9 | 8 | 7..0 |
|---|---|---|---|---|---|---|
| transmit pin | TXCHARDISPMODE[1] | TXCHARDISPVAL[1] | TXDATA[15:8] | TXCHARDISPMODE[0] | TXCHARDISPVAL[0] | TXDATA[7:0] |
| receive pin | RXCHARISK[1] | RXRUNDISP[1] | RXDATA[15:8] | RXCHARISK[0] | RXRUNDISP[0] | RXDATA[7:0] |

## The error detector

`error_detector` runs on `rx_usrclk`. A received word passes through three registers before it is
compared. The local generator's output register adds one clock after a load. The extra delay lines up
each received word with the prediction made for it.

### Counting without losing a word

- **`error_counter`.** Computes the XOR of received and expected words, registered. `bit_to_bit_adder`
  then counts the ones in the 20-bit difference. It uses four 32-entry ROMs of 3 bits, one per 5-bit
  slice, and a balanced adder tree. The result is registered and added to a 64-bit total.
- **Gate alignment.** The gate signal travels through the same two pipeline stages. A word is
  therefore counted exactly when it was compared during gating.
- **`bit_counter`.** Adds 20 per gated word. Its gate is delayed by the same two clocks, so errors and
  bits always describe the same set of words.
- **Capacity.** The 64-bit counters last 2^64 bits: about 187 years even at 3.125 Gb/s.

### Synchronisation window and indicators

`err_sync_counter` sums word errors over windows of 12 500 words (250 000 bits). If a window ends with
more errors than the autosync threshold, it raises `syncloss`.

| Sync_threshold | Errors per window | BER |
|---|---|---|
| 0 | 2500 | 1e-2 |
| 1 | 250 | 1e-3 |
| 2 | 25 | 1e-4 |
| 3 | 2 | 1e-5 |

When autosync is enabled, `syncloss` triggers two more seed loads from the received data and restarts
the window. The same double load happens whenever the detector is enabled.

Both indicators stay on until the second 1 Hz tick after the event, which is 1 to 2 seconds:

- A syncloss lights both the syncloss and the error indicators.
- A window with any errors at or below the threshold lights only the error indicator.

### Gating

Writing 1 to `Start_gating` (through the error detector sequencer) starts a gating period. At the
start, the counters and `time_counter` are cleared. The time counter counts seconds in BCD, from
0 days 00:00:00 up to 999 days 23:59:59, where it stops.

`finish_gating` (100 MHz domain) compares against one of two limits and raises `stop`:

- **Gating_Type 0:** the gated time has reached the programmed BCD stop time. A stop time of zero
  means no limit.
- **Gating_Type 1:** the error count has reached 10, 100, 1000 or 10 000 (Error_Threshold 0..3).

`stop` clears `Start_gating`, which ends the period. The counts stay readable until the next start.
The comparator is shown zeros until the detector has actually cleared its counts for the new period.
A count left over from the previous period therefore cannot end the new one the moment it starts.
Time is counted in whole ticks of the free-running 1 Hz clock, so a period with a stop time of N seconds lasts between N-1 and N seconds.

## The pattern generator

`pattern_generator` adds two things to `pattern_hw`:

- **`err_insert`.** A counter that pulses once every N user clocks. N is 5·10^8, 5·10^7, … 500
  (err_ratio 0..6; 7 also gives 500). With 20 bits per clock this gives error ratios of 1e-10 to 1e-4.
- **Bit inverter.** While the pulse is high, it flips bit 19 of the outgoing word.

## Start-up order

Neither channel works unless its clocks are set up in order. Two sequencers on `clk_100M` handle this.

`patgen_ctrl` takes the transmit channel through these steps:

1. Ask the frequency programmer to shift the synthesizer word for the selected bit rate. Wait until
   it reports done.
2. Pulse the synthesizer's S_LOAD.
3. Hold the DCM in reset, release it, and wait for lock.
4. Load the seed.
5. Run.

`errdet_ctrl` does the same for the receive channel, with two differences. It enables the receiver and
waits a settling time in place of the seed step. It passes `Start_gating` on only while running.

Each strobe is held for `HOLD` = 16 clocks of 100 MHz, long enough for the slower user clocks to see it.

- Changing the bit rate while running starts again from step 1.
- Losing DCM lock starts again from step 3.
- Clearing the enable switches the channel off.

`prog_freq` (694 kHz) holds the synthesizer words in a 32-entry ROM indexed by the bit-rate register.
It shifts a 14-bit word out MSB first. Its programming clock is the inverted 694 kHz clock, gated so
it only runs during the 14 shifts. Data changes half a period before the synthesizer samples it.
`finish` is high when idle, drops when a load starts, and rises after the last bit.

## Talking to it: RS-232

The line runs at 115 200 baud with 8 data bits, LSB first, and two stop bits.

- **Transmitter (`uart_tx`).** An 11-bit shift register on the 115.2 kHz clock.
- **Receiver (`uart_rx`).** Runs on the 694 kHz clock, six samples per bit. It synchronises the line,
  finds the start bit, and samples each bit near its middle. `new_data_n` is asserted, active low, for
  one 694 kHz cycle after the byte is stored.

### Registers (`control_regs`)

The PC sends an address byte, then a value byte. Only the register's width is kept. A byte that is not
a valid address is dropped and the next byte is again taken as an address. All registers reset to 0.

| Addr | Register | Bits | | Addr | Register | Bits |
|---|---|---|---|---|---|---|
| 60 | PatgenEN | 1 | | 6C | Gating_Type (0 time, 1 errors) | 1 |
| 61 | TXPRBS_sel (pattern code) | 4 | | 6D–6F | days, hundreds/tens/units (BCD) | 4 each |
| 62 | TX_BR (bit-rate ROM index) | 5 | | 70–71 | hours, tens/units | 4 each |
| 63 | TXinvertP | 1 | | 72–73 | minutes, tens/units | 4 each |
| 64 | Insert_err | 1 | | 74–75 | seconds, tens/units | 4 each |
| 65 | err_ratio | 3 | | 76 | Error_Threshold | 2 |
| 66 | ERRdet_EN | 1 | | 77 | Sync_threshold | 2 |
| 67 | RXPRBS_sel | 4 | | | | |
| 68 | RX_BR | 5 | | | | |
| 69 | RXinvertP | 1 | | | | |
| 6A | Autosync_EN | 1 | | | | |
| 6B | Start_gating | 1 | | | | |

The two polarity bits drive the transceivers' own polarity inputs (`tx_polarity`, `rx_polarity`).

### Result package (`data_tx_hw`)

While ERRdet_EN is set, the FPGA sends these 18 bytes and then waits 3 ms (346 cycles at 115.2 kHz):

| Byte | 0 | 1–8 | 9–16 | 17 |
|---|---|---|---|---|
| Content | flags | error count, MSB first | bit count, MSB first | 0xAA |

The flags byte is `{1, 0, 0, 0, 0, not gating, syncloss indicator, error indicator}`. The counts are
captured when the package starts, so the 16 count bytes belong together. One package takes about
1.7 ms plus the 3 ms pause.

## Departures and open points

- **Synthesizer words are placeholders.** The real ROM must hold the divider words for the board's
  synthesizer at each bit rate. Until then the bit-rate registers select nothing meaningful.
- **State machines are this design's own.** The original description names the start-up sequencers
  and the UART receive control, and the signals they drive. The states, their order and the hold
  times were designed here.
- **Chosen values.** The autosync thresholds, error-stop values, pattern codes, flags layout, seed
  value, and the choice of bit 19 as first on the line were all chosen here.
- **Indicator hold time.** Indicators stay on 1–2 s rather than exactly 1 s. The 1 Hz reference is
  made from the 100 MHz clock.
- **Stop_gating and Start_gating.** Stop_gating *clears* Start_gating. The original description can be
  read as "sets"; clearing is the only reading that ends a gating period.
- **Register bank crossing.** The register bank (694 kHz) feeds the 100 MHz sequencers directly. Its
  outputs only change on serial writes.

## Simulating

Every testbench is self-checking. Each prints `TB_RESULT checks=<n> failures=<n>` and stops, and each
has a watchdog. The testbenches give delays in nanoseconds, so pass `--timescale 1ns/1ps`. With
Verilator 5:

    verilator --binary --timing --timescale 1ns/1ps --top-module tb_pattern_hw \
        -y rtl -y tb +libext+.sv -Irtl -Itb rtl/bert_pkg.sv tb/tb_pattern_hw.sv
    obj_dir/Vtb_pattern_hw

There is one testbench per block, named `tb/tb_<module>.sv`.

**`tb_bert_top`** runs the whole tester with smaller dividers (1 Hz = 20 000 clocks, 500-word sync
window). Its environment is `tb_bert_top_env.svh`:

- models of the two DCMs and the serial synthesizers;
- a loopback channel with polarity inversion and word slips;
- a PC side that writes registers and decodes packages.

It covers these mechanisms and prints a count for each: synthesizer programming, seed loads, inserted
errors, stops on errors and on time, syncloss and resynchronisation, both LEDs, polarity, a channel
slip, and packages. It needs about 20 s.

**`tb_bert_workloads`** runs the loopback measurements the tester was built for, with the same short
second. It needs about 30 s.

- PRBS 2^7-1, 2^15-1, 2^29-1 and 2^31-1 at 2.5 Gb/s, each time-gated. The transmitted line stream is
  checked against its polynomial's recurrence.
- Error insertion, checking that errors / bits equals the programmed ratio.
- A run at 2.25 Gb/s.

**`tb_bert_top_full`** runs the top with every parameter at its default. It runs PRBS 2^31-1 through a
clean gating period and then an error-threshold stop. It needs a few seconds.

## Files

- `rtl/bert_pkg.sv`: shared widths, register addresses, pattern codes, configuration structs, and the
  threshold and transceiver-mapping functions.
- `rtl/bert_top.sv`: the top.
- `rtl/`: one file per module. Helper modules are `prbs_par`, `clk_gen_div`, `uart_tx`, `uart_rx`,
  `sync2` and `snapshot_sync`.
- `tb/`: testbenches, plus `tb_check.svh` (check counters) and `tb_uart_tasks.svh` (line-level UART
  tasks).
