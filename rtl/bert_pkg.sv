// bert_pkg: constants, types and helper functions shared by the BER tester.
//
// Holds the control-register map (one byte address per parameter, 0x60 to
// 0x77), the pattern selection codes of the pattern multiplexer, the word
// width of the 20-bit transceiver interface, the packed configuration
// structs that the control registers hand to the pattern generator and to
// the error detector, and the bit mapping between a 20-bit pattern word and
// the transceiver fabric pins.
//
// Bit order convention used throughout: in a 20-bit pattern word, bit 19 is
// the first bit on the line and bit 0 the last.
package bert_pkg;

  localparam int unsigned WORD_W = 20;  // bits per transceiver user clock

  // Control register addresses (byte written before the value byte).
  typedef enum logic [7:0] {
    A_PATGEN_EN   = 8'h60,
    A_TXPRBS_SEL  = 8'h61,
    A_TX_BR       = 8'h62,
    A_TX_INVERT   = 8'h63,
    A_INSERT_ERR  = 8'h64,
    A_ERR_RATIO   = 8'h65,
    A_ERRDET_EN   = 8'h66,
    A_RXPRBS_SEL  = 8'h67,
    A_RX_BR       = 8'h68,
    A_RX_INVERT   = 8'h69,
    A_AUTOSYNC_EN = 8'h6A,
    A_START_GATE  = 8'h6B,
    A_GATING_TYPE = 8'h6C,
    A_TIME_D2     = 8'h6D,
    A_TIME_D1     = 8'h6E,
    A_TIME_D0     = 8'h6F,
    A_TIME_H1     = 8'h70,
    A_TIME_H0     = 8'h71,
    A_TIME_M1     = 8'h72,
    A_TIME_M0     = 8'h73,
    A_TIME_S1     = 8'h74,
    A_TIME_S0     = 8'h75,
    A_ERR_THRESH  = 8'h76,
    A_SYNC_THRESH = 8'h77
  } reg_addr_e;

  // Pattern multiplexer inputs, in the order the multiplexer lists them.
  typedef enum logic [3:0] {
    PAT_ZEROS   = 4'd0,
    PAT_CLKDIV2 = 4'd1,
    PAT_5ONES   = 4'd2,
    PAT_10ONES  = 4'd3,
    PAT_PRBS7   = 4'd4,
    PAT_PRBS9   = 4'd5,
    PAT_PRBS10  = 4'd6,
    PAT_PRBS11  = 4'd7,
    PAT_PRBS15  = 4'd8,
    PAT_PRBS20  = 4'd9,
    PAT_PRBS23  = 4'd10,
    PAT_PRBS29  = 4'd11,
    PAT_PRBS31  = 4'd12
  } pat_sel_e;

  localparam int unsigned NUM_PRBS = 9;
  // Polynomials x^N + x^T + 1, one per PRBS, in multiplexer order.
  localparam int unsigned PRBS_N [NUM_PRBS] = '{7, 9, 10, 11, 15, 20, 23, 29, 31};
  localparam int unsigned PRBS_T [NUM_PRBS] = '{6, 5, 7, 9, 14, 3, 18, 27, 28};

  // Gating time as nine BCD digits: days (3), hours (2), minutes (2), seconds (2).
  typedef struct packed {
    logic [3:0] d2, d1, d0;
    logic [3:0] h1, h0;
    logic [3:0] m1, m0;
    logic [3:0] s1, s0;
  } bcd_time_t;

  typedef struct packed {
    logic       enable;
    logic [3:0] prbs_sel;
    logic [4:0] bitrate;
    logic       invert;
    logic       insert_err;
    logic [2:0] err_ratio;
  } patgen_cfg_t;

  typedef struct packed {
    logic       enable;
    logic [3:0] prbs_sel;
    logic [4:0] bitrate;
    logic       invert;
    logic       autosync_en;
    logic       start_gating;
    logic       gating_type;   // 0: stop on gating time, 1: stop on error count
    bcd_time_t  gate_time;
    logic [1:0] err_thresh;
    logic [1:0] sync_thresh;
  } errdet_cfg_t;

  // Stop values selected by the 2-bit error threshold register.
  function automatic logic [63:0] err_stop_value(input logic [1:0] sel);
    unique case (sel)
      2'd0: return 64'd10;
      2'd1: return 64'd100;
      2'd2: return 64'd1000;
      default: return 64'd10000;
    endcase
  endfunction

  // Autosync thresholds: errors allowed in one sync window of about
  // 250000 bits for BER limits 1e-2, 1e-3, 1e-4 and 1e-5.
  function automatic logic [17:0] sync_thresh_value(input logic [1:0] sel);
    unique case (sel)
      2'd0: return 18'd2500;
      2'd1: return 18'd250;
      2'd2: return 18'd25;
      default: return 18'd2;
    endcase
  endfunction

  // Error insertion period in user clock cycles, selected by err_ratio.
  function automatic logic [28:0] err_ins_period(input logic [2:0] sel);
    unique case (sel)
      3'd0: return 29'd500000000;
      3'd1: return 29'd50000000;
      3'd2: return 29'd5000000;
      3'd3: return 29'd500000;
      3'd4: return 29'd50000;
      3'd5: return 29'd5000;
      default: return 29'd500;
    endcase
  endfunction

  // Placeholder synthesizer words for the frequency programmers' ROM:
  // {N[1:0] = 1, M[8:0] = 50 + 10*address}. Replace with the board's values.
  function automatic logic [32*11-1:0] prog_freq_default_rom();
    logic [32*11-1:0] r;
    for (int k = 0; k < 32; k++) r[k*11 +: 11] = {2'd1, 9'(50 + 10*k)};
    return r;
  endfunction

  // Transceiver transmit pins (8B/10B bypassed, two-byte path). Slot s of the
  // 20 serial bits (s = 0 sent first) is pattern bit 19-s.
  typedef struct packed {
    logic [15:0] txdata;
    logic [1:0]  txchardispmode;
    logic [1:0]  txchardispval;
  } rio_tx_t;

  typedef struct packed {
    logic [15:0] rxdata;
    logic [1:0]  rxcharisk;
    logic [1:0]  rxrundisp;
  } rio_rx_t;

  function automatic rio_tx_t word_to_rio_tx(input logic [WORD_W-1:0] w);
    rio_tx_t t;
    t.txchardispmode[1] = w[19];     // slot 0
    t.txchardispval[1]  = w[18];     // slot 1
    t.txdata[15:8]      = w[17:10];  // slots 2..9
    t.txchardispmode[0] = w[9];      // slot 10
    t.txchardispval[0]  = w[8];      // slot 11
    t.txdata[7:0]       = w[7:0];    // slots 12..19
    return t;
  endfunction

  function automatic logic [WORD_W-1:0] rio_rx_to_word(input rio_rx_t r);
    return {r.rxcharisk[1], r.rxrundisp[1], r.rxdata[15:8],
            r.rxcharisk[0], r.rxrundisp[0], r.rxdata[7:0]};
  endfunction

endpackage
