// h2_pkg -- types and constants shared by the HIPERLAN/2 baseband modem.
//
// Holds the command set of the modem interface unit (Tx, Tx_S, Tx_L, Rx, Rx_S, Rx_L,
// IQ_EN, RESET, END, NOP, BCH_SRCH, CFG), the seven physical-layer modes, the packet
// types that appear in a command program and the OFDM numerology (64-point FFT,
// 48 data + 4 pilot subcarriers, 16-sample cyclic prefix).
// The command list follows the interface command table of the design; the binary
// encoding of a command word, the mode numbering and the packet sizes in bytes are
// this design's own choices (packet sizes and rates are those of HIPERLAN/2).
//
// Command word (32 bits, one word per command in the command memory):
//   [31:28] opcode (op_e)      [27:15] time slot at which the command executes
//   Tx*/Rx*: [14] P1 (burst starts with a preamble) [13:11] packet type
//            [10:7] number of packets  [6:4] physical mode
//   IQ_EN:   [0] RF interface on
//   END:     [1] flush receive path  [0] flush transmit path
//   RESET:   [14:13] frames for synchronisation search  [12:0] slot number loaded
//            into the slot counter when the preamble is found
package h2_pkg;

  typedef enum logic [3:0] {
    OP_NOP = 4'd0, OP_TX = 4'd1, OP_TX_S = 4'd2, OP_TX_L = 4'd3,
    OP_RX  = 4'd4, OP_RX_S = 4'd5, OP_RX_L = 4'd6, OP_IQ_EN = 4'd7,
    OP_RESET = 4'd8, OP_END = 4'd9, OP_BCH_SRCH = 4'd10, OP_CFG = 4'd11
  } op_e;

  typedef enum logic [2:0] {
    M_BPSK12 = 3'd0, M_BPSK34 = 3'd1, M_QPSK12 = 3'd2, M_QPSK34 = 3'd3,
    M_QAM16_916 = 3'd4, M_QAM16_34 = 3'd5, M_QAM64_34 = 3'd6
  } mode_e;

  typedef enum logic [2:0] {
    PT_BCH = 3'd0, PT_FCH = 3'd1, PT_ACH = 3'd2, PT_SCH = 3'd3, PT_LCH = 3'd4, PT_RCH = 3'd5
  } ptype_e;

  // Preamble kind sent in front of a burst.
  typedef enum logic [1:0] {PRE_NONE = 2'd0, PRE_SHORT = 2'd1, PRE_LONG = 2'd2} pre_e;

  typedef struct packed {
    op_e         op;
    logic [12:0] slot;
    logic        p1;
    ptype_e      ptype;
    logic [3:0]  npkt;
    mode_e       mode;
    logic [3:0]  arg;
  } cmd_t;

  // Everything the transmit or receive path needs to run one burst.
  typedef struct packed {
    mode_e       mode;
    pre_e        pre;
    logic [12:0] nbytes;   // payload bytes of the burst
    logic [6:0]  seed;     // scrambler initial state
  } burst_t;

  localparam int NFFT = 64;
  localparam int NCP  = 16;
  localparam int NSD  = 48;   // data subcarriers per OFDM symbol
  localparam int SW   = 16;   // IQ sample width

  function automatic int unsigned pkt_bytes(ptype_e t);
    case (t)
      PT_BCH: return 15;
      PT_FCH: return 27;
      PT_LCH: return 54;
      default: return 9;    // ACH, SCH, RCH
    endcase
  endfunction

  // coded bits per subcarrier
  function automatic int unsigned nbpsc(mode_e m);
    case (m)
      M_BPSK12, M_BPSK34:       return 1;
      M_QPSK12, M_QPSK34:       return 2;
      M_QAM16_916, M_QAM16_34:  return 4;
      default:                  return 6;
    endcase
  endfunction

  // data bits per OFDM symbol
  function automatic int unsigned ndbps(mode_e m);
    case (m)
      M_BPSK12:    return 24;
      M_BPSK34:    return 36;
      M_QPSK12:    return 48;
      M_QPSK34:    return 72;
      M_QAM16_916: return 108;
      M_QAM16_34:  return 144;
      default:     return 216;
    endcase
  endfunction

  // code rate class: 0 = 1/2, 1 = 3/4, 2 = 9/16
  function automatic logic [1:0] rate_of(mode_e m);
    case (m)
      M_BPSK12, M_QPSK12: return 2'd0;
      M_QAM16_916:        return 2'd2;
      default:            return 2'd1;
    endcase
  endfunction

  // FFT bin of data subcarrier d (0..47): carriers -26..26 without 0 and +-7, +-21
  function automatic logic [5:0] data_bin(int unsigned d);
    int c;
    if (d < 5)        c = -26 + int'(d);
    else if (d < 18)  c = -20 + int'(d) - 5;
    else if (d < 24)  c = -6  + int'(d) - 18;
    else if (d < 30)  c = 1   + int'(d) - 24;
    else if (d < 43)  c = 8   + int'(d) - 30;
    else              c = 22  + int'(d) - 43;
    return 6'(c);
  endfunction

  // Long training symbol value (+1/-1) on carrier c = bin, 0 where unused.
  // L(-26..26) = 1 1 -1 -1 1 1 -1 1 -1 1 1 1 1 1 1 -1 -1 1 1 -1 1 -1 1 1 1 1 0
  //              1 -1 -1 1 1 -1 1 -1 1 -1 -1 -1 -1 -1 1 1 -1 -1 1 -1 1 -1 1 1 1 1
  localparam logic [52:0] LTS_NEG  = 53'h159f53029814c;

  function automatic logic signed [1:0] lts_val(logic [5:0] bin);
    int c; int idx;
    c = (bin >= 32) ? int'(bin) - 64 : int'(bin);
    if (c < -26 || c > 26 || c == 0) return 2'sd0;
    idx = c + 26;
    return LTS_NEG[idx] ? -2'sd1 : 2'sd1;
  endfunction

  // Short training symbol: carriers +-4,+-8,...,+-24 carry (1+j) or -(1+j).
  // S(-24..24 step 4) = +,-,+,-,-,+,0,-,-,+,+,+,+  (sign of (1+j))
  function automatic logic signed [1:0] sts_val(logic [5:0] bin);
    int c;
    logic [12:0] neg;
    neg = 13'b0000110011010; // bit n for carrier -24+4n : 1 = negative
    c = (bin >= 32) ? int'(bin) - 64 : int'(bin);
    if (c < -24 || c > 24 || c == 0 || (c % 4) != 0) return 2'sd0;
    return neg[(c + 24) / 4] ? -2'sd1 : 2'sd1;
  endfunction

endpackage
