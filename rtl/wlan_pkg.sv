// wlan_pkg: types, constants and index functions shared by the OFDM modem,
// the MAC hardware accelerator and the AHB system blocks.
//
// The modem follows the HIPERLAN/2 / IEEE 802.11a physical layer: 64-point
// OFDM with 48 data and 4 pilot subcarriers, BPSK/QPSK/16-QAM/64-QAM, a K=7
// rate-1/2 convolutional code punctured to 2/3, 3/4 or 9/16. The interleaver
// permutation, the Gray constellation tables, the puncturing patterns and the
// subcarrier numbering are those of the two standards; they are collected here
// as pure functions so that transmitter and receiver share one definition.
//
// Lint note: the symbol-size constants and the CRC residue are kept here as
// documentation of the format and may be unused by a given compilation;
// `conv_out` leaves state bit 3 unused because neither generator taps it.
package wlan_pkg;

  // ---------------------------------------------------------------- modem
  typedef enum logic [1:0] {MOD_BPSK = 2'd0, MOD_QPSK = 2'd1, MOD_16QAM = 2'd2, MOD_64QAM = 2'd3} mod_t;
  typedef enum logic [1:0] {CR_1_2 = 2'd0, CR_2_3 = 2'd1, CR_3_4 = 2'd2, CR_9_16 = 2'd3} crate_t;

  localparam int NFFT   = 64;   // FFT size (T_U = 64 samples)
  localparam int NCP    = 16;   // cyclic prefix samples (T_CP = 16 samples)
  localparam int NDATA  = 48;   // data subcarriers
  localparam int NPILOT = 4;    // pilot subcarriers

  // time-domain sample and frequency-domain bin
  typedef struct packed { logic signed [15:0] re; logic signed [15:0] im; } cplx16_t;
  typedef struct packed { logic signed [23:0] re; logic signed [23:0] im; } cplx24_t;

  // constellation unit: one step between adjacent levels is 2*LVL
  localparam int LVL = 256;

  function automatic int unsigned nbpsc(mod_t m);
    case (m)
      MOD_BPSK:  return 1;
      MOD_QPSK:  return 2;
      MOD_16QAM: return 4;
      default:   return 6;
    endcase
  endfunction

  function automatic int unsigned ncbps(mod_t m);
    return 48 * nbpsc(m);
  endfunction

  // Interleaver: coded-bit index k (0..N-1) -> transmitted position j.
  function automatic int unsigned ilv_index(int unsigned k, mod_t m);
    int unsigned n, s, i;
    n = ncbps(m);
    s = (nbpsc(m) / 2 > 1) ? nbpsc(m) / 2 : 1;
    i = (n / 16) * (k % 16) + k / 16;
    return s * (i / s) + (i + n - (16 * i) / n) % s;
  endfunction

  // Deinterleaver: received position j -> coded-bit index k.
  function automatic int unsigned dil_index(int unsigned j, mod_t m);
    int unsigned n, s, i;
    n = ncbps(m);
    s = (nbpsc(m) / 2 > 1) ? nbpsc(m) / 2 : 1;
    i = s * (j / s) + (j + (16 * j) / n) % s;
    return 16 * i - (n - 1) * ((16 * i) / n);
  endfunction

  // Puncturing: period in mother-code input bits and keep masks for the
  // A (g0 = 133 octal) and B (g1 = 171 octal) outputs at position p.
  function automatic int unsigned punct_period(crate_t r);
    case (r)
      CR_1_2:  return 1;
      CR_2_3:  return 2;
      CR_3_4:  return 3;
      default: return 9;
    endcase
  endfunction

  function automatic logic punct_keep_a(crate_t r, int unsigned p);
    case (r)
      CR_1_2:  return 1'b1;
      CR_2_3:  return 1'b1;                          // A: 1 1
      CR_3_4:  return (p != 2);                      // A: 1 1 0
      default: return (p != 4);                      // A: 1 1 1 1 0 1 1 1 1
    endcase
  endfunction

  function automatic logic punct_keep_b(crate_t r, int unsigned p);
    case (r)
      CR_1_2:  return 1'b1;
      CR_2_3:  return (p != 1);                      // B: 1 0
      CR_3_4:  return (p != 1);                      // B: 1 0 1
      default: return (p != 8);                      // B: 1 1 1 1 1 1 1 1 0
    endcase
  endfunction

  // Convolutional code: outputs for current input u and the six previous
  // inputs st (st[0] most recent).
  function automatic logic [1:0] conv_out(logic u, logic [5:0] st);
    logic a, b;
    a = u ^ st[1] ^ st[2] ^ st[4] ^ st[5];
    b = u ^ st[0] ^ st[1] ^ st[2] ^ st[5];
    return {b, a};
  endfunction

  // Data carrier m (0..47) -> FFT bin (subcarriers -26..26 without 0 and
  // the pilots at -21, -7, 7, 21; negative carriers at bins 38..63).
  function automatic int unsigned data_bin(int unsigned m);
    int sc;
    if (m < 5)       sc = int'(m) - 26;
    else if (m < 18) sc = int'(m) - 25;
    else if (m < 24) sc = int'(m) - 24;
    else if (m < 30) sc = int'(m) - 23;
    else if (m < 43) sc = int'(m) - 22;
    else             sc = int'(m) - 21;
    return (sc < 0) ? unsigned'(sc + 64) : unsigned'(sc);
  endfunction

  // Gray-coded amplitude level (odd integer) of a 1-, 2- or 3-bit group,
  // first bit received first (b[0]).
  function automatic int pam_level(logic [2:0] b, int unsigned nb);
    int l;
    if (nb == 1) l = b[0] ? 1 : -1;
    else if (nb == 2)
      case ({b[0], b[1]})
        2'b00: l = -3; 2'b01: l = -1; 2'b11: l = 1; default: l = 3;
      endcase
    else
      case ({b[0], b[1], b[2]})
        3'b000: l = -7; 3'b001: l = -5; 3'b011: l = -3; 3'b010: l = -1;
        3'b110: l = 1;  3'b111: l = 3;  3'b101: l = 5;  default: l = 7;
      endcase
    return l;
  endfunction

  // Hard decision: received value (in LVL units) -> the bit group, b[0] first.
  function automatic logic [2:0] pam_slice(logic signed [23:0] v, int unsigned nb);
    int l, vi;
    logic [2:0] b;
    b = '0;
    vi = int'(v);
    case (nb)
      1: b[0] = (vi >= 0);
      2: begin
           l = (vi < -2 * LVL) ? -3 : (vi < 0) ? -1 : (vi < 2 * LVL) ? 1 : 3;
           for (int c = 0; c < 4; c++) if (pam_level(3'(c), 2) == l) b = 3'(c);
         end
      default: begin
           l = (vi < -6 * LVL) ? -7 : (vi < -4 * LVL) ? -5 : (vi < -2 * LVL) ? -3 : (vi < 0) ? -1 :
               (vi < 2 * LVL) ? 1 : (vi < 4 * LVL) ? 3 : (vi < 6 * LVL) ? 5 : 7;
           for (int c = 0; c < 8; c++) if (pam_level(3'(c), 3) == l) b = 3'(c);
         end
    endcase
    return b;
  endfunction

  // ---------------------------------------------------------------- MAC
  // IEEE 802.3/802.11 FCS: reflected CRC-32, one octet per call.
  function automatic logic [31:0] crc32_byte(logic [31:0] crc, logic [7:0] d);
    logic [31:0] c;
    c = crc ^ {24'd0, d};
    for (int i = 0; i < 8; i++) c = c[0] ? ((c >> 1) ^ 32'hEDB8_8320) : (c >> 1);
    return c;
  endfunction
  localparam logic [31:0] CRC32_RESIDUE = 32'hDEBB_20E3;

  // ---------------------------------------------------------------- AHB
  typedef enum logic [1:0] {HT_IDLE = 2'b00, HT_BUSY = 2'b01, HT_NONSEQ = 2'b10, HT_SEQ = 2'b11} htrans_t;

  typedef struct packed {
    logic [31:0] haddr;
    htrans_t     htrans;
    logic        hwrite;
    logic [2:0]  hsize;
    logic [2:0]  hburst;
    logic [31:0] hwdata;
  } ahb_m2s_t;

  typedef struct packed {
    logic [31:0] hrdata;
    logic        hready;
    logic [1:0]  hresp;
  } ahb_s2m_t;

endpackage
