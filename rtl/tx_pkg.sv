// tx_pkg: types, constants and small lookup functions shared by the 802.11ax
// MU-OFDMA transmitter.
//
// The transmitter serves up to 9 users in a 20 MHz channel, each on its own
// resource unit (RU) of 26, 52, 106 or 242 tones and its own MCS 0..6.  The
// numbers below (data/pilot tones per RU, interleaver geometry, RU tone
// ranges, pilot positions, MCS table) are those of the IEEE 802.11ax 20 MHz
// tone plan; the context-switch layout (4 x 64-bit words per user) and the
// 1024 x 64-bit per-user data memory follow the transmitter's architecture.
package tx_pkg;

  // ------------------------------------------------------------------ sizes
  localparam int unsigned MAX_USERS   = 9;     // nine 26-tone RUs in 20 MHz
  localparam int unsigned USER_W      = 4;
  localparam int unsigned BRAM_DEPTH  = 1024;  // per-user data BRAM, 1024 x 64
  localparam int unsigned BRAM_AW     = 10;
  localparam int unsigned CS_WORDS    = 4;     // context words per user
  localparam int unsigned HDR_WORDS   = 3;     // configuration words ahead of payload
  localparam int unsigned NFFT        = 256;   // HE-modulated fields
  localparam int unsigned NFFT_L      = 64;    // pre-HE fields
  localparam int unsigned SAMPLE_W    = 16;
  localparam int unsigned MAX_SD_SYM  = 256;   // data tones of all users, one symbol

  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef struct packed {
    sample_t re;
    sample_t im;
  } cplx_t;

  typedef enum logic [1:0] {RU26 = 2'd0, RU52 = 2'd1, RU106 = 2'd2, RU242 = 2'd3} ru_size_e;
  typedef enum logic [1:0] {MOD_BPSK = 2'd0, MOD_QPSK = 2'd1, MOD_16QAM = 2'd2, MOD_64QAM = 2'd3} mod_e;
  typedef enum logic [1:0] {R12 = 2'd0, R23 = 2'd1, R34 = 2'd2} rate_e;
  typedef enum logic [1:0] {GI08 = 2'd0, GI16 = 2'd1, GI32 = 2'd2} gi_e;
  typedef enum logic [1:0] {PPDU_SU = 2'd0, PPDU_MU = 2'd1, PPDU_TB = 2'd2} ppdu_e;

  // Per-user configuration, word 0 of the user's data BRAM.
  typedef struct packed {
    logic [31:0] rsvd;
    logic [15:0] psdu_len;    // payload bytes
    logic [6:0]  scr_seed;    // scrambler initial state (non-zero)
    logic        valid;       // user takes part in this PPDU
    logic [2:0]  mcs;         // 0..6
    logic [3:0]  ru_idx;      // RU index within its size class, 0-based
    ru_size_e    ru_size;
  } user_cfg_t;

  // Global PPDU configuration, word 1 of user 0's BRAM.
  typedef struct packed {
    logic [35:0] rsvd;
    logic [11:0] lsig_len;    // L-SIG LENGTH
    logic [2:0]  n_ltf;       // number of HE-LTF symbols, 1..
    logic [9:0]  n_sym;       // number of HE data symbols
    gi_e         gi;
    ppdu_e       ppdu;
  } glob_cfg_t;

  // HE-SIG-A content, word 2 of user 0's BRAM (host-formed, CRC and tail included).
  typedef struct packed {
    logic [11:0] rsvd;
    logic [25:0] a2;
    logic [25:0] a1;
  } sig_a_t;

  // Context word, 64 bits; one per stateful sub-module of the BCIM.
  typedef logic [63:0] ctx_word_t;
  typedef enum logic [1:0] {CTX_DATA = 2'd0, CTX_SCR = 2'd1, CTX_ENC = 2'd2, CTX_PMOD = 2'd3} ctx_slot_e;

  // ---------------------------------------------------------- MCS / RU maps
  function automatic mod_e mcs_mod(input logic [2:0] mcs);
    case (mcs)
      3'd0:        return MOD_BPSK;
      3'd1, 3'd2:  return MOD_QPSK;
      3'd3, 3'd4:  return MOD_16QAM;
      default:     return MOD_64QAM;
    endcase
  endfunction

  function automatic rate_e mcs_rate(input logic [2:0] mcs);
    case (mcs)
      3'd0, 3'd1, 3'd3: return R12;
      3'd5:             return R23;
      default:          return R34;
    endcase
  endfunction

  function automatic logic [2:0] nbpscs(input mod_e m);
    case (m)
      MOD_BPSK:  return 3'd1;
      MOD_QPSK:  return 3'd2;
      MOD_16QAM: return 3'd4;
      default:   return 3'd6;
    endcase
  endfunction

  function automatic logic [7:0] ru_nsd(input ru_size_e r);  // data tones
    case (r)
      RU26:    return 8'd24;
      RU52:    return 8'd48;
      RU106:   return 8'd102;
      default: return 8'd234;
    endcase
  endfunction

  function automatic logic [7:0] ru_ntones(input ru_size_e r);
    case (r)
      RU26:    return 8'd26;
      RU52:    return 8'd52;
      RU106:   return 8'd106;
      default: return 8'd242;
    endcase
  endfunction

  // coded bits per symbol for one user: N_CBPS(u) = N_SD * N_BPSCS
  function automatic logic [10:0] ncbps(input ru_size_e r, input logic [2:0] mcs);
    return 11'(ru_nsd(r)) * 11'(nbpscs(mcs_mod(mcs)));
  endfunction

  // data bits per symbol: N_DBPS = N_CBPS * R
  function automatic logic [10:0] ndbps(input ru_size_e r, input logic [2:0] mcs);
    logic [10:0] c;
    c = ncbps(r, mcs);
    case (mcs_rate(mcs))
      R12:     return c >> 1;
      R23:     return 11'((c * 2) / 3);
      default: return 11'((c * 3) / 4);
    endcase
  endfunction

  // BCC interleaver columns and rows-per-bit (N_ROW = rowk * N_BPSCS)
  function automatic logic [4:0] il_ncol(input ru_size_e r);
    case (r)
      RU26:    return 5'd8;
      RU52:    return 5'd16;
      RU106:   return 5'd17;
      default: return 5'd26;
    endcase
  endfunction

  function automatic logic [3:0] il_rowk(input ru_size_e r);
    case (r)
      RU26, RU52: return 4'd3;
      RU106:      return 4'd6;
      default:    return 4'd9;
    endcase
  endfunction

  // First (lowest) tone of an RU, as a signed tone index -128..127.
  function automatic logic signed [8:0] ru_first_tone(input ru_size_e r, input logic [3:0] idx);
    case (r)
      RU26: case (idx)
              4'd0: return -9'sd121;  4'd1: return -9'sd95;  4'd2: return -9'sd68;
              4'd3: return -9'sd42;   4'd4: return -9'sd16;  4'd5: return  9'sd17;
              4'd6: return  9'sd43;   4'd7: return  9'sd70;  default: return 9'sd96;
            endcase
      RU52: case (idx)
              4'd0: return -9'sd121;  4'd1: return -9'sd68;
              4'd2: return  9'sd17;   default: return 9'sd70;
            endcase
      RU106: return (idx == 4'd0) ? -9'sd122 : 9'sd17;
      default: return -9'sd122;
    endcase
  endfunction

  // Tones skipped inside an RU: the DC gap of the centre 26-tone RU
  // (-3..3) and of the 242-tone RU (-1..1).
  function automatic logic in_ru_gap(input ru_size_e r, input logic signed [8:0] k);
    if (r == RU242) return (k >= -9'sd1 && k <= 9'sd1);
    if (r == RU26)  return (k >= -9'sd3 && k <= 9'sd3);
    return 1'b0;
  endfunction

  function automatic logic [8:0] abs9(input logic signed [8:0] k);
    return (k < 0) ? 9'(-k) : 9'(k);
  endfunction

  // Pilot tone?  26/52-tone RUs use +-{10,22,36,48,62,76,90,102,116};
  // 106/242-tone RUs use +-{22,48,76,102}.
  function automatic logic is_pilot(input ru_size_e r, input logic signed [8:0] k);
    logic [8:0] a;
    a = abs9(k);
    if (r == RU26 || r == RU52)
      return a == 10 || a == 22 || a == 36 || a == 48 || a == 62 ||
             a == 76 || a == 90 || a == 102 || a == 116;
    return a == 22 || a == 48 || a == 76 || a == 102;
  endfunction

  // Constant used for 1/sqrt(2) etc. in Q1.14 (full scale = 2^14)
  localparam int QONE = 16384;

endpackage
