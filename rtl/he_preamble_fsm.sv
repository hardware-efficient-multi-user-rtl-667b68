// he_preamble_fsm: reads the packet configuration from the data BRAM bank and
// produces the frequency-domain symbols of the HE preamble.
//
// On `tx_start` it reads word 1 (PPDU configuration) and word 2 (HE-SIG-A
// bits) of user 0 and word 0 of every user, exposing them as `glob`, `cfg`
// and `n_users` (the number of leading users whose valid bit is set).  It then
// starts the TD-MUX, which plays L-STF and L-LTF from its tables, and writes
// into the FD-MUX, one tone per clock, in this order:
//   L-SIG, RL-SIG          24 bits: RATE 1101, R, LENGTH, even parity, tail
//   HE-SIG-A1, HE-SIG-A2   26 bits each from the host, encoded as one block
//                          - each BCC-encoded at rate 1/2, block-interleaved
//                          (N_COL x N_ROW = 16 x 3 for L-SIG, 13 x 4 for SIG-A),
//                          BPSK-mapped onto tones -28..28 of a 64-point symbol
//                          with pilots +-7, +-21 and, for L-SIG/RL-SIG, the
//                          fixed tones +-27, +-28;
//   HE-STF                 the 20 MHz M-sequence on every 16th tone (256-point);
//   HE-LTF x n_ltf         +-1 on every tone from -122 to 122 outside DC.
// Each symbol is committed with its metadata once the FD-MUX has a free
// buffer.  Then `data_start` hands over to the BCIM; `data_done` ends the
// packet.  The FSM, its reading of the configuration words and the field
// order come from the transmitter's design; HE-SIG-B is not generated, the
// HE-LTF tone values are a placeholder sign sequence (x^7+x^4+1) rather than
// the standard's table, and the SIG field coding is done by a helper encoder
// here instead of by the BCIM.  HE-STF and HE-LTF are sent as full 256-point
// symbols with the data GI, longer than the standard's 4 us HE-STF and
// compressed HE-LTFs; this keeps the TD-MUX to two symbol sizes.  A few output
// bits are constant by construction (e.g. the low bits of the GI length in
// `fd_meta`, always a multiple of 16).
module he_preamble_fsm
  import tx_pkg::*;
#(
  parameter int unsigned N_USERS = MAX_USERS,
  parameter int          UNIT    = 8192
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              tx_start,
  output logic [USER_W-1:0] b_user,
  output logic [BRAM_AW-1:0] b_addr,
  input  logic [63:0]       b_data,
  output user_cfg_t         cfg [N_USERS],
  output glob_cfg_t         glob,
  output logic [USER_W-1:0] n_users,
  output logic              fd_valid,
  output logic signed [8:0] fd_tone,
  output cplx_t             fd_val,
  output logic              fd_n64,
  output logic              fd_commit,
  output logic [7:0]        fd_meta,
  input  logic              fd_ready,
  output logic              td_start,
  output logic [11:0]       td_nsyms,
  output logic              data_start,
  input  logic              data_done,
  output logic              busy
);
  typedef enum logic [3:0] {P_IDLE, P_CFG, P_CNT, P_SIGENC, P_SIGWAIT, P_SIGWR,
                            P_STF, P_LTF, P_DATA} st_e;
  st_e st;

  sig_a_t      siga;
  logic [4:0]  ci;             // configuration read index
  logic        cv;
  logic [4:0]  cidx;
  logic [1:0]  q;              // SIG symbol 0..3
  logic [25:0] sbits;
  logic [4:0]  nbits;
  logic [5:0]  ecnt;
  logic [51:0] coded;
  logic        enc_need, enc_out, enc_ld;
  logic signed [8:0] k;
  logic [5:0]  d;              // data tone count in SIG symbol
  logic [2:0]  lcnt;
  logic [6:0]  lfsr;
  logic [6:0]  gi_len;
  logic [23:0] lsig;
  logic [15:0] enc_ctx;        // unused: the SIG encoder is never switched

  function automatic logic [USER_W-1:0] count_leading(input user_cfg_t c [N_USERS]);
    for (int u = 0; u < N_USERS; u++) if (!c[u].valid) return USER_W'(u);
    return USER_W'(N_USERS);
  endfunction

  // ---------------------------------------------------------------- L-SIG
  always_comb begin
    lsig[3:0]   = 4'b1011;                     // R1..R4 = 1,1,0,1 (6 Mb/s), R1 first
    lsig[4]     = 1'b0;
    lsig[16:5]  = glob.lsig_len;
    lsig[17]    = ^{4'b1011, glob.lsig_len};
    lsig[23:18] = '0;
  end

  always_comb begin
    case (glob.gi)
      GI16:    gi_len = 7'd32;
      GI32:    gi_len = 7'd64;
      default: gi_len = 7'd16;
    endcase
  end

  // configuration reads: index 0 -> user0 word1, 1 -> user0 word2, 2+u -> user u word0
  assign b_user = (ci < 5'd2) ? '0 : USER_W'(ci - 5'd2);
  assign b_addr = (ci == 5'd0) ? BRAM_AW'(1) : (ci == 5'd1) ? BRAM_AW'(2) : '0;
  assign busy   = (st != P_IDLE);

  // helper encoder for the SIG fields (rate 1/2)
  bcc_encoder u_enc (
    .clk, .rst_n, .en(st == P_SIGENC && !enc_ld), .rate(R12), .in_bit(sbits[0]),
    .need_in(enc_need), .out_bit(enc_out), .load(enc_ld), .ctx_i(16'd0), .ctx_o(enc_ctx));

  // SIG tone classification
  logic signed [8:0] ka;
  logic is_dc, is_pil, is_xtra, is_dat, xtra_neg;
  logic [5:0] jn, kin;        // interleaver: tone order j -> coded index k
  logic [2:0] nrow;
  logic [4:0] ncol;
  assign ka       = (k < 0) ? -k : k;
  assign is_dc    = (k == 0);
  assign is_pil   = (ka == 9'sd7) || (ka == 9'sd21);
  assign is_xtra  = (ka >= 9'sd27) && (q < 2'd2);
  assign is_dat   = !is_dc && !is_pil && !is_xtra;
  assign xtra_neg = (k != 9'sd28);             // {-28,-27,27,28} -> {-1,-1,-1,+1}
  assign nrow     = (q < 2'd2) ? 3'd3 : 3'd4;
  assign ncol     = (q < 2'd2) ? 5'd16 : 5'd13;
  assign jn       = d;
  assign kin      = 6'(ncol * 6'(jn % 6'(nrow)) + 6'(jn / 6'(nrow)));

  localparam logic [14:0] HE_M = 15'b101101110111000;   // bit i: M[i] = +1, i = m + 7
  localparam int KS = int'($rtoi(real'(UNIT) / $sqrt(2.0) + 0.5));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= P_IDLE; ci <= '0; cv <= 1'b0; cidx <= '0; glob <= '0; siga <= '0; n_users <= '0;
      for (int u = 0; u < N_USERS; u++) cfg[u] <= '0;
      q <= '0; sbits <= '0; nbits <= '0; ecnt <= '0; coded <= '0; enc_ld <= 1'b0;
      k <= '0; d <= '0; lcnt <= '0; lfsr <= 7'h7F;
      fd_valid <= 1'b0; fd_tone <= '0; fd_val <= '0; fd_n64 <= 1'b0; fd_commit <= 1'b0; fd_meta <= '0;
      td_start <= 1'b0; td_nsyms <= '0; data_start <= 1'b0;
    end else begin
      fd_valid <= 1'b0; fd_commit <= 1'b0; td_start <= 1'b0; data_start <= 1'b0; enc_ld <= 1'b0;
      // capture configuration words one clock after their address
      cv   <= (st == P_CFG);
      cidx <= ci;
      if (cv) begin
        if (cidx == 5'd0)      glob <= glob_cfg_t'(b_data);
        else if (cidx == 5'd1) siga <= sig_a_t'(b_data);
        else                   cfg[4'(cidx - 5'd2)] <= user_cfg_t'(b_data);
      end
      case (st)
        P_IDLE: if (tx_start) begin ci <= '0; st <= P_CFG; end
        P_CFG: begin
          if (32'(ci) == N_USERS + 1) st <= P_CNT;
          else ci <= ci + 5'd1;
        end
        P_CNT: if (!cv) begin
          n_users  <= count_leading(cfg);
          td_start <= 1'b1;
          td_nsyms <= 12'd5 + 12'(glob.n_ltf) + 12'(glob.n_sym);
          q        <= '0;
          sbits    <= {2'b00, lsig};
          nbits    <= 5'd24;
          ecnt     <= '0;
          enc_ld   <= 1'b1;
          st       <= P_SIGENC;
        end
        P_SIGENC: begin
          // one coded bit per clock into coded[ecnt]; the reset clock codes nothing
          if (!enc_ld) begin
            coded[ecnt] <= enc_out;
            ecnt        <= ecnt + 6'd1;
            if (enc_need) sbits <= sbits >> 1;
            if (ecnt == 6'(2 * nbits - 1)) st <= P_SIGWAIT;
          end
        end
        P_SIGWAIT: if (fd_ready && !fd_commit) begin
          k  <= -9'sd28;
          d  <= '0;
          st <= P_SIGWR;
        end
        P_SIGWR: begin
          if (!is_dc) begin
            fd_valid <= 1'b1;
            fd_tone  <= k;
            fd_n64   <= 1'b1;
            fd_val   <= '0;
            if (is_pil) begin
              fd_val.re <= (k == 9'sd21) ? sample_t'(-UNIT) : sample_t'(UNIT);
            end else if (is_xtra) begin
              fd_val.re <= xtra_neg ? sample_t'(-UNIT) : sample_t'(UNIT);
            end else begin
              fd_val.re <= coded[kin] ? sample_t'(UNIT) : sample_t'(-UNIT);
            end
          end
          if (is_dat) d <= d + 6'd1;
          k <= k + 9'sd1;
          if (k == 9'sd28) begin
            fd_commit <= 1'b1;
            fd_meta   <= {1'b1, 7'd16};
            q         <= q + 2'd1;
            ecnt      <= '0;
            case (q)
              2'd0: begin sbits <= {2'b00, lsig}; nbits <= 5'd24; enc_ld <= 1'b1; st <= P_SIGENC; end
              2'd1: begin sbits <= siga.a1; nbits <= 5'd26; enc_ld <= 1'b1; st <= P_SIGENC; end
              2'd2: begin sbits <= siga.a2; nbits <= 5'd26; st <= P_SIGENC; end
              default: begin k <= -9'sd112; st <= P_STF; end
            endcase
          end
        end
        P_STF: if ((fd_ready && !fd_commit) || k != -9'sd112) begin
          if (k != 0) begin
            fd_valid  <= 1'b1;
            fd_tone   <= k;
            fd_n64    <= 1'b0;
            fd_val.re <= HE_M[4'((k >>> 4) + 9'sd7)] ? sample_t'(KS) : sample_t'(-KS);
            fd_val.im <= HE_M[4'((k >>> 4) + 9'sd7)] ? sample_t'(KS) : sample_t'(-KS);
          end
          k <= k + 9'sd16;
          if (k == 9'sd112) begin
            fd_commit <= 1'b1;
            fd_meta   <= {1'b0, gi_len};
            k         <= -9'sd122;
            lcnt      <= '0;
            st        <= P_LTF;
          end
        end
        P_LTF: if ((fd_ready && !fd_commit) || k != -9'sd122) begin
          if (k < -9'sd1 || k > 9'sd1) begin
            fd_valid  <= 1'b1;
            fd_tone   <= k;
            fd_n64    <= 1'b0;
            fd_val.re <= lfsr[6] ? sample_t'(UNIT) : sample_t'(-UNIT);
            fd_val.im <= '0;
            lfsr      <= {lfsr[5:0], lfsr[6] ^ lfsr[3]};
          end
          k <= k + 9'sd1;
          if (k == 9'sd122) begin
            fd_commit <= 1'b1;
            fd_meta   <= {1'b0, gi_len};
            k         <= -9'sd122;
            lfsr      <= 7'h7F;
            lcnt      <= lcnt + 3'd1;
            if (lcnt + 3'd1 >= glob.n_ltf) begin
              data_start <= 1'b1;
              st         <= P_DATA;
            end
          end
        end
        P_DATA: if (data_done) st <= P_IDLE;
        default: st <= P_IDLE;
      endcase
    end
  end
endmodule
