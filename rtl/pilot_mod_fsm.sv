// pilot_mod_fsm: the "pilot and modulation" stage of the BCIM.  For one user
// per run it walks every tone of the user's RU from the lowest tone up, one
// tone per clock, and emits (tone index, complex value): a pilot value on the
// pilot tones and, on the data tones, the constellation point of the next
// N_BPSCS interleaved bits fetched from the ping-pong buffer.  The DC gap of
// the centre 26-tone RU and of the 242-tone RU is skipped without output.
//
// Timing: `start` latches the user's RU, MCS, buffer base slot and half; the
// walk takes one clock per tone of the RU span (26, 33 for the centre 26-tone
// RU, 52, 106 or 245) and outputs lag the walk by one clock (buffer read
// latency).  `busy` is high from `start` to the last output.
//
// Pilots: value = p_n * PSI[(m + n) mod 8] on the real axis, with p_n the
// 127-periodic polarity sequence (x^7+x^4+1, all-ones start, 0 -> +1),
// m the pilot's number within the RU and n this user's symbol count.  The
// per-user state {n, polarity LFSR} is the context saved across users.
// The stage and its context come from the transmitter's architecture; the
// pilot value rule is a simplified form of the 802.11ax one (this design's
// choice) and the tone plan is 802.11ax's.
module pilot_mod_fsm
  import tx_pkg::*;
#(
  parameter int unsigned SLOTS = MAX_SD_SYM,
  parameter int          UNIT  = 8192,
  localparam int unsigned SW   = $clog2(SLOTS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  ru_size_e      ru,
  input  logic [3:0]    ru_idx,
  input  logic [2:0]    mcs,
  input  logic [SW-1:0] base,
  input  logic          half,
  output logic          busy,
  output logic          rd_half,
  output logic [SW-1:0] rd_slot,
  input  logic [5:0]    rd_bits,
  output logic          out_valid,
  output logic signed [8:0] out_tone,
  output cplx_t         out_sym,
  input  logic          load,
  input  logic [16:0]   ctx_i,
  output logic [16:0]   ctx_o
);
  localparam logic [7:0] PSI = 8'b1110_0111;   // bit m: 1 -> +1, 0 -> -1 (PSI = 1,1,1,-1,-1,1,1,1)

  ru_size_e        ru_q;
  mod_e            mod_q;
  logic            walking;
  logic signed [8:0] k, k_last;
  logic [SW-1:0]   dcnt;
  logic [3:0]      pcnt;
  logic [9:0]      nsym;
  logic [6:0]      lfsr;
  logic            pol;              // 1 -> polarity -1
  logic            is_p, gap;
  logic            v1, p1, psgn1;
  logic signed [8:0] t1;
  cplx_t           dsym;
  logic [SW-1:0]   base_q;
  logic            half_q;

  assign pol   = lfsr[6] ^ lfsr[3];
  assign is_p  = is_pilot(ru_q, k);
  assign gap   = in_ru_gap(ru_q, k);
  assign ctx_o = {nsym, lfsr};
  assign busy  = walking || v1;

  assign rd_slot = base_q + dcnt;
  assign rd_half = half_q;

  qam_mapper #(.UNIT(UNIT)) u_map (.mode(mod_q), .bits(rd_bits), .sym(dsym));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      walking <= 1'b0; k <= '0; k_last <= '0; dcnt <= '0; pcnt <= '0;
      nsym <= '0; lfsr <= 7'h7F; ru_q <= RU26; mod_q <= MOD_BPSK;
      base_q <= '0; half_q <= 1'b0; v1 <= 1'b0; p1 <= 1'b0; psgn1 <= 1'b0; t1 <= '0;
    end else begin
      v1 <= 1'b0;
      if (load) begin
        {nsym, lfsr} <= ctx_i;
      end else if (start) begin
        walking <= 1'b1;
        ru_q    <= ru;
        mod_q   <= mcs_mod(mcs);
        base_q  <= base;
        half_q  <= half;
        k       <= ru_first_tone(ru, ru_idx);
        k_last  <= ru_first_tone(ru, ru_idx) + 9'(ru_ntones(ru)) - 9'sd1 +
                   ((ru == RU242) ? 9'sd3 : (ru == RU26 && ru_idx == 4'd4) ? 9'sd7 : 9'sd0);
        dcnt    <= '0;
        pcnt    <= '0;
      end else if (walking) begin
        k <= k + 9'sd1;
        if (!gap) begin
          v1    <= 1'b1;
          t1    <= k;
          p1    <= is_p;
          psgn1 <= pol ^ !PSI[3'(pcnt + 4'(nsym))];
          if (is_p) pcnt <= pcnt + 4'd1;
          else      dcnt <= dcnt + SW'(1);
        end
        if (k == k_last) begin
          walking <= 1'b0;
          nsym    <= nsym + 10'd1;
          lfsr    <= {lfsr[5:0], pol};
        end
      end
    end
  end

  always_comb begin
    out_valid = v1;
    out_tone  = t1;
    if (p1) begin
      out_sym.re = psgn1 ? sample_t'(-UNIT) : sample_t'(UNIT);
      out_sym.im = '0;
    end else begin
      out_sym = dsym;
    end
  end
endmodule
