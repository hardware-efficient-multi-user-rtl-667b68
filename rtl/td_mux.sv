// td_mux: time-domain multiplexer.  It forms the complete baseband sample
// stream of a packet: first the L-STF and L-LTF, played from look-up tables,
// then every OFDM symbol the IFFT delivers, each preceded by its guard
// interval (the cyclic prefix: the last G samples of the symbol).
//
// L-STF: 160 samples, ten repeats of its 16-sample period.  L-LTF: its
// 32-sample double guard interval followed by two 64-sample periods.  Both
// tables are computed at elaboration as 64-point inverse DFTs of the 802.11
// L-STF and L-LTF tone values, with the same 1/64 scale and UNIT amplitude
// as symbols coming out of the IFFT.
// Interface: `pkt_start` with `n_syms` (all IFFT symbols of the packet)
// starts a packet; samples leave on `s_valid`/`s_data` whenever `s_ready`
// (FIFO not full).  Per IFFT symbol the TD-MUX reads the bank with one clock
// of latency (CP then body) and releases it.  `pkt_done` pulses after the
// last sample.  Symbol metadata: bit 7 = 64-point, bits 6:0 = GI samples.
// Table contents and the GI insertion follow the transmitter's design and
// 802.11; the read pipeline is this design's.
module td_mux
  import tx_pkg::*;
#(
  parameter int UNIT = 8192
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        pkt_start,
  input  logic [11:0] n_syms,
  input  logic        sym_avail,
  input  logic [7:0]  sym_meta,
  output logic [7:0]  sym_addr,
  input  cplx_t       sym_data,
  output logic        sym_release,
  output logic        s_valid,
  output cplx_t       s_data,
  input  logic        s_ready,
  output logic        pkt_done,
  output logic        busy
);
  typedef logic [31:0] tab_t [64];   // {re, im}

  // L-LTF tone signs, k = -26 (MSB) .. 26 (LSB), 1 -> +1; bit for k = 0 unused
  localparam logic [52:0] LTF_POS = 53'b11001101011111100110101111010011010100000110010101111;

  // sign of the L-STF tone at k = 4m, m = -6..6 (bit m+6), 1 -> +(1+j)
  localparam logic [12:0] STF_SGN = 13'b1111000100101;

  function automatic tab_t mk_tab(input bit stf);
    tab_t t;
    real sr, si, a, vr, vi;
    for (int n = 0; n < 64; n++) begin
      sr = 0.0; si = 0.0;
      for (int k = -26; k <= 26; k++) begin
        vr = 0.0; vi = 0.0;
        if (stf) begin
          // sqrt(13/6) * (+-1) * (1+j) on k = 4m, m != 0
          if (k % 4 == 0 && k != 0 && k >= -24 && k <= 24) begin
            vr = STF_SGN[k / 4 + 6] ? 1.4719601443879744 : -1.4719601443879744;
            vi = vr;
          end
        end else if (k != 0) begin
          vr = LTF_POS[52 - (k + 26)] ? 1.0 : -1.0;
        end
        a  = 6.283185307179586 * k * n / 64.0;
        sr = sr + vr * $cos(a) - vi * $sin(a);
        si = si + vr * $sin(a) + vi * $cos(a);
      end
      t[n] = {16'($rtoi(sr * UNIT / 64.0)), 16'($rtoi(si * UNIT / 64.0))};
    end
    return t;
  endfunction
  localparam tab_t STF = mk_tab(1'b1);
  localparam tab_t LTF = mk_tab(1'b0);

  typedef enum logic [2:0] {T_IDLE, T_STF, T_LTF, T_WAIT, T_SYM, T_DONE} st_e;
  st_e st;

  logic [8:0]  cnt, len, gi, nn;
  logic [11:0] left;
  logic        pv;              // sym_data holds a valid sample (read last clock)
  logic        ready_rd;

  assign busy = (st != T_IDLE);

  // IFFT symbols: sample index cnt runs 0..GI+N-1; read address = (cnt - GI) mod N
  assign nn       = sym_meta[7] ? 9'd64 : 9'd256;
  assign gi       = {2'b00, sym_meta[6:0]};
  assign sym_addr = 8'(cnt - gi + (cnt < gi ? nn : 9'd0));
  assign ready_rd = s_ready || !s_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= T_IDLE; cnt <= '0; len <= '0; left <= '0; pv <= 1'b0;
      s_valid <= 1'b0; s_data <= '0; sym_release <= 1'b0; pkt_done <= 1'b0;
    end else begin
      sym_release <= 1'b0;
      pkt_done    <= 1'b0;
      if (s_valid && s_ready) s_valid <= 1'b0;
      case (st)
        T_IDLE: if (pkt_start) begin
          st <= T_STF; cnt <= '0; left <= n_syms;
        end
        T_STF: if (ready_rd) begin
          s_valid <= 1'b1;
          s_data  <= STF[6'(cnt[3:0])];
          cnt     <= cnt + 9'd1;
          if (cnt == 9'd159) begin cnt <= '0; st <= T_LTF; end
        end
        T_LTF: if (ready_rd) begin
          s_valid <= 1'b1;
          s_data  <= LTF[6'(cnt + 9'd32)];
          cnt     <= cnt + 9'd1;
          if (cnt == 9'd159) begin
            cnt <= '0;
            st  <= (left == '0) ? T_DONE : T_WAIT;
          end
        end
        T_WAIT: if (sym_avail && !sym_release) begin
          cnt <= '0; pv <= 1'b0; len <= gi + nn;
          st  <= T_SYM;
        end
        T_SYM: begin
          // address cnt is presented this clock, its data arrives next clock
          if (!pv) begin
            pv <= 1'b1;                 // prime the read pipeline
          end else if (ready_rd) begin
            s_valid <= 1'b1;
            s_data  <= sym_data;
            cnt     <= cnt + 9'd1;
            pv      <= 1'b0;            // re-prime: next address goes out now
            if (cnt == len - 9'd1) begin
              sym_release <= 1'b1;
              left        <= left - 12'd1;
              st          <= (left == 12'd1) ? T_DONE : T_WAIT;
            end
          end
        end
        T_DONE: if (!s_valid || s_ready) begin
          pkt_done <= 1'b1;
          st       <= T_IDLE;
        end
        default: st <= T_IDLE;
      endcase
    end
  end
endmodule
