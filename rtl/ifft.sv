// ifft: 64/256-point inverse FFT, radix-2 decimation in time, one butterfly
// per clock, with two working banks so that one symbol is transformed while
// the previous one is read out by the TD-MUX.
//
// Flow per symbol: LOAD reads the N bins from the FD-MUX in bit-reversed
// order (N clocks + 1 of latency) and releases the FD buffer; COMPUTE runs
// log2(N) stages of N/2 butterflies (1024 clocks for N = 256, 192 for N = 64);
// the bank is then marked full with the symbol's metadata.  A 256-point symbol
// therefore takes about 1281 clocks, under the 1360 clocks (13.6 us at 100 MHz)
// of the shortest HE symbol.  Butterfly: a' = (a + W b)/2, b' = (a - W b)/2
// with W = exp(+j*2*pi*p/(2h)); the 1/2 per stage gives an overall 1/N scale,
// so the output cannot overflow.  Twiddles (Q2.14, 128 entries of
// exp(+j*2*pi*m/256)) are computed at elaboration; an N-point stage of
// half-size h uses entry p * 256/(2h), independent of N.
// Read side: `out_avail`, `out_meta`, `out_addr` -> `out_data` one clock
// later, `out_release` frees the bank.
// The document names the IFFT only; this architecture is this design's.
module ifft
  import tx_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_avail,
  input  logic [7:0]  in_meta,      // bit 7: 64-point
  output logic [7:0]  in_bin,
  input  cplx_t       in_data,
  output logic        in_release,
  output logic        out_avail,
  output logic [7:0]  out_meta,
  input  logic [7:0]  out_addr,
  output cplx_t       out_data,
  input  logic        out_release
);
  localparam int TWB = 14;
  typedef logic signed [15:0] tw_t [128];

  function automatic tw_t mk_tw(input bit is_sin);
    tw_t t;
    for (int m = 0; m < 128; m++) begin
      real a;
      a = 6.283185307179586 * m / 256.0;
      t[m] = 16'($rtoi((is_sin ? $sin(a) : $cos(a)) * 16384.0 + (((is_sin ? $sin(a) : $cos(a)) >= 0.0) ? 0.5 : -0.5)));
    end
    return t;
  endfunction
  localparam tw_t TW_C = mk_tw(1'b0);
  localparam tw_t TW_S = mk_tw(1'b1);

  typedef enum logic [1:0] {I_IDLE, I_LOAD, I_COMP} st_e;
  st_e st;

  cplx_t      bank [2][NFFT];
  logic [1:0] full;
  logic [7:0] meta [2];
  logic       cb, ob;          // compute bank, output bank
  logic       n64;
  logic [8:0] lcnt;
  logic [2:0] stg;
  logic [6:0] bf;
  logic [7:0] lwa;
  logic       lwv;

  function automatic logic [7:0] bitrev(input logic [7:0] n, input logic is64);
    logic [7:0] r;
    for (int b = 0; b < 8; b++) r[b] = n[7-b];
    return is64 ? {2'b00, r[7:2]} : r;
  endfunction

  // butterfly addresses
  logic [7:0]  i0, i1, h, twi;
  logic [2:0]  last_stg;
  logic [6:0]  last_bf;
  cplx_t       a, b, y0, y1;
  logic signed [31:0] wr, wi;
  logic signed [17:0] s0r, s0i, s1r, s1i;

  always_comb begin
    h   = 8'(1) << stg;
    i0  = 8'(((16'(bf) >> stg) << (stg + 3'd1)) | (16'(bf) & 16'(h - 8'd1)));
    i1  = i0 + h;
    twi = 8'((16'(bf) & 16'(h - 8'd1)) << (3'd7 - stg));
    a   = bank[cb][i0];
    b   = bank[cb][i1];
    wr  = (32'(b.re) * 32'(TW_C[twi[6:0]]) - 32'(b.im) * 32'(TW_S[twi[6:0]])) >>> TWB;
    wi  = (32'(b.re) * 32'(TW_S[twi[6:0]]) + 32'(b.im) * 32'(TW_C[twi[6:0]])) >>> TWB;
    s0r = 18'(a.re) + 18'(wr);
    s0i = 18'(a.im) + 18'(wi);
    s1r = 18'(a.re) - 18'(wr);
    s1i = 18'(a.im) - 18'(wi);
    y0  = '{re: 16'(s0r >>> 1), im: 16'(s0i >>> 1)};
    y1  = '{re: 16'(s1r >>> 1), im: 16'(s1i >>> 1)};
    last_stg = n64 ? 3'd5 : 3'd7;
    last_bf  = n64 ? 7'd31 : 7'd127;
  end

  assign in_bin    = bitrev(lcnt[7:0], n64);
  assign out_avail = full[ob];
  assign out_meta  = meta[ob];

  always_ff @(posedge clk) begin
    if (lwv) bank[cb][lwa] <= in_data;
    if (st == I_COMP) begin
      bank[cb][i0] <= y0;
      bank[cb][i1] <= y1;
    end
    out_data <= bank[ob][out_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= I_IDLE; full <= '0; meta[0] <= '0; meta[1] <= '0; cb <= 1'b0; ob <= 1'b0;
      n64 <= 1'b0; lcnt <= '0; stg <= '0; bf <= '0; lwa <= '0; lwv <= 1'b0; in_release <= 1'b0;
    end else begin
      in_release <= 1'b0;
      lwv        <= 1'b0;
      case (st)
        I_IDLE: if (in_avail && !full[cb]) begin
          n64     <= in_meta[7];
          meta[cb] <= in_meta;
          lcnt    <= '0;
          st      <= I_LOAD;
        end
        I_LOAD: begin
          if (lcnt < (n64 ? 9'd64 : 9'd256)) begin
            lwv  <= 1'b1;
            lwa  <= 8'(lcnt);
            lcnt <= lcnt + 9'd1;
          end else begin
            in_release <= 1'b1;
            stg <= '0;
            bf  <= '0;
            st  <= I_COMP;
          end
        end
        I_COMP: begin
          bf <= bf + 7'd1;
          if (bf == last_bf) begin
            bf  <= '0;
            stg <= stg + 3'd1;
            if (stg == last_stg) begin
              full[cb] <= 1'b1;
              cb       <= !cb;
              st       <= I_IDLE;
            end
          end
        end
        default: st <= I_IDLE;
      endcase
      if (out_release) begin
        full[ob] <= 1'b0;
        ob       <= !ob;
      end
    end
  end
endmodule
