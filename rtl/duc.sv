// duc: digital up-converter from 20 MS/s to 40 MS/s.  Runs on the 40 MHz
// sample clock; every second clock (the 20 MHz read strobe) it takes one
// sample from the clock-crossing FIFO, and it outputs one sample per clock:
//   y[2n]   = x[n-1]
//   y[2n+1] = (x[n-1] + x[n]) / 2          (linear-interpolation half-band)
// A packet of M input samples gives 2M+1 output samples: the stream starts
// with the interpolation from zero and ends on the last input sample.
// While `active` is high an empty FIFO at a read strobe is an underflow: the
// sample is replaced by zero and `underflow` pulses.  `active` goes high at
// the first sample of a packet and low when the FIFO runs dry after
// `pkt_end` has been seen (a level from the write side, synchronised here).
// The 20 MHz read / 40 MHz output rates follow the transmitter's design; the
// interpolation filter is this design's choice (the document gives none).
module duc
  import tx_pkg::*;
(
  input  logic  clk,          // 40 MHz
  input  logic  rst_n,
  input  logic  fifo_empty,
  input  cplx_t fifo_data,
  output logic  fifo_rd,
  input  logic  pkt_end,      // asynchronous level: no more samples will come
  output logic  active,
  output logic  iq_valid,
  output cplx_t iq,
  output logic  underflow
);
  logic  ph;
  cplx_t xp, xc;
  logic  e1, e2;
  logic signed [16:0] sr, si;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin e1 <= 1'b0; e2 <= 1'b0; end
    else        begin e1 <= pkt_end; e2 <= e1; end
  end

  assign fifo_rd = active && !ph && !fifo_empty;
  assign sr = 17'(xp.re) + 17'(xc.re);
  assign si = 17'(xp.im) + 17'(xc.im);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph <= 1'b0; xp <= '0; xc <= '0; active <= 1'b0;
      iq_valid <= 1'b0; iq <= '0; underflow <= 1'b0;
    end else begin
      underflow <= 1'b0;
      if (!active) begin
        iq_valid <= 1'b0;
        ph       <= 1'b0;
        xc       <= '0;
        if (!fifo_empty && !e2) active <= 1'b1;
      end else begin
        ph       <= !ph;
        iq_valid <= 1'b1;
        if (!ph) begin
          iq <= xc;                     // x[n-1]
          xp <= xc;
          if (!fifo_empty) begin
            xc <= fifo_data;
          end else begin
            xc <= '0;
            if (e2) active <= 1'b0;     // packet over
            else    underflow <= 1'b1;
          end
        end else begin
          iq <= '{re: 16'(sr >>> 1), im: 16'(si >>> 1)};
        end
      end
    end
  end
endmodule
