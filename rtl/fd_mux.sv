// fd_mux: frequency-domain multiplexer.  It assembles complete 64-point or
// 256-point OFDM symbols from (tone, value) writes coming from the preamble
// FSM or from the BCIM, and hands them to the IFFT in FFT-bin order.
//
// Two symbol buffers (ping-pong), each 256 complex words plus a 256-bit map of
// written tones; a tone that nobody wrote in a symbol (null, DC, guard or
// unoccupied RU) reads as zero.  Tone k is stored at bin k mod N (N = 64 if
// `wr_n64`, else 256).  `commit` closes the fill buffer with its metadata
// (size and guard-interval length) and moves to the other buffer; `wr_ready`
// says the fill buffer is free.  The read side sees `rd_avail`/`rd_meta`,
// reads bins with one cycle of latency and frees the buffer with `rd_release`.
// The combining of preamble and per-user tones with unused tones follows the
// transmitter's design; the buffering scheme is this design's.
module fd_mux
  import tx_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              wr_valid,
  input  logic signed [8:0] wr_tone,
  input  cplx_t             wr_val,
  input  logic              wr_n64,
  input  logic              commit,
  input  logic [7:0]        commit_meta,   // {n64, guard-interval length in samples[6:0]}
  output logic              wr_ready,
  output logic              rd_avail,
  output logic [7:0]        rd_meta,
  input  logic [7:0]        rd_bin,
  output cplx_t             rd_data,
  input  logic              rd_release
);
  cplx_t        mem  [2][NFFT];
  logic [NFFT-1:0] used [2];
  logic [1:0]   full;
  logic [7:0]   meta [2];
  logic         fill, drain;
  logic [7:0]   wbin;

  assign wbin     = wr_n64 ? {2'b00, wr_tone[5:0]} : wr_tone[7:0];
  assign wr_ready = !full[fill];
  assign rd_avail = full[drain];
  assign rd_meta  = meta[drain];

  always_ff @(posedge clk) begin
    if (wr_valid) mem[fill][wbin] <= wr_val;
    rd_data <= used[drain][rd_bin] ? mem[drain][rd_bin] : '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full <= '0; fill <= 1'b0; drain <= 1'b0;
      used[0] <= '0; used[1] <= '0; meta[0] <= '0; meta[1] <= '0;
    end else begin
      if (wr_valid) used[fill][wbin] <= 1'b1;
      if (commit) begin
        full[fill] <= 1'b1;
        meta[fill] <= commit_meta;
        fill       <= !fill;
      end
      if (rd_release) begin
        full[drain] <= 1'b0;
        used[drain] <= '0;
        drain       <= !drain;
      end
    end
  end

  // a write only goes to a free buffer
  assert property (@(posedge clk) disable iff (!rst_n) wr_valid |-> !full[fill]);
endmodule
