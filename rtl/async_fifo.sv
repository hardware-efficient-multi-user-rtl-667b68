// async_fifo: dual-clock FIFO carrying baseband samples from the 100 MHz
// processing domain (TD-MUX) to the DUC domain.
//
// Classic Gray-code design: binary and Gray read/write pointers one bit wider
// than the address, each Gray pointer passed through a two-flop synchroniser
// into the other domain.  `full` is computed in the write domain and `empty`
// in the read domain, both conservative.  Read data is first-word-fall-through:
// `rdata` shows the head entry while `!empty`, and `rd_en` pops it.
// Each domain has its own active-low asynchronous reset.
// The FIFO between TD-MUX and DUC is the transmitter's; its depth and
// construction are this design's.
module async_fifo #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 64,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic         wclk,
  input  logic         wrst_n,
  input  logic         wr_en,
  input  logic [W-1:0] wdata,
  output logic         full,
  input  logic         rclk,
  input  logic         rrst_n,
  input  logic         rd_en,
  output logic [W-1:0] rdata,
  output logic         empty
);
  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wbin, wgray, rbin, rgray;
  logic [AW:0]  wq1, wq2, rq1, rq2;       // wq*: read ptr in write domain; rq*: write ptr in read domain
  logic [AW:0]  wbin_n, rbin_n;

  function automatic logic [AW:0] b2g(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  assign wbin_n = wbin + (AW+1)'(wr_en && !full);
  assign rbin_n = rbin + (AW+1)'(rd_en && !empty);

  always_ff @(posedge wclk) if (wr_en && !full) mem[wbin[AW-1:0]] <= wdata;
  assign rdata = mem[rbin[AW-1:0]];

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin <= '0; wgray <= '0; wq1 <= '0; wq2 <= '0;
    end else begin
      wbin  <= wbin_n;
      wgray <= b2g(wbin_n);
      wq1   <= rgray;
      wq2   <= wq1;
    end
  end

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin <= '0; rgray <= '0; rq1 <= '0; rq2 <= '0;
    end else begin
      rbin  <= rbin_n;
      rgray <= b2g(rbin_n);
      rq1   <= wgray;
      rq2   <= rq1;
    end
  end

  assign full  = (wgray == {~wq2[AW:AW-1], wq2[AW-2:0]});
  assign empty = (rgray == rq2);
endmodule
