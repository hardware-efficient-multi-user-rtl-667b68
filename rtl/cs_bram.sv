// cs_bram: context-switch memory.  Four 64-bit locations per user hold the
// saved state of the HE data FSM, the scrambler, the encoder and the
// pilot/modulation FSM.  Simple dual-port RAM: one synchronous write port and
// one read port with one cycle of read latency (BRAM style).  Each access takes
// one clock, as in the transmitter's context-switch scheme.  Contents are not
// reset here: the context-switch FSM clears them in its Flushing state.
module cs_bram
  import tx_pkg::*;
#(
  parameter int unsigned N_USERS = MAX_USERS,
  localparam int unsigned DEPTH  = N_USERS * CS_WORDS,
  localparam int unsigned AW     = $clog2(DEPTH)
) (
  input  logic      clk,
  input  logic      we,
  input  logic [AW-1:0] waddr,
  input  ctx_word_t wdata,
  input  logic [AW-1:0] raddr,
  output ctx_word_t rdata
);
  ctx_word_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
