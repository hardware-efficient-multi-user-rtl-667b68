// data_bram_bank: one 1024 x 64-bit BRAM per user.  Word 0 of each user's
// BRAM is that user's configuration (tx_pkg::user_cfg_t), words 1 and 2 of
// user 0 the PPDU-wide configuration (tx_pkg::glob_cfg_t) and the HE-SIG-A
// bits (tx_pkg::sig_a_t), and the payload bytes follow from word 3, least
// significant bit first.
//
// The host writes through port W (user, address, data).  Two read ports, each
// with one cycle of latency: port A feeds the shared BCIM's HE data FSM, port B
// the preamble FSM and configuration reads.  The bank sizes follow the
// transmitter's architecture; the header layout and the two read ports are
// this design's choice.
module data_bram_bank
  import tx_pkg::*;
#(
  parameter int unsigned N_USERS = MAX_USERS,
  parameter int unsigned DEPTH   = BRAM_DEPTH,
  localparam int unsigned AW     = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              we,
  input  logic [USER_W-1:0] wuser,
  input  logic [AW-1:0]     waddr,
  input  logic [63:0]       wdata,
  input  logic [USER_W-1:0] a_user,
  input  logic [AW-1:0]     a_addr,
  output logic [63:0]       a_data,
  input  logic [USER_W-1:0] b_user,
  input  logic [AW-1:0]     b_addr,
  output logic [63:0]       b_data
);
  logic [63:0] mem [N_USERS][DEPTH];

  always_ff @(posedge clk) begin
    if (we && wuser < USER_W'(N_USERS)) mem[wuser][waddr] <= wdata;
    a_data <= (a_user < USER_W'(N_USERS)) ? mem[a_user][a_addr] : '0;
    b_data <= (b_user < USER_W'(N_USERS)) ? mem[b_user][b_addr] : '0;
  end
endmodule
