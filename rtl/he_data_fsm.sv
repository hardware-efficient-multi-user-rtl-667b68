// he_data_fsm: produces one user's DATA-field bit stream for the BCC path:
// 16 SERVICE bits (zero), the PSDU bits read from the user's data BRAM, 6 tail
// bits and then padding bits for as long as the encoder keeps asking.  Because
// every user's stream is simply padded until the common number of OFDM symbols
// is done, all users' transmissions end together.
//
// State is a single bit position `bitpos` in that stream (the context word).
// The BRAM has one cycle of read latency, so the read address is computed from
// the *next* bit position: after any advance or context load the word that
// holds the current bit is on `rd_data` one cycle later.  Payload bit n sits in
// word HDR_WORDS + n/64, bit n%64.  `bit_o` is combinational, `tail_o` marks
// the tail bits (sent as zeros past the scrambler), `pad_o` the padding bits.
// SERVICE/tail/padding follow 802.11; the bit-position context is this
// design's choice.
module he_data_fsm
  import tx_pkg::*;
#(
  parameter int unsigned AW = BRAM_AW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,          // current bit consumed
  input  logic [15:0]   psdu_len,    // bytes
  output logic [AW-1:0] rd_addr,
  input  logic [63:0]   rd_data,
  output logic          bit_o,
  output logic          tail_o,
  output logic          pad_o,
  input  logic          load,
  input  logic [19:0]   ctx_i,
  output logic [19:0]   ctx_o
);
  logic [19:0] bitpos, bitpos_n;
  logic [19:0] psdu_end, tail_end, pay_n;
  logic [5:0]  pay;

  assign psdu_end = 20'd16 + {1'b0, psdu_len, 3'b000};
  assign tail_end = psdu_end + 20'd6;

  always_comb begin
    bitpos_n = bitpos;
    if (load)    bitpos_n = ctx_i;
    else if (en) bitpos_n = bitpos + 20'd1;
  end

  // word holding the next bit; SERVICE positions prefetch the first payload word
  assign pay_n   = (bitpos_n < 20'd16) ? 20'd0 : bitpos_n - 20'd16;
  assign rd_addr = AW'(HDR_WORDS + 32'(pay_n >> 6));
  assign pay     = 6'(bitpos - 20'd16);

  always_comb begin
    bit_o  = 1'b0;
    tail_o = 1'b0;
    pad_o  = 1'b0;
    if (bitpos < 20'd16)          bit_o  = 1'b0;
    else if (bitpos < psdu_end)   bit_o  = rd_data[pay];
    else if (bitpos < tail_end)   tail_o = 1'b1;
    else                          pad_o  = 1'b1;
  end

  assign ctx_o = bitpos;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) bitpos <= '0;
    else        bitpos <= bitpos_n;
  end
endmodule
