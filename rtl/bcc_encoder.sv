// bcc_encoder: rate-1/2, constraint-length-7 convolutional encoder
// (generators 133 and 171 octal) with puncturing to rates 2/3 and 3/4.
//
// It produces exactly one coded bit per cycle with `en` high.  On a cycle where
// no coded bit is pending it takes a new input bit (`need_in` is then high),
// computes the pair (A, B), sends the first kept bit of the pair and holds the
// other as pending if the puncturing pattern keeps it.  Puncturing, per input
// bit phase p: 1/2 keeps A,B; 2/3 keeps A,B | A; 3/4 keeps A,B | A | B.
// `need_in` and `out_bit` are combinational.  The whole state (6-bit shift
// register, puncture phase, pending bit) is visible on `ctx_o` and loaded
// from `ctx_i` with `load`, so the encoder can be shared between users.
// The top 6 bits of `ctx_o` are constant zero: they only pad the 10-bit state
// to a 16-bit field of the 64-bit context word.
// Code and puncturing are those of 802.11; the context interface is part of the
// transmitter's hardware-virtualisation scheme.
module bcc_encoder
  import tx_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  rate_e       rate,
  input  logic        in_bit,
  output logic        need_in,
  output logic        out_bit,
  input  logic        load,
  input  logic [15:0] ctx_i,
  output logic [15:0] ctx_o
);
  logic [5:0] sr;          // sr[i] = input delayed by i+1
  logic [1:0] ph;          // puncture phase of the next input bit
  logic       pend_v, pend_b;
  logic       a, b, keep_a, keep_b;
  logic [1:0] ph_next;

  assign a = in_bit ^ sr[1] ^ sr[2] ^ sr[4] ^ sr[5];
  assign b = in_bit ^ sr[0] ^ sr[1] ^ sr[2] ^ sr[5];

  always_comb begin
    keep_a  = 1'b1;
    keep_b  = 1'b1;
    ph_next = 2'd0;
    case (rate)
      R23: begin
        keep_b  = (ph == 2'd0);
        ph_next = (ph == 2'd0) ? 2'd1 : 2'd0;
      end
      R34: begin
        keep_a  = (ph != 2'd2);
        keep_b  = (ph != 2'd1);
        ph_next = (ph == 2'd2) ? 2'd0 : ph + 2'd1;
      end
      default: ;
    endcase
  end

  assign need_in = !pend_v;
  assign out_bit = pend_v ? pend_b : (keep_a ? a : b);
  assign ctx_o   = {6'd0, pend_v, pend_b, ph, sr};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr <= '0; ph <= '0; pend_v <= 1'b0; pend_b <= 1'b0;
    end else if (load) begin
      {pend_v, pend_b, ph, sr} <= ctx_i[9:0];
    end else if (en) begin
      if (pend_v) begin
        pend_v <= 1'b0;
      end else begin
        sr     <= {sr[4:0], in_bit};
        ph     <= ph_next;
        pend_v <= keep_a && keep_b;
        pend_b <= b;
      end
    end
  end
endmodule
