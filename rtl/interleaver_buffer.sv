// interleaver_buffer: 802.11ax BCC interleaver fused with the ping-pong BRAM
// that decouples the BCIM's pre-modulation part from its modulation part.
//
// The memory holds two OFDM symbols (halves) of coded bits for all users,
// grouped per data subcarrier (up to 6 bits per slot, MAX_SD_SYM slots per
// half).  The write side receives one user's coded bits in order, k = 0..N_CBPS-1,
// and stores each directly at its interleaved position j, so the read side can
// fetch the N_BPSCS bits of one subcarrier per access:
//   c = k mod N_COL, r = k div N_COL (kept as counters)
//   i = N_ROW*c + r
//   j = s*floor(i/s) + ((i - c) mod s),  s = max(N_BPSCS/2, 1)
// (floor(N_COL*i/N_CBPS) equals c, which removes the division of the standard
// formula).  Bit j goes to slot base + j div N_BPSCS, bit j mod N_BPSCS.
// `wr_start` latches the user's RU size, modulation, slot base and half and
// clears the counters; each `wr_en` cycle writes one bit.  The read port
// (half, slot) returns the slot's 6 bits one cycle later.
// The interleaver formula and N_COL/N_ROW are 802.11ax's; storing at the
// permuted address and the slot organisation are this design's choices.
module interleaver_buffer
  import tx_pkg::*;
#(
  parameter int unsigned SLOTS = MAX_SD_SYM,
  localparam int unsigned SW   = $clog2(SLOTS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_start,
  input  ru_size_e      wr_ru,
  input  mod_e          wr_mod,
  input  logic [SW-1:0] wr_base,
  input  logic          wr_half,
  input  logic          wr_en,
  input  logic          wr_bit,
  input  logic          rd_half,
  input  logic [SW-1:0] rd_slot,
  output logic [5:0]    rd_bits
);
  logic [5:0]  mem [2][SLOTS];
  ru_size_e    ru_q;
  mod_e        mod_q;
  logic [SW-1:0] base_q;
  logic        half_q;
  logic [4:0]  c;
  logic [6:0]  r;
  logic [4:0]  ncol;
  logic [6:0]  nrow;
  logic [2:0]  nb;
  logic [10:0] i, j, jq;
  logic [1:0]  s;
  logic [1:0]  imod, icmod;
  logic [7:0]  slot;
  logic [2:0]  bsel;

  assign ncol = il_ncol(ru_q);
  assign nb   = nbpscs(mod_q);
  assign nrow = 7'(il_rowk(ru_q)) * 7'(nb);
  assign s    = (nb <= 3'd2) ? 2'd1 : 2'(nb >> 1);
  assign i    = 11'(nrow) * 11'(c) + 11'(r);

  always_comb begin
    case (s)
      2'd2:    begin imod = 2'(i % 11'd2); icmod = 2'((i - 11'(c)) % 11'd2); end
      2'd3:    begin imod = 2'(i % 11'd3); icmod = 2'((i - 11'(c)) % 11'd3); end
      default: begin imod = 2'd0;          icmod = 2'd0; end
    endcase
    j  = i - 11'(imod) + 11'(icmod);
    jq = j / 11'd6;
    case (nb)
      3'd1:    begin slot = 8'(j);      bsel = 3'd0; end
      3'd2:    begin slot = 8'(j >> 1); bsel = 3'(j[0]); end
      3'd4:    begin slot = 8'(j >> 2); bsel = 3'(j[1:0]); end
      default: begin slot = 8'(jq); bsel = 3'(j - jq * 11'd6); end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c <= '0; r <= '0; ru_q <= RU26; mod_q <= MOD_BPSK; base_q <= '0; half_q <= 1'b0;
    end else if (wr_start) begin
      c <= '0; r <= '0; ru_q <= wr_ru; mod_q <= wr_mod; base_q <= wr_base; half_q <= wr_half;
    end else if (wr_en) begin
      if (c == ncol - 5'd1) begin
        c <= '0;
        r <= r + 7'd1;
      end else begin
        c <= c + 5'd1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en && !wr_start) mem[half_q][base_q + SW'(slot)][bsel] <= wr_bit;
    rd_bits <= mem[rd_half][rd_slot];
  end
endmodule
