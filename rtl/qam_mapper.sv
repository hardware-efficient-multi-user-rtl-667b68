// qam_mapper: Gray-coded BPSK / QPSK / 16-QAM / 64-QAM constellation mapper.
//
// Purely combinational.  `bits[0]` is the first bit of the group in stream
// order; BPSK uses bits[0], QPSK bits[1:0], 16-QAM bits[3:0], 64-QAM bits[5:0].
// The first half of the group selects the in-phase level, the second half the
// quadrature level, with the 802.11 Gray mapping (0 -> -1 for one bit;
// 00,01,11,10 -> -3,-1,+1,+3; 000,001,011,010,110,111,101,100 -> -7..+7).
// Points are normalised to unit average power and scaled by UNIT, rounding
// UNIT/sqrt(2), UNIT/sqrt(10) and UNIT/sqrt(42).  The unit amplitude is this
// design's choice.
module qam_mapper
  import tx_pkg::*;
#(
  parameter int UNIT = 8192
) (
  input  mod_e       mode,
  input  logic [5:0] bits,
  output cplx_t      sym
);
  localparam int K2  = int'($rtoi(real'(UNIT) / $sqrt(2.0)  + 0.5));
  localparam int K10 = int'($rtoi(real'(UNIT) / $sqrt(10.0) + 0.5));
  localparam int K42 = int'($rtoi(real'(UNIT) / $sqrt(42.0) + 0.5));

  function automatic int lvl2(input logic [1:0] b);   // b = {first, second}
    case (b)
      2'b00: return -3;
      2'b01: return -1;
      2'b11: return  1;
      default: return 3;
    endcase
  endfunction

  function automatic int lvl3(input logic [2:0] b);
    case (b)
      3'b000: return -7;
      3'b001: return -5;
      3'b011: return -3;
      3'b010: return -1;
      3'b110: return  1;
      3'b111: return  3;
      3'b101: return  5;
      default: return 7;
    endcase
  endfunction

  int li, lq, k;

  always_comb begin
    li = 0; lq = 0; k = UNIT;
    case (mode)
      MOD_BPSK:  begin li = bits[0] ? 1 : -1; lq = 0; k = UNIT; end
      MOD_QPSK:  begin li = bits[0] ? 1 : -1; lq = bits[1] ? 1 : -1; k = K2; end
      MOD_16QAM: begin li = lvl2({bits[0], bits[1]}); lq = lvl2({bits[2], bits[3]}); k = K10; end
      default:   begin li = lvl3({bits[0], bits[1], bits[2]}); lq = lvl3({bits[3], bits[4], bits[5]}); k = K42; end
    endcase
    sym.re = sample_t'(li * k);
    sym.im = sample_t'(lq * k);
  end
endmodule
