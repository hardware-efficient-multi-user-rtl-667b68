// tb_ref_pkg: reference models used by the testbenches, written from the
// 802.11 definitions independently of the RTL: scrambler sequence, BCC
// encoder with puncturing, interleaver permutation by the standard formula,
// constellation levels, pilot polarity and RU tone walks.
package tb_ref_pkg;
  import tx_pkg::*;

  // first 16 values of the 802.11 pilot polarity sequence p_n
  localparam int P16 [16] = '{1,1,1,1,-1,-1,-1,1,-1,-1,-1,-1,1,1,-1,1};
  localparam int PSI [8]  = '{1,1,1,-1,-1,1,1,1};

  function automatic int unit_k(input int unit, input int m);
    case (m)
      1: return int'($rtoi(real'(unit) / $sqrt(2.0) + 0.5));
      2: return int'($rtoi(real'(unit) / $sqrt(10.0) + 0.5));
      3: return int'($rtoi(real'(unit) / $sqrt(42.0) + 0.5));
      default: return unit;
    endcase
  endfunction

  // level of one axis from its bits, b[0] first
  function automatic int axis_level(input int nb, input bit b0, input bit b1, input bit b2);
    int sgn;
    sgn = b0 ? 1 : -1;
    case (nb)
      1: return sgn;
      2: return sgn * (b1 ? 1 : 3);
      default: return sgn * (b1 ? (b2 ? 3 : 1) : (b2 ? 5 : 7));
    endcase
  endfunction

  // map nbpscs bits (bits[0] first) -> {re, im}
  function automatic void ref_map(input int unit, input int nbpscs, input bit bits [6],
                                  output int re, output int im);
    int k;
    case (nbpscs)
      1: begin re = bits[0] ? unit : -unit; im = 0; end
      2: begin k = unit_k(unit, 1); re = axis_level(1, bits[0], 0, 0) * k; im = axis_level(1, bits[1], 0, 0) * k; end
      4: begin k = unit_k(unit, 2); re = axis_level(2, bits[0], bits[1], 0) * k; im = axis_level(2, bits[2], bits[3], 0) * k; end
      default: begin k = unit_k(unit, 3); re = axis_level(3, bits[0], bits[1], bits[2]) * k; im = axis_level(3, bits[3], bits[4], bits[5]) * k; end
    endcase
  endfunction

  // interleaver: coded index k -> position j (802.11 formula, with divisions)
  function automatic int il_j(input int k, input int ncol, input int nrow, input int nb);
    int i, s, ncbps;
    ncbps = ncol * nrow;
    s = (nb / 2 > 1) ? nb / 2 : 1;
    i = nrow * (k % ncol) + k / ncol;
    return s * (i / s) + (i + ncbps - (ncol * i) / ncbps) % s;
  endfunction

  // rate-1/2 K=7 encoder on a bit array, then puncturing (rate 0:1/2 1:2/3 2:3/4)
  function automatic void ref_bcc(input bit din [$], input int rate, output bit dout [$]);
    bit [6:0] w;   // w[0] = current input, w[d] = input delayed by d
    bit a, b;
    w = '0;
    dout = {};
    foreach (din[n]) begin
      w = {w[5:0], din[n]};
      a = ^(w & 7'b1101101);   // 133 octal over delays 0..6, reversed: taps 0,2,3,5,6
      b = ^(w & 7'b1001111);   // 171 octal: taps 0,1,2,3,6
      case (rate)
        0: begin dout.push_back(a); dout.push_back(b); end
        1: begin dout.push_back(a); if (n % 2 == 0) dout.push_back(b); end
        default: begin
          if (n % 3 != 2) dout.push_back(a);
          if (n % 3 != 1) dout.push_back(b);
        end
      endcase
    end
  endfunction

  // scramble in place with seed; positions flagged in zero[] are forced to 0
  function automatic void ref_scramble(inout bit d [$], input bit [6:0] seed, input int t0, input int t1);
    bit [6:0] s;
    bit f;
    s = seed;
    foreach (d[n]) begin
      f = s[6] ^ s[3];
      s = {s[5:0], f};
      d[n] = (n >= t0 && n < t1) ? 1'b0 : (d[n] ^ f);
    end
  endfunction

  // span of RU tones walked (with its DC gap) and the tones themselves
  function automatic void ref_tones(input ru_size_e r, input int idx, output int tones [$]);
    int first, n;
    tones = {};
    case (r)
      RU26: begin
        int f26 [9] = '{-121, -95, -68, -42, -16, 17, 43, 70, 96};
        first = f26[idx]; n = 26;
      end
      RU52: begin
        int f52 [4] = '{-121, -68, 17, 70};
        first = f52[idx]; n = 52;
      end
      RU106: begin first = (idx == 0) ? -122 : 17; n = 106; end
      default: begin first = -122; n = 242; end
    endcase
    for (int k = first; tones.size() < n; k++) begin
      if (r == RU242 && k >= -1 && k <= 1) continue;
      if (r == RU26 && idx == 4 && k >= -3 && k <= 3) continue;
      tones.push_back(k);
    end
  endfunction

  function automatic bit ref_is_pilot(input ru_size_e r, input int k);
    int a;
    a = (k < 0) ? -k : k;
    if (r == RU26 || r == RU52)
      return a inside {10, 22, 36, 48, 62, 76, 90, 102, 116};
    return a inside {22, 48, 76, 102};
  endfunction
endpackage
