`timescale 1ns/1ps
// tb_qam_mapper: applies every bit pattern in every modulation (BPSK, QPSK,
// 16-QAM, 64-QAM) and compares the mapper's I/Q with the Gray-coded levels of
// the reference (tb_ref_pkg), scaled by 1, 1/sqrt(2), 1/sqrt(10) and
// 1/sqrt(42).  Also checks that each constellation has unit mean power within
// rounding.  The mapper is combinational; values are sampled 1 ns after a change.
module tb_qam_mapper;
  import tx_pkg::*;
  import tb_ref_pkg::*;

  localparam int UNIT = 8192;
  mod_e mode;
  logic [5:0] bits;
  cplx_t sym;
  logic [31:0] w;
  int re, im;
  assign w = sym;

  qam_mapper #(.UNIT(UNIT)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    for (int m = 0; m < 4; m++) begin
      int nb, npts;
      real pwr;
      nb = (m == 0) ? 1 : 2 * m;
      npts = 1 << nb;
      pwr = 0.0;
      for (int p = 0; p < npts; p++) begin
        bit b6 [6];
        int er, ei;
        mode = mod_e'(m);
        bits = 6'(p);
        for (int b = 0; b < 6; b++) b6[b] = bits[b];
        #1;
        re = int'($signed(w[31:16])); im = int'($signed(w[15:0]));
        ref_map(UNIT, nb, b6, er, ei);
        checks++;
        if (re != er || im != ei) begin
          failures++;
          $display("FAIL: mode %0d bits %b: got %0d,%0d expected %0d,%0d", m, bits, re, im, er, ei);
        end
        pwr += (real'(re) * re + real'(im) * im) / (real'(UNIT) * UNIT);
      end
      pwr = pwr / npts;
      checks++;
      if (pwr < 0.999 || pwr > 1.001) begin
        failures++;
        $display("FAIL: mode %0d mean power %f", m, pwr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
