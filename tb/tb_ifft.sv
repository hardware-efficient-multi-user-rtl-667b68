`timescale 1ns/1ps
// tb_ifft: sends random 256-point and 64-point symbols (and single-tone ones)
// through the IFFT from a frequency-domain buffer model with one clock of read
// latency, and compares every output sample with a direct inverse DFT computed
// here in floating point: x[n] = (1/N) sum_k X[k] exp(+j 2 pi k n / N).
// The error allowed is a few LSBs (rounding in log2(N) scaled stages).
// Also checks the processing time (from in_avail to out_avail: N+2 clocks of
// loading plus N/2*log2(N) butterflies) and that a second symbol is
// transformed while the first is still held at the output (two banks).
module tb_ifft;
  import tx_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;
  logic in_avail = 1'b0, in_release, out_avail, out_release = 1'b0;
  logic [7:0] in_meta = '0, in_bin, out_meta, out_addr = '0;
  cplx_t in_data, out_data;
  logic [31:0] ow;
  assign ow = out_data;

  ifft dut (.*);

  int xr [256], xi [256];
  always_ff @(posedge clk) in_data <= '{re: 16'(xr[in_bin]), im: 16'(xi[in_bin])};

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  real er [256], ei [256];
  task automatic ref_idft(input int n);
    for (int t = 0; t < n; t++) begin
      er[t] = 0.0; ei[t] = 0.0;
      for (int k = 0; k < n; k++) begin
        real a;
        a = 6.283185307179586 * real'((k * t) % n) / real'(n);
        er[t] += xr[k] * $cos(a) - xi[k] * $sin(a);
        ei[t] += xr[k] * $sin(a) + xi[k] * $cos(a);
      end
      er[t] /= n; ei[t] /= n;
    end
  endtask

  // load symbol into the model, start it, return cycles to out_avail
  task automatic send(input int n, input int kind, output int cyc);
    for (int k = 0; k < 256; k++) begin
      if (k >= n) begin xr[k] = 0; xi[k] = 0; end
      else if (kind == 0) begin xr[k] = $urandom_range(0, 32000) - 16000; xi[k] = $urandom_range(0, 32000) - 16000; end
      else begin xr[k] = (k == kind) ? 8192 : 0; xi[k] = 0; end
    end
    ref_idft(n);
    @(negedge clk);
    in_avail = 1'b1; in_meta = (n == 64) ? 8'h80 | 8'd16 : 8'd64;
    cyc = 0;
    while (!in_release) begin @(negedge clk); cyc++; end
    in_avail = 1'b0;
    while (!out_avail) begin @(negedge clk); cyc++; end
  endtask

  task automatic drain(input int n, input string what);
    int maxe, e;
    maxe = 0;
    for (int t = 0; t < n; t++) begin
      @(negedge clk); out_addr = 8'(t);
      @(posedge clk); #1;
      e = $rtoi($sqrt((real'($signed(ow[31:16])) - er[t]) ** 2 + (real'($signed(ow[15:0])) - ei[t]) ** 2));
      if (e > maxe) maxe = e;
    end
    chk(maxe <= 6, $sformatf("%s: max error %0d LSB", what, maxe));
    chk(out_meta[7] == (n == 64), $sformatf("%s: size in metadata", what));
    @(negedge clk); out_release = 1'b1; @(negedge clk); out_release = 1'b0;
  endtask

  initial begin
    int cyc;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    send(256, 0, cyc);
    chk(cyc >= 1280 && cyc <= 1285, $sformatf("256-point time %0d clocks (256 load + 1024 butterflies)", cyc));
    drain(256, "random 256-point");
    send(64, 0, cyc);
    chk(cyc >= 256 && cyc <= 261, $sformatf("64-point time %0d clocks (64 load + 192 butterflies)", cyc));
    drain(64, "random 64-point");
    send(256, 37, cyc);
    drain(256, "single tone 37 of 256");
    send(64, 5, cyc);
    drain(64, "single tone 5 of 64");
    // two in flight: the second is computed while the first waits at the output
    send(256, 0, cyc);
    begin
      real sr [256], si [256];
      sr = er; si = ei;
      send(64, 0, cyc);          // returns immediately: bank 0 still full, bank 1 in use
      er = sr; ei = si;
      drain(256, "first of two queued symbols");
      wait (out_avail);
      ref_idft(64);
      drain(64, "second of two queued symbols");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
