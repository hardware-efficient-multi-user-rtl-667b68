`timescale 1ns/1ps
// tb_duc: feeds packets of random 20 MS/s samples to the 2x up-converter from
// a FIFO model and checks the 40 MS/s output sample by sample against
// y[0] = 0, y[2n+1] = floor((x[n-1] + x[n]) / 2), y[2n+2] = x[n] (x[-1] = 0),
// i.e. 2M+1 outputs for M inputs.  Checks the rate (one FIFO read every
// second 40 MHz clock, outputs on consecutive clocks), that `active` drops
// after pkt_end, and that an empty FIFO in mid-packet raises `underflow`.
module tb_duc;
  import tx_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #12.5 clk = !clk;     // 40 MHz
  logic fifo_empty, fifo_rd, pkt_end = 1'b0, active, iq_valid, underflow;
  cplx_t fifo_data, iq;

  duc dut (.*);

  int checks = 0, failures = 0;
  // FIFO model: buffer with write and read indices
  logic [31:0] buf_q [4096];
  int wi = 0, ri = 0;
  assign fifo_empty = (wi == ri);
  assign fifo_data = buf_q[ri % 4096];
  always @(posedge clk) if (fifo_rd) ri <= ri + 1;

  int yre [$], yim [$];
  int n_uf = 0, n_rd = 0, rd_gap_bad = 0, last_rd = -10, cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (iq_valid) begin
      yre.push_back(int'(iq.re)); yim.push_back(int'(iq.im));
    end
    if (underflow && rst_n) n_uf++;
    if (fifo_rd) begin
      n_rd++;
      if (last_rd >= 0 && cyc - last_rd != 2) rd_gap_bad++;
      last_rd = cyc;
    end
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic packet(input int m, input bit gap);
    int xr [$], xi [$], er, ei, bad;
    yre = {}; yim = {}; last_rd = -10;
    for (int n = 0; n < m; n++) begin
      xr.push_back($urandom_range(0, 65535) - 32768);
      xi.push_back($urandom_range(0, 65535) - 32768);
      buf_q[wi % 4096] = {16'(xr[n]), 16'(xi[n])}; wi++;
    end
    pkt_end = 1'b0;
    wait (active);
    if (gap) begin
      // let the DUC drain the queue and run dry before the end is signalled
      wait (wi == ri);
      repeat (6) @(posedge clk);
    end
    pkt_end = 1'b1;
    wait (!active);
    repeat (3) @(posedge clk);
    pkt_end = 1'b0;
    if (!gap) begin
      chk(yre.size() == 2 * m + 1, $sformatf("%0d outputs for %0d inputs (got %0d)", 2 * m + 1, m, yre.size()));
      bad = 0;
      for (int k = 0; k < yre.size() && k < 2 * m + 1; k++) begin
        if (k == 0) begin er = 0; ei = 0; end
        else if (k % 2 == 0) begin er = xr[k / 2 - 1]; ei = xi[k / 2 - 1]; end
        else begin
          int n;
          n = k / 2;
          er = ((n > 0 ? xr[n - 1] : 0) + xr[n]) >>> 1;
          ei = ((n > 0 ? xi[n - 1] : 0) + xi[n]) >>> 1;
        end
        if (yre[k] != er || yim[k] != ei) bad++;
      end
      chk(bad == 0, $sformatf("interpolated samples (%0d wrong)", bad));
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    packet(50, 1'b0);
    packet(333, 1'b0);
    chk(n_uf == 0, "no underflow while the FIFO keeps up");
    chk(rd_gap_bad == 0, "one FIFO read every second clock (20 MS/s in, 40 MS/s out)");
    chk(n_rd == 383, "every input sample read once");
    packet(20, 1'b1);
    chk(n_uf > 0, "underflow flagged when the FIFO runs dry in mid-packet");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
