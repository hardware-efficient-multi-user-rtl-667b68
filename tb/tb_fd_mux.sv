`timescale 1ns/1ps
// tb_fd_mux: writes random subsets of tones (negative and positive indices)
// into 256-point and 64-point symbols, commits them with metadata, and reads
// every bin back: bin k mod N must hold the last value written to tone k and
// unwritten bins must read zero.  Checks the ping-pong behaviour: a second
// symbol can be filled while the first waits, wr_ready drops when both buffers
// are full and returns after a release, symbols come out in order, and the
// one-clock read latency.
module tb_fd_mux;
  import tx_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;
  logic wr_valid = 1'b0, wr_n64 = 1'b0, commit = 1'b0, wr_ready, rd_avail, rd_release = 1'b0;
  logic signed [8:0] wr_tone = '0;
  cplx_t wr_val = '0, rd_data;
  logic [7:0] commit_meta = '0, rd_meta, rd_bin = '0;
  logic [31:0] rw;
  assign rw = rd_data;

  fd_mux dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  typedef logic [31:0] sym_t [256];

  task automatic fill(input bit n64, input logic [7:0] meta, output sym_t exp);
    int n;
    n = n64 ? 64 : 256;
    for (int b = 0; b < 256; b++) exp[b] = '0;
    for (int w = 0; w < 150; w++) begin
      int k;
      logic [31:0] v;
      k = n64 ? $urandom_range(0, 63) - 32 : $urandom_range(0, 255) - 128;
      v = $urandom;
      @(negedge clk);
      wr_valid = 1'b1; wr_tone = 9'(k); wr_val = v; wr_n64 = n64;
      exp[(k + n) % n] = v;
    end
    @(negedge clk);
    wr_valid = 1'b0; commit = 1'b1; commit_meta = meta;
    @(negedge clk);
    commit = 1'b0;
  endtask

  task automatic drain(input bit n64, input logic [7:0] meta, input sym_t exp, input string what);
    int bad;
    bad = 0;
    chk(rd_avail, {what, ": symbol available"});
    chk(rd_meta == meta, {what, ": metadata"});
    for (int b = 0; b < (n64 ? 64 : 256); b++) begin
      @(negedge clk); rd_bin = 8'(b);
      @(posedge clk); #1;
      if (rw !== exp[b]) bad++;
    end
    chk(bad == 0, $sformatf("%s: %0d bins wrong", what, bad));
    @(negedge clk); rd_release = 1'b1; @(negedge clk); rd_release = 1'b0;
  endtask

  initial begin
    sym_t e1, e2, e3;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    chk(wr_ready && !rd_avail, "empty after reset");
    fill(1'b0, 8'h20, e1);
    chk(wr_ready, "second buffer free after one commit");
    fill(1'b1, 8'h90, e2);
    chk(!wr_ready, "wr_ready low with both buffers full");
    drain(1'b0, 8'h20, e1, "256-point symbol");
    chk(wr_ready, "wr_ready back after release");
    fill(1'b0, 8'h40, e3);
    drain(1'b1, 8'h90, e2, "64-point symbol");
    drain(1'b0, 8'h40, e3, "256-point symbol after reuse (old tones cleared)");
    chk(!rd_avail && wr_ready, "empty at the end");
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
