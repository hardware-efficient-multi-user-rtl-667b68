`timescale 1ns/1ps
// tb_async_fifo: writes a numbered random stream at 100 MHz and reads it at
// 40 MHz (and then the other way round, fast reader), with random stalls on
// both sides.  Checks that every word arrives once and in order, that the
// writer never needs more than DEPTH entries before `full` (no overflow: a
// write is only issued while !full), that `full` is seen when the reader
// stops, and that the FIFO ends empty.
module tb_async_fifo;
  localparam int W = 32, DEPTH = 16;
  logic wclk = 1'b0, rclk = 1'b0, wrst_n = 1'b0, rrst_n = 1'b0;
  real wper = 5.0, rper = 12.5;
  always #(wper) wclk = !wclk;
  always #(rper) rclk = !rclk;
  logic wr_en = 1'b0, rd_en = 1'b0, full, empty;
  logic [W-1:0] wdata = '0, rdata;

  async_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  logic [W-1:0] sent [$];
  int n_full = 0, n_got = 0, bad = 0;
  bit rstop = 1'b0, rdrun = 1'b1;
  int wprob = 90, rprob = 90;

  always @(posedge wclk) if (full) n_full++;

  // reader
  always @(negedge rclk) begin
    rd_en <= 1'b0;
    if (rdrun && !rstop && !empty && $urandom_range(0, 99) < rprob) rd_en <= 1'b1;
  end
  always @(posedge rclk) begin
    if (rd_en && !empty) begin
      if (sent.size() == 0 || rdata !== sent[0]) bad++;
      if (sent.size() > 0) void'(sent.pop_front());
      n_got++;
    end
  end

  task automatic stream(input int n);
    for (int k = 0; k < n; k++) begin
      @(negedge wclk);
      while (full || $urandom_range(0, 99) >= wprob) begin
        wr_en = 1'b0;
        @(negedge wclk);
      end
      wr_en = 1'b1; wdata = $urandom;
      sent.push_back(wdata);
    end
    @(negedge wclk); wr_en = 1'b0;
  endtask

  initial begin
    repeat (3) @(posedge rclk);
    wrst_n = 1'b1; rrst_n = 1'b1;
    repeat (3) @(posedge rclk);
    // 1: fast writer, slow reader; reader pauses once so the FIFO fills
    fork
      stream(400);
      begin repeat (50) @(posedge rclk); rstop = 1'b1; repeat (60) @(posedge rclk); rstop = 1'b0; end
    join
    wait (sent.size() == 0);
    repeat (10) @(posedge rclk);
    checks++; if (bad != 0) begin failures++; $display("FAIL: %0d words out of order or corrupted", bad); end
    checks++; if (n_got != 400) begin failures++; $display("FAIL: got %0d words", n_got); end
    checks++; if (n_full == 0) begin failures++; $display("FAIL: full never raised"); end
    checks++; if (!empty) begin failures++; $display("FAIL: not empty at the end"); end
    // 2: slow writer, fast reader
    wper = 12.5; rper = 5.0; wprob = 50; n_got = 0;
    stream(300);
    wait (sent.size() == 0);
    repeat (10) @(posedge rclk);
    checks++; if (bad != 0) begin failures++; $display("FAIL: %0d words out of order or corrupted", bad); end
    checks++; if (n_got != 300) begin failures++; $display("FAIL: got %0d words", n_got); end
    checks++; if (!empty) begin failures++; $display("FAIL: not empty at the end"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
