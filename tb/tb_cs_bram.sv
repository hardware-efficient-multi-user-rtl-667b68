`timescale 1ns/1ps
// tb_cs_bram: writes random 64-bit context words to every location of the
// context-switch memory (N_USERS x 4 words) in random order, reads them back
// with random interleaved writes, and checks each read against a model.  Also
// checks the one-clock read latency: data for an address appears on the clock
// edge after the address is presented, and a read of a location written in
// the same clock returns the old word.
module tb_cs_bram;
  import tx_pkg::*;

  localparam int N = 9;
  localparam int DEPTH = N * CS_WORDS;
  localparam int AW = $clog2(DEPTH);

  logic clk = 1'b0;
  always #5 clk = !clk;
  logic we = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  ctx_word_t wdata = '0, rdata;

  cs_bram #(.N_USERS(N)) dut (.*);

  int checks = 0, failures = 0;
  ctx_word_t model [DEPTH];

  initial begin
    ctx_word_t expq;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1'b1; waddr = AW'(a); wdata = {$urandom, $urandom}; model[a] = wdata;
    end
    @(negedge clk); we = 1'b0;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      raddr = AW'($urandom_range(0, DEPTH - 1));
      we = 1'($urandom);
      waddr = ($urandom_range(0, 3) == 0) ? raddr : AW'($urandom_range(0, DEPTH - 1));
      wdata = {$urandom, $urandom};
      expq = model[raddr];                 // read-before-write
      if (we) model[waddr] = wdata;
      @(posedge clk); #1;
      checks++;
      if (rdata !== expq) begin
        failures++;
        if (failures < 5) $display("FAIL: read %0d got %h expected %h", raddr, rdata, expq);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
