`timescale 1ns/1ps
// tb_bcc_encoder: drives random bits through the encoder at rates 1/2, 2/3
// and 3/4 and compares every coded bit with the reference encoder and
// puncturer (tb_ref_pkg).  Checks one coded bit per clock, and that saving the
// state mid-stream, running another stream, and restoring it continues the
// first stream exactly (the context switch).
module tb_bcc_encoder;
  import tx_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;
  logic en = 1'b0, in_bit = 1'b0, load = 1'b0, need_in, out_bit;
  rate_e rate = R12;
  logic [15:0] ctx_i = '0, ctx_o;

  bcc_encoder dut (.*);

  int checks = 0, failures = 0;

  // run n coded bits of stream din starting at input index *pos, compare to ref
  task automatic run(input bit din [$], input bit ref_out [$], inout int pos, inout int opos, input int n);
    for (int c = 0; c < n; c++) begin
      @(negedge clk);
      en = 1'b1;
      in_bit = din[pos];
      #1;
      checks++;
      if (out_bit !== ref_out[opos]) begin
        failures++;
        if (failures < 5) $display("FAIL: rate %0d coded bit %0d", rate, opos);
      end
      if (need_in) pos++;
      opos++;
    end
    @(negedge clk);
    en = 1'b0;
  endtask

  initial begin
    bit d1 [$], d2 [$], r1 [$], r2 [$];
    int p1, o1, p2, o2;
    logic [15:0] saved;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 3; r++) begin
      d1 = {}; d2 = {};
      for (int n = 0; n < 600; n++) begin d1.push_back(1'($urandom)); d2.push_back(1'($urandom)); end
      ref_bcc(d1, r, r1);
      ref_bcc(d2, r, r2);
      rate = rate_e'(r);
      @(negedge clk); load = 1'b1; ctx_i = '0; @(negedge clk); load = 1'b0;
      p1 = 0; o1 = 0; p2 = 0; o2 = 0;
      run(d1, r1, p1, o1, 301);              // odd length: stops mid-pair / mid-pattern
      saved = ctx_o;
      @(negedge clk); load = 1'b1; ctx_i = '0; @(negedge clk); load = 1'b0;
      run(d2, r2, p2, o2, 250);              // another "user"
      @(negedge clk); load = 1'b1; ctx_i = saved; @(negedge clk); load = 1'b0;
      run(d1, r1, p1, o1, 400);              // first user resumes
      checks++;
      if (o1 != 701) failures++;
    end
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
