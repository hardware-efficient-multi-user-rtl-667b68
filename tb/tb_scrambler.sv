`timescale 1ns/1ps
// tb_scrambler: checks the x^7 + x^4 + 1 data scrambler against the reference
// sequence for several seeds (one bit per clock), the 127-bit period of the
// all-ones seed, forcing of tail bits to zero while the state still advances,
// and that a saved state, restored after another stream, continues the first.
module tb_scrambler;
  import tb_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;
  logic en = 1'b0, in_bit = 1'b0, zero_out = 1'b0, load = 1'b0, out_bit;
  logic [6:0] state_i = '0, state_o;

  scrambler dut (.*);

  int checks = 0, failures = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  task automatic seed(input logic [6:0] s);
    @(negedge clk); load = 1'b1; state_i = s; @(negedge clk); load = 1'b0;
  endtask

  // feed d[from..to-1], compare with ref r
  task automatic feed(input bit d [$], input bit r [$], input int from, input int to, input int t0, input int t1);
    for (int n = from; n < to; n++) begin
      @(negedge clk);
      en = 1'b1; in_bit = d[n]; zero_out = (n >= t0 && n < t1);
      #1 chk(out_bit == r[n], $sformatf("bit %0d", n));
    end
    @(negedge clk); en = 1'b0; zero_out = 1'b0;
  endtask

  initial begin
    bit d [$], r [$], d2 [$], r2 [$];
    logic [6:0] sv;
    int first_one;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // all-ones seed, zero input: period 127, starts 0000 1110 ...
    d = {};
    for (int n = 0; n < 254; n++) d.push_back(1'b0);
    r = d;
    ref_scramble(r, 7'h7F, 0, 0);
    seed(7'h7F);
    feed(d, r, 0, 254, -1, -1);
    for (int n = 0; n < 127; n++) chk(r[n] == r[n + 127], "period 127");
    chk(r[0] == 0 && r[1] == 0 && r[2] == 0 && r[3] == 0 && r[4] == 1, "start of all-ones sequence");
    // random data, several seeds, tail forced to zero, save and restore
    for (int k = 0; k < 6; k++) begin
      logic [6:0] s1, s2;
      s1 = 7'($urandom_range(1, 127)); s2 = 7'($urandom_range(1, 127));
      d = {}; d2 = {};
      for (int n = 0; n < 300; n++) begin d.push_back(1'($urandom)); d2.push_back(1'($urandom)); end
      r = d; ref_scramble(r, s1, 150, 156);
      r2 = d2; ref_scramble(r2, s2, 400, 400);
      seed(s1);
      feed(d, r, 0, 140, 150, 156);
      sv = state_o;
      seed(s2);
      feed(d2, r2, 0, 200, 400, 400);
      seed(sv);
      feed(d, r, 140, 300, 150, 156);
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
