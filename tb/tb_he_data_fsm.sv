`timescale 1ns/1ps
// tb_he_data_fsm: drives the HE data FSM from a data-memory model with a
// one-clock read latency and random `en` gaps.  Checks the bit stream against
// the expected SERVICE (16 zeros), PSDU bits (word 3 onwards, LSB first),
// 6 tail bits (tail_o) and pad bits (pad_o), for several PSDU lengths.  Also
// saves the bit position in mid-stream, runs another user, restores it and
// checks that the first stream continues where it stopped.
module tb_he_data_fsm;
  import tx_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;
  logic en = 1'b0, load = 1'b0, bit_o, tail_o, pad_o;
  logic [15:0] psdu_len = '0;
  logic [BRAM_AW-1:0] rd_addr;
  logic [63:0] rd_data;
  logic [19:0] ctx_i = '0, ctx_o;
  int user = 0;

  he_data_fsm dut (.*);

  logic [63:0] mem [2][64];
  always_ff @(posedge clk) rd_data <= mem[user][rd_addr[5:0]];

  int checks = 0, failures = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  // expected (bit, tail, pad) at position p for user u with L bytes
  task automatic expect_at(input int u, input int L, input int p, output bit b, output bit t, output bit pd);
    b = 0; t = 0; pd = 0;
    if (p < 16) b = 0;
    else if (p < 16 + 8 * L) b = mem[u][HDR_WORDS + (p - 16) / 64][(p - 16) % 64];
    else if (p < 16 + 8 * L + 6) t = 1;
    else pd = 1;
  endtask

  task automatic restore(input logic [19:0] c);
    @(negedge clk); load = 1'b1; ctx_i = c; @(negedge clk); load = 1'b0;
  endtask

  task automatic walk(input int u, input int L, inout int p, input int n);
    bit b, t, pd;
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      en = 1'b0;
      while ($urandom_range(0, 3) == 0) @(negedge clk);
      en = 1'b1;
      #1;
      expect_at(u, L, p, b, t, pd);
      chk(bit_o == b && tail_o == t && pad_o == pd, $sformatf("user %0d position %0d", u, p));
      p++;
    end
    @(negedge clk); en = 1'b0;
  endtask

  initial begin
    int p0, p1, L0, L1;
    logic [19:0] sv;
    for (int u = 0; u < 2; u++) for (int w = 0; w < 64; w++) mem[u][w] = {$urandom, $urandom};
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 4; r++) begin
      L0 = $urandom_range(1, 60); L1 = $urandom_range(1, 60);
      user = 0; psdu_len = 16'(L0); restore('0); p0 = 0;
      walk(0, L0, p0, 16 + 4 * L0);               // stop inside the PSDU
      sv = ctx_o;
      chk(sv == 20'(p0), "saved context is the bit position");
      user = 1; psdu_len = 16'(L1); restore('0); p1 = 0;
      walk(1, L1, p1, 16 + 8 * L1 + 20);          // through tail into padding
      user = 0; psdu_len = 16'(L0); restore(sv);
      walk(0, L0, p0, 4 * L0 + 30);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
