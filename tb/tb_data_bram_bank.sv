`timescale 1ns/1ps
// tb_data_bram_bank: fills parts of every user's 1024 x 64 data memory through
// the host write port, then reads through both read ports (A: BCIM,
// B: preamble FSM) at random users and addresses and compares with a model.
// Checks the one-clock read latency of both ports and that users do not alias.
module tb_data_bram_bank;
  import tx_pkg::*;

  localparam int N = 9;
  localparam int AW = BRAM_AW;

  logic clk = 1'b0;
  always #5 clk = !clk;
  logic we = 1'b0;
  logic [USER_W-1:0] wuser = '0, a_user = '0, b_user = '0;
  logic [AW-1:0] waddr = '0, a_addr = '0, b_addr = '0;
  logic [63:0] wdata = '0, a_data, b_data;

  data_bram_bank #(.N_USERS(N)) dut (.*);

  int checks = 0, failures = 0;
  logic [63:0] model [N][64];   // first and last 32 words of each user

  function automatic logic [AW-1:0] addr_of(input int k);
    return (k < 32) ? AW'(k) : AW'(BRAM_DEPTH - 64 + k);
  endfunction

  initial begin
    logic [63:0] ea, eb;
    for (int u = 0; u < N; u++)
      for (int k = 0; k < 64; k++) begin
        @(negedge clk);
        we = 1'b1; wuser = USER_W'(u); waddr = addr_of(k);
        wdata = {u[7:0], k[7:0], $urandom, 16'($urandom)};
        model[u][k] = wdata;
      end
    @(negedge clk); we = 1'b0;
    for (int n = 0; n < 600; n++) begin
      int ua, ka, ub, kb;
      ua = $urandom_range(0, N - 1); ka = $urandom_range(0, 63);
      ub = $urandom_range(0, N - 1); kb = $urandom_range(0, 63);
      @(negedge clk);
      a_user = USER_W'(ua); a_addr = addr_of(ka);
      b_user = USER_W'(ub); b_addr = addr_of(kb);
      ea = model[ua][ka]; eb = model[ub][kb];
      @(posedge clk); #1;
      checks += 2;
      if (a_data !== ea) begin failures++; if (failures < 5) $display("FAIL: port A user %0d word %0d", ua, ka); end
      if (b_data !== eb) begin failures++; if (failures < 5) $display("FAIL: port B user %0d word %0d", ub, kb); end
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
