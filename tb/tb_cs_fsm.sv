`timescale 1ns/1ps
// tb_cs_fsm: drives the context-switching FSM with models of the two BCIM
// stages (each stays busy for a random number of clocks after its start
// pulse) and checks:
//  - Flushing: N_USERS*4 zero writes covering every CS-BRAM address, then Idle;
//  - the job order: pre-modulation jobs (user, symbol) run user-major inside a
//    symbol, symbol by symbol; the modulation job of each sub-tick is the
//    pre-modulation job of the previous sub-tick;
//  - ContextRestoring reads slots 0..2 of the pre-modulation user and slot 3 of
//    the modulation user, and loads them (ld, ld_slot 0..3) in order;
//  - ContextSaving writes the same four addresses, then raises cs_finish;
//  - 8 clocks of CS-BRAM access per switch (4 reads + 4 writes);
//  - one sym_done per symbol, one tx_finish, and a stall while out_ready is low
//    before user 0's modulation.
module tb_cs_fsm;
  import tx_pkg::*;

  localparam int N = 5;
  localparam int AW = $clog2(N * CS_WORDS);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;
  logic [USER_W-1:0] n_users = '0;
  logic [9:0] n_sym = '0;
  logic tx_start = 1'b0, out_ready = 1'b1, pm_busy = 1'b0, mod_busy = 1'b0;
  logic cs_we, ld, pm_start, mod_start, pm_act, mod_act, flushing;
  logic [AW-1:0] cs_waddr, cs_raddr;
  logic [1:0] wr_slot, ld_slot;
  logic [USER_W-1:0] pm_user, mod_user;
  logic [9:0] pm_sym, mod_sym;
  logic sym_done, cs_finish, tx_finish, idle, stall;

  cs_fsm #(.N_USERS(N)) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // stage models
  int pm_left = 0, mod_left = 0;
  always @(posedge clk) begin
    if (pm_start) pm_left = $urandom_range(3, 40);
    else if (pm_left > 0) pm_left--;
    if (mod_start) mod_left = $urandom_range(3, 40);
    else if (mod_left > 0) mod_left--;
  end
  always @(negedge clk) begin
    pm_busy = (pm_left > 0);
    mod_busy = (mod_left > 0);
  end

  // observers
  int n_flush = 0, n_rd = 0, n_wr = 0, n_pm = 0, n_mod = 0, n_sd = 0, n_tx = 0, n_stall = 0, n_csf = 0;
  int order_bad = 0, ld_bad = 0, addr_bad = 0;
  int last_pu = -1, last_ps = -1, prev_pu, prev_ps, ld_next = 0, wr_in_switch = 0, rd_in_switch = 0;
  bit flush_seen [N * CS_WORDS];
  int exp_u = 0, exp_s = 0;
  always @(posedge clk) if (rst_n) begin
    if (flushing && cs_we) flush_seen[cs_waddr] = 1'b1;
    if (ld) begin
      int u;
      n_rd++; rd_in_switch++;
      if (int'(ld_slot) != ld_next) ld_bad++;
      ld_next = (ld_next + 1) % 4;
      u = (ld_slot == 2'd3) ? int'(mod_user) : int'(pm_user);
    end
    if (dut.state == 2'd2 && !dut.running && dut.cnt <= 3) begin
      int u;
      u = (dut.cnt == 3) ? int'(mod_user) : int'(pm_user);
      if (int'(cs_raddr) != u * 4 + int'(dut.cnt)) addr_bad++;
    end
    if (cs_we && !flushing) begin
      int u;
      n_wr++; wr_in_switch++;
      u = (wr_slot == 2'd3) ? int'(mod_user) : int'(pm_user);
      if (int'(cs_waddr) != u * 4 + int'(wr_slot)) addr_bad++;
    end
    if (pm_start) begin
      n_pm++;
      if (int'(pm_user) != exp_u || int'(pm_sym) != exp_s) order_bad++;
      if (mod_start && (int'(mod_user) != last_pu || int'(mod_sym) != last_ps)) order_bad++;
      last_pu = int'(pm_user); last_ps = int'(pm_sym);
      exp_u++;
      if (exp_u == int'(n_users)) begin exp_u = 0; exp_s++; end
    end
    if (mod_start) n_mod++;
    if (sym_done) n_sd++;
    if (tx_finish) n_tx++;
    if (stall) n_stall++;
    if (cs_finish) n_csf++;
  end

  task automatic packet(input int nu, input int ns, input bit hold);
    n_rd = 0; n_wr = 0; n_pm = 0; n_mod = 0; n_sd = 0; n_tx = 0; n_csf = 0;
    exp_u = 0; exp_s = 0; last_pu = -1; last_ps = -1; ld_next = 0;
    n_users = USER_W'(nu); n_sym = 10'(ns);
    wait (idle);
    @(negedge clk); tx_start = 1'b1; @(negedge clk); tx_start = 1'b0;
    if (hold) begin
      // hold out_ready low before user 0's modulation job of symbol 1
      wait (pm_start && pm_user == '0 && pm_sym == 10'd1);
      out_ready = 1'b0;
      repeat (100) @(posedge clk);
      out_ready = 1'b1;
    end
    @(posedge tx_finish);
    repeat (2) @(posedge clk);
    chk(n_pm == nu * ns, $sformatf("%0d pre-modulation jobs, expected %0d", n_pm, nu * ns));
    chk(n_mod == nu * ns, $sformatf("%0d modulation jobs, expected %0d", n_mod, nu * ns));
    chk(n_csf == nu * ns, "one cs_finish per sub-tick but the last");
    chk(n_rd == 4 * (nu * ns + 1), $sformatf("4 context loads per sub-tick (%0d)", n_rd));
    chk(n_wr == 4 * nu * ns - 4 + 4, $sformatf("context writes (%0d)", n_wr));
    chk(n_sd == ns, "one sym_done per symbol");
    chk(n_tx == 1, "one tx_finish");
    chk(order_bad == 0 && ld_bad == 0 && addr_bad == 0,
        $sformatf("job order / load slots / CS-BRAM addresses (%0d %0d %0d)", order_bad, ld_bad, addr_bad));
  endtask

  initial begin
    int t0, t1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    t0 = 0;
    while (!idle) begin @(posedge clk); t0++; end
    chk(t0 == N * CS_WORDS, $sformatf("flush takes N_USERS*4 = %0d clocks (%0d)", N * CS_WORDS, t0));
    for (int a = 0; a < N * CS_WORDS; a++) chk(flush_seen[a], "every CS-BRAM word cleared");
    chk(flushing == 1'b0, "flushing low in idle");
    packet(5, 3, 1'b1);
    chk(n_stall > 0, "stall while out_ready low");
    packet(1, 4, 1'b0);
    packet(3, 2, 1'b0);
    // the switch itself: from both stages idle to the next start pulse
    wait (idle);
    n_users = USER_W'(2); n_sym = 10'd2;
    @(negedge clk); tx_start = 1'b1; @(negedge clk); tx_start = 1'b0;
    @(posedge cs_finish);
    t1 = 0;
    while (!pm_start) begin @(posedge clk); t1++; end
    chk(t1 == 7, $sformatf("restore: 4 reads, read latency and start = 7 clocks from cs_finish to start (%0d)", t1));
    @(posedge tx_finish);
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
