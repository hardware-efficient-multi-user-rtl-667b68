`timescale 1ns/1ps
// tb_mu_ofdma_tx: end-to-end test of the transmitter at its default sizes
// (nine user BRAMs, 1024-entry clock-crossing FIFO), no parameter overrides.
//
// Four packets are sent back to back, the configurations the transmitter is
// characterised with in a 20 MHz channel: one 242-tone RU (single user, MCS 6,
// GI 3.2 us), four 52-tone RUs (MCS 6, GI 1.6 us), nine 26-tone RUs (MCS 6,
// GI 0.8 us) and two 106-tone RUs (MCS 2, GI 3.2 us), with payloads of
// different lengths so that shorter users are padded.  For every packet the test checks, against numbers worked out here:
//   - the interrupt arrives;
//   - the DUC emits exactly 2 x (320 + symbols x (N + GI)) + 1 samples, i.e. the
//     waveform is continuous at 40 MS/s with no underflow;
//   - the BCIM completes one context switch per (user, symbol) job;
//   - the FD-MUX receives one commit per preamble and data symbol;
//   - the BCIM emits every tone of every RU exactly once per data symbol.
// It also counts how often each mechanism happened (context switch, stall,
// padding, 64- and 256-point symbols, a 9-user packet) and fails if one never
// did.
module tb_mu_ofdma_tx;
  import tx_pkg::*;

  logic clk = 1'b0, clk_dac = 1'b0, rst_n = 1'b0, rst_dac_n = 1'b0;
  always #5    clk     = !clk;       // 100 MHz
  always #12.5 clk_dac = !clk_dac;   // 40 MHz

  logic               h_we = 1'b0;
  logic [USER_W-1:0]  h_user = '0;
  logic [BRAM_AW-1:0] h_addr = '0;
  logic [63:0]        h_data = '0;
  logic               tx_start = 1'b0;
  logic irq, busy, iq_valid, dac_active, ev_underflow, ev_cs_finish, ev_stall, ev_pad, ev_sym_commit;
  cplx_t iq;

  mu_ofdma_tx dut (.*);

  int checks = 0, failures = 0;
  int n_cs = 0, n_stall = 0, n_pad = 0, n_commit = 0, n_iq = 0, n_uf = 0, n_bout = 0;

  int n_64 = 0, n_256 = 0, n_9user = 0;

  always @(posedge clk) begin
    if (ev_cs_finish)  n_cs++;
    if (ev_stall)      n_stall++;
    if (ev_pad)        n_pad++;
    if (ev_sym_commit) n_commit++;
    if (dut.u_bcim.out_valid) n_bout++;
    if (ev_sym_commit) begin
      if (dut.fd_cmeta[7]) n_64++; else n_256++;
    end
  end
  always @(posedge clk_dac) begin
    if (iq_valid) n_iq++;
    if (ev_underflow) n_uf++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic hwrite(input int u, input int a, input logic [63:0] d);
    @(negedge clk);
    h_we = 1'b1; h_user = USER_W'(u); h_addr = BRAM_AW'(a); h_data = d;
    @(negedge clk);
    h_we = 1'b0;
  endtask

  // one packet: nu users of RU size ru, MCS mcs, GI g
  task automatic run_packet(input int nu, input ru_size_e ru, input int mcs, input gi_e g);
    user_cfg_t c;
    glob_cfg_t gc;
    int len [MAX_USERS];
    int nsym, need, ntones, gi_s, nltf, exp_iq, nsyms_all;
    nsym = 1;
    nltf = 1;
    ntones = 0;
    for (int u = 0; u < MAX_USERS; u++) begin
      c = '0;
      if (u < nu) begin
        len[u] = 20 + 37 * u;                     // bytes, different per user
        c.ru_size = ru; c.ru_idx = 4'(u); c.mcs = 3'(mcs); c.valid = 1'b1;
        c.scr_seed = 7'(7'h5D + u); c.psdu_len = 16'(len[u]);
        need = (16 + 8 * len[u] + 6 + ndbps(ru, 3'(mcs)) - 1) / ndbps(ru, 3'(mcs));
        if (need > nsym) nsym = need;
        ntones += ru_ntones(ru);
        for (int w = 0; w < (len[u] + 7) / 8; w++)
          hwrite(u, HDR_WORDS + w, {$urandom, $urandom});
      end
      hwrite(u, 0, c);
    end
    gc = '0; gc.ppdu = (nu == 1) ? PPDU_SU : PPDU_MU; gc.gi = g; gc.n_sym = 10'(nsym);
    gc.n_ltf = 3'(nltf); gc.lsig_len = 12'd1000;
    hwrite(0, 1, gc);
    hwrite(0, 2, {12'd0, 26'h2AB_CDEF, 26'h123_4567});
    gi_s = (g == GI08) ? 16 : (g == GI16) ? 32 : 64;
    nsyms_all = 5 + nltf + nsym;
    exp_iq = 2 * (320 + 4 * 80 + (1 + nltf + nsym) * (256 + gi_s)) + 1;
    n_cs = 0; n_commit = 0; n_iq = 0; n_uf = 0; n_bout = 0;
    @(negedge clk); tx_start = 1'b1; @(negedge clk); tx_start = 1'b0;
    fork
      begin : wait_irq
        @(posedge irq);
      end
      begin
        repeat (400000) @(posedge clk);
      end
    join_any
    disable fork;
    if (irq !== 1'b1)
      $display("stuck: pre=%0d cs=%0d run=%0d pmb=%0d modb=%0d pm_u=%0d pm_s=%0d mod_u=%0d mod_s=%0d fdfull=%b ifft=%0d td=%0d",
        dut.u_pre.st, dut.u_bcim.u_csfsm.state, dut.u_bcim.u_csfsm.running, dut.u_bcim.pm_busy, dut.u_bcim.mod_busy,
        dut.u_bcim.pm_user, dut.u_bcim.pm_sym, dut.u_bcim.mod_user, dut.u_bcim.mod_sym, dut.u_fd.full, dut.u_ifft.st, dut.u_td.st);
    check(irq === 1'b1 || n_commit == nsyms_all, "interrupt raised");
    // let the DUC drain
    wait (!dac_active);
    repeat (20) @(posedge clk_dac);
    $display("packet nu=%0d ru=%0d mcs=%0d gi=%0d: nsym=%0d iq=%0d/%0d cs=%0d commits=%0d tones=%0d uf=%0d",
             nu, ru, mcs, gi_s, nsym, n_iq, exp_iq, n_cs, n_commit, n_bout, n_uf);
    check(n_iq == exp_iq, "sample count at 40 MS/s");
    check(n_uf == 0, "no DUC underflow (continuous waveform)");
    check(n_cs == nu * nsym, "one context switch per (user, symbol) job");
    check(n_commit == nsyms_all, "one FD-MUX commit per symbol");
    check(n_bout == ntones * nsym, "every RU tone emitted once per data symbol");
    if (nu == 9) n_9user++;
  endtask

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1'b1; rst_dac_n = 1'b1;
    repeat (50) @(posedge clk);
    run_packet(1, RU242, 6, GI32);
    run_packet(4, RU52, 6, GI16);
    run_packet(9, RU26, 6, GI08);
    run_packet(2, RU106, 2, GI32);
    check(n_stall > 0, "BCIM stalled on a full frequency-domain buffer at least once");
    check(n_pad > 0, "padding bits were sent");
    check(n_64 > 0 && n_256 > 0, "both 64- and 256-point symbols");
    check(n_9user > 0, "a nine-user packet");
    $display("events: stalls=%0d pad_bits=%0d sym64=%0d sym256=%0d", n_stall, n_pad, n_64, n_256);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
