`timescale 1ns/1ps
// tb_he_preamble_fsm: loads a packet configuration into a data-memory model
// (PPDU word, HE-SIG-A word, per-user words with the first U users valid),
// pulses tx_start and checks:
//  - the decoded configuration (glob, cfg[], n_users) and the TD-MUX start
//    with 5 + N_LTF + N_SYM symbols;
//  - L-SIG and RL-SIG: the 24 L-SIG bits (rate 6 Mb/s, LENGTH, even parity,
//    tail) rate-1/2 encoded, interleaved (16 x 3) and BPSK-mapped onto the 48
//    data tones of -26..26, pilots +-7/+-21 = (1, 1, 1, -1), and the extra
//    tones -28, -27, 27, 28 = (-1, -1, -1, 1); all computed here with the
//    reference encoder;
//  - HE-SIG-A1/A2: the 52 host bits encoded as one block, each symbol's 52
//    coded bits interleaved (13 x 4) onto the 52 data tones of -28..28;
//  - HE-STF: +-(1+j)/sqrt(2) on tones 16m, m = -7..7, m != 0, with the M sequence;
//  - N_LTF HE-LTF symbols with 242 tones each;
//  - one commit per symbol with the right size/GI metadata, no write while the
//    FD-MUX is not ready, data_start after the last HE-LTF and busy until
//    data_done.
module tb_he_preamble_fsm;
  import tx_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = 9, UNIT = 8192;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;
  logic tx_start = 1'b0, fd_valid, fd_n64, fd_commit, fd_ready = 1'b1, td_start, data_start, data_done = 1'b0, busy;
  logic [USER_W-1:0] b_user, n_users;
  logic [BRAM_AW-1:0] b_addr;
  logic [63:0] b_data;
  user_cfg_t cfg [N];
  glob_cfg_t glob;
  logic signed [8:0] fd_tone;
  cplx_t fd_val;
  logic [7:0] fd_meta;
  logic [11:0] td_nsyms;
  logic [31:0] fw;
  assign fw = fd_val;

  he_preamble_fsm #(.N_USERS(N), .UNIT(UNIT)) dut (.*);

  logic [63:0] mem [N][4];
  always_ff @(posedge clk) b_data <= mem[b_user][b_addr[1:0]];

  // FD-MUX model: collect the tones of each committed symbol
  int sym_idx = 0, nw_bad = 0;
  int tre [16][int], tim [16][int];
  logic [7:0] metas [16];
  always @(posedge clk) if (rst_n) begin
    if (fd_valid) begin
      if (!fd_ready) nw_bad++;
      tre[sym_idx][int'(fd_tone)] = int'($signed(fw[31:16]));
      tim[sym_idx][int'(fd_tone)] = int'($signed(fw[15:0]));
    end
    if (fd_commit) begin metas[sym_idx] = fd_meta; sym_idx++; end
  end

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // compare symbol s with BPSK data tones from coded bits cb[off..], interleaver ncol x nrow
  task automatic chk_sig(input int s, input bit cb [$], input int off, input int ncol, input int nrow, input bit xtra, input string what);
    int d, bad, kk, v, nt;
    d = 0; bad = 0; nt = 0;
    for (int k = -28; k <= 28; k++) begin
      int a;
      a = (k < 0) ? -k : k;
      if (k == 0) continue;
      nt++;
      if (!tre[s].exists(k)) begin bad++; continue; end
      if (a == 7 || a == 21) v = (k == 21) ? -UNIT : UNIT;
      else if (xtra && a >= 27) v = (k == 28) ? UNIT : -UNIT;
      else begin
        kk = ncol * (d % nrow) + d / nrow;
        v = cb[off + kk] ? UNIT : -UNIT;
        d++;
      end
      if (tre[s][k] != v || tim[s][k] != 0) bad++;
    end
    chk(bad == 0 && tre[s].size() == nt, $sformatf("%s: %0d of %0d tones wrong", what, bad, nt));
    chk(metas[s] == 8'h90, $sformatf("%s: 64-point, 16-sample GI", what));
  endtask

  initial begin
    glob_cfg_t g;
    sig_a_t sa;
    user_cfg_t uc;
    bit lbits [$], lcod [$], abits [$], acod [$];
    int nu, par;
    for (int u = 0; u < N; u++) for (int w = 0; w < 4; w++) mem[u][w] = {$urandom, $urandom};
    nu = 6;
    g = '0; g.lsig_len = 12'd1234; g.n_ltf = 3'd2; g.n_sym = 10'd7; g.gi = GI16; g.ppdu = PPDU_MU;
    sa = '0; sa.a1 = 26'($urandom); sa.a2 = 26'($urandom);
    mem[0][1] = 64'(g); mem[0][2] = 64'(sa);
    for (int u = 0; u < N; u++) begin
      uc = user_cfg_t'(mem[u][0]);
      uc.valid = (u < nu);
      mem[u][0] = 64'(uc);
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk); tx_start = 1'b1; @(negedge clk); tx_start = 1'b0;
    @(posedge td_start); #1;
    chk(glob == g, "PPDU configuration word");
    chk(n_users == USER_W'(nu), $sformatf("n_users %0d", n_users));
    for (int u = 0; u < N; u++) chk(cfg[u] == user_cfg_t'(mem[u][0]), $sformatf("user %0d configuration", u));
    chk(td_nsyms == 12'(5 + 2 + 7), "TD-MUX symbol count 5 + N_LTF + N_SYM");
    // make the FSM wait once for a free FD buffer
    fd_ready = 1'b0;
    repeat (200) @(posedge clk);
    chk(sym_idx == 0, "nothing committed while the FD-MUX is full");
    fd_ready = 1'b1;
    @(posedge data_start);
    repeat (3) @(posedge clk);
    chk(sym_idx == 4 + 1 + 2, $sformatf("%0d symbols committed before data_start", sym_idx));
    chk(nw_bad == 0, "no tone written while the FD-MUX was not ready");
    // L-SIG reference
    lbits = {1, 1, 0, 1, 0};
    par = 1;
    for (int b = 0; b < 12; b++) begin lbits.push_back(g.lsig_len[b]); par ^= g.lsig_len[b]; end
    lbits.push_back(1'(par));
    for (int b = 0; b < 6; b++) lbits.push_back(0);
    ref_bcc(lbits, 0, lcod);
    chk_sig(0, lcod, 0, 16, 3, 1'b1, "L-SIG");
    chk_sig(1, lcod, 0, 16, 3, 1'b1, "RL-SIG");
    for (int b = 0; b < 26; b++) abits.push_back(sa.a1[b]);
    for (int b = 0; b < 26; b++) abits.push_back(sa.a2[b]);
    ref_bcc(abits, 0, acod);
    chk_sig(2, acod, 0, 13, 4, 1'b0, "HE-SIG-A1");
    chk_sig(3, acod, 52, 13, 4, 1'b0, "HE-SIG-A2");
    // HE-STF
    begin
      int bad, ks, mseq [15];
      mseq = '{-1, -1, -1, 1, 1, 1, -1, 1, 1, 1, -1, 1, 1, -1, 1};
      ks = $rtoi(UNIT / $sqrt(2.0) + 0.5);
      bad = 0;
      for (int m = -7; m <= 7; m++) begin
        if (m == 0) continue;
        if (!tre[4].exists(16 * m) || tre[4][16 * m] != mseq[m + 7] * ks || tim[4][16 * m] != mseq[m + 7] * ks) bad++;
      end
      chk(bad == 0 && tre[4].size() == 14, $sformatf("HE-STF: %0d tones wrong, %0d written", bad, tre[4].size()));
      chk(metas[4] == 8'd32, "HE-STF: 256-point, GI 1.6 us");
    end
    for (int l = 0; l < 2; l++) begin
      chk(tre[5 + l].size() == 242, $sformatf("HE-LTF %0d: 242 tones", l));
      chk(!tre[5 + l].exists(0) && !tre[5 + l].exists(1) && !tre[5 + l].exists(-1), "HE-LTF: DC tones empty");
    end
    chk(busy, "busy during the data field");
    @(negedge clk); data_done = 1'b1; @(negedge clk); data_done = 1'b0;
    @(posedge clk); #1;
    chk(!busy, "idle after data_done");
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
