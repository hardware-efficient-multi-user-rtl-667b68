`timescale 1ns/1ps
// tb_bcim_hv: bit-exact test of the shared, context-switched BCIM.
//
// Five runs share the one BCIM: three users on 26-tone RUs (MCS 1, 3, 4),
// four users on 52-tone RUs (MCS 0, 2, 5, 6, one extra padding symbol, output
// held back once), one user on the 242-tone RU at MCS 6, the 26-tone run again
// (checks that a new packet starts from flushed contexts), and two users on
// 106-tone RUs.  Payload lengths differ per user.  The expected (tone, value) stream is computed
// here from the 802.11 definitions (tb_ref_pkg): SERVICE + PSDU + tail +
// padding, scrambling, BCC encoding and puncturing, interleaving by the
// standard formula, Gray mapping and pilot values.  Every output tone is
// compared in order.  Also checked: one context switch per (user, symbol)
// job, one symbol-done per symbol, and the sub-tick length: each sub-tick
// lasts the larger of N_CBPS(u) and the RU walk plus a fixed 12-clock
// context-switch overhead.  `out_ready` is dropped for a while to make the
// BCIM stall.
module tb_bcim_hv;
  import tx_pkg::*;
  import tb_ref_pkg::*;

  localparam int NU = 4;
  localparam int UNIT = 8192;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;

  user_cfg_t cfg [NU];
  logic [USER_W-1:0] n_users;
  logic [9:0] n_sym;
  logic tx_start = 1'b0, out_ready = 1'b1;
  logic [USER_W-1:0] a_user;
  logic [BRAM_AW-1:0] a_addr;
  logic [63:0] a_data;
  logic out_valid, sym_done, cs_finish, tx_finish, idle, stall, pad_active;
  logic signed [8:0] out_tone;
  cplx_t out_sym;
  logic [31:0] o_word;
  int o_re, o_im;
  assign o_word = out_sym;
  assign o_re = int'($signed(o_word[31:16]));
  assign o_im = int'($signed(o_word[15:0]));

  bcim_hv #(.N_USERS(NU), .UNIT(UNIT)) dut (.*);

  logic [63:0] mem [NU][BRAM_DEPTH];
  always_ff @(posedge clk) a_data <= mem[a_user][a_addr];

  int checks = 0, failures = 0;
  int exp_t [$], exp_re [$], exp_im [$];
  int n_cs = 0, n_sd = 0, n_stall = 0, mism = 0, n_out = 0;
  int last_cs, st_len_bad = 0;

  always @(posedge clk) begin
    if (out_valid) begin
      int t, re, im;
      if (exp_t.size() == 0) begin
        mism++;
      end else begin
        t = exp_t.pop_front(); re = exp_re.pop_front(); im = exp_im.pop_front();
        if (t != int'(out_tone) || re != int'(o_re) || im != int'(o_im)) begin
          if (mism < 5) $display("mismatch at %0d: tone %0d/%0d value %0d,%0d / %0d,%0d", n_out, out_tone, t, o_re, o_im, re, im);
          mism++;
        end
        n_out++;
      end
    end
    if (cs_finish) n_cs++;
    if (sym_done)  n_sd++;
    if (stall)     n_stall++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // span of the modulation walk in clocks
  function automatic int walk(input user_cfg_t c);
    if (c.ru_size == RU242) return 245;
    if (c.ru_size == RU26 && c.ru_idx == 4) return 33;
    return int'(ru_ntones(c.ru_size));
  endfunction

  task automatic run(input int nu, input ru_size_e ru, input int mcs [NU], input int nsym_extra, input bit hold);
    bit stream [$], coded [$], il [$];
    int nsym, ncb, ndb, nb, ncol, nrow, tl [$], d, pc, p, tick, t_start, total;
    bit b6 [6];
    int re, im;
    nsym = 1;
    for (int u = 0; u < nu; u++) begin
      cfg[u] = '0;
      cfg[u].ru_size = ru; cfg[u].ru_idx = 4'(u); cfg[u].mcs = 3'(mcs[u]); cfg[u].valid = 1'b1;
      cfg[u].scr_seed = 7'(7'h11 + 13 * u); cfg[u].psdu_len = 16'(10 + 23 * u);
      ndb = int'(ndbps(ru, 3'(mcs[u])));
      if ((16 + 8 * (10 + 23 * u) + 6 + ndb - 1) / ndb > nsym) nsym = (16 + 8 * (10 + 23 * u) + 6 + ndb - 1) / ndb;
      for (int w = 0; w < 200; w++) mem[u][w] = {$urandom, $urandom};
    end
    nsym += nsym_extra;
    n_users = USER_W'(nu); n_sym = 10'(nsym);
    // expected stream: per symbol, per user
    begin
      bit cod [NU][$];
      for (int u = 0; u < nu; u++) begin
        int L, t0;
        L = 10 + 23 * u;
        ndb = int'(ndbps(ru, 3'(mcs[u])));
        stream = {};
        for (int n = 0; n < 16; n++) stream.push_back(1'b0);
        for (int n = 0; n < 8 * L; n++) stream.push_back(mem[u][HDR_WORDS + n / 64][n % 64]);
        t0 = stream.size();
        while (stream.size() < nsym * ndb) stream.push_back(1'b0);
        ref_scramble(stream, cfg[u].scr_seed, t0, t0 + 6);
        ref_bcc(stream, int'(mcs_rate(3'(mcs[u]))), coded);
        cod[u] = coded;
      end
      for (int s = 0; s < nsym; s++) begin
        for (int u = 0; u < nu; u++) begin
          nb = int'(nbpscs(mcs_mod(3'(mcs[u]))));
          ncb = int'(ncbps(ru, 3'(mcs[u])));
          ncol = int'(il_ncol(ru)); nrow = int'(il_rowk(ru)) * nb;
          il = {};
          for (int j = 0; j < ncb; j++) il.push_back(1'b0);
          for (int k = 0; k < ncb; k++) il[il_j(k, ncol, nrow, nb)] = cod[u][s * ncb + k];
          ref_tones(ru, u, tl);
          d = 0; pc = 0;
          foreach (tl[i]) begin
            exp_t.push_back(tl[i]);
            if (ref_is_pilot(ru, tl[i])) begin
              p = P16[s] * PSI[(pc + s) % 8];
              exp_re.push_back(p * UNIT); exp_im.push_back(0);
              pc++;
            end else begin
              for (int b = 0; b < 6; b++) b6[b] = (b < nb) ? il[d * nb + b] : 1'b0;
              ref_map(UNIT, nb, b6, re, im);
              exp_re.push_back(re); exp_im.push_back(im);
              d++;
            end
          end
        end
      end
    end
    n_cs = 0; n_sd = 0; mism = 0; n_out = 0; st_len_bad = 0;
    // budget: sub-tick t lasts max(N_CBPS of job t, walk of job t-1) + 12
    total = 0;
    for (int t = 0; t <= nu * nsym; t++) begin
      int a, b;
      a = (t < nu * nsym) ? int'(ncbps(ru, 3'(mcs[t % nu]))) : 0;
      b = (t > 0) ? walk(cfg[(t - 1) % nu]) + 1 : 0;
      total += ((a > b) ? a : b) + 12;
    end
    @(negedge clk); tx_start = 1'b1; @(negedge clk); tx_start = 1'b0;
    t_start = $time;
    if (hold)
      fork
        begin
          // hold the output back once to provoke a stall
          repeat (3000) @(posedge clk);
          out_ready = 1'b0;
          repeat (500) @(posedge clk);
          out_ready = 1'b1;
        end
      join_none
    @(posedge tx_finish);
    tick = ($time - t_start) / 10;
    repeat (5) @(posedge clk);
    $display("run nu=%0d ru=%0d nsym=%0d: cycles=%0d budget=%0d (+500 held) cs=%0d sd=%0d left=%0d mism=%0d",
             nu, ru, nsym, tick, total, n_cs, n_sd, exp_t.size(), mism);
    check(mism == 0 && exp_t.size() == 0, "output stream bit-exact against the reference chain");
    check(n_cs == nu * nsym, "one context switch per (user, symbol)");
    check(n_sd == nsym, "one symbol-done per symbol");
    check(tick <= total + (hold ? 510 : 10) && tick >= total - 20, "processing time = sum of sub-ticks (N_CBPS or RU walk) + 12-clock overhead");
    exp_t = {}; exp_re = {}; exp_im = {};
    wait (idle);
  endtask

  initial begin
    int m4 [NU] = '{0, 2, 5, 6};
    int m1 [NU] = '{6, 0, 0, 0};
    int m3 [NU] = '{1, 3, 4, 0};
    for (int u = 0; u < NU; u++) cfg[u] = '0;
    n_users = '0; n_sym = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (idle);
    run(3, RU26, m3, 0, 1'b0);
    run(4, RU52, m4, 1, 1'b1);
    run(1, RU242, m1, 0, 1'b0);
    run(3, RU26, m3, 0, 1'b0);
    run(2, RU106, m3, 0, 1'b0);
    check(n_stall > 0, "BCIM stalled while out_ready was low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
