`timescale 1ns/1ps
// tb_pilot_mod_fsm: runs the pilot/modulation stage over every RU of every
// size in the 20 MHz plan (9 x 26, 4 x 52, 2 x 106, 1 x 242) with random MCS
// and random buffer contents, and compares the (tone, value) stream with the
// reference tone walk (tb_ref_pkg::ref_tones), pilot positions and values
// p_n * PSI[(m + n) mod 8], and the constellation point of the buffer slot
// base + d for the d-th data tone.  Checks the walk time (busy for span + 1
// clocks) and that the per-user context {symbol count, polarity LFSR} saved
// after one symbol and restored after another user's runs gives the next
// symbol's pilots.
module tb_pilot_mod_fsm;
  import tx_pkg::*;
  import tb_ref_pkg::*;

  localparam int UNIT = 8192, SW = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;
  logic start = 1'b0, half = 1'b0, load = 1'b0, busy, rd_half, out_valid;
  ru_size_e ru = RU26;
  logic [3:0] ru_idx = '0;
  logic [2:0] mcs = '0;
  logic [SW-1:0] base = '0, rd_slot;
  logic [5:0] rd_bits;
  logic signed [8:0] out_tone;
  cplx_t out_sym;
  logic [16:0] ctx_i = '0, ctx_o;
  logic [31:0] ow;
  assign ow = out_sym;

  pilot_mod_fsm #(.UNIT(UNIT)) dut (.*);

  logic [5:0] buf_m [2][256];
  always_ff @(posedge clk) rd_bits <= buf_m[rd_half][rd_slot];

  int checks = 0, failures = 0;
  int got_t [$], got_re [$], got_im [$];
  always @(posedge clk) if (out_valid) begin
    got_t.push_back(int'(out_tone));
    got_re.push_back(int'($signed(ow[31:16])));
    got_im.push_back(int'($signed(ow[15:0])));
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 60) $display("FAIL: %s", what); end
  endtask

  task automatic restore(input logic [16:0] c);
    @(negedge clk); load = 1'b1; ctx_i = c; @(negedge clk); load = 1'b0;
  endtask

  // one run: symbol s of user on (r, idx) with mcs m, buffer base b, half h
  task automatic run(input ru_size_e r, input int idx, input int m, input int b, input bit h, input int s);
    int tl [$], d, pc, nb, er, ei, bad, cyc, span;
    bit b6 [6];
    for (int k = 0; k < 256; k++) buf_m[h][k] = 6'($urandom);
    got_t = {}; got_re = {}; got_im = {};
    @(negedge clk);
    start = 1'b1; ru = r; ru_idx = 4'(idx); mcs = 3'(m); base = SW'(b); half = h;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;   // counts the start clock too
    while (busy) begin @(negedge clk); cyc++; end
    ref_tones(r, idx, tl);
    span = (r == RU242) ? 245 : (r == RU26 && idx == 4) ? 33 : int'(ru_ntones(r));
    chk(cyc == span + 2, $sformatf("RU %0d/%0d busy %0d clocks, expected %0d", r, idx, cyc - 1, span + 1));
    chk(got_t.size() == tl.size(), $sformatf("RU %0d/%0d: %0d tones", r, idx, got_t.size()));
    nb = int'(nbpscs(mcs_mod(3'(m))));
    d = 0; pc = 0; bad = 0;
    foreach (tl[i]) begin
      if (ref_is_pilot(r, tl[i])) begin
        er = P16[s] * PSI[(pc + s) % 8] * UNIT; ei = 0; pc++;
      end else begin
        for (int q = 0; q < 6; q++) b6[q] = buf_m[h][b + d][q];
        ref_map(UNIT, nb, b6, er, ei);
        d++;
      end
      if (i >= got_t.size() || got_t[i] != tl[i] || got_re[i] != er || got_im[i] != ei) bad++;
    end
    chk(bad == 0, $sformatf("RU %0d/%0d mcs %0d symbol %0d: %0d tones wrong", r, idx, m, s, bad));
  endtask

  initial begin
    logic [16:0] sv;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // every RU, first symbol of a fresh context
    for (int r = 0; r < 4; r++) begin
      int n;
      n = (r == 0) ? 9 : (r == 1) ? 4 : (r == 2) ? 2 : 1;
      for (int idx = 0; idx < n; idx++) begin
        restore({10'd0, 7'h7F});
        run(ru_size_e'(r), idx, $urandom_range(0, 6), $urandom_range(0, 10), 1'($urandom), 0);
      end
    end
    // context: user A symbols 0..11 interleaved with user B
    restore({10'd0, 7'h7F});
    sv = {10'd0, 7'h7F};
    for (int s = 0; s < 12; s++) begin
      restore(sv);
      run(RU52, 1, 6, 3, 1'(s), s);
      sv = ctx_o;
      restore({10'd0, 7'h7F});
      run(RU106, 1, 3, 0, !1'(s), 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
