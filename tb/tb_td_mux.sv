`timescale 1ns/1ps
// tb_td_mux: plays packets through the TD-MUX with random back-pressure on
// s_ready and checks the whole sample stream:
//  - 160 L-STF samples and 160 L-LTF samples equal to the inverse DFT (1/64
//    scale, UNIT amplitude) of the 802.11 L-STF and L-LTF tone sequences,
//    written out here from the standard and transformed in floating point
//    (+-2 LSB);
//  - each IFFT symbol (random data, 64 or 256 points, guard interval 16, 32
//    or 64 samples) as its last G samples followed by all N samples;
//  - one release per symbol, pkt_done once, and the sample count.
module tb_td_mux;
  import tx_pkg::*;

  localparam int UNIT = 8192;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;
  logic pkt_start = 1'b0, sym_avail = 1'b0, sym_release, s_valid, s_ready = 1'b1, pkt_done, busy;
  logic [11:0] n_syms = '0;
  logic [7:0] sym_meta = '0, sym_addr;
  cplx_t sym_data, s_data;
  logic [31:0] sw;
  assign sw = s_data;

  td_mux #(.UNIT(UNIT)) dut (.*);

  // IFFT output model: symbols queued as arrays
  logic [31:0] symq [$][256];
  logic [7:0] metaq [$];
  logic [31:0] cur [256];
  always_comb begin
    sym_avail = metaq.size() > 0;
    sym_meta  = (metaq.size() > 0) ? metaq[0] : '0;
  end
  always_ff @(posedge clk) sym_data <= (symq.size() > 0) ? symq[0][sym_addr] : '0;
  int n_rel = 0;
  always @(posedge clk) if (sym_release) begin
    void'(symq.pop_front()); void'(metaq.pop_front()); n_rel++;
  end

  int got_re [$], got_im [$];
  int n_done = 0;
  always @(posedge clk) begin
    if (s_valid && s_ready) begin
      got_re.push_back(int'($signed(sw[31:16]))); got_im.push_back(int'($signed(sw[15:0])));
    end
    if (pkt_done) n_done++;
  end
  always @(negedge clk) s_ready <= ($urandom_range(0, 3) != 0);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // 802.11 legacy training tone values, k = -26..26
  localparam int LTF_T [53] = '{1,1,-1,-1,1,1,-1,1,-1,1,1,1,1,1,1,-1,-1,1,1,-1,1,-1,1,1,1,1,0,
                                1,-1,-1,1,1,-1,1,-1,1,-1,-1,-1,-1,-1,1,1,-1,-1,1,-1,1,-1,1,1,1,1};
  localparam int STF_T [53] = '{0,0,1,0,0,0,-1,0,0,0,1,0,0,0,-1,0,0,0,-1,0,0,0,1,0,0,0,0,
                                0,0,0,-1,0,0,0,-1,0,0,0,1,0,0,0,1,0,0,0,1,0,0,0,1,0,0};
  real lr [64], li [64];
  task automatic legacy(input bit stf);
    for (int n = 0; n < 64; n++) begin
      lr[n] = 0.0; li[n] = 0.0;
      for (int k = -26; k <= 26; k++) begin
        real vr, vi, a;
        if (stf) begin vr = STF_T[k + 26] * $sqrt(13.0 / 6.0); vi = vr; end
        else begin vr = LTF_T[k + 26]; vi = 0.0; end
        a = 6.283185307179586 * k * n / 64.0;
        lr[n] += vr * $cos(a) - vi * $sin(a);
        li[n] += vr * $sin(a) + vi * $cos(a);
      end
      lr[n] = lr[n] * UNIT / 64.0; li[n] = li[n] * UNIT / 64.0;
    end
  endtask

  task automatic packet(input int ns);
    int er [$], ei [$], bad, n, g;
    logic [31:0] s [256];
    got_re = {}; got_im = {}; n_rel = 0; n_done = 0;
    legacy(1'b1);
    for (int t = 0; t < 160; t++) begin er.push_back($rtoi(lr[t % 16])); ei.push_back($rtoi(li[t % 16])); end
    legacy(1'b0);
    for (int t = 0; t < 160; t++) begin er.push_back($rtoi(lr[(t + 32) % 64])); ei.push_back($rtoi(li[(t + 32) % 64])); end
    for (int q = 0; q < ns; q++) begin
      n = (q < 2) ? 64 : 256;
      g = (q < 2) ? 16 : (q % 2 ? 32 : 64);
      for (int t = 0; t < 256; t++) s[t] = $urandom;
      for (int t = 0; t < g + n; t++) begin
        int a;
        a = (t < g) ? n - g + t : t - g;
        er.push_back(int'($signed(s[a][31:16]))); ei.push_back(int'($signed(s[a][15:0])));
      end
      symq.push_back(s); metaq.push_back(8'((n == 64 ? 128 : 0) + g));
    end
    @(negedge clk); pkt_start = 1'b1; n_syms = 12'(ns); @(negedge clk); pkt_start = 1'b0;
    wait (n_done == 1);
    repeat (3) @(posedge clk);
    chk(got_re.size() == er.size(), $sformatf("%0d samples, expected %0d", got_re.size(), er.size()));
    bad = 0;
    for (int t = 0; t < er.size() && t < got_re.size(); t++) begin
      int tol;
      tol = (t < 320) ? 2 : 0;
      if (got_re[t] > er[t] + tol || got_re[t] < er[t] - tol || got_im[t] > ei[t] + tol || got_im[t] < ei[t] - tol) begin
        bad++;
        if (bad < 4) $display("  sample %0d: %0d,%0d expected %0d,%0d", t, got_re[t], got_im[t], er[t], ei[t]);
      end
    end
    chk(bad == 0, $sformatf("%0d samples wrong", bad));
    chk(n_rel == ns, "one release per symbol");
    chk(!busy, "idle after the packet");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    packet(5);
    packet(3);
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
