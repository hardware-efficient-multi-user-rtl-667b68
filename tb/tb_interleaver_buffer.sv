`timescale 1ns/1ps
// tb_interleaver_buffer: for every RU size (26/52/106/242) and modulation
// (BPSK..64-QAM) writes one symbol of random coded bits (one per clock, the
// N_CBPS write takes N_CBPS clocks) at a random slot base into one half, and
// reads the slots back: slot base+d must hold bits j = d*N_BPSCS ..
// d*N_BPSCS+N_BPSCS-1 of the interleaved block, where bit k of the input goes
// to j(k) by the 802.11 formula (tb_ref_pkg::il_j, with its divisions).
// A second user is written into the other half between write and read to
// check that the halves are independent (ping-pong).
module tb_interleaver_buffer;
  import tx_pkg::*;
  import tb_ref_pkg::*;

  localparam int SLOTS = MAX_SD_SYM, SW = $clog2(SLOTS);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;
  logic wr_start = 1'b0, wr_half = 1'b0, wr_en = 1'b0, wr_bit = 1'b0, rd_half = 1'b0;
  ru_size_e wr_ru = RU26;
  mod_e wr_mod = MOD_BPSK;
  logic [SW-1:0] wr_base = '0, rd_slot = '0;
  logic [5:0] rd_bits;

  interleaver_buffer dut (.*);

  int checks = 0, failures = 0;

  task automatic write_sym(input ru_size_e r, input mod_e m, input int base, input bit half, output bit il [$]);
    int nb, ncb, ncol, nrow;
    bit d [$];
    nb = int'(nbpscs(m)); ncb = int'(ru_nsd(r)) * nb;
    ncol = int'(il_ncol(r)); nrow = int'(il_rowk(r)) * nb;
    il = {};
    for (int k = 0; k < ncb; k++) begin d.push_back(1'($urandom)); il.push_back(1'b0); end
    for (int k = 0; k < ncb; k++) il[il_j(k, ncol, nrow, nb)] = d[k];
    @(negedge clk);
    wr_start = 1'b1; wr_ru = r; wr_mod = m; wr_base = SW'(base); wr_half = half;
    @(negedge clk);
    wr_start = 1'b0;
    for (int k = 0; k < ncb; k++) begin
      wr_en = 1'b1; wr_bit = d[k];
      @(negedge clk);
    end
    wr_en = 1'b0;
  endtask

  task automatic read_check(input ru_size_e r, input mod_e m, input int base, input bit half, input bit il [$]);
    int nb, bad;
    nb = int'(nbpscs(m));
    bad = 0;
    for (int s = 0; s < int'(ru_nsd(r)); s++) begin
      @(negedge clk);
      rd_half = half; rd_slot = SW'(base + s);
      @(posedge clk); #1;
      for (int b = 0; b < nb; b++) if (rd_bits[b] != il[s * nb + b]) bad++;
    end
    checks++;
    if (bad != 0) begin
      failures++;
      $display("FAIL: RU %0d mod %0d base %0d: %0d bits misplaced", r, m, base, bad);
    end
  endtask

  initial begin
    bit il [$], il2 [$];
    int base;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 4; r++)
      for (int m = 0; m < 4; m++) begin
        base = (r == 3) ? $urandom_range(0, 20) : $urandom_range(0, 120);
        write_sym(ru_size_e'(r), mod_e'(m), base, 1'(m), il);
        write_sym(RU242, MOD_64QAM, 0, !1'(m), il2);        // other half
        read_check(ru_size_e'(r), mod_e'(m), base, 1'(m), il);
        read_check(RU242, MOD_64QAM, 0, !1'(m), il2);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
