// mu_ofdma_tx: IEEE 802.11ax MU-OFDMA transmitter PHY for a 20 MHz channel
// in which a single BCIM chain serves all users by hardware virtualisation.
//
// Data path (100 MHz domain unless noted):
//   host -> data_bram_bank (one 1024x64 BRAM per user)
//        -> he_preamble_fsm (configuration, L-SIG/RL-SIG/HE-SIG-A/HE-STF/HE-LTF tones)
//        -> bcim_hv (shared BCIM, CS-FSM + CS-BRAM context switching)
//        -> fd_mux (64/256-point frequency-domain symbols, unused tones zero)
//        -> ifft   (64/256-point, two banks)
//        -> td_mux (L-STF/L-LTF tables, guard-interval insertion)
//        -> async_fifo -> duc (40 MHz domain: 20 MS/s in, 40 MS/s out)
// The host fills the BRAMs through the write port and pulses `tx_start`
// (the low MAC's TX start); `irq` pulses when the last sample of the packet
// has left the TD-MUX.  Event outputs expose the mechanisms of the design for
// observation: context-switch completions, stalls of the BCIM waiting for a
// frequency-domain buffer, padding, symbol commits and DUC underflows.
// The module structure follows the transmitter's block diagram; the event
// outputs and the end-of-packet timer for the DUC are this design's.
module mu_ofdma_tx
  import tx_pkg::*;
#(
  parameter int unsigned N_USERS    = MAX_USERS,
  parameter int unsigned FIFO_DEPTH = 1024,
  parameter int          UNIT       = 8192
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clk_dac,
  input  logic               rst_dac_n,
  input  logic               h_we,
  input  logic [USER_W-1:0]  h_user,
  input  logic [BRAM_AW-1:0] h_addr,
  input  logic [63:0]        h_data,
  input  logic               tx_start,
  output logic               irq,
  output logic               busy,
  output logic               iq_valid,
  output cplx_t              iq,
  output logic               dac_active,
  output logic               ev_underflow,
  output logic               ev_cs_finish,
  output logic               ev_stall,
  output logic               ev_pad,
  output logic               ev_sym_commit
);
  // -------------------------------------------------------------- memories
  logic [USER_W-1:0]  a_user, b_user;
  logic [BRAM_AW-1:0] a_addr, b_addr;
  logic [63:0]        a_data, b_data;

  data_bram_bank #(.N_USERS(N_USERS)) u_bram (
    .clk, .we(h_we), .wuser(h_user), .waddr(h_addr), .wdata(h_data),
    .a_user, .a_addr, .a_data, .b_user, .b_addr, .b_data);

  // -------------------------------------------------------------- preamble
  user_cfg_t         cfg [N_USERS];
  glob_cfg_t         glob;
  logic [USER_W-1:0] n_users;
  logic              p_valid, p_n64, p_commit, fd_ready, td_start, data_start, data_done, p_busy;
  logic signed [8:0] p_tone;
  cplx_t             p_val;
  logic [7:0]        p_meta;
  logic [11:0]       td_nsyms;

  he_preamble_fsm #(.N_USERS(N_USERS), .UNIT(UNIT)) u_pre (
    .clk, .rst_n, .tx_start, .b_user, .b_addr, .b_data, .cfg, .glob, .n_users,
    .fd_valid(p_valid), .fd_tone(p_tone), .fd_val(p_val), .fd_n64(p_n64),
    .fd_commit(p_commit), .fd_meta(p_meta), .fd_ready,
    .td_start, .td_nsyms, .data_start, .data_done, .busy(p_busy));

  // ------------------------------------------------------------------ BCIM
  logic              b_valid, sym_done, b_idle;
  logic signed [8:0] b_tone;
  cplx_t             b_val;
  logic [6:0]        gi_len;

  bcim_hv #(.N_USERS(N_USERS), .UNIT(UNIT)) u_bcim (
    .clk, .rst_n, .cfg, .n_users, .n_sym(glob.n_sym), .tx_start(data_start),
    .out_ready(fd_ready), .a_user, .a_addr, .a_data,
    .out_valid(b_valid), .out_tone(b_tone), .out_sym(b_val), .sym_done,
    .cs_finish(ev_cs_finish), .tx_finish(data_done), .idle(b_idle), .stall(ev_stall),
    .pad_active(ev_pad));

  always_comb begin
    case (glob.gi)
      GI16:    gi_len = 7'd32;
      GI32:    gi_len = 7'd64;
      default: gi_len = 7'd16;
    endcase
  end

  // ---------------------------------------------------------------- FD-MUX
  logic       fd_avail, fd_release, fd_wv, fd_commit;
  logic [7:0] fd_meta, fd_bin, fd_cmeta;
  cplx_t      fd_data;

  assign fd_wv     = p_valid || b_valid;
  assign fd_commit = p_commit || sym_done;
  assign fd_cmeta  = p_commit ? p_meta : {1'b0, gi_len};
  assign ev_sym_commit = fd_commit;

  fd_mux u_fd (
    .clk, .rst_n, .wr_valid(fd_wv), .wr_tone(p_valid ? p_tone : b_tone),
    .wr_val(p_valid ? p_val : b_val), .wr_n64(p_valid && p_n64),
    .commit(fd_commit), .commit_meta(fd_cmeta), .wr_ready(fd_ready),
    .rd_avail(fd_avail), .rd_meta(fd_meta), .rd_bin(fd_bin), .rd_data(fd_data),
    .rd_release(fd_release));

  // ------------------------------------------------------------------ IFFT
  logic       t_avail, t_release;
  logic [7:0] t_meta, t_addr;
  cplx_t      t_data;

  ifft u_ifft (
    .clk, .rst_n, .in_avail(fd_avail), .in_meta(fd_meta), .in_bin(fd_bin), .in_data(fd_data),
    .in_release(fd_release), .out_avail(t_avail), .out_meta(t_meta), .out_addr(t_addr),
    .out_data(t_data), .out_release(t_release));

  // ---------------------------------------------------------------- TD-MUX
  logic  s_valid, s_ready, pkt_done, td_busy;
  cplx_t s_data;

  td_mux #(.UNIT(UNIT)) u_td (
    .clk, .rst_n, .pkt_start(td_start), .n_syms(td_nsyms),
    .sym_avail(t_avail), .sym_meta(t_meta), .sym_addr(t_addr), .sym_data(t_data),
    .sym_release(t_release), .s_valid, .s_data, .s_ready, .pkt_done, .busy(td_busy));

  assign irq  = pkt_done;
  assign busy = p_busy || !b_idle || td_busy;

  // end of packet for the DUC: raised 32 clocks after the TD-MUX goes idle, so
  // the last write pointer has crossed before the level does
  logic [5:0] tail_cnt;
  logic       pkt_end;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tail_cnt <= '0; pkt_end <= 1'b1;
    end else if (td_busy) begin
      tail_cnt <= '0; pkt_end <= 1'b0;
    end else if (!pkt_end) begin
      tail_cnt <= tail_cnt + 6'd1;
      if (&tail_cnt) pkt_end <= 1'b1;
    end
  end

  // ------------------------------------------------------------ CDC + DUC
  logic  f_full, f_empty, f_rd;
  cplx_t f_data;

  assign s_ready = !f_full;

  async_fifo #(.W($bits(cplx_t)), .DEPTH(FIFO_DEPTH)) u_fifo (
    .wclk(clk), .wrst_n(rst_n), .wr_en(s_valid), .wdata(s_data), .full(f_full),
    .rclk(clk_dac), .rrst_n(rst_dac_n), .rd_en(f_rd), .rdata(f_data), .empty(f_empty));

  duc u_duc (
    .clk(clk_dac), .rst_n(rst_dac_n), .fifo_empty(f_empty), .fifo_data(f_data), .fifo_rd(f_rd),
    .pkt_end, .active(dac_active), .iq_valid, .iq, .underflow(ev_underflow));

endmodule
