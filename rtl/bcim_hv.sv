// bcim_hv: the Bit Coded and Interleaved Modulation (BCIM) module built once
// and shared by all users through hardware virtualisation.
//
// One physical chain - HE data FSM, scrambler, BCC encoder, interleaver, ping-
// pong buffer, pilot/modulation FSM - is time-multiplexed over the users of
// the packet.  It runs as a two-stage pipeline at sub-tick granularity:
//   pre-modulation  (data FSM -> scrambler -> encoder -> interleaver write)
//                   produces the N_CBPS(u) coded bits of one user, one per clock;
//   modulation      (pilot/mod FSM) walks the tones of the previous user's RU.
// Both stages start together and the next sub-tick begins when both are done.
// Between sub-ticks the CS-FSM saves the four contexts of the outgoing jobs
// (data FSM bit position, scrambler state, encoder state, pilot/mod state) to
// the CS-BRAM and restores those of the incoming jobs.  A context word with
// bit 63 clear (as left by flushing) means "first symbol": the sub-module is
// then initialised from the user's configuration instead.
//
// Interface: per-user configuration array `cfg`, `n_users`, `n_sym`;
// `tx_start` starts the DATA field; the output is a stream of (tone, value)
// with `out_valid`, plus `sym_done` once the last user of a symbol is out.
// `out_ready` (a free frequency-domain buffer) gates the start of every new
// symbol.  Port A of the data BRAM bank is driven from here.
// The architecture (shared BCIM, CS-FSM, CS-BRAM with four 64-bit words per
// user, two-level pipelining) follows the transmitter's design; the context
// word layouts are this design's.
module bcim_hv
  import tx_pkg::*;
#(
  parameter int unsigned N_USERS = MAX_USERS,
  parameter int          UNIT    = 8192,
  localparam int unsigned SW     = $clog2(MAX_SD_SYM),
  localparam int unsigned CAW    = $clog2(N_USERS * CS_WORDS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  user_cfg_t         cfg [N_USERS],
  input  logic [USER_W-1:0] n_users,
  input  logic [9:0]        n_sym,
  input  logic              tx_start,
  input  logic              out_ready,
  output logic [USER_W-1:0] a_user,
  output logic [BRAM_AW-1:0] a_addr,
  input  logic [63:0]       a_data,
  output logic              out_valid,
  output logic signed [8:0] out_tone,
  output cplx_t             out_sym,
  output logic              sym_done,
  output logic              cs_finish,
  output logic              tx_finish,
  output logic              idle,
  output logic              stall,
  output logic              pad_active
);
  // ---------------------------------------------------------------- control
  logic cs_we, ld, pm_start, mod_start, pm_act, mod_act;
  logic [CAW-1:0] cs_waddr, cs_raddr;
  logic [1:0] wr_slot, ld_slot;
  logic       flushing;
  logic [USER_W-1:0] pm_user, mod_user;
  logic [9:0] pm_sym, mod_sym;
  logic pm_busy, mod_busy;
  ctx_word_t cs_wdata, cs_rdata;

  cs_fsm #(.N_USERS(N_USERS)) u_csfsm (
    .clk, .rst_n, .n_users, .n_sym, .tx_start, .out_ready,
    .pm_busy, .mod_busy,
    .cs_we, .cs_waddr, .cs_raddr, .wr_slot, .flushing, .ld, .ld_slot,
    .pm_start, .mod_start, .pm_act, .mod_act,
    .pm_user, .pm_sym, .mod_user, .mod_sym,
    .sym_done, .cs_finish, .tx_finish, .idle, .stall);

  cs_bram #(.N_USERS(N_USERS)) u_csbram (
    .clk, .we(cs_we), .waddr(cs_waddr), .wdata(cs_wdata), .raddr(cs_raddr), .rdata(cs_rdata));

  user_cfg_t pcfg, mcfg;
  assign pcfg = cfg[pm_user];
  assign mcfg = cfg[mod_user];

  // ------------------------------------------------------- pre-modulation
  logic [10:0] bitcnt, pm_ncbps;
  logic        enc_need, enc_bit, data_bit, tail, pad, scr_bit, adv;
  logic [19:0] dctx_o, dctx_i;
  logic [6:0]  sctx_o, sctx_i;
  logic [15:0] ectx_o, ectx_i;
  logic [16:0] mctx_o, mctx_i;
  logic        ld_d, ld_s, ld_e, ld_m;
  logic [SW-1:0] pm_base, pm_base_next;

  assign pm_ncbps = ncbps(pcfg.ru_size, pcfg.mcs);
  assign adv      = pm_busy && enc_need;

  // context restore: an invalid word (bit 63 clear) initialises from cfg
  assign ld_d   = ld && ld_slot == CTX_DATA;
  assign ld_s   = ld && ld_slot == CTX_SCR;
  assign ld_e   = ld && ld_slot == CTX_ENC;
  assign ld_m   = ld && ld_slot == CTX_PMOD;
  assign dctx_i = cs_rdata[63] ? cs_rdata[19:0] : 20'd0;
  assign sctx_i = cs_rdata[63] ? cs_rdata[6:0]  : pcfg.scr_seed;
  assign ectx_i = cs_rdata[63] ? cs_rdata[15:0] : 16'd0;
  assign mctx_i = cs_rdata[63] ? cs_rdata[16:0] : {10'd0, 7'h7F};

  always_comb begin
    if (flushing) cs_wdata = '0;
    else case (wr_slot)
      CTX_DATA: cs_wdata = {1'b1, 43'd0, dctx_o};
      CTX_SCR:  cs_wdata = {1'b1, 56'd0, sctx_o};
      CTX_ENC:  cs_wdata = {1'b1, 47'd0, ectx_o};
      default:  cs_wdata = {1'b1, 46'd0, mctx_o};
    endcase
  end

  assign a_user = pm_user;

  he_data_fsm u_data (
    .clk, .rst_n, .en(adv), .psdu_len(pcfg.psdu_len), .rd_addr(a_addr), .rd_data(a_data),
    .bit_o(data_bit), .tail_o(tail), .pad_o(pad), .load(ld_d), .ctx_i(dctx_i), .ctx_o(dctx_o));

  scrambler u_scr (
    .clk, .rst_n, .en(adv), .in_bit(data_bit), .zero_out(tail), .out_bit(scr_bit),
    .load(ld_s), .state_i(sctx_i), .state_o(sctx_o));

  bcc_encoder u_enc (
    .clk, .rst_n, .en(pm_busy), .rate(mcs_rate(pcfg.mcs)), .in_bit(scr_bit),
    .need_in(enc_need), .out_bit(enc_bit), .load(ld_e), .ctx_i(ectx_i), .ctx_o(ectx_o));

  assign pad_active = pm_busy && pad;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pm_busy <= 1'b0; bitcnt <= '0; pm_base <= '0;
    end else begin
      if (pm_start) begin
        pm_busy <= 1'b1;
        bitcnt  <= '0;
      end else if (pm_busy) begin
        bitcnt <= bitcnt + 11'd1;
        if (bitcnt == pm_ncbps - 11'd1) pm_busy <= 1'b0;
      end
      if (pm_start || mod_start) pm_base <= pm_base_next;
    end
  end

  // slot base of the pre-modulation user: data tones of the users before it
  assign pm_base_next = (pm_user == '0) ? '0 :
                        pm_base + SW'(ru_nsd(cfg[pm_user - USER_W'(1)].ru_size));

  // ----------------------------------------------------- ping-pong buffer
  logic          rd_half;
  logic [SW-1:0] rd_slot;
  logic [5:0]    rd_bits;

  interleaver_buffer u_ilv (
    .clk, .rst_n, .wr_start(pm_start), .wr_ru(pcfg.ru_size), .wr_mod(mcs_mod(pcfg.mcs)),
    .wr_base(pm_base_next), .wr_half(pm_sym[0]), .wr_en(pm_busy), .wr_bit(enc_bit),
    .rd_half, .rd_slot, .rd_bits);

  // ------------------------------------------------------------ modulation
  pilot_mod_fsm #(.UNIT(UNIT)) u_pmod (
    .clk, .rst_n, .start(mod_start), .ru(mcfg.ru_size), .ru_idx(mcfg.ru_idx), .mcs(mcfg.mcs),
    .base(pm_base), .half(mod_sym[0]), .busy(mod_busy),
    .rd_half, .rd_slot, .rd_bits,
    .out_valid, .out_tone, .out_sym, .load(ld_m), .ctx_i(mctx_i), .ctx_o(mctx_o));

endmodule
