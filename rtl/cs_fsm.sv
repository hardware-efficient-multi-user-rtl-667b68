// cs_fsm: context-switching FSM that lets one physical BCIM act as N logical
// BCIMs, one per user.  Four states, whatever the number of users:
//
//   FLUSH    clears the CS-BRAM, one word per clock (N_USERS*4 clocks), so every
//            context reads as "not yet valid" at the start of a packet.
//   IDLE     waits for `tx_start`.
//   RESTORE  reads the contexts for the next sub-tick (4 reads, 1 clock each:
//            slots 0..2 of the pre-modulation user, slot 3 of the modulation
//            user), raises `ld` with `ld_slot` as each word arrives (one clock
//            of BRAM latency, so restoring spans 5 clocks plus one to start), then
//            starts both BCIM stages together and waits for both to finish
//            (one sub-tick).  A sub-tick that begins a new symbol in the
//            modulation stage waits for `out_ready` first (a stall).
//   SAVE     writes the four context words back (4 clocks), then pulses
//            `cs_finish` and returns to RESTORE, or pulses `tx_finish` and
//            goes to FLUSH after the last job.
//
// Jobs are (symbol, user) pairs in the order s*N + u.  In sub-tick t the
// pre-modulation stage runs job t and the modulation stage job t-1, so each
// symbol takes N sub-ticks plus one sub-tick of pipeline drain per packet.
// `ctx_rd`/`ctx_wr` give the CS-BRAM address as (user, slot).  The state set
// and the 4-clock save and restore follow the transmitter's design; the job
// pipeline bookkeeping and the out_ready stall are this design's.
module cs_fsm
  import tx_pkg::*;
#(
  parameter int unsigned N_USERS = MAX_USERS,
  localparam int unsigned AW     = $clog2(N_USERS * CS_WORDS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [USER_W-1:0] n_users,      // users in this packet, 1..N_USERS
  input  logic [9:0]        n_sym,        // data symbols, >= 1
  input  logic              tx_start,
  input  logic              out_ready,
  input  logic              pm_busy,
  input  logic              mod_busy,
  output logic              cs_we,
  output logic [AW-1:0]     cs_waddr,
  output logic [AW-1:0]     cs_raddr,
  output logic [1:0]        wr_slot,      // slot being written this clock
  output logic              flushing,     // CS-BRAM being cleared: write zeros
  output logic              ld,
  output logic [1:0]        ld_slot,
  output logic              pm_start,
  output logic              mod_start,
  output logic              pm_act,       // pre-modulation job exists this sub-tick
  output logic              mod_act,
  output logic [USER_W-1:0] pm_user,
  output logic [9:0]        pm_sym,
  output logic [USER_W-1:0] mod_user,
  output logic [9:0]        mod_sym,
  output logic              sym_done,     // last user of a symbol modulated
  output logic              cs_finish,
  output logic              tx_finish,
  output logic              idle,
  output logic              stall
);
  typedef enum logic [1:0] {S_FLUSH, S_IDLE, S_RESTORE, S_SAVE} state_e;
  state_e state;

  logic [AW-1:0] fcnt;
  logic [2:0]    cnt;
  logic          running, waited;
  logic [USER_W-1:0] cur_user;
  logic [1:0]    slot;

  assign idle     = (state == S_IDLE);
  assign flushing = (state == S_FLUSH);
  assign pm_act  = (pm_sym < n_sym);
  assign mod_act = (mod_sym != 10'h3FF);   // mod job t-1 exists once t >= 1

  // read data of slot cnt-1 is on the CS-BRAM port during cnt = 1..4
  assign ld      = (state == S_RESTORE) && !running && cnt >= 3'd1 && cnt <= 3'd4;
  assign ld_slot = 2'(cnt - 3'd1);

  // CS-BRAM addressing: slot 3 belongs to the modulation user
  always_comb begin
    slot     = 2'(cnt);
    cur_user = (slot == 2'd3) ? mod_user : pm_user;
    cs_raddr = AW'(32'(cur_user) * CS_WORDS + 32'(slot));
    cs_we    = 1'b0;
    cs_waddr = cs_raddr;
    wr_slot  = slot;
    if (state == S_FLUSH) begin
      cs_we    = 1'b1;
      cs_waddr = fcnt;
    end else if (state == S_SAVE) begin
      cs_we = (slot == 2'd3) ? mod_act : pm_act;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_FLUSH; fcnt <= '0; cnt <= '0; running <= 1'b0; waited <= 1'b0;
      pm_user <= '0; pm_sym <= '0; mod_user <= '0; mod_sym <= 10'h3FF;
      pm_start <= 1'b0; mod_start <= 1'b0;
      sym_done <= 1'b0; cs_finish <= 1'b0; tx_finish <= 1'b0; stall <= 1'b0;
    end else begin
      pm_start <= 1'b0; mod_start <= 1'b0;
      sym_done <= 1'b0; cs_finish <= 1'b0; tx_finish <= 1'b0; stall <= 1'b0;
      case (state)
        S_FLUSH: begin
          fcnt <= fcnt + AW'(1);
          if (32'(fcnt) == N_USERS * CS_WORDS - 1) begin
            fcnt  <= '0;
            state <= S_IDLE;
          end
        end
        S_IDLE: begin
          if (tx_start) begin
            pm_user <= '0; pm_sym <= '0; mod_user <= '0; mod_sym <= 10'h3FF;
            cnt <= '0; running <= 1'b0; waited <= 1'b0;
            state <= S_RESTORE;
          end
        end
        S_RESTORE: begin
          if (!running) begin
            if (cnt < 3'd5) begin
              cnt <= cnt + 3'd1;
            end
            if (cnt == 3'd5) begin
              if (mod_act && mod_user == '0 && !out_ready) begin
                stall <= 1'b1;
              end else begin
                pm_start  <= pm_act;
                mod_start <= mod_act;
                running   <= 1'b1;
                waited    <= 1'b0;
              end
            end
          end else begin
            waited <= 1'b1;
            if (waited && !pm_busy && !mod_busy) begin
              running <= 1'b0;
              cnt     <= '0;
              state   <= S_SAVE;
            end
          end
        end
        S_SAVE: begin
          cnt <= cnt + 3'd1;
          if (cnt == 3'd3) begin
            cnt <= '0;
            sym_done <= mod_act && (mod_user == n_users - USER_W'(1));
            // advance: the modulation stage takes the job just pre-modulated
            mod_user <= pm_user;
            mod_sym  <= pm_act ? pm_sym : 10'h3FF;
            if (pm_user == n_users - USER_W'(1)) begin
              pm_user <= '0;
              pm_sym  <= pm_sym + 10'd1;
            end else begin
              pm_user <= pm_user + USER_W'(1);
            end
            if (!pm_act) begin
              tx_finish <= 1'b1;
              state     <= S_FLUSH;
            end else begin
              cs_finish <= 1'b1;
              state     <= S_RESTORE;
            end
          end
        end
        default: state <= S_FLUSH;
      endcase
    end
  end

  // a context slot is only loaded while restoring
  assert property (@(posedge clk) disable iff (!rst_n) ld |-> state == S_RESTORE);
endmodule
