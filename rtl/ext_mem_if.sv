// External memory interface for one 32-bit mobile DDR SDRAM.
//
// Requests (bank, row, column, read/write) enter a command FIFO that flags, for each
// access, whether the next access goes to another row of the same bank (cmd_fifo). One
// unified FSM serves all four banks: per cycle it looks at the head request and the bank
// state register and issues ACT if the bank is closed, PRE if another row is open, or a
// READ/WRITE if the row is open. A READ/WRITE whose hit flag is 0 is issued with auto
// precharge (RDA/WRA), so a following row change in that bank needs no PRE command.
// The timing checker and the NOP counter hold each command until its DRAM timing is met.
// The FSM also powers the device up (wait, precharge all, load mode and extended mode
// registers), refreshes it every T_REFI clocks (precharging all banks first if needed)
// and enters precharge power-down (CKE low) after PD_IDLE idle clocks with all banks
// closed. State names follow the document's FSM (power-on, PREALL, LMR, IDLE, auto
// refresh, power down, row active, READ, WRITE, READ AP, WRITE AP, PRE); the state
// records the last command class, the decision logic is common to all of them.
//
// Data: the design uses burst length 2, so each request moves one 64-bit word (both DDR
// beats of one clock). Write words come from a write data FIFO of 2 x 36-bit beats
// ({mask[3:0], data[31:0]} per beat, mask bit 1 = byte written) and read words go to a
// read data FIFO of 2 x 32-bit beats. The pad cells that serialise the beats onto DQ and
// DQS are outside this module: dram_dq_out/dram_dqm carry both beats of one clock
// ({beat1, beat0}) and dram_dq_in returns both beats of one clock.
//
// Timing: all DRAM pins are registered. A READ on the pins in clock c returns data that
// the pad presents on dram_dq_in in clock c+CL; write data is driven in the clock after
// the WRITE command (write latency 1). A READ is only issued when the read FIFO has room
// for its data. The command set, the FSM, the adaptive auto precharge and the FIFO
// widths follow the document; burst length, timing values, refresh and power-down
// policy are this design's choices.
module ext_mem_if
  import mem_pkg::*;
#(
  parameter int unsigned CMD_DEPTH   = 8,
  parameter int unsigned WDATA_DEPTH = 8,
  parameter int unsigned RDATA_DEPTH = 8,
  parameter int unsigned T_RCD  = T_RCD_D,
  parameter int unsigned T_RP   = T_RP_D,
  parameter int unsigned T_RAS  = T_RAS_D,
  parameter int unsigned T_RC   = T_RC_D,
  parameter int unsigned T_RRD  = T_RRD_D,
  parameter int unsigned T_WR   = T_WR_D,
  parameter int unsigned T_WTR  = T_WTR_D,
  parameter int unsigned T_RFC  = T_RFC_D,
  parameter int unsigned T_MRD  = T_MRD_D,
  parameter int unsigned T_REFI = T_REFI_D,
  parameter int unsigned T_INIT = T_INIT_D,
  parameter int unsigned CL     = CL_D,
  parameter int unsigned PD_IDLE = 64,
  parameter logic [ROW_W-1:0] MODE_REG     = 12'h031,  // CL 3, sequential, BL 2
  parameter logic [ROW_W-1:0] EXT_MODE_REG = 12'h000   // full array, full drive
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // request side (from the address translator)
  input  logic                  req_valid,
  input  mem_req_t              req,
  output logic                  req_ready,
  // write data side
  input  logic                  wdata_valid,
  input  logic [2*BEAT_W-1:0]   wdata,
  output logic                  wdata_ready,
  output logic                  wdata_almost_full,   // at most one free entry
  // read data side
  output logic                  rdata_valid,
  output logic [2*DQ_W-1:0]     rdata,
  input  logic                  rdata_pop,
  // status
  output logic                  init_done,
  output logic                  idle,
  output logic [31:0]           n_act,
  output logic [31:0]           n_pre,
  output logic [31:0]           n_rw,
  output logic [31:0]           n_auto_pre,
  output logic [31:0]           n_ref,
  output logic [31:0]           n_pdown,
  // DRAM pad side
  output logic                  dram_cke,
  output logic                  dram_cs_n,
  output logic                  dram_ras_n,
  output logic                  dram_cas_n,
  output logic                  dram_we_n,
  output logic [BANK_W-1:0]     dram_ba,
  output logic [ROW_W-1:0]      dram_a,
  output logic [2*DQ_W/8-1:0]   dram_dqm,
  output logic [2*DQ_W-1:0]     dram_dq_out,
  output logic                  dram_dq_oe,
  input  logic [2*DQ_W-1:0]     dram_dq_in
);
  typedef enum logic [3:0] {
    ST_POWER_ON, ST_INIT_PREALL, ST_LMR, ST_IDLE, ST_AUTO_REFRESH, ST_POWER_DOWN,
    ST_ROW_ACTIVE, ST_READ, ST_WRITE, ST_READ_AP, ST_WRITE_AP, ST_PRE, ST_PREALL
  } state_e;

  state_e state, state_n;

  // ---------------- command FIFO ----------------
  mem_req_t head;
  logic     head_hit, q_empty, q_full, q_pop;
  logic [$clog2(CMD_DEPTH+1)-1:0] q_count;

  cmd_fifo #(.DEPTH(CMD_DEPTH)) u_cmdq (
    .clk, .rst_n,
    .push(req_valid && !q_full), .push_req(req), .full(q_full),
    .pop(q_pop), .empty(q_empty), .head_req(head), .head_hit(head_hit), .count(q_count)
  );
  assign req_ready = !q_full;

  // ---------------- data FIFOs ----------------
  logic                 wf_empty, wf_full, wf_pop;
  logic [2*BEAT_W-1:0]  wf_dout;
  logic [$clog2(WDATA_DEPTH+1)-1:0] wf_count;
  data_fifo #(.WIDTH(2*BEAT_W), .DEPTH(WDATA_DEPTH)) u_wfifo (
    .clk, .rst_n, .push(wdata_valid && !wf_full), .din(wdata),
    .pop(wf_pop), .dout(wf_dout), .empty(wf_empty), .full(wf_full), .count(wf_count)
  );
  assign wdata_ready = !wf_full;
  assign wdata_almost_full = (32'(wf_count) + 1 >= WDATA_DEPTH);

  logic                 rf_empty, rf_full, rf_push;
  logic [$clog2(RDATA_DEPTH+1)-1:0] rf_count;
  data_fifo #(.WIDTH(2*DQ_W), .DEPTH(RDATA_DEPTH)) u_rfifo (
    .clk, .rst_n, .push(rf_push), .din(dram_dq_in),
    .pop(rdata_pop && !rf_empty), .dout(rdata), .empty(rf_empty), .full(rf_full),
    .count(rf_count)
  );
  assign rdata_valid = !rf_empty;

  // ---------------- state register, timing checker, NOP counter ----------------
  dram_cmd_e         cmd;
  logic [BANK_W-1:0] cmd_bank;
  logic [ROW_W-1:0]  cmd_row;
  logic              q_hit, q_conflict, any_open;
  logic [NUM_BANKS-1:0] bank_open, act_ok, rd_ok, wr_ok, pre_ok;

  bank_state_reg u_state_reg (
    .clk, .rst_n, .cmd, .cmd_bank, .cmd_row,
    .q_bank(head.bank), .q_row(head.row), .q_hit, .q_conflict,
    .bank_open, .any_open
  );

  timing_checker #(
    .T_RCD(T_RCD), .T_RP(T_RP), .T_RAS(T_RAS), .T_RC(T_RC), .T_RRD(T_RRD),
    .T_WR(T_WR), .T_WTR(T_WTR), .CL(CL)
  ) u_timing (
    .clk, .rst_n, .cmd, .cmd_bank, .act_ok, .rd_ok, .wr_ok, .pre_ok
  );

  logic        nop_load, nop_done;
  logic [15:0] nop_value;
  nop_counter #(.WIDTH(16)) u_nop (
    .clk, .rst_n, .load(nop_load), .value(nop_value), .done(nop_done)
  );

  // ---------------- refresh request, idle timer, read pipeline ----------------
  logic [15:0] ref_cnt;
  logic        ref_due;
  logic [15:0] idle_cnt;
  logic        init_started, init_started_n;
  logic        lmr_idx, lmr_idx_n;
  logic        cke_n;
  logic [CL:0] rd_pipe;
  logic [$clog2(RDATA_DEPTH+CL+2)-1:0] rd_inflight;

  always_comb begin
    rd_inflight = '0;
    for (int i = 0; i <= CL; i++) rd_inflight += rd_pipe[i];
  end
  assign rf_push = rd_pipe[CL];

  // ---------------- FSM decision ----------------
  logic rd_space;
  assign rd_space = (32'(rf_count) + 32'(rd_inflight)) < RDATA_DEPTH;

  always_comb begin
    state_n        = state;
    cmd            = CMD_NOP;
    cmd_bank       = head.bank;
    cmd_row        = head.row;
    nop_load       = 1'b0;
    nop_value      = '0;
    q_pop          = 1'b0;
    wf_pop         = 1'b0;
    cke_n          = 1'b1;
    init_started_n = init_started;
    lmr_idx_n      = lmr_idx;

    unique case (state)
      ST_POWER_ON: begin
        if (!init_started) begin
          nop_load = 1'b1; nop_value = 16'(T_INIT); init_started_n = 1'b1;
        end else if (nop_done) begin
          cmd = CMD_PREA; nop_load = 1'b1; nop_value = 16'(T_RP);
          state_n = ST_INIT_PREALL;
        end
      end
      ST_INIT_PREALL: if (nop_done) begin
        cmd = CMD_LMR; cmd_bank = 2'b00; cmd_row = MODE_REG;
        nop_load = 1'b1; nop_value = 16'(T_MRD); lmr_idx_n = 1'b0;
        state_n = ST_LMR;
      end
      ST_LMR: if (nop_done) begin
        if (!lmr_idx) begin
          cmd = CMD_LMR; cmd_bank = 2'b10; cmd_row = EXT_MODE_REG;
          nop_load = 1'b1; nop_value = 16'(T_MRD); lmr_idx_n = 1'b1;
        end else begin
          state_n = ST_IDLE;
        end
      end
      ST_AUTO_REFRESH: if (nop_done) state_n = ST_IDLE;
      ST_POWER_DOWN: begin
        if (ref_due || !q_empty) state_n = ST_IDLE;   // CKE high, one NOP clock
        else cke_n = 1'b0;
      end
      ST_PREALL: if (nop_done) begin
        cmd = CMD_REF; nop_load = 1'b1; nop_value = 16'(T_RFC);
        state_n = ST_AUTO_REFRESH;
      end
      default: begin
        // IDLE, ROW ACTIVE, READ, WRITE, READ AP, WRITE AP, PRE: common scheduling.
        if (ref_due) begin
          if (any_open) begin
            if (&pre_ok) begin
              cmd = CMD_PREA; nop_load = 1'b1; nop_value = 16'(T_RP);
              state_n = ST_PREALL;
            end
          end else if (&act_ok) begin
            cmd = CMD_REF; nop_load = 1'b1; nop_value = 16'(T_RFC);
            state_n = ST_AUTO_REFRESH;
          end
        end else if (!q_empty) begin
          if (q_hit) begin
            if (head.we) begin
              if (!wf_empty && wr_ok[head.bank]) begin
                cmd = head_hit ? CMD_WR : CMD_WRA;
                q_pop = 1'b1; wf_pop = 1'b1;
                state_n = head_hit ? ST_WRITE : ST_WRITE_AP;
              end
            end else if (rd_space && rd_ok[head.bank]) begin
              cmd = head_hit ? CMD_RD : CMD_RDA;
              q_pop = 1'b1;
              state_n = head_hit ? ST_READ : ST_READ_AP;
            end
          end else if (q_conflict) begin
            if (pre_ok[head.bank]) begin
              cmd = CMD_PRE; state_n = ST_PRE;
            end
          end else if (act_ok[head.bank]) begin
            cmd = CMD_ACT; state_n = ST_ROW_ACTIVE;
          end
        end else if (!any_open) begin
          state_n = ST_IDLE;
          if (32'(idle_cnt) >= PD_IDLE) begin
            state_n = ST_POWER_DOWN; cke_n = 1'b0;
          end
        end
      end
    endcase
  end

  // ---------------- registers and DRAM pins ----------------
  logic [2*BEAT_W-1:0] wd_stage;
  logic                wd_stage_v;

  // A FIFO word is {mask1, data1, mask0, data0}; the masks are byte enables, DQM is
  // their inverse.
  logic [2*DQ_W-1:0]   wd_data;
  logic [2*DQ_W/8-1:0] wd_dqm;
  assign wd_data = {wd_stage[BEAT_W +: DQ_W], wd_stage[0 +: DQ_W]};
  assign wd_dqm  = ~{wd_stage[BEAT_W+DQ_W +: 4], wd_stage[DQ_W +: 4]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= ST_POWER_ON;
      init_started <= 1'b0;
      lmr_idx      <= 1'b0;
      ref_cnt      <= '0;
      ref_due      <= 1'b0;
      idle_cnt     <= '0;
      rd_pipe      <= '0;
      wd_stage     <= '0;
      wd_stage_v   <= 1'b0;
      dram_cke     <= 1'b1;
      {dram_cs_n, dram_ras_n, dram_cas_n, dram_we_n} <= 4'b0111;
      dram_ba      <= '0;
      dram_a       <= '0;
      dram_dqm     <= '1;
      dram_dq_out  <= '0;
      dram_dq_oe   <= 1'b0;
      n_act <= '0; n_pre <= '0; n_rw <= '0; n_auto_pre <= '0; n_ref <= '0; n_pdown <= '0;
    end else begin
      state        <= state_n;
      init_started <= init_started_n;
      lmr_idx      <= lmr_idx_n;

      // refresh interval timer (starts once initialisation is complete)
      if (cmd == CMD_REF) begin
        ref_cnt <= '0; ref_due <= 1'b0;
      end else if (init_done) begin
        if (32'(ref_cnt) >= T_REFI - 1) ref_due <= 1'b1;
        else ref_cnt <= ref_cnt + 1'b1;
      end

      if (cmd != CMD_NOP || !q_empty || any_open || state == ST_POWER_DOWN) idle_cnt <= '0;
      else if (idle_cnt != '1) idle_cnt <= idle_cnt + 1'b1;

      rd_pipe <= {rd_pipe[CL-1:0], (cmd == CMD_RD || cmd == CMD_RDA)};

      // command pins
      dram_cke <= cke_n;
      unique case (cmd)
        CMD_ACT:  {dram_cs_n, dram_ras_n, dram_cas_n, dram_we_n} <= 4'b0011;
        CMD_RD, CMD_RDA: {dram_cs_n, dram_ras_n, dram_cas_n, dram_we_n} <= 4'b0101;
        CMD_WR, CMD_WRA: {dram_cs_n, dram_ras_n, dram_cas_n, dram_we_n} <= 4'b0100;
        CMD_PRE, CMD_PREA: {dram_cs_n, dram_ras_n, dram_cas_n, dram_we_n} <= 4'b0010;
        CMD_REF:  {dram_cs_n, dram_ras_n, dram_cas_n, dram_we_n} <= 4'b0001;
        CMD_LMR:  {dram_cs_n, dram_ras_n, dram_cas_n, dram_we_n} <= 4'b0000;
        default:  {dram_cs_n, dram_ras_n, dram_cas_n, dram_we_n} <= 4'b0111;
      endcase
      dram_ba <= cmd_bank;
      unique case (cmd)
        CMD_ACT, CMD_LMR: dram_a <= cmd_row;
        CMD_RD, CMD_WR:   dram_a <= {1'b0, 1'b0, 1'b0, head.col};     // A10 = 0
        CMD_RDA, CMD_WRA: dram_a <= {1'b0, 1'b1, 1'b0, head.col};     // A10 = 1: auto precharge
        CMD_PREA:         dram_a <= 12'h400;                          // A10 = 1: all banks
        default:          dram_a <= '0;
      endcase

      // write data: staged one clock, driven in the clock after the WRITE command
      wd_stage_v <= wf_pop;
      if (wf_pop) wd_stage <= wf_dout;
      dram_dq_oe  <= wd_stage_v;
      dram_dq_out <= wd_stage_v ? wd_data : '0;
      dram_dqm    <= wd_stage_v ? wd_dqm : '1;

      // statistics for the energy model E = Nact*Eact + Npre*Epre + Nrw*Erw
      if (cmd == CMD_ACT) n_act <= n_act + 1'b1;
      if (cmd == CMD_PRE || cmd == CMD_PREA || cmd == CMD_RDA || cmd == CMD_WRA)
        n_pre <= n_pre + 1'b1;
      if (cmd == CMD_RD || cmd == CMD_RDA || cmd == CMD_WR || cmd == CMD_WRA)
        n_rw <= n_rw + 1'b1;
      if (cmd == CMD_RDA || cmd == CMD_WRA) n_auto_pre <= n_auto_pre + 1'b1;
      if (cmd == CMD_REF) n_ref <= n_ref + 1'b1;
      if (state != ST_POWER_DOWN && state_n == ST_POWER_DOWN) n_pdown <= n_pdown + 1'b1;
    end
  end

  assign init_done = !(state inside {ST_POWER_ON, ST_INIT_PREALL, ST_LMR});
  assign idle      = q_empty && wf_empty && rf_empty && (rd_pipe == '0) && !wd_stage_v;

  // Not needed by the sequencer: the queue fill level, the reserved request bits and the
  // per-bank open flags (any_open and the hit/conflict outputs carry what is used).
  logic unused_status;
  assign unused_status = ^{q_count, head.rsvd, bank_open};

  // A column command must only go to an open row.
  assert property (@(posedge clk) disable iff (!rst_n)
    (cmd inside {CMD_RD, CMD_RDA, CMD_WR, CMD_WRA}) |-> q_hit)
    else $error("ext_mem_if: column command to a row that is not open");
  assert property (@(posedge clk) disable iff (!rst_n) !(rf_push && rf_full))
    else $error("ext_mem_if: read data FIFO overflow");
endmodule
