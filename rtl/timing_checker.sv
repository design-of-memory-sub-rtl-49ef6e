// Timing checker of the external memory interface.
//
// Tracks the DRAM timing constraints that follow each issued command and tells the FSM in
// the same cycle which commands are legal now. Per bank it keeps down-counters for
// ACT->READ/WRITE (tRCD), ACT->PRE (tRAS), ACT->ACT (tRC), PRE->ACT (tRP, including the
// automatic precharge after RDA/WRA) and write recovery before PRE (tWR). Shared counters
// cover ACT->ACT between banks (tRRD), column-command spacing (BL/2 clocks), the
// read-to-write bus turnaround (CL + BL/2) and write-to-read (WL + BL/2 + tWTR).
// A counter loaded with N at the command's clock edge lets the dependent command go
// N clocks later. The FSM reports every command through cmd/cmd_bank.
// The document gives the block and its role only; the set of constraints and their
// values are this design's, from a typical mobile DDR datasheet.
module timing_checker
  import mem_pkg::*;
#(
  parameter int unsigned T_RCD = T_RCD_D,
  parameter int unsigned T_RP  = T_RP_D,
  parameter int unsigned T_RAS = T_RAS_D,
  parameter int unsigned T_RC  = T_RC_D,
  parameter int unsigned T_RRD = T_RRD_D,
  parameter int unsigned T_WR  = T_WR_D,
  parameter int unsigned T_WTR = T_WTR_D,
  parameter int unsigned CL    = CL_D
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  dram_cmd_e            cmd,
  input  logic [BANK_W-1:0]    cmd_bank,
  output logic [NUM_BANKS-1:0] act_ok,
  output logic [NUM_BANKS-1:0] rd_ok,
  output logic [NUM_BANKS-1:0] wr_ok,
  output logic [NUM_BANKS-1:0] pre_ok
);
  localparam int unsigned CW    = 5;
  localparam int unsigned HALF  = BL / 2;          // clocks of data per burst
  localparam int unsigned WL    = 1;               // write latency of mobile DDR
  localparam int unsigned T_R2W = CL + HALF;
  localparam int unsigned T_W2R = WL + HALF + T_WTR;
  localparam int unsigned T_W2P = WL + HALF + T_WR;

  logic [CW-1:0] rcd [NUM_BANKS];
  logic [CW-1:0] ras [NUM_BANKS];
  logic [CW-1:0] rc  [NUM_BANKS];
  logic [CW-1:0] rp  [NUM_BANKS];
  logic [CW-1:0] wrp [NUM_BANKS];
  logic [CW-1:0] rrd, ccd, r2w, w2r;

  function automatic logic [CW-1:0] dec(input logic [CW-1:0] c);
    return (c != '0) ? c - 1'b1 : c;
  endfunction

  function automatic logic [CW-1:0] ld(input int unsigned n);
    return (n > 0) ? CW'(n - 1) : '0;
  endfunction

  function automatic logic [CW-1:0] max2(input logic [CW-1:0] a, input logic [CW-1:0] b);
    return (a > b) ? a : b;
  endfunction

  logic is_rd, is_wr;
  assign is_rd = (cmd == CMD_RD) || (cmd == CMD_RDA);
  assign is_wr = (cmd == CMD_WR) || (cmd == CMD_WRA);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < NUM_BANKS; b++) begin
        rcd[b] <= '0; ras[b] <= '0; rc[b] <= '0; rp[b] <= '0; wrp[b] <= '0;
      end
      rrd <= '0; ccd <= '0; r2w <= '0; w2r <= '0;
    end else begin
      for (int b = 0; b < NUM_BANKS; b++) begin
        logic sel;
        sel = (BANK_W'(b) == cmd_bank);
        rcd[b] <= dec(rcd[b]);
        ras[b] <= dec(ras[b]);
        rc[b]  <= dec(rc[b]);
        rp[b]  <= dec(rp[b]);
        wrp[b] <= dec(wrp[b]);
        if (cmd == CMD_ACT && sel) begin
          rcd[b] <= ld(T_RCD);
          ras[b] <= ld(T_RAS);
          rc[b]  <= ld(T_RC);
        end
        if ((cmd == CMD_PRE && sel) || cmd == CMD_PREA || cmd == CMD_REF || cmd == CMD_LMR)
          rp[b] <= max2(dec(rp[b]), ld(T_RP));
        // Auto precharge starts once tRAS is met and the burst (and write recovery) ends.
        if (cmd == CMD_RDA && sel) rp[b] <= max2(ras[b], CW'(HALF)) + ld(T_RP);
        if (cmd == CMD_WRA && sel) rp[b] <= max2(ras[b], CW'(T_W2P)) + ld(T_RP);
        if (cmd == CMD_WR && sel)  wrp[b] <= ld(T_W2P);
      end
      rrd <= (cmd == CMD_ACT) ? ld(T_RRD) : dec(rrd);
      ccd <= (is_rd || is_wr) ? ld(HALF)  : dec(ccd);
      r2w <= is_rd ? ld(T_R2W) : dec(r2w);
      w2r <= is_wr ? ld(T_W2R) : dec(w2r);
    end
  end

  always_comb begin
    for (int b = 0; b < NUM_BANKS; b++) begin
      act_ok[b] = (rc[b] == '0) && (rp[b] == '0) && (rrd == '0);
      rd_ok[b]  = (rcd[b] == '0) && (ccd == '0) && (w2r == '0);
      wr_ok[b]  = (rcd[b] == '0) && (ccd == '0) && (r2w == '0);
      pre_ok[b] = (ras[b] == '0) && (wrp[b] == '0) && (ccd == '0);
    end
  end
endmodule
