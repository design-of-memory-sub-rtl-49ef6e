// Behavioural model of a 256 Mbit, 32-bit mobile DDR SDRAM (4 banks x 4096 rows x 512
// columns) as seen through DDR pad cells that deliver both beats of a clock at once.
// Not synthesizable; for testbenches only.
//
// It decodes the registered command pins on each rising edge (CKE high, CS# low),
// keeps the open row of each bank, stores written words in a sparse array and returns
// read bursts (two words: column and column+1) on dq_in CL clocks after the READ.
// Unwritten words read as pattern(bank,row,col) so that tests can predict them. Every
// protocol or timing rule broken by the controller (column command to a closed bank,
// ACT to an open bank, tRCD, tRAS, tRP, tWR, tRFC, command during refresh, missing
// write data) increments `violations` and prints a message.
module mddr_model #(
  parameter int unsigned CL    = 3,
  parameter longint T_RCD = 3,
  parameter longint T_RP  = 3,
  parameter longint T_RAS = 7,
  parameter longint T_WR  = 3,
  parameter longint T_RFC = 12
) (
  input  logic        clk,
  input  logic        cke,
  input  logic        cs_n,
  input  logic        ras_n,
  input  logic        cas_n,
  input  logic        we_n,
  input  logic [1:0]  ba,
  input  logic [11:0] a,
  input  logic [7:0]  dqm,
  input  logic [63:0] dq_out,
  input  logic        dq_oe,
  output logic [63:0] dq_in
);
  logic [31:0] mem [int];
  longint      cycle = 0;
  int          violations = 0;
  int          n_act = 0, n_rd = 0, n_wr = 0, n_pre = 0, n_ap = 0, n_ref = 0, n_lmr = 0;
  int          cke_low_cycles = 0;

  bit          open_b   [4];
  logic [11:0] row_b    [4];
  longint      t_act    [4];
  longint      act_ok_at[4];
  longint      pre_ok_at[4];
  longint      busy_until = 0;

  logic [63:0] rpipe  [CL];
  bit          wr_pend = 0;
  int          wr_key0, wr_key1;

  function automatic int key(input logic [1:0] b, input logic [11:0] r, input logic [8:0] c);
    return int'({b, r, c});
  endfunction

  function automatic logic [31:0] pattern(input int k);
    return 32'(k) * 32'h9E37_79B1 + 32'h1234_5678;
  endfunction

  function automatic logic [31:0] rd_word(input int k);
    return mem.exists(k) ? mem[k] : pattern(k);
  endfunction

  function automatic logic [31:0] merge(input logic [31:0] old, input logic [31:0] nw,
                                        input logic [3:0] m);
    logic [31:0] res;
    for (int i = 0; i < 4; i++) res[8*i +: 8] = m[i] ? old[8*i +: 8] : nw[8*i +: 8];
    return res;
  endfunction

  task automatic viol(input string msg);
    violations++;
    $display("mddr_model: cycle %0d: %s", cycle, msg);
  endtask

  initial begin
    for (int b = 0; b < 4; b++) begin
      open_b[b] = 0; row_b[b] = '0; t_act[b] = -100; act_ok_at[b] = 0; pre_ok_at[b] = 0;
    end
    for (int i = 0; i < CL; i++) rpipe[i] = '0;
  end

  assign dq_in = rpipe[CL-1];

  always @(posedge clk) begin
    logic [3:0] c;
    logic [8:0] col;
    cycle++;
    for (int i = CL - 1; i > 0; i--) rpipe[i] <= rpipe[i-1];
    rpipe[0] <= '0;

    // write data of the WRITE seen on the previous edge
    if (wr_pend) begin
      if (!dq_oe) viol("write data missing");
      mem[wr_key0] = merge(rd_word(wr_key0), dq_out[31:0], dqm[3:0]);
      mem[wr_key1] = merge(rd_word(wr_key1), dq_out[63:32], dqm[7:4]);
      wr_pend = 0;
    end

    if (!cke) cke_low_cycles++;
    c = {cs_n, ras_n, cas_n, we_n};
    col = a[8:0];
    if (cke && !cs_n && c != 4'b0111) begin
      if (cycle < busy_until) viol("command during refresh or mode load");
      unique case (c)
        4'b0011: begin // ACT
          n_act++;
          if (open_b[ba]) viol($sformatf("ACT to open bank %0d", ba));
          if (cycle < act_ok_at[ba]) viol($sformatf("tRP/tRC violated on bank %0d", ba));
          open_b[ba] = 1; row_b[ba] = a; t_act[ba] = cycle;
        end
        4'b0101, 4'b0100: begin // READ / WRITE
          bit is_wr;
          is_wr = (c == 4'b0100);
          if (!open_b[ba]) viol($sformatf("column command to closed bank %0d", ba));
          if (cycle - t_act[ba] < T_RCD) viol("tRCD violated");
          if (col[0]) viol("odd column for BL 2");
          if (is_wr) begin
            n_wr++;
            wr_pend = 1;
            wr_key0 = key(ba, row_b[ba], col);
            wr_key1 = key(ba, row_b[ba], col + 9'd1);
            pre_ok_at[ba] = cycle + 2 + T_WR;
          end else begin
            n_rd++;
            rpipe[0] <= {rd_word(key(ba, row_b[ba], col + 9'd1)), rd_word(key(ba, row_b[ba], col))};
          end
          if (a[10]) begin
            longint start;
            n_ap++;
            start = is_wr ? cycle + 2 + T_WR : cycle + 1;
            if (start < t_act[ba] + T_RAS) start = t_act[ba] + T_RAS;
            open_b[ba] = 0;
            act_ok_at[ba] = start + T_RP;
          end
        end
        4'b0010: begin // PRE / PREALL
          n_pre++;
          for (int b = 0; b < 4; b++) begin
            if (a[10] || ba == 2'(b)) begin
              if (open_b[b] && cycle - t_act[b] < T_RAS) viol("tRAS violated");
              if (open_b[b] && cycle < pre_ok_at[b]) viol("tWR violated");
              open_b[b] = 0;
              act_ok_at[b] = cycle + T_RP;
            end
          end
        end
        4'b0001: begin // REF
          n_ref++;
          for (int b = 0; b < 4; b++) begin
            if (open_b[b]) viol("REF with open bank");
            if (cycle < act_ok_at[b]) viol("REF before tRP");
          end
          busy_until = cycle + T_RFC;
        end
        4'b0000: begin // LMR
          n_lmr++;
          busy_until = cycle + 2;
        end
        default: viol("unsupported command");
      endcase
    end
  end
endmodule
