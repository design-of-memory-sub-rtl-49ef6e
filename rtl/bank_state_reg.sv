// Bank state register of the external memory interface.
//
// For each of the four DRAM banks it records whether a row is open and which one. The
// FSM reports every command it issues (cmd, cmd_bank, cmd_row): ACT opens the row, PRE
// and the auto-precharge variants RDA/WRA close the bank, PREA closes all banks. From the
// query address (q_bank, q_row) it derives in the same cycle whether the access is a row
// hit (bank open on that row), a row conflict (bank open on another row) or needs an
// activation (bank closed). The document says the register records the status of each
// bank for command scheduling; the encoding and the query outputs are this design's.
module bank_state_reg
  import mem_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  dram_cmd_e         cmd,
  input  logic [BANK_W-1:0] cmd_bank,
  input  logic [ROW_W-1:0]  cmd_row,
  input  logic [BANK_W-1:0] q_bank,
  input  logic [ROW_W-1:0]  q_row,
  output logic              q_hit,
  output logic              q_conflict,
  output logic [NUM_BANKS-1:0] bank_open,
  output logic              any_open
);
  logic [ROW_W-1:0] open_row [NUM_BANKS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bank_open <= '0;
      for (int b = 0; b < NUM_BANKS; b++) open_row[b] <= '0;
    end else begin
      unique case (cmd)
        CMD_ACT: begin
          bank_open[cmd_bank] <= 1'b1;
          open_row[cmd_bank]  <= cmd_row;
        end
        CMD_PRE, CMD_RDA, CMD_WRA: bank_open[cmd_bank] <= 1'b0;
        CMD_PREA:                  bank_open <= '0;
        default: ;
      endcase
    end
  end

  assign q_hit      = bank_open[q_bank] && (open_row[q_bank] == q_row);
  assign q_conflict = bank_open[q_bank] && (open_row[q_bank] != q_row);
  assign any_open   = |bank_open;
endmodule
