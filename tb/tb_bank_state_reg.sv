// Self-checking test of the bank state register: random ACT/PRE/PREA/RDA/WRA commands
// against a reference model, checking open flags and the hit/conflict query outputs.
module tb_bank_state_reg;
  import mem_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  dram_cmd_e cmd;
  logic [1:0] cmd_bank, q_bank;
  logic [11:0] cmd_row, q_row;
  logic q_hit, q_conflict, any_open;
  logic [3:0] bank_open;
  bank_state_reg dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  bit          m_open [4];
  logic [11:0] m_row  [4];

  initial begin
    cmd = CMD_NOP; cmd_bank = '0; cmd_row = '0; q_bank = '0; q_row = '0;
    for (int b = 0; b < 4; b++) begin m_open[b] = 0; m_row[b] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      int pick;
      @(negedge clk);
      // check queries against the model
      q_bank = 2'($urandom_range(0, 3));
      q_row  = 12'($urandom_range(0, 3));
      #1;
      check(q_hit == (m_open[q_bank] && m_row[q_bank] == q_row), "hit");
      check(q_conflict == (m_open[q_bank] && m_row[q_bank] != q_row), "conflict");
      check(bank_open == {m_open[3], m_open[2], m_open[1], m_open[0]}, "open flags");
      check(any_open == (m_open[0] | m_open[1] | m_open[2] | m_open[3]), "any open");
      pick = $urandom_range(0, 9);
      cmd_bank = 2'($urandom_range(0, 3));
      cmd_row  = 12'($urandom_range(0, 3));
      cmd = (pick < 4) ? CMD_ACT : (pick == 4) ? CMD_PRE : (pick == 5) ? CMD_PREA :
            (pick == 6) ? CMD_RDA : (pick == 7) ? CMD_WRA : (pick == 8) ? CMD_RD : CMD_NOP;
      @(posedge clk); #1;
      unique case (cmd)
        CMD_ACT: begin m_open[cmd_bank] = 1; m_row[cmd_bank] = cmd_row; end
        CMD_PRE, CMD_RDA, CMD_WRA: m_open[cmd_bank] = 0;
        CMD_PREA: for (int b = 0; b < 4; b++) m_open[b] = 0;
        default: ;
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
