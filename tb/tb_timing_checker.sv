// Self-checking test of the timing checker. For each constraint it issues the first
// command and measures after how many clocks the dependent command is allowed:
// ACT->READ = tRCD, ACT->PRE = tRAS, PRE->ACT = tRP, ACT->ACT same bank = tRC,
// ACT->ACT other bank = tRRD, WRITE->PRE = 1 + 1 + tWR, READ->WRITE = CL + 1,
// WRITE->READ = 1 + 1 + tWTR, RDA->ACT = max(tRAS left, 1) + tRP.
module tb_timing_checker;
  import mem_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  dram_cmd_e cmd;
  logic [1:0] cmd_bank;
  logic [3:0] act_ok, rd_ok, wr_ok, pre_ok;
  timing_checker dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // issue one command at the next clock edge
  task automatic issue(input dram_cmd_e c, input int b);
    @(negedge clk); cmd = c; cmd_bank = 2'(b);
    @(negedge clk); cmd = CMD_NOP;
  endtask

  // clocks from the last issue until the flag selected by `which` is high for bank b
  task automatic measure(input int which, input int b, input int expect_n, input string name);
    int n;
    logic f;
    n = 1;
    forever begin
      case (which)
        0: f = act_ok[b];
        1: f = rd_ok[b];
        2: f = wr_ok[b];
        default: f = pre_ok[b];
      endcase
      if (f || n > 60) break;
      @(negedge clk); n++;
    end
    check(n == expect_n, $sformatf("%s: %0d clocks, expected %0d", name, n, expect_n));
  endtask

  task automatic settle();
    repeat (20) @(negedge clk);
  endtask

  initial begin
    cmd = CMD_NOP; cmd_bank = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    settle();
    check(&act_ok && &rd_ok && &wr_ok && &pre_ok, "all allowed after reset");
    issue(CMD_ACT, 1); measure(1, 1, T_RCD_D, "tRCD");
    settle(); issue(CMD_ACT, 2); measure(3, 2, T_RAS_D, "tRAS");
    settle(); issue(CMD_PRE, 2); measure(0, 2, T_RP_D, "tRP");
    settle(); issue(CMD_ACT, 0); measure(0, 0, T_RC_D, "tRC");
    settle(); issue(CMD_ACT, 0); measure(0, 3, T_RRD_D, "tRRD");
    settle(); issue(CMD_WR, 3);  measure(3, 3, 2 + T_WR_D, "tWR");
    settle(); issue(CMD_RD, 3);  measure(2, 3, CL_D + 1, "read to write");
    settle(); issue(CMD_WR, 3);  measure(1, 3, 2 + T_WTR_D, "write to read");
    settle(); issue(CMD_ACT, 1); issue(CMD_RDA, 1);
    // RDA one clock after... ACT issued 2 clocks earlier: tRAS has T_RAS-2 left
    measure(0, 1, (T_RAS_D - 2) + T_RP_D, "RDA to ACT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
