// Self-checking test of the two-bank synchronization buffer. Over several periods the
// DRAM side fills its bank with fresh data while the pipe side writes its own data into
// the other bank; after the swap each side must read what the other side wrote. It also
// checks that the banks swap only once both sides are done, whatever their order.
module tb_sync_buffer;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  localparam int W = 128;   // words per bank (the default)
  logic d_en, d_we, d_done, p_en, p_we, p_done, dram_bank, swap;
  logic [6:0] d_addr, p_addr;
  logic [63:0] d_wdata, d_rdata, p_wdata, p_rdata;
  logic [31:0] n_swaps;
  sync_buffer dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic logic [63:0] dpat(input int period, input int a);
    return {32'(period), 32'(a)} ^ 64'hD0D0_0000_0000_D0D0;
  endfunction
  function automatic logic [63:0] ppat(input int period, input int a);
    return {32'(period), 32'(a)} ^ 64'h0000_7777_7777_0000;
  endfunction

  initial begin
    d_en = 0; d_we = 0; d_done = 0; p_en = 0; p_we = 0; p_done = 0;
    d_addr = '0; p_addr = '0; d_wdata = '0; p_wdata = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int period = 0; period < 6; period++) begin
      logic bank0;
      @(negedge clk);
      bank0 = dram_bank;
      // both sides read back what the other side wrote in the previous period
      if (period > 0) begin
        for (int a = 0; a < W; a++) begin
          @(negedge clk);
          d_en = 1; d_we = 0; d_addr = 7'(a);
          p_en = 1; p_we = 0; p_addr = 7'(a);
          @(negedge clk);
          d_en = 0; p_en = 0;
          check(d_rdata == ppat(period - 1, a), $sformatf("DRAM side reads pipe data, word %0d", a));
          check(p_rdata == dpat(period - 1, a), $sformatf("pipe side reads fetched data, word %0d", a));
        end
      end
      // both sides write their data for the next period
      for (int a = 0; a < W; a++) begin
        @(negedge clk);
        d_en = 1; d_we = 1; d_addr = 7'(a); d_wdata = dpat(period, a);
        p_en = 1; p_we = 1; p_addr = 7'(a); p_wdata = ppat(period, a);
      end
      @(negedge clk);
      d_en = 0; p_en = 0; d_we = 0; p_we = 0;
      // done pulses in varying order
      if (period % 3 == 0) begin
        d_done = 1; @(negedge clk); d_done = 0;
        repeat (3) begin check(!swap && dram_bank == bank0, "no swap before both done"); @(negedge clk); end
        p_done = 1; #1 check(swap, "swap when the second side is done"); @(negedge clk); p_done = 0;
      end else if (period % 3 == 1) begin
        p_done = 1; @(negedge clk); p_done = 0;
        repeat (3) begin check(!swap && dram_bank == bank0, "no swap before both done"); @(negedge clk); end
        d_done = 1; #1 check(swap, "swap when the second side is done"); @(negedge clk); d_done = 0;
      end else begin
        d_done = 1; p_done = 1; #1 check(swap, "swap when both are done together");
        @(negedge clk); d_done = 0; p_done = 0;
      end
      check(dram_bank == !bank0, "banks exchanged");
    end
    check(n_swaps == 6, "six swaps");
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
