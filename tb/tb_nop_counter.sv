// Self-checking test of the NOP counter: after loading N, done must stay low for
// exactly N-1 clocks and rise N clocks after the load, for N from 1 to 40.
module tb_nop_counter;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic load, done;
  logic [15:0] value;
  nop_counter #(.WIDTH(16)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    load = 0; value = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(done, "done after reset");
    for (int n = 1; n <= 40; n++) begin
      int waited;
      @(negedge clk); load = 1; value = 16'(n);
      @(negedge clk); load = 0;
      waited = 1;
      while (!done) begin @(negedge clk); waited++; end
      check(waited == n, $sformatf("N=%0d: done after %0d clocks", n, waited));
    end
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
