// Self-checking test of data_fifo: random pushes and pops against a queue model,
// checking data order, the count, and the full/empty flags.
module tb_data_fifo;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  localparam int unsigned DEPTH = 8;
  logic push, pop, empty, full;
  logic [35:0] din, dout;
  logic [3:0] count;
  data_fifo #(.WIDTH(36), .DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  logic [35:0] q [$];
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    push = 0; pop = 0; din = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int i = 0; i < 3000; i++) begin
      // phase-dependent bias so that both full and empty are reached
      int bias;
      bias = ((i / 200) % 2 == 0) ? 6 : 2;
      @(negedge clk);
      check(empty == (q.size() == 0), "empty flag");
      check(full == (q.size() == DEPTH), "full flag");
      check(int'(count) == q.size(), "count");
      if (q.size() > 0) check(dout == q[0], $sformatf("head %h expected %h", dout, q[0]));
      push = ($urandom_range(0, 7) < bias) && !full;
      pop  = ($urandom_range(0, 7) >= bias) && !empty;
      din  = 36'({$urandom, $urandom});
      @(posedge clk);
      #1;
      if (pop)  void'(q.pop_front());
      if (push) q.push_back(din);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
