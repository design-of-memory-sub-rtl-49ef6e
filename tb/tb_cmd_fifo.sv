// Self-checking test of the command FIFO and its hit flags.
// 1) The access sequence printed in the document's example (bank/row/column 2/100/50,
//    1/100/80, 1/91/60, 2/100/28, 2/100/60, then 2/101/60) is pushed and popped; each
//    flag must equal ~B | R against the following access. 2) Random sequences with
//    random pop timing, including pops of the newest entry while the next one arrives,
//    are checked against the same rule.
module tb_cmd_fifo;
  import mem_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic push, pop, full, empty, head_hit;
  mem_req_t push_req, head_req;
  logic [3:0] count;
  cmd_fifo #(.DEPTH(8)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic mem_req_t mk(input int b, input int r, input int c);
    mem_req_t m;
    m = '0; m.bank = 2'(b); m.row = 12'(r); m.col = 9'(c);
    return m;
  endfunction

  // expected flag of element i of a pushed sequence: compared with element i+1 if that
  // one was pushed while element i was still queued (or in the same cycle as its pop)
  mem_req_t seq [$];
  bit       queued_at_next [$];

  initial begin
    mem_req_t ex [6];
    bit       exp_hit [5];
    push = 0; pop = 0; push_req = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // ---- document example ----
    ex[0] = mk(2, 100, 50); ex[1] = mk(1, 100, 80); ex[2] = mk(1, 91, 60);
    ex[3] = mk(2, 100, 28); ex[4] = mk(2, 100, 60); ex[5] = mk(2, 101, 60);
    for (int i = 0; i < 5; i++)
      exp_hit[i] = (ex[i].bank != ex[i+1].bank) || (ex[i].row == ex[i+1].row);
    for (int i = 0; i < 6; i++) begin
      @(negedge clk); push = 1; push_req = ex[i];
    end
    @(negedge clk); push = 0;
    for (int i = 0; i < 6; i++) begin
      @(negedge clk);
      check(head_req == ex[i], "example order");
      if (i < 5) check(head_hit == exp_hit[i], $sformatf("example entry %0d hit %b", i, head_hit));
      else       check(head_hit == 1'b1, "newest entry keeps default flag 1");
      pop = 1;
      @(posedge clk); #1 pop = 0;
    end
    check(exp_hit[4] == 1'b0 && exp_hit[1] == 1'b0 && exp_hit[2] == 1'b1, "example contains row misses");
    // ---- random sequences ----
    for (int n = 0; n < 2000; n++) begin
      bit do_push, do_pop;
      @(negedge clk);
      do_push = ($urandom_range(0, 3) != 0) && !full;
      do_pop  = ($urandom_range(0, 3) != 0) && !empty;
      if (do_pop) begin
        mem_req_t h;
        bit eh;
        int idx;
        idx = seq.size() - int'(count);    // index of the head in seq
        h = seq[idx];
        check(head_req == h, "random order");
        if (idx + 1 < seq.size())
          eh = (h.bank != seq[idx+1].bank) || (h.row == seq[idx+1].row);
        else if (do_push)
          eh = 1'b1;  // computed below with the pushed request
        else
          eh = 1'b1;
        push_req = mk($urandom_range(0, 3), $urandom_range(0, 2), 2 * $urandom_range(0, 7));
        if (idx + 1 == seq.size() && do_push)
          eh = (h.bank != push_req.bank) || (h.row == push_req.row);
        push = do_push; pop = do_pop;
        #1;
        check(head_hit == eh, $sformatf("random entry hit %b expected %b", head_hit, eh));
      end else begin
        push_req = mk($urandom_range(0, 3), $urandom_range(0, 2), 2 * $urandom_range(0, 7));
      end
      push = do_push; pop = do_pop;
      @(posedge clk); #1;
      if (do_push) seq.push_back(push_req);
      push = 0; pop = 0;
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
