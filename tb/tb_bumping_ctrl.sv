// Self-checking test of the constant-rate bumping controller.
// 1) The document's example: DPB of 4, coding order I(0) P(12) B(4) B(8) b(2) b(6) b(10)
//    with the first four kept for reference. The controller must output nothing for the
//    first four pictures, then 0, 2, 4 (one per decoded picture), and 6, 8, 10, 12 on
//    four flush requests. A reference model of the standard (variable-rate) bumping
//    process must give the bursts 0 2 | 4 6 | 8 10 for the same stream (12 follows at
//    the end of the stream).
// 2) Random streams of hierarchical-B groups (sizes 1, 2, 4) with sliding-window
//    reference marking: every picture must be output exactly once, in the order of the
//    standard process, with at most one output per decoded picture and no error.
module tb_bumping_ctrl;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  localparam int DPB = 4, NFS = 8;
  logic cur_valid, ready, pic_done, pic_is_ref, flush, flush_empty, out_valid, error;
  logic [2:0] cur_fs, out_fs;
  logic signed [15:0] pic_poc, out_poc;
  logic [NFS-1:0] unref_mask;
  logic [3:0] dpb_count, rb_count;
  logic [31:0] n_direct, n_rb_insert, n_out_rb, n_out_dpb, n_stall;
  bumping_ctrl #(.DPB_SIZE(DPB)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---------------- outputs seen ----------------
  int outs [$];
  always @(posedge clk) if (rst_n && out_valid) outs.push_back(int'(out_poc));

  // ---------------- standard bumping process (reference) ----------------
  typedef struct { int poc; bit ref_f; bit needed; } pic_t;
  pic_t sdpb [$];
  int   std_out [$];
  task automatic std_step(input int poc, input bit is_ref, input int unref_pocs [$], output int n_out);
    n_out = 0;
    foreach (sdpb[i]) foreach (unref_pocs[j]) if (sdpb[i].poc == unref_pocs[j]) sdpb[i].ref_f = 0;
    forever begin
      int mi;
      for (int i = sdpb.size() - 1; i >= 0; i--)
        if (!sdpb[i].ref_f && !sdpb[i].needed) sdpb.delete(i);
      if (sdpb.size() < DPB) begin
        sdpb.push_back('{poc, is_ref, 1'b1});
        break;
      end
      mi = -1;
      foreach (sdpb[i]) if (sdpb[i].needed && (mi < 0 || sdpb[i].poc < sdpb[mi].poc)) mi = i;
      if (!is_ref && (mi < 0 || poc < sdpb[mi].poc)) begin
        std_out.push_back(poc); n_out++;
        break;
      end
      std_out.push_back(sdpb[mi].poc); n_out++;
      sdpb[mi].needed = 0;
    end
  endtask
  task automatic std_flush();
    forever begin
      int mi;
      mi = -1;
      foreach (sdpb[i]) if (sdpb[i].needed && (mi < 0 || sdpb[i].poc < sdpb[mi].poc)) mi = i;
      if (mi < 0) break;
      std_out.push_back(sdpb[mi].poc);
      sdpb[mi].needed = 0;
    end
  endtask

  // ---------------- driving the controller ----------------
  int fs_poc [NFS];        // POC held by each frame store (for marking)
  int max_burst_std = 0;

  task automatic decode(input int poc, input bit is_ref, input int unref_pocs [$], output int n_out);
    int n_before;
    logic [NFS-1:0] m;
    @(negedge clk);
    while (!ready) @(negedge clk);
    check(cur_valid, "frame store assigned");
    fs_poc[cur_fs] = poc;
    m = '0;
    foreach (unref_pocs[j]) for (int f = 0; f < NFS; f++) if (fs_poc[f] == unref_pocs[j] && f != int'(cur_fs)) m[f] = 1'b1;
    repeat (3) @(negedge clk);        // decoding time
    n_before = outs.size();
    pic_done = 1; pic_poc = 16'(poc); pic_is_ref = is_ref; unref_mask = m;
    @(negedge clk);
    pic_done = 0;
    while (!ready) @(negedge clk);
    @(negedge clk);
    n_out = outs.size() - n_before;
    check(n_out <= 1, $sformatf("at most one output per picture (POC %0d gave %0d)", poc, n_out));
  endtask

  task automatic do_flush(output int n_out);
    int n_before;
    @(negedge clk);
    while (!ready) @(negedge clk);
    n_before = outs.size();
    flush = 1;
    @(negedge clk);
    flush = 0;
    while (!ready) @(negedge clk);
    @(negedge clk);
    n_out = outs.size() - n_before;
  endtask

  task automatic reset_dut();
    rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    outs.delete(); std_out.delete(); sdpb.delete();
    for (int f = 0; f < NFS; f++) fs_poc[f] = -1000;
  endtask

  initial begin
    int none [$];
    int n, per [$];
    pic_done = 0; pic_poc = '0; pic_is_ref = 0; unref_mask = '0; flush = 0;
    reset_dut();
    // ---------------- document example ----------------
    begin
      int pocs [7] = '{0, 12, 4, 8, 2, 6, 10};
      bit refs [7] = '{1, 1, 1, 1, 0, 0, 0};
      int exp_step [7] = '{-1, -1, -1, -1, 0, 2, 4};
      int std_n [7];
      for (int i = 0; i < 7; i++) begin
        int before_std;
        before_std = std_out.size();
        std_step(pocs[i], refs[i], none, std_n[i]);
        before_std = outs.size();
        decode(pocs[i], refs[i], none, n);
        if (exp_step[i] < 0) check(n == 0, $sformatf("example: no output after POC %0d", pocs[i]));
        else check(n == 1 && outs[outs.size() - 1] == exp_step[i],
                   $sformatf("example: output %0d after POC %0d", exp_step[i], pocs[i]));
      end
      check(std_n[4] == 2 && std_n[5] == 2 && std_n[6] == 2, "standard process bursts 0 2 | 4 6 | 8 10");
      check(n_rb_insert > 0 && n_out_rb > 0, "regulation buffer used");
      for (int k = 0; k < 4; k++) begin
        int exp_f [4] = '{6, 8, 10, 12};
        do_flush(n);
        check(n == 1 && outs[outs.size() - 1] == exp_f[k], $sformatf("example flush output %0d", exp_f[k]));
      end
      check(flush_empty, "nothing left after the flush");
      std_flush();
      check(outs == std_out, "example: same output order as the standard process");
    end
    // ---------------- random hierarchical-B streams ----------------
    for (int s = 0; s < 20; s++) begin
      int base, refs_q [$], total;
      reset_dut();
      base = 0; total = 0; refs_q.delete();
      for (int g = 0; g < 12; g++) begin
        int gs, order [$];
        bit isref [$];
        order.delete(); isref.delete();
        gs = (s == 0) ? 4 : (1 << $urandom_range(0, 2));
        // coding order: anchor, then middle (reference) picture, then the rest
        order.push_back(base + 2 * gs); isref.push_back(1);
        if (gs == 4) begin
          order.push_back(base + 4); isref.push_back(1);
          order.push_back(base + 2); isref.push_back(0);
          order.push_back(base + 6); isref.push_back(0);
        end else if (gs == 2) begin
          order.push_back(base + 2); isref.push_back(0);
        end
        if (g == 0) begin order.push_front(base); isref.push_front(1); end
        foreach (order[i]) begin
          int unref [$];
          int sn;
          unref.delete();
          if (isref[i]) begin
            // sliding window: at most DPB-1 reference pictures
            while (refs_q.size() >= DPB - 1) unref.push_back(refs_q.pop_front());
            refs_q.push_back(order[i]);
          end
          std_step(order[i], isref[i], unref, sn);
          if (sn > max_burst_std) max_burst_std = sn;
          decode(order[i], isref[i], unref, n);
          total++;
        end
        base += 2 * gs;
      end
      n = 1;
      while (!flush_empty) do_flush(n);
      std_flush();
      check(outs.size() == total, $sformatf("stream %0d: %0d of %0d pictures output", s, outs.size(), total));
      check(outs == std_out, $sformatf("stream %0d: output order equals the standard process", s));
      for (int i = 1; i < outs.size(); i++)
        check(outs[i] > outs[i-1], "output POCs increase");
      check(!error, "no error flag");
    end
    check(max_burst_std >= 2, "random streams contain output bursts in the standard process");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
