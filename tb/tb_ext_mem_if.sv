// Self-checking test of the external memory interface against the mobile DDR model.
// It writes random 64-bit words to addresses that mix row hits, bank changes and row
// misses in the same bank, reads them back and compares with a scoreboard. It checks
// that the model saw no protocol or timing violation, that auto precharge was used
// exactly for the accesses followed by another row of the same bank, that refresh and
// power-down happened, and that a stream of row-hit reads runs at one burst per clock.
module tb_ext_mem_if;
  import mem_pkg::*;
  localparam int unsigned T_REFI = 300;
  localparam int unsigned NREQ   = 400;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic req_valid, req_ready, wdata_valid, wdata_ready, wafull, rdata_valid, rdata_pop;
  mem_req_t req;
  logic [71:0] wdata;
  logic [63:0] rdata;
  logic init_done, idle;
  logic [31:0] n_act, n_pre, n_rw, n_auto_pre, n_ref, n_pdown;
  logic cke, cs_n, ras_n, cas_n, we_n, dq_oe;
  logic [1:0] ba; logic [11:0] a; logic [7:0] dqm; logic [63:0] dq_out, dq_in;

  ext_mem_if #(.T_REFI(T_REFI), .T_INIT(50), .PD_IDLE(20)) dut (
    .clk, .rst_n, .req_valid, .req, .req_ready, .wdata_valid, .wdata, .wdata_ready,
    .wdata_almost_full(wafull), .rdata_valid, .rdata, .rdata_pop, .init_done, .idle,
    .n_act, .n_pre, .n_rw, .n_auto_pre, .n_ref, .n_pdown,
    .dram_cke(cke), .dram_cs_n(cs_n), .dram_ras_n(ras_n), .dram_cas_n(cas_n),
    .dram_we_n(we_n), .dram_ba(ba), .dram_a(a), .dram_dqm(dqm), .dram_dq_out(dq_out),
    .dram_dq_oe(dq_oe), .dram_dq_in(dq_in)
  );
  mddr_model model (
    .clk, .cke, .cs_n, .ras_n, .cas_n, .we_n, .ba, .a, .dqm, .dq_out, .dq_oe, .dq_in
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // scoreboard
  logic [63:0] sb [int];
  mem_req_t    reqs [$];
  logic [63:0] wq [$];
  logic [63:0] exp_rd [$];
  int          exp_ap = 0;

  function automatic int k(input mem_req_t r);
    return int'({r.bank, r.row, r.col});
  endfunction
  function automatic logic [63:0] pat(input mem_req_t r);
    int k0;
    k0 = k(r);
    return {model.pattern(k0 + 1), model.pattern(k0)};
  endfunction

  // request driver
  int rd_seen = 0, n_reads = 0;
  initial begin
    longint cyc0;
    mem_req_t r, prev;
    req_valid = 0; wdata_valid = 0; req = '0; wdata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (init_done);
    check(model.n_lmr == 2, "two mode register loads during initialisation");
    // build the request list: bursts of accesses in few rows, random banks
    prev = '0;
    for (int i = 0; i < NREQ; i++) begin
      r = '0;
      r.we   = ($urandom_range(0, 1) == 1);
      r.bank = 2'($urandom_range(0, 3));
      r.row  = 12'($urandom_range(0, 3));
      r.col  = 9'($urandom_range(0, 15) * 2);
      reqs.push_back(r);
    end
    // expected auto-precharge count: consecutive pair, same bank, different row
    for (int i = 0; i + 1 < NREQ; i++)
      if (reqs[i].bank == reqs[i+1].bank && reqs[i].row != reqs[i+1].row) exp_ap++;
    // expected read data and write data in request order
    foreach (reqs[i]) begin
      if (reqs[i].we) begin
        logic [63:0] d;
        d = {$urandom, $urandom};
        sb[k(reqs[i])] = d;
        wq.push_back(d);
      end else begin
        exp_rd.push_back(sb.exists(k(reqs[i])) ? sb[k(reqs[i])] : pat(reqs[i]));
      end
    end
    // drive requests and write data (clocked drivers below)
    go = 1;
    wait (ri == reqs.size() && wi == wq.size());
    wait (idle && rd_seen == exp_rd.size());
    repeat (10) @(posedge clk);
    check(model.violations == 0, "no DRAM protocol or timing violation");
    check(n_auto_pre == 32'(exp_ap), $sformatf("auto precharge count %0d expected %0d", n_auto_pre, exp_ap));
    check(model.n_ap == exp_ap, "model saw the same auto precharges");
    check(n_rw == NREQ, "every request issued once");
    check(n_ref > 0 && model.n_ref == int'(n_ref), "refresh issued");
    // idle: after the next refresh has closed all banks, power-down must be entered
    repeat (T_REFI + 100) @(posedge clk);
    check(n_pdown > 0 && model.cke_low_cycles > 0, "power-down entered when idle");
    // row-hit read stream: 16 reads in one row must take 16 consecutive clocks
    begin
      longint first, last;
      int cnt;
      r = '0; r.bank = 2'd1; r.row = 12'd7;
      burst = 1;
      for (int i = 0; i < 16; i++) begin
        r.col = 9'(2 * i);
        exp_rd.push_back(pat(r));
        reqs.push_back(r);
      end
      first = 0; last = 0; cnt = 0;
      while (cnt < 16) begin
        @(posedge clk);
        if (!cs_n && ras_n && !cas_n && we_n) begin
          if (cnt == 0) first = model.cycle;
          last = model.cycle; cnt++;
        end
      end
      check(last - first == 15, $sformatf("16 row-hit reads in %0d clocks", last - first + 1));
    end
    wait (rd_seen == exp_rd.size());
    repeat (5) @(posedge clk);
    check(model.violations == 0, "no violation after the read stream");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // clocked request and write-data drivers; random gaps unless a burst is wanted
  bit go = 0, burst = 0;
  int ri = 0, wi = 0;
  always @(posedge clk) begin
    if (go) begin
      if (!req_valid || req_ready) begin
        if (ri < reqs.size() && (burst || $urandom_range(0, 7) != 0)) begin
          req <= reqs[ri]; req_valid <= 1; ri++;
        end else req_valid <= 0;
      end
      if (!wdata_valid || wdata_ready) begin
        if (wi < wq.size()) begin
          wdata <= {4'hF, wq[wi][63:32], 4'hF, wq[wi][31:0]}; wdata_valid <= 1; wi++;
        end else wdata_valid <= 0;
      end
    end
  end

  // read data checker
  assign rdata_pop = rdata_valid;
  always @(posedge clk) begin
    if (rst_n && rdata_valid) begin
      check(rd_seen < exp_rd.size() && rdata == exp_rd[rd_seen],
            $sformatf("read %0d data %h expected %h", rd_seen, rdata,
                      rd_seen < exp_rd.size() ? exp_rd[rd_seen] : 64'h0));
      rd_seen++;
    end
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
