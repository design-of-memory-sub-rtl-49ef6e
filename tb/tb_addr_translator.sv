// Self-checking test of the address translator. For random fetch and store requests
// (luma, chroma and motion data, blocks of 4 to 16 samples, random quarter-pel vectors,
// positions at the picture edges) a reference model lists, pixel by pixel, the DRAM
// burst that holds each sample of the clipped fetch window, using the data arrangement
// formula directly (32x32 blocks, bank = 2*(block_y mod 2) + block_x mod 2,
// row = frame*510 + (block_y/2)*30 + block_x/2, column = line*8 + x/4 in the block;
// chroma at column 256 with Cr/Cb interleaved; motion at column 384). The translator's
// output must be exactly that list, in order, at one burst per clock.
module tb_addr_translator;
  import mem_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, out_valid, out_last, out_ready;
  blk_req_t in_req;
  mem_req_t out_req;
  logic [6:0] out_sbuf_addr;
  addr_translator dut (.*);

  localparam int PW = 1920, PH = 1088;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic int fdiv(input int a, input int b);  // floor division
    return (a >= 0) ? a / b : -((-a + b - 1) / b);
  endfunction
  function automatic int clampi(input int v, input int hi);
    return v < 0 ? 0 : (v > hi ? hi : v);
  endfunction

  typedef struct { int bank; int row; int col; } addr_t;
  addr_t exp_q [$];

  function automatic addr_t luma_addr(input int f, input int px, input int py);
    addr_t a;
    int bxk, byk;
    bxk = px / 32; byk = py / 32;
    a.bank = 2 * (byk % 2) + (bxk % 2);
    a.row  = f * 510 + (byk / 2) * 30 + bxk / 2;
    a.col  = ((py % 32) * 8 + (px % 32) / 4) & ~1;
    return a;
  endfunction
  function automatic addr_t chroma_addr(input int f, input int bytex, input int cy);
    addr_t a;
    int bxk, byk;
    bxk = bytex / 32; byk = cy / 16;
    a.bank = 2 * (byk % 2) + (bxk % 2);
    a.row  = f * 510 + (byk / 2) * 30 + bxk / 2;
    a.col  = (256 + (cy % 16) * 8 + (bytex % 32) / 4) & ~1;
    return a;
  endfunction

  task automatic build(input blk_req_t r);
    int x0, x1, y0, y1;
    addr_t a, last;
    bit have;
    exp_q.delete();
    have = 0;
    if (r.comp == COMP_MOTION) begin
      for (int w = int'(r.h); w < int'(r.h) + int'(r.w); w++) begin
        a = luma_addr(int'(r.frame), int'(r.x), int'(r.y));
        a.col = 384 + 2 * w;
        exp_q.push_back(a);
      end
      return;
    end
    if (r.comp == COMP_LUMA) begin
      int mx, my;
      mx = r.we ? 0 : int'(r.mvx); my = r.we ? 0 : int'(r.mvy);
      x0 = int'(r.x) + fdiv(mx, 4); y0 = int'(r.y) + fdiv(my, 4);
      x1 = x0 + int'(r.w) - 1;      y1 = y0 + int'(r.h) - 1;
      if (mx % 4 != 0) begin x0 -= 2; x1 += 3; end
      if (my % 4 != 0) begin y0 -= 2; y1 += 3; end
      x0 = clampi(x0, PW - 1); x1 = clampi(x1, PW - 1);
      y0 = clampi(y0, PH - 1); y1 = clampi(y1, PH - 1);
    end else begin
      int mx, my;
      mx = r.we ? 0 : int'(r.mvx); my = r.we ? 0 : int'(r.mvy);
      x0 = int'(r.x) + fdiv(mx, 8); y0 = int'(r.y) + fdiv(my, 8);
      x1 = x0 + int'(r.w) - 1;      y1 = y0 + int'(r.h) - 1;
      if (mx % 8 != 0) x1 += 1;
      if (my % 8 != 0) y1 += 1;
      x0 = clampi(x0, PW / 2 - 1); x1 = clampi(x1, PW / 2 - 1);
      y0 = clampi(y0, PH / 2 - 1); y1 = clampi(y1, PH / 2 - 1);
    end
    for (int y = y0; y <= y1; y++) begin
      int xs, xe;
      // whole bursts: widen the sample range to 8-byte boundaries
      if (r.comp == COMP_LUMA) begin xs = (x0 / 8) * 8; xe = x1; end
      else begin xs = ((2 * x0) / 8) * 8; xe = 2 * x1 + 1; end
      for (int x = xs; x <= xe; x++) begin
        a = (r.comp == COMP_LUMA) ? luma_addr(int'(r.frame), x, y)
                                  : chroma_addr(int'(r.frame), x, y);
        if (!have || a != last) exp_q.push_back(a);
        last = a; have = 1;
      end
    end
  endtask

  int n_fetch_frac = 0, n_edge = 0;
  initial begin
    in_valid = 0; in_req = '0; out_ready = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      blk_req_t r;
      int got, first_cyc, last_cyc, cyc;
      static int sizes [3] = '{4, 8, 16};
      r = '0;
      r.comp  = (n % 5 == 4) ? COMP_MOTION : ((n % 3 == 2) ? COMP_CHROMA : COMP_LUMA);
      r.we    = ($urandom_range(0, 3) == 0);
      r.frame = 3'($urandom_range(0, 7));
      r.w     = 6'(sizes[$urandom_range(0, 2)]);
      r.h     = 6'(sizes[$urandom_range(0, 2)]);
      r.mvx   = 14'($signed($urandom_range(0, 255)) - 128);
      r.mvy   = 14'($signed($urandom_range(0, 255)) - 128);
      r.sbuf_base = 7'($urandom_range(0, 20));
      if (r.comp == COMP_LUMA) begin
        r.x = 12'(($urandom_range(0, PW / 4 - 4)) * 4);
        r.y = 12'(($urandom_range(0, PH / 4 - 4)) * 4);
        if (n % 7 == 0) begin r.x = 0; r.y = 12'(PH - 8); n_edge++; end
      end else if (r.comp == COMP_CHROMA) begin
        r.w = 6'(r.w / 2); r.h = 6'(r.h / 2);
        r.x = 12'(($urandom_range(0, PW / 8 - 4)) * 4);
        r.y = 12'(($urandom_range(0, PH / 8 - 4)) * 4);
        if (n % 7 == 0) begin r.x = 12'(PW / 2 - 4); r.y = 0; n_edge++; end
      end else begin
        r.x = 12'($urandom_range(0, PW - 1)); r.y = 12'($urandom_range(0, PH - 1));
        r.h = 6'($urandom_range(0, 16)); r.w = 6'($urandom_range(1, 16));
      end
      if (!r.we && r.comp != COMP_MOTION && (r.mvx[1:0] != 0 || r.mvy[1:0] != 0)) n_fetch_frac++;
      build(r);
      @(negedge clk);
      check(in_ready, "ready for a new request");
      in_valid = 1; in_req = r;
      @(negedge clk);
      in_valid = 0;
      got = 0; cyc = 0; first_cyc = -1; last_cyc = -1;
      while (got < exp_q.size() && cyc < 2000) begin
        out_ready = ($urandom_range(0, 9) != 0) || (n % 2 == 0);
        #1;
        if (out_valid && out_ready) begin
          check(int'(out_req.bank) == exp_q[got].bank && int'(out_req.row) == exp_q[got].row &&
                int'(out_req.col) == exp_q[got].col && out_req.we == r.we,
                $sformatf("req %0d burst %0d: got b%0d r%0d c%0d, expected b%0d r%0d c%0d", n, got,
                          out_req.bank, out_req.row, out_req.col,
                          exp_q[got].bank, exp_q[got].row, exp_q[got].col));
          check(out_sbuf_addr == 7'(int'(r.sbuf_base) + got), "sync buffer word number");
          check(out_last == (got == exp_q.size() - 1), "last flag");
          if (first_cyc < 0) first_cyc = cyc;
          last_cyc = cyc;
          got++;
        end
        @(negedge clk); cyc++;
      end
      out_ready = 1;
      check(got == exp_q.size(), $sformatf("req %0d: %0d bursts of %0d", n, got, exp_q.size()));
      if (n % 2 == 0) begin
        check(first_cyc == 1, $sformatf("first burst one clock after acceptance (%0d)", first_cyc));
        check(last_cyc - first_cyc == exp_q.size() - 1, "one burst per clock");
      end
      @(negedge clk);
      check(!out_valid, "no extra burst");
    end
    check(n_fetch_frac > 50 && n_edge > 20, "fractional vectors and edge blocks exercised");
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
