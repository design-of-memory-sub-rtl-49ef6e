// Shared body of the end-to-end tests of the memory sub-system: signal declarations,
// the mobile DDR SDRAM model, pin-level mechanism counters, an independent model of the
// data arrangement, the video-pipe stimulus and the task run_e2e() that plays the whole
// picture stream and counts the checks. The including module defines PIC_W and PIC_H,
// instantiates mem_subsystem as `dut` with (.*) and prints the result line.
  localparam int DPB = 4, NFS = 2 * DPB;   // the DUT's default DPB size
  localparam int GW = (PIC_W + 63) / 64, FROWS = GW * ((PIC_H + 63) / 64);
  localparam int FL_BASE = 0, FC_BASE = 72, SL_BASE = 96, SC_BASE = 104, MO_BASE = 108;

  logic clk = 0, rst_n = 0;
  always #3.086 clk = ~clk;   // 162 MHz

  logic blk_valid = 0, blk_ready, fetch_done = 0;
  blk_req_t blk_req = '0;
  logic p_en = 0, p_we = 0, p_done = 0, sbuf_swap, sbuf_dram_bank;
  logic [6:0] p_addr = '0;
  logic [63:0] p_wdata = '0, p_rdata;
  logic cur_valid, pic_ready, pic_done = 0, pic_is_ref = 0, flush = 0, flush_empty;
  logic [2:0] cur_fs, out_fs;
  logic signed [15:0] pic_poc = '0, out_poc;
  logic [NFS-1:0] unref_mask = '0;
  logic out_valid, bump_error, init_done;
  logic [31:0] n_direct, n_rb_insert, n_out_rb, n_out_dpb, n_stall, n_act, n_pre, n_rw, n_auto_pre, n_ref, n_pdown, n_swaps;
  logic dram_cke, dram_cs_n, dram_ras_n, dram_cas_n, dram_we_n, dram_dq_oe;
  logic [1:0] dram_ba;
  logic [11:0] dram_a;
  logic [7:0] dram_dqm;
  logic [63:0] dram_dq_out, dram_dq_in;


  mddr_model u_mem (
    .clk, .cke(dram_cke), .cs_n(dram_cs_n), .ras_n(dram_ras_n), .cas_n(dram_cas_n),
    .we_n(dram_we_n), .ba(dram_ba), .a(dram_a), .dqm(dram_dqm), .dq_out(dram_dq_out),
    .dq_oe(dram_dq_oe), .dq_in(dram_dq_in)
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---------------- mechanism counters from the pins ----------------
  int c_act = 0, c_rd = 0, c_wr = 0, c_ap = 0, c_pre1 = 0, c_prea = 0, c_ref = 0, c_pd = 0;
  int c_stall = 0, c_swap = 0, c_rowhit = 0;
  bit col_since_act [4];
  logic cke_q = 1;
  always @(posedge clk) if (rst_n) begin
    cke_q <= dram_cke;
    if (cke_q && !dram_cke) c_pd++;
    if (blk_valid && !blk_ready) c_stall++;
    if (sbuf_swap) c_swap++;
    if (dram_cke && !dram_cs_n) begin
      unique case ({dram_ras_n, dram_cas_n, dram_we_n})
        3'b011: begin c_act++; col_since_act[dram_ba] = 0; end
        3'b101, 3'b100: begin
          if (dram_we_n) c_rd++; else c_wr++;
          if (dram_a[10]) c_ap++;
          if (col_since_act[dram_ba]) c_rowhit++;
          col_since_act[dram_ba] = 1;
        end
        3'b010: if (dram_a[10]) c_prea++; else c_pre1++;
        3'b001: c_ref++;
        default: ;
      endcase
    end
  end

  // ---------------- independent model of the data arrangement ----------------
  logic [31:0] golden [int];
  function automatic int dkey(input int b, input int r, input int c);
    return (b << 21) | (r << 9) | c;
  endfunction
  function automatic logic [31:0] pattern(input int k);
    return 32'(k) * 32'h9E37_79B1 + 32'h1234_5678;
  endfunction
  function automatic logic [31:0] gword(input int k);
    return golden.exists(k) ? golden[k] : pattern(k);
  endfunction
  // key of the first column of the burst holding luma pixel (x, y) or chroma pair (x, y)
  function automatic int burst_key(input bit chroma, input int f, input int x, input int y);
    int bx, by, bank, row, col;
    if (chroma) begin
      bx = x / 16; by = y / 16;
      col = 256 + (y % 16) * 8 + ((x % 16) / 4) * 2;
    end else begin
      bx = x / 32; by = y / 32;
      col = (y % 32) * 8 + ((x % 32) / 8) * 2;
    end
    bank = (by % 2) * 2 + (bx % 2);
    row  = f * FROWS + (by / 2) * GW + bx / 2;
    return dkey(bank, row, col);
  endfunction
  function automatic int clipi(input int v, input int hi);
    return v < 0 ? 0 : (v > hi ? hi : v);
  endfunction

  // words the pipe will find after a fetch, in burst order
  typedef logic [63:0] wq_t [$];
  function automatic wq_t window(input bit chroma, input int f, input int x, input int y,
                                 input int w, input int h, input int mvx, input int mvy);
    wq_t q;
    int ix, iy, xl, xh, yl, yh, per;
    if (chroma) begin
      ix = x + (mvx >>> 3); iy = y + (mvy >>> 3);
      xl = clipi(ix, PIC_W / 2 - 1); xh = clipi(ix + w - 1 + ((mvx & 7) != 0), PIC_W / 2 - 1);
      yl = clipi(iy, PIC_H / 2 - 1); yh = clipi(iy + h - 1 + ((mvy & 7) != 0), PIC_H / 2 - 1);
      per = 4;
    end else begin
      ix = x + (mvx >>> 2); iy = y + (mvy >>> 2);
      xl = clipi(ix - 2 * ((mvx & 3) != 0), PIC_W - 1); xh = clipi(ix + w - 1 + 3 * ((mvx & 3) != 0), PIC_W - 1);
      yl = clipi(iy - 2 * ((mvy & 3) != 0), PIC_H - 1); yh = clipi(iy + h - 1 + 3 * ((mvy & 3) != 0), PIC_H - 1);
      per = 8;
    end
    for (int ln = yl; ln <= yh; ln++)
      for (int b = xl / per; b <= xh / per; b++) begin
        int k;
        k = burst_key(chroma, f, b * per, ln);
        q.push_back({gword(k + 1), gword(k)});
      end
    return q;
  endfunction

  // ---------------- driving ----------------
  task automatic send(input blk_req_t r);
    @(negedge clk);
    blk_valid = 1; blk_req = r;
    while (!blk_ready) @(negedge clk);
    @(negedge clk);
    blk_valid = 0;
  endtask

  function automatic blk_req_t mk(input bit we, input comp_e comp, input int f, input int x, input int y,
                                  input int w, input int h, input int mvx, input int mvy, input int base);
    blk_req_t r;
    r = '0;
    r.we = we; r.comp = comp; r.frame = 3'(f); r.x = 12'(x); r.y = 12'(y);
    r.w = 6'(w); r.h = 6'(h); r.mvx = 14'(mvx); r.mvy = 14'(mvy); r.sbuf_base = 7'(base);
    return r;
  endfunction

  // block state carried between periods
  typedef struct { int a; logic [63:0] d; string what; } rd_t;
  rd_t   exp_rd [$];                  // fetched last period, to be checked now
  bit    st_pending = 0;              // reconstructed block written last period
  int    st_f, st_x, st_y;
  logic [63:0] st_l [8], st_c [4], st_m [2];
  int    refs_fs [$];                 // frame stores of reference pictures
  int    n_words_checked = 0;
  longint dram_clocks = 0;            // DRAM-side clocks of the block periods
  int    n_blocks = 0;
  longint wc_clocks = 0;              // the same for worst-case (four 4x4 partition) blocks
  int    n_wc_blocks = 0;

  // motion words of the 8x8 block at (x, y): two words per 8x8 block of a 32x32 block
  function automatic int mo_first(input int x, input int y);
    return 2 * (((y % 32) / 8) * 4 + (x % 32) / 8);
  endfunction
  function automatic int mo_key(input int f, input int x, input int y, input int word);
    int bx, by;
    bx = x / 32; by = y / 32;
    return dkey((by % 2) * 2 + (bx % 2), f * FROWS + (by / 2) * GW + bx / 2, 384 + 2 * word);
  endfunction

  task automatic period(input bit new_block, input int f, input int x, input int y);
    logic [63:0] nl [8], nc [4], nm [2];
    int fl, mvx, mvy, fx, fy, la, ca;
    bit part4;
    wq_t wl, wc;
    longint t0;
    // pipe side: check last period's fetch, write this period's reconstruction
    for (int i = 0; i <= exp_rd.size(); i++) begin
      @(negedge clk);
      if (i > 0) begin
        check(p_rdata == exp_rd[i-1].d, $sformatf("%s word at %0d: got %h exp %h",
              exp_rd[i-1].what, exp_rd[i-1].a, p_rdata, exp_rd[i-1].d));
        n_words_checked++;
      end
      p_en = (i < exp_rd.size()); p_we = 0;
      p_addr = (i < exp_rd.size()) ? 7'(exp_rd[i].a) : '0;
    end
    for (int i = 0; i < 14; i++) begin
      @(negedge clk);
      p_wdata = {$urandom, $urandom};
      if (i < 8) nl[i] = p_wdata; else if (i < 12) nc[i-8] = p_wdata; else nm[i-12] = p_wdata;
      p_en = new_block; p_we = 1;
      p_addr = 7'(i < 8 ? SL_BASE + i : (i < 12 ? SC_BASE + i - 8 : MO_BASE + i - 12));
    end
    @(negedge clk);
    p_en = 0; p_we = 0; p_done = 1;
    @(negedge clk);
    p_done = 0;
    // DRAM side: store last period's block, fetch for this one
    t0 = u_mem.cycle;
    if (st_pending) begin
      send(mk(1, COMP_LUMA, st_f, st_x, st_y, 8, 8, 0, 0, SL_BASE));
      for (int i = 0; i < 8; i++) begin
        int k;
        k = burst_key(0, st_f, st_x, st_y + i);
        golden[k] = st_l[i][31:0]; golden[k + 1] = st_l[i][63:32];
      end
      send(mk(1, COMP_CHROMA, st_f, st_x / 2, st_y / 2, 4, 4, 0, 0, SC_BASE));
      for (int i = 0; i < 4; i++) begin
        int k;
        k = burst_key(1, st_f, st_x / 2, st_y / 2 + i);
        golden[k] = st_c[i][31:0]; golden[k + 1] = st_c[i][63:32];
      end
      send(mk(1, COMP_MOTION, st_f, st_x, st_y, 2, mo_first(st_x, st_y), 0, 0, MO_BASE));
      for (int i = 0; i < 2; i++) begin
        int k;
        k = mo_key(st_f, st_x, st_y, mo_first(st_x, st_y) + i);
        golden[k] = st_m[i][31:0]; golden[k + 1] = st_m[i][63:32];
      end
    end
    exp_rd.delete();
    if (new_block) begin
      fl = (refs_fs.size() > 0 && $urandom_range(0, 3) != 0) ? refs_fs[$urandom_range(0, refs_fs.size() - 1)]
                                                              : $urandom_range(0, NFS - 1);
      fx = x; fy = y;
      if ($urandom_range(0, 7) == 0) begin fx = PIC_W - 8 * $urandom_range(1, 3); fy = PIC_H - 8 * $urandom_range(1, 3); end
      // one in four blocks is the worst case of the document's Table I: four 4x4
      // partitions, each with its own fractional vector and reference window
      part4 = ($urandom_range(0, 3) == 0);
      la = FL_BASE; ca = FC_BASE;
      for (int p = 0; p < (part4 ? 4 : 1); p++) begin
        int px, py, sz;
        sz = part4 ? 4 : 8;
        px = fx + sz * (p % 2); py = fy + sz * (p / 2);
        mvx = $urandom_range(0, 160) - 80; mvy = $urandom_range(0, 160) - 80;
        if (part4) begin mvx = mvx | 1; mvy = mvy | 1; end
        else if ($urandom_range(0, 2) == 0) begin mvx = mvx & ~3; mvy = mvy & ~3; end
        wl = window(0, fl, px, py, sz, sz, mvx, mvy);
        send(mk(0, COMP_LUMA, fl, px, py, sz, sz, mvx, mvy, la));
        foreach (wl[i]) exp_rd.push_back('{la + i, wl[i], "luma fetch"});
        la += wl.size();
        wc = window(1, fl, px / 2, py / 2, sz / 2, sz / 2, mvx, mvy);
        send(mk(0, COMP_CHROMA, fl, px / 2, py / 2, sz / 2, sz / 2, mvx, mvy, ca));
        foreach (wc[i]) exp_rd.push_back('{ca + i, wc[i], "chroma fetch"});
        ca += wc.size();
      end
      check(la <= FC_BASE && ca <= SL_BASE, "fetch windows fit their buffer areas");
      // co-located motion data (temporal direct prediction)
      send(mk(0, COMP_MOTION, fl, fx, fy, 2, mo_first(fx, fy), 0, 0, MO_BASE));
      for (int i = 0; i < 2; i++) begin
        int k;
        k = mo_key(fl, fx, fy, mo_first(fx, fy) + i);
        exp_rd.push_back('{MO_BASE + i, {gword(k + 1), gword(k)}, "motion fetch"});
      end
    end
    st_pending = new_block;
    if (new_block) begin
      st_f = f; st_x = x; st_y = y; st_l = nl; st_c = nc; st_m = nm;
    end
    @(negedge clk);
    fetch_done = 1;
    @(negedge clk);
    fetch_done = 0;
    while (!sbuf_swap) @(negedge clk);
    if (new_block && !part4) begin
      dram_clocks += u_mem.cycle - t0;
      n_blocks++;
    end
    if (new_block && part4) begin
      wc_clocks += u_mem.cycle - t0;
      n_wc_blocks++;
    end
  endtask

  // ---------------- pictures ----------------
  int outs [$];
  always @(posedge clk) if (rst_n && out_valid) outs.push_back(int'(out_poc));
  int fs_of_poc [int];
  int refs_poc [$];

  task automatic picture(input int poc, input bit is_ref, input int nblocks);
    int f;
    logic [NFS-1:0] m;
    @(negedge clk);
    while (!(pic_ready && cur_valid)) @(negedge clk);
    f = int'(cur_fs);
    fs_of_poc[poc] = f;
    for (int b = 0; b < nblocks; b++)
      period(1, f, 8 * $urandom_range(0, 15), 8 * $urandom_range(0, 7));
    period(0, 0, 0, 0);   // last store of the picture
    m = '0;
    if (is_ref) begin
      while (refs_poc.size() >= DPB) begin
        int old;
        old = refs_poc.pop_front();
        m[fs_of_poc[old]] = 1'b1;
      end
      refs_poc.push_back(poc);
    end
    refs_fs.delete();
    foreach (refs_poc[i]) refs_fs.push_back(fs_of_poc[refs_poc[i]]);
    @(negedge clk);
    pic_done = 1; pic_poc = 16'(poc); pic_is_ref = is_ref; unref_mask = m;
    @(negedge clk);
    pic_done = 0;
  endtask

  task automatic do_flush();
    while (!flush_empty) begin
      @(negedge clk);
      while (!pic_ready) @(negedge clk);
      flush = 1;
      @(negedge clk);
      flush = 0;
      repeat (4) @(negedge clk);
    end
  endtask

  // the whole run; the including module prints the result line
  task automatic run_e2e();
    int order [$];
    int mb_clocks;
    bit isref [$];
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (!init_done) @(negedge clk);
    check(u_mem.n_lmr == 2, "mode and extended mode registers loaded");
    order.push_back(0); isref.push_back(1);
    for (int g = 0; g < 4; g++) begin
      int b;
      b = 8 * g;
      if (g == 2) begin
        // a deeper pyramid: non-reference pictures that precede every waiting picture
        static int p8 [8] = '{16, 8, 4, 2, 6, 12, 10, 14};
        static bit r8 [8] = '{1, 1, 1, 0, 0, 1, 0, 0};
        foreach (p8[k]) begin order.push_back(b + p8[k]); isref.push_back(r8[k]); end
        continue;
      end
      if (g == 3) b = 32;
      order.push_back(b + 8); isref.push_back(1);
      order.push_back(b + 4); isref.push_back(1);
      order.push_back(b + 2); isref.push_back(0);
      order.push_back(b + 6); isref.push_back(0);
    end
    foreach (order[i]) begin
      picture(order[i], isref[i], (i % 4 == 0) ? 10 : 5);
      if (i % 5 == 4) repeat (2 * T_REFI_D) @(negedge clk);   // pipe idle: refresh, power-down
    end
    do_flush();
    // after the flush every stored picture is a reference that has been shown; a new
    // anchor fills the DPB and the non-reference picture before it is shown at once
    picture(100, 1, 3); order.push_back(100);
    picture(98, 0, 3);  order.push_back(98);
    do_flush();
    repeat (20) @(negedge clk);

    check(n_words_checked > 500, $sformatf("fetched words checked (%0d)", n_words_checked));
    check(outs.size() == order.size(), $sformatf("all %0d pictures output (%0d)", order.size(), outs.size()));
    for (int i = 1; i < outs.size(); i++) check(outs[i] > outs[i-1], "display order increases");
    check(!bump_error, "bumping controller error flag clear");
    check(u_mem.violations == 0, $sformatf("DRAM model reports %0d violations", u_mem.violations));
    check(c_act > 0,    $sformatf("activate commands (%0d)", c_act));
    check(c_rd > 0,     $sformatf("read commands (%0d)", c_rd));
    check(c_wr > 0,     $sformatf("write commands (%0d)", c_wr));
    check(c_ap > 0,     $sformatf("auto precharge accesses (%0d)", c_ap));
    check(c_pre1 > 0,   $sformatf("single-bank precharges (%0d)", c_pre1));
    check(c_prea > 0,   $sformatf("precharge-all commands (%0d)", c_prea));
    check(c_ref > 0,    $sformatf("auto refreshes (%0d)", c_ref));
    check(c_pd > 0,     $sformatf("power-down entries (%0d)", c_pd));
    check(c_rowhit > 0, $sformatf("row-hit column accesses (%0d)", c_rowhit));
    check(c_stall > 0,  $sformatf("pipe stall cycles (%0d)", c_stall));
    check(c_swap > 0,   $sformatf("buffer swaps (%0d)", c_swap));
    check(n_direct > 0, $sformatf("direct outputs (%0d)", n_direct));
    check(n_rb_insert > 0, $sformatf("regulation buffer inserts (%0d)", n_rb_insert));
    check(n_out_rb > 0, $sformatf("regulation buffer outputs (%0d)", n_out_rb));
    check(n_out_dpb > 0, $sformatf("outputs from the DPB (%0d)", n_out_dpb));
    check(int'(n_act) == c_act && int'(n_ref) == c_ref && int'(n_pdown) == c_pd && int'(n_swaps) == c_swap,
          "controller counters agree with the pins");
    check(int'(n_auto_pre) == c_ap && int'(n_rw) == c_rd + c_wr, "column and auto precharge counters agree");
    // 1920x1080 at 30 pictures/s with a 162 MHz clock leaves 162e6 / (8160 * 30) = 661
    // clocks per macroblock; the DRAM side of these periods must stay within it
    mb_clocks = int'(4 * dram_clocks / longint'(n_blocks));
    $display("DRAM-side clocks per macroblock (4 block periods): %0d", mb_clocks);
    check(mb_clocks <= 660, $sformatf("DRAM clocks per macroblock within the real-time budget (%0d)", mb_clocks));
    // Table I puts the worst case of the 8x8 granularity with one DRAM at 940 clocks per
    // macroblock, above the budget; the worst-case blocks here are measured against it
    mb_clocks = int'(4 * wc_clocks / longint'(n_wc_blocks));
    $display("DRAM-side clocks per macroblock, worst-case blocks: %0d", mb_clocks);
    check(n_wc_blocks > 20 && mb_clocks <= 940, $sformatf("worst-case clocks per macroblock within Table I (%0d)", mb_clocks));
    $display("acts %0d rd %0d wr %0d ap %0d pre %0d prea %0d ref %0d pd %0d hit %0d stall %0d swap %0d direct %0d rb %0d/%0d cycles %0d",
             c_act, c_rd, c_wr, c_ap, c_pre1, c_prea, c_ref, c_pd, c_rowhit, c_stall, c_swap,
             n_direct, n_rb_insert, n_out_rb, u_mem.cycle);
  endtask
