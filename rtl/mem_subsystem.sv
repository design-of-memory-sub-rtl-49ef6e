// Memory sub-system of an H.264/AVC High profile Level 4 decoder (top level).
//
// The video pipe works block by block (one 8x8 luma block with its two 4x4 chroma
// blocks). For each block period it sends block requests: fetches of reference windows
// for motion compensation and stores of reconstructed blocks. The address translator
// turns every request into DRAM burst addresses using the 32x32 checkerboard data
// arrangement; the external memory interface queues them, decides per access whether to
// close the row with auto precharge, and drives the mobile DDR SDRAM. Fetched bursts are
// written into the DRAM-side bank of the two-bank synchronization buffer at the word
// position the request asked for; stored bursts are read from that bank, where the video
// pipe left the reconstructed block in the previous period. When the pipe has issued all
// requests of a period (fetch_done) and the traffic has drained, the DRAM side reports
// done; when the pipe reports done too, the buffer banks swap. Beside the data path, the
// constant-rate bumping controller assigns frame stores to decoded pictures and
// chooses at most one picture per picture period for display (out_*); its frame store
// numbers are the frame field of the block requests and of the display read-out.
//
// Interfaces: blk_* (request handshake, blk_req_t from mem_pkg), p_* (pipe port of the
// synchronization buffer, 64-bit, one-clock read latency), pic_*/flush/out_* (bumping
// controller), dram_* (DRAM command, address and mask pins, and both data beats of each
// clock towards the DDR pad cells), n_* (event counters for the DRAM energy model
// E = Nact*Eact + Npre*Epre + Nrw*Erw). Store requests write every byte (all masks on).
// The partition into these blocks follows the document; the request format, the
// done/swap protocol and the glue between the blocks are this design's.
module mem_subsystem
  import mem_pkg::*;
#(
  parameter int unsigned PIC_W      = 1920,
  parameter int unsigned PIC_H      = 1088,
  parameter int unsigned DPB_SIZE   = 4,
  parameter int unsigned SBUF_WORDS = 128,
  parameter int unsigned CMD_DEPTH  = 8,
  parameter int unsigned T_REFI     = T_REFI_D,
  parameter int unsigned T_INIT     = T_INIT_D
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // block requests from the video pipe
  input  logic                   blk_valid,
  input  blk_req_t               blk_req,
  output logic                   blk_ready,
  input  logic                   fetch_done,
  // video pipe port of the synchronization buffer
  input  logic                   p_en,
  input  logic                   p_we,
  input  logic [$clog2(SBUF_WORDS)-1:0] p_addr,
  input  logic [BUS_W-1:0]       p_wdata,
  output logic [BUS_W-1:0]       p_rdata,
  input  logic                   p_done,
  output logic                   sbuf_swap,
  output logic                   sbuf_dram_bank,
  // bumping controller
  output logic                   cur_valid,
  output logic [$clog2(2*DPB_SIZE)-1:0] cur_fs,
  output logic                   pic_ready,
  input  logic                   pic_done,
  input  logic signed [15:0]     pic_poc,
  input  logic                   pic_is_ref,
  input  logic [2*DPB_SIZE-1:0]  unref_mask,
  input  logic                   flush,
  output logic                   flush_empty,
  output logic                   out_valid,
  output logic [$clog2(2*DPB_SIZE)-1:0] out_fs,
  output logic signed [15:0]     out_poc,
  output logic                   bump_error,
  output logic [31:0]            n_direct,
  output logic [31:0]            n_rb_insert,
  output logic [31:0]            n_out_rb,
  output logic [31:0]            n_out_dpb,
  output logic [31:0]            n_stall,
  // status and DRAM statistics
  output logic                   init_done,
  output logic [31:0]            n_act,
  output logic [31:0]            n_pre,
  output logic [31:0]            n_rw,
  output logic [31:0]            n_auto_pre,
  output logic [31:0]            n_ref,
  output logic [31:0]            n_pdown,
  output logic [31:0]            n_swaps,
  // DRAM pad side
  output logic                   dram_cke,
  output logic                   dram_cs_n,
  output logic                   dram_ras_n,
  output logic                   dram_cas_n,
  output logic                   dram_we_n,
  output logic [BANK_W-1:0]      dram_ba,
  output logic [ROW_W-1:0]       dram_a,
  output logic [2*DQ_W/8-1:0]    dram_dqm,
  output logic [2*DQ_W-1:0]      dram_dq_out,
  output logic                   dram_dq_oe,
  input  logic [2*DQ_W-1:0]      dram_dq_in
);
  localparam int unsigned SAW       = $clog2(SBUF_WORDS);
  localparam int unsigned TAG_DEPTH = 2 * CMD_DEPTH;

  // ---------------- address translator ----------------
  logic       t_valid, t_ready, t_last;
  mem_req_t   t_req;
  logic [6:0] t_sbuf;

  addr_translator #(.PIC_W(PIC_W), .PIC_H(PIC_H)) u_xlat (
    .clk, .rst_n,
    .in_valid(blk_valid), .in_req(blk_req), .in_ready(blk_ready),
    .out_valid(t_valid), .out_req(t_req), .out_last(t_last), .out_sbuf_addr(t_sbuf),
    .out_ready(t_ready)
  );

  // ---------------- external memory interface ----------------
  logic                e_req_ready, e_wready, e_wafull, e_rvalid, e_rpop, e_idle;
  logic [2*BEAT_W-1:0] e_wdata;
  logic [2*DQ_W-1:0]   e_rdata;
  logic                wpush;

  ext_mem_if #(.CMD_DEPTH(CMD_DEPTH), .T_REFI(T_REFI), .T_INIT(T_INIT)) u_emi (
    .clk, .rst_n,
    .req_valid(t_valid && t_ready), .req(t_req), .req_ready(e_req_ready),
    .wdata_valid(wpush), .wdata(e_wdata), .wdata_ready(e_wready),
    .wdata_almost_full(e_wafull),
    .rdata_valid(e_rvalid), .rdata(e_rdata), .rdata_pop(e_rpop),
    .init_done, .idle(e_idle),
    .n_act, .n_pre, .n_rw, .n_auto_pre, .n_ref, .n_pdown,
    .dram_cke, .dram_cs_n, .dram_ras_n, .dram_cas_n, .dram_we_n, .dram_ba, .dram_a,
    .dram_dqm, .dram_dq_out, .dram_dq_oe, .dram_dq_in
  );

  // ---------------- read tags: sync buffer word of each outstanding read ----------------
  logic           tag_full, tag_empty, tag_pop;
  logic [SAW-1:0] tag_head;
  logic [$clog2(TAG_DEPTH+1)-1:0] tag_count;
  data_fifo #(.WIDTH(SAW), .DEPTH(TAG_DEPTH)) u_tags (
    .clk, .rst_n,
    .push(t_valid && t_ready && !t_req.we), .din(t_sbuf[SAW-1:0]),
    .pop(tag_pop), .dout(tag_head), .empty(tag_empty), .full(tag_full), .count(tag_count)
  );

  // A store burst needs room for its data word, a fetch burst room for its tag.
  assign t_ready = e_req_ready && (t_req.we ? !e_wafull : !tag_full);

  // ---------------- DRAM side of the synchronization buffer ----------------
  logic             d_en, d_we, d_done;
  logic [SAW-1:0]   d_addr;
  logic [BUS_W-1:0] d_wdata, d_rdata;
  logic             wr_read;     // reading a stored word for the write FIFO
  logic             fetch_seen;

  assign wr_read = t_valid && t_ready && t_req.we;
  assign e_rpop  = e_rvalid && !wr_read;
  assign tag_pop = e_rpop;
  always_comb begin
    d_en = wr_read || e_rpop;
    d_we = !wr_read;
    d_addr  = wr_read ? t_sbuf[SAW-1:0] : tag_head;
    d_wdata = e_rdata;
  end
  assign e_wdata = {4'hF, d_rdata[63:32], 4'hF, d_rdata[31:0]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wpush      <= 1'b0;
      fetch_seen <= 1'b0;
    end else begin
      wpush <= wr_read;
      if (d_done)          fetch_seen <= 1'b0;
      else if (fetch_done) fetch_seen <= 1'b1;
    end
  end
  assign d_done = fetch_seen && blk_ready && !blk_valid && e_idle && tag_empty && !wpush;

  sync_buffer #(.BANK_WORDS(SBUF_WORDS), .WIDTH(BUS_W)) u_sbuf (
    .clk, .rst_n,
    .d_en, .d_we, .d_addr, .d_wdata, .d_rdata, .d_done,
    .p_en, .p_we, .p_addr, .p_wdata, .p_rdata, .p_done,
    .dram_bank(sbuf_dram_bank), .swap(sbuf_swap), .n_swaps
  );

  // ---------------- constant-rate bumping ----------------
  logic [$clog2(2*DPB_SIZE+1)-1:0] dpb_count, rb_count;
  bumping_ctrl #(.DPB_SIZE(DPB_SIZE), .NUM_FS(2*DPB_SIZE), .POC_W(16)) u_bump (
    .clk, .rst_n,
    .cur_valid, .cur_fs, .ready(pic_ready),
    .pic_done, .pic_poc, .pic_is_ref, .unref_mask,
    .flush, .flush_empty,
    .out_valid, .out_fs, .out_poc,
    .dpb_count, .rb_count, .n_direct, .n_rb_insert, .n_out_rb, .n_out_dpb, .n_stall,
    .error(bump_error)
  );

  // Status bits the glue does not need: flow control uses the almost-full flag and the
  // translator's per-burst handshake, the buffer words fit in SAW bits, and the DPB/RB
  // fill levels are internal to the bumping controller.
  logic unused_status;
  assign unused_status = ^{e_wready, t_last, t_sbuf[6], tag_count, dpb_count, rb_count};
endmodule
