// Address translator of the memory sub-system.
//
// Turns one block request of the video pipe into the sequence of DRAM burst addresses
// (bank, row, column) that moves the block, one 64-bit burst per accepted output.
//
// Data arrangement: the luma plane is cut into 32x32 blocks; blocks (2i,2j), (2i+1,2j),
// (2i,2j+1), (2i+1,2j+1) sit in banks 0, 1, 2, 3 (a checkerboard), each in one DRAM row.
// The row number is frame * FRAME_ROWS + group, where group numbers the 2x2 clusters in
// raster order. Inside the row, columns 0-255 hold the 32x32 luma pixels (8 columns of
// 4 pixels per line), columns 256-383 the matching 16x16 Cb and Cr samples interleaved
// into a 32-byte by 16-line block (Cr, Cb alternating), and columns 384-447 the motion
// data of the block. A fetch for an 8x8 block and its chroma therefore opens at most one
// row per bank, and the chroma access after a luma access hits the same open row.
//
// Fetch window: for a fetch, the integer part of the quarter-pel luma motion vector
// moves the block; a fractional component widens the window by 2 samples before and 3
// after (6-tap interpolation). For chroma, the eighth-pel vector moves the block and a
// fractional part adds 1 sample after (bilinear). The window is clipped to the picture
// (edge samples are repeated by the prediction unit), widened to whole 8-byte bursts
// and scanned line by line. Stores (we = 1) use the block as given.
// Motion requests: x, y locate the 32x32 block, h is the first motion word (0-31) and w
// the number of 64-bit words.
//
// Timing: a request is accepted when in_ready is high; one clock later the first address
// is offered on out_*; one address leaves per clock while out_ready is high; out_last
// marks the final burst, and in_ready rises again after it. out_sbuf_addr numbers the
// bursts from the request's sbuf_base, for the synchronization buffer.
// The 32x32 blocks, the bank checkerboard and the row layout follow the document; the
// order of the 2x2 clusters, the request format and the window rules are this design's.
module addr_translator
  import mem_pkg::*;
#(
  parameter int unsigned PIC_W = 1920,   // luma width in pixels
  parameter int unsigned PIC_H = 1088    // luma height in lines (multiple of 16)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  blk_req_t   in_req,
  output logic       in_ready,
  output logic       out_valid,
  output mem_req_t   out_req,
  output logic       out_last,
  output logic [6:0] out_sbuf_addr,
  input  logic       out_ready
);
  localparam int unsigned GROUPS_W   = (PIC_W + 63) / 64;
  localparam int unsigned GROUPS_H   = (PIC_H + 63) / 64;
  localparam int unsigned FRAME_ROWS = GROUPS_W * GROUPS_H;
  localparam int signed   LW_MAX = PIC_W - 1;
  localparam int signed   LH_MAX = PIC_H - 1;
  localparam int signed   CW_MAX = PIC_W / 2 - 1;
  localparam int signed   CH_MAX = PIC_H / 2 - 1;

  typedef enum logic [1:0] {S_IDLE, S_SETUP, S_GEN} state_e;
  state_e state;

  blk_req_t    r;
  logic [11:0] bx_lo, bx_hi, ln_hi;          // burst columns and last line of the window
  logic [11:0] bx, ln;                        // scan position
  logic [6:0]  seq;

  // ---------------- window computation (from the registered request) ----------------
  function automatic int signed clip(input int signed v, input int signed hi);
    return (v < 0) ? 0 : ((v > hi) ? hi : v);
  endfunction

  logic [11:0] win_bx_lo, win_bx_hi, win_ln_lo, win_ln_hi;
  always_comb begin
    int signed ix, iy, xl, xh;
    logic fx, fy;
    win_bx_lo = '0; win_bx_hi = '0; win_ln_lo = '0; win_ln_hi = '0;
    ix = 0; iy = 0; xl = 0; xh = 0; fx = 1'b0; fy = 1'b0;
    unique case (r.comp)
      COMP_CHROMA: begin
        ix = int'(r.x) + (r.we ? 0 : (int'(r.mvx) >>> 3));
        iy = int'(r.y) + (r.we ? 0 : (int'(r.mvy) >>> 3));
        fx = !r.we && (r.mvx[2:0] != 3'd0);
        fy = !r.we && (r.mvy[2:0] != 3'd0);
        xl = clip(ix, CW_MAX);
        xh = clip(ix + int'(r.w) - 1 + (fx ? 1 : 0), CW_MAX);
        win_bx_lo = 12'(xl >> 2);      // 4 interleaved Cr/Cb pairs per burst
        win_bx_hi = 12'(xh >> 2);
        win_ln_lo = 12'(clip(iy, CH_MAX));
        win_ln_hi = 12'(clip(iy + int'(r.h) - 1 + (fy ? 1 : 0), CH_MAX));
      end
      COMP_MOTION: begin
        win_bx_lo = 12'(r.h);
        win_bx_hi = 12'(int'(r.h) + int'(r.w) - 1);
        win_ln_lo = r.y;
        win_ln_hi = r.y;
      end
      default: begin
        ix = int'(r.x) + (r.we ? 0 : (int'(r.mvx) >>> 2));
        iy = int'(r.y) + (r.we ? 0 : (int'(r.mvy) >>> 2));
        fx = !r.we && (r.mvx[1:0] != 2'd0);
        fy = !r.we && (r.mvy[1:0] != 2'd0);
        xl = clip(ix - (fx ? 2 : 0), LW_MAX);
        xh = clip(ix + int'(r.w) - 1 + (fx ? 3 : 0), LW_MAX);
        win_bx_lo = 12'(xl >> 3);      // 8 luma pixels per burst
        win_bx_hi = 12'(xh >> 3);
        win_ln_lo = 12'(clip(iy - (fy ? 2 : 0), LH_MAX));
        win_ln_hi = 12'(clip(iy + int'(r.h) - 1 + (fy ? 3 : 0), LH_MAX));
      end
    endcase
  end

  // ---------------- address of the current burst ----------------
  logic [11:0] blk_x, blk_y;
  logic [ROW_W-1:0] group, row;
  logic [COL_W-1:0] col;
  always_comb begin
    unique case (r.comp)
      COMP_CHROMA: begin
        blk_x = bx >> 2;                       // 32 bytes per block line
        blk_y = ln >> 4;                       // 16 chroma lines per block
        col   = COL_W'(COL_CHROMA_BASE) + COL_W'({ln[3:0], bx[1:0], 1'b0});
      end
      COMP_MOTION: begin
        blk_x = r.x >> 5;
        blk_y = ln >> 5;
        col   = COL_W'(COL_MOTION_BASE) + COL_W'({bx[4:0], 1'b0});
      end
      default: begin
        blk_x = bx >> 2;                       // 4 bursts per 32-pixel line
        blk_y = ln >> 5;
        col   = COL_W'(COL_LUMA_BASE) + COL_W'({ln[4:0], bx[1:0], 1'b0});
      end
    endcase
    group = ROW_W'(32'(blk_y >> 1) * GROUPS_W + 32'(blk_x >> 1));
    row   = ROW_W'(32'(r.frame) * FRAME_ROWS) + group;
  end

  assign out_valid     = (state == S_GEN);
  assign out_req       = '{rsvd: '0, we: r.we, bank: {blk_y[0], blk_x[0]}, row: row, col: col};
  assign out_last      = (bx == bx_hi) && (ln == ln_hi);
  assign out_sbuf_addr = r.sbuf_base + seq;
  assign in_ready      = (state == S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      r     <= '0;
      bx_lo <= '0; bx_hi <= '0; ln_hi <= '0;
      bx    <= '0; ln    <= '0; seq   <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (in_valid) begin
          r     <= in_req;
          state <= S_SETUP;
        end
        S_SETUP: begin
          bx_lo <= win_bx_lo; bx_hi <= win_bx_hi;
          ln_hi <= win_ln_hi;
          bx    <= win_bx_lo; ln    <= win_ln_lo;
          seq   <= '0;
          state <= S_GEN;
        end
        S_GEN: if (out_ready) begin
          seq <= seq + 1'b1;
          if (out_last) begin
            state <= S_IDLE;
          end else if (bx == bx_hi) begin
            bx <= bx_lo;
            ln <= ln + 1'b1;
          end else begin
            bx <= bx + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Every address must stay inside the device.
  assert property (@(posedge clk) disable iff (!rst_n)
    out_valid |-> (32'(row) < 32'(8 * FRAME_ROWS)) && (col < COL_W'(448)))
    else $error("addr_translator: address outside the frame store area");
endmodule
