// Shared types and constants of the H.264/AVC decoder memory sub-system.
//
// The external memory is a 256 Mbit mobile DDR SDRAM organised as 4 banks x 4096 rows x
// 512 columns x 32 bits. Every DRAM row holds one 32x32 luminance block (256 columns),
// the matching 32x16 interleaved Cb/Cr block (128 columns) and the motion data of that
// block (64 columns); this map and the device geometry follow the document. The burst
// length of 2 (one clock of double-data-rate transfer per command), CAS latency 3 and
// the timing values below are this design's own choices, taken from typical datasheet
// figures of a 166 MHz mobile DDR part run at the document's 162 MHz clock.
package mem_pkg;

  localparam int unsigned NUM_BANKS = 4;
  localparam int unsigned BANK_W    = 2;
  localparam int unsigned ROW_W     = 12;   // 4096 rows
  localparam int unsigned COL_W     = 9;    // 512 columns of 32 bits
  localparam int unsigned DQ_W      = 32;   // DRAM data pins
  localparam int unsigned BEAT_W    = 36;   // one write beat: 4 byte masks + 32 data bits
  localparam int unsigned BUS_W     = 64;   // on-chip data word: both beats of one clock

  // Column areas inside one DRAM row.
  localparam int unsigned COL_LUMA_BASE   = 0;    // 256 columns, 32x32 luma pixels
  localparam int unsigned COL_CHROMA_BASE = 256;  // 128 columns, 32x16 Cr/Cb interleaved
  localparam int unsigned COL_MOTION_BASE = 384;  // 64 columns of motion data

  // Default DRAM timing in clocks at 162 MHz (6.17 ns).
  localparam int unsigned T_RCD_D  = 3;     // ACT -> READ/WRITE, 18 ns
  localparam int unsigned T_RP_D   = 3;     // PRE -> ACT, 18 ns
  localparam int unsigned T_RAS_D  = 7;     // ACT -> PRE, 42 ns
  localparam int unsigned T_RC_D   = 10;    // ACT -> ACT same bank, 60 ns
  localparam int unsigned T_RRD_D  = 2;     // ACT -> ACT other bank, 12 ns
  localparam int unsigned T_WR_D   = 3;     // end of write data -> PRE, 15 ns
  localparam int unsigned T_WTR_D  = 1;     // end of write data -> READ
  localparam int unsigned T_RFC_D  = 12;    // REF -> any command, 72 ns
  localparam int unsigned T_MRD_D  = 2;     // LMR -> any command
  localparam int unsigned T_REFI_D = 1263;  // average refresh interval, 7.8 us
  localparam int unsigned T_INIT_D = 32400; // power-up wait, 200 us
  localparam int unsigned CL_D     = 3;     // CAS latency
  localparam int unsigned BL       = 2;     // burst length (beats)

  // Request word written into the command FIFO ("Address (32 bits)").
  typedef struct packed {
    logic [7:0]       rsvd;
    logic             we;     // 1: write burst, 0: read burst
    logic [BANK_W-1:0] bank;
    logic [ROW_W-1:0] row;
    logic [COL_W-1:0] col;
  } mem_req_t;

  // Command FIFO entry: request plus the hit flag that keeps the row open.
  typedef struct packed {
    logic     hit;
    mem_req_t req;
  } cmd_entry_t;

  // DRAM commands as seen by the timing checker and the bank state register.
  typedef enum logic [3:0] {
    CMD_NOP, CMD_ACT, CMD_RD, CMD_WR, CMD_RDA, CMD_WRA,
    CMD_PRE, CMD_PREA, CMD_REF, CMD_LMR
  } dram_cmd_e;

  // Picture component addressed by a block request.
  typedef enum logic [1:0] {
    COMP_LUMA   = 2'd0,
    COMP_CHROMA = 2'd1,
    COMP_MOTION = 2'd2
  } comp_e;

  // Block request from the video pipe to the address translator.
  typedef struct packed {
    logic              we;     // 1: store a reconstructed block, 0: fetch
    comp_e             comp;
    logic [2:0]        frame;  // frame store index
    logic [11:0]       x;      // luma: pixel, chroma: chroma sample, motion: first word
    logic [11:0]       y;      // luma: pixel line, chroma: chroma line
    logic [5:0]        w;      // block width (samples) or motion word count
    logic [5:0]        h;      // block height (lines)
    logic signed [13:0] mvx;   // quarter-pel luma motion vector (zero for stores)
    logic signed [13:0] mvy;
    logic [6:0]        sbuf_base; // first synchronization buffer word of this block
  } blk_req_t;

endpackage
