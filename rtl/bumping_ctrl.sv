// Constant-rate bumping controller: decides which decoded picture is sent to display.
//
// The frame stores in DRAM are twice the decoded picture buffer (DPB): DPB_SIZE stores
// may hold DPB pictures, the rest serve as the regulation buffer (RB) and as the store
// of the picture being decoded. For every frame store the controller keeps a state
// (free, being decoded, in DPB, in RB, being displayed), the picture order count (POC),
// a used-for-reference flag and an output-needed flag.
//
// Per decoded picture (pic_done) it runs the constant-rate bumping flow:
//  1. marking: frame stores named in unref_mask lose their reference flag, and the
//     store displayed during the last picture period is freed;
//  2. removal: DPB/RB pictures that are neither needed for output nor for reference
//     are freed;
//  3. if the DPB has room, the current picture joins it; if the RB is not empty and no
//     picture has been output in this period, the picture with the smallest POC still
//     waiting for output is output;
//  4. if the DPB is full: a non-reference current picture with a POC below all waiting
//     pictures is output directly, or put into the RB if a picture has already been
//     output in this period; otherwise the smallest-POC waiting picture is output and
//     the flow returns to step 2, and once one picture has been output the current
//     picture goes to the RB instead of forcing a second output.
// At most one picture is output per decoded picture. "Waiting" pictures are those of
// both DPB and RB, so the order of output POCs is the same as with the standard
// process. At the end of the stream each flush request outputs the next waiting
// picture, again one per request. After each step the controller assigns a free frame
// store to the next picture (cur_fs, cur_valid); it waits (and counts stall cycles)
// while none is free.
//
// Timing: pic_done and flush are accepted when ready is high. The flow takes three
// clocks plus two per loop iteration; out_valid is a one-clock pulse with out_fs and
// out_poc. The flow and the RB of DPB size follow the document; the frame-store states,
// the freeing of a displayed store one picture period later and the restriction of
// direct output to non-reference pictures are this design's.
module bumping_ctrl #(
  parameter int unsigned DPB_SIZE = 4,
  parameter int unsigned NUM_FS   = 2 * DPB_SIZE,
  parameter int unsigned POC_W    = 16
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // frame store for the next picture to decode
  output logic                      cur_valid,
  output logic [$clog2(NUM_FS)-1:0] cur_fs,
  // end of decoding of the current picture
  output logic                      ready,
  input  logic                      pic_done,
  input  logic signed [POC_W-1:0]   pic_poc,
  input  logic                      pic_is_ref,
  input  logic [NUM_FS-1:0]         unref_mask,
  // end of stream: output one remaining picture per request
  input  logic                      flush,
  output logic                      flush_empty,
  // display output
  output logic                      out_valid,
  output logic [$clog2(NUM_FS)-1:0] out_fs,
  output logic signed [POC_W-1:0]   out_poc,
  // status
  output logic [$clog2(NUM_FS+1)-1:0] dpb_count,
  output logic [$clog2(NUM_FS+1)-1:0] rb_count,
  output logic [31:0]               n_direct,
  output logic [31:0]               n_rb_insert,
  output logic [31:0]               n_out_rb,
  output logic [31:0]               n_out_dpb,
  output logic [31:0]               n_stall,
  output logic                      error
);
  localparam int unsigned FW = $clog2(NUM_FS);

  typedef enum logic [2:0] {FS_FREE, FS_CUR, FS_DPB, FS_RB, FS_DISP} fs_state_e;
  typedef enum logic [2:0] {E_ALLOC, E_WAIT, E_MARK, E_REMOVE, E_CHECK, E_FLUSH} eng_e;

  fs_state_e               st     [NUM_FS];
  logic signed [POC_W-1:0] poc    [NUM_FS];
  logic [NUM_FS-1:0]       is_ref, needed;
  eng_e                    eng;

  logic signed [POC_W-1:0] c_poc;
  logic                    c_ref;
  logic [NUM_FS-1:0]       c_mask;
  logic                    quota;       // one picture already output in this period

  // ---------------- occupancy and smallest waiting POC ----------------
  logic          min_valid, free_valid;
  logic [FW-1:0] min_fs, free_fs;
  logic signed [POC_W-1:0] min_poc;
  always_comb begin
    dpb_count = '0; rb_count = '0;
    min_valid = 1'b0; min_fs = '0; min_poc = '0;
    free_valid = 1'b0; free_fs = '0;
    for (int i = 0; i < NUM_FS; i++) begin
      if (st[i] == FS_DPB) dpb_count = dpb_count + 1'b1;
      if (st[i] == FS_RB)  rb_count  = rb_count + 1'b1;
      if ((st[i] == FS_DPB || st[i] == FS_RB) && needed[i] &&
          (!min_valid || poc[i] < min_poc)) begin
        min_valid = 1'b1; min_fs = FW'(i); min_poc = poc[i];
      end
      if (st[i] == FS_FREE && !free_valid) begin
        free_valid = 1'b1; free_fs = FW'(i);
      end
    end
  end

  logic rb_waiting;
  always_comb begin
    rb_waiting = 1'b0;
    for (int i = 0; i < NUM_FS; i++) rb_waiting |= (st[i] == FS_RB) && needed[i];
  end

  assign ready       = (eng == E_WAIT);
  assign cur_valid   = (eng == E_WAIT);
  assign flush_empty = !min_valid;

  // ---------------- decision of the check step ----------------
  // act_store: the current picture is kept, in state store_where
  // act_out_cur: the current picture is the one output
  // act_out_min: the smallest waiting picture (min_fs) is output
  logic      act_store, act_out_cur, act_out_min, act_rb, act_loop, act_err;
  fs_state_e store_where;
  always_comb begin
    act_store = 1'b1; act_out_cur = 1'b0; act_out_min = 1'b0;
    act_rb = 1'b0; act_loop = 1'b0; act_err = 1'b0;
    store_where = FS_DPB;
    if (32'(dpb_count) < DPB_SIZE) begin
      // DPB has room: keep the current picture; the RB may release one picture.
      if (rb_waiting && !quota) begin
        if (c_poc < min_poc) begin
          act_out_cur = 1'b1;
          store_where = c_ref ? FS_DPB : FS_DISP;
        end else begin
          act_out_min = 1'b1;
        end
      end
    end else if (!c_ref && (!min_valid || c_poc < min_poc)) begin
      // current picture precedes every waiting picture
      if (quota) begin
        store_where = FS_RB; act_rb = 1'b1;
        act_err = (32'(rb_count) >= NUM_FS - DPB_SIZE);
      end else begin
        store_where = FS_DISP; act_out_cur = 1'b1;
      end
    end else if (quota || !min_valid) begin
      // one picture has been output already (or nothing can be bumped)
      store_where = FS_RB; act_rb = 1'b1;
      act_err = (32'(rb_count) >= NUM_FS - DPB_SIZE) || !min_valid;
    end else begin
      act_store = 1'b0; act_out_min = 1'b1; act_loop = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_FS; i++) begin
        st[i]  <= FS_FREE;
        poc[i] <= '0;
      end
      is_ref <= '0; needed <= '0;
      eng    <= E_ALLOC;
      cur_fs <= '0;
      c_poc  <= '0; c_ref <= 1'b0; c_mask <= '0; quota <= 1'b0;
      out_valid <= 1'b0; out_fs <= '0; out_poc <= '0;
      n_direct <= '0; n_rb_insert <= '0; n_out_rb <= '0; n_out_dpb <= '0; n_stall <= '0;
      error <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      unique case (eng)
        E_ALLOC: begin
          if (free_valid) begin
            st[free_fs] <= FS_CUR;
            cur_fs      <= free_fs;
            eng         <= E_WAIT;
          end else begin
            n_stall <= n_stall + 1'b1;
          end
        end
        E_WAIT: begin
          if (pic_done) begin
            c_poc <= pic_poc; c_ref <= pic_is_ref; c_mask <= unref_mask;
            quota <= 1'b0;
            eng   <= E_MARK;
          end else if (flush) begin
            eng <= E_FLUSH;
          end
        end
        E_MARK: begin
          for (int i = 0; i < NUM_FS; i++) begin
            if (c_mask[i] && (st[i] == FS_DPB || st[i] == FS_RB)) is_ref[i] <= 1'b0;
            if (st[i] == FS_DISP) st[i] <= FS_FREE;
          end
          eng <= E_REMOVE;
        end
        E_REMOVE: begin
          for (int i = 0; i < NUM_FS; i++)
            if ((st[i] == FS_DPB || st[i] == FS_RB) && !is_ref[i] && !needed[i])
              st[i] <= FS_FREE;
          eng <= E_CHECK;
        end
        E_CHECK: begin
          eng <= act_loop ? E_REMOVE : E_ALLOC;
          if (act_loop) quota <= 1'b1;
          if (act_store) begin
            st[cur_fs]     <= store_where;
            poc[cur_fs]    <= c_poc;
            is_ref[cur_fs] <= c_ref;
            needed[cur_fs] <= !act_out_cur;
          end
          if (act_out_cur) begin
            out_valid <= 1'b1; out_fs <= cur_fs; out_poc <= c_poc;
            n_direct  <= n_direct + 1'b1;
          end
          if (act_out_min) begin
            needed[min_fs] <= 1'b0;
            if (st[min_fs] == FS_RB || !is_ref[min_fs]) st[min_fs] <= FS_DISP;
            out_valid <= 1'b1; out_fs <= min_fs; out_poc <= min_poc;
            if (st[min_fs] == FS_RB) n_out_rb  <= n_out_rb + 1'b1;
            else                     n_out_dpb <= n_out_dpb + 1'b1;
          end
          if (act_rb)  n_rb_insert <= n_rb_insert + 1'b1;
          if (act_err) error <= 1'b1;
        end
        E_FLUSH: begin
          for (int i = 0; i < NUM_FS; i++)
            if (st[i] == FS_DISP) st[i] <= FS_FREE;
          if (min_valid) begin
            needed[min_fs] <= 1'b0;
            if (st[min_fs] == FS_RB || !is_ref[min_fs]) st[min_fs] <= FS_DISP;
            out_valid <= 1'b1; out_fs <= min_fs; out_poc <= min_poc;
            if (st[min_fs] == FS_RB) n_out_rb  <= n_out_rb + 1'b1;
            else                     n_out_dpb <= n_out_dpb + 1'b1;
          end
          eng <= E_WAIT;
        end
        default: eng <= E_ALLOC;
      endcase
    end
  end

  // Constant rate: no two outputs within one picture period.
  logic out_in_period;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                         out_in_period <= 1'b0;
    else if (eng == E_WAIT && (pic_done || flush)) out_in_period <= 1'b0;
    else if (out_valid)                 out_in_period <= 1'b1;
  end
  assert property (@(posedge clk) disable iff (!rst_n) !(out_valid && out_in_period))
    else $error("bumping_ctrl: more than one output in one picture period");
endmodule
