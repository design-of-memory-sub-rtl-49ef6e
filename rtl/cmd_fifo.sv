// Command FIFO with row-miss detection for adaptive auto precharge.
//
// Each entry holds one DRAM request (bank, row, column, read/write) and a hit flag. A new
// entry is written with hit = 1. When the next request arrives, it is compared with the
// most recently written entry, the "current" one: B is set when the two address the same
// bank and R when they address the same row, and the current entry's flag becomes
// Hit = ~B | R. A flag of 0 therefore marks an access that is followed by a different row
// in the same bank, and the controller issues it with auto precharge; a flag of 1 keeps
// the row open. The entry structure, the default of 1 and the formula follow the
// document; the depth of 8 is this design's choice.
//
// Timing: a request pushed in cycle t is visible at the head from t+1. If the head is the
// current entry and a new request is pushed in the same cycle, the head's flag shown on
// head_hit already includes the comparison, so no decision is lost when the FIFO runs
// nearly empty. If the current entry has already left the FIFO when the next request
// arrives, it was issued with the default flag of 1.
module cmd_fifo
  import mem_pkg::*;
#(
  parameter int unsigned DEPTH = 8
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     push,
  input  mem_req_t push_req,
  output logic     full,
  input  logic     pop,
  output logic     empty,
  output mem_req_t head_req,
  output logic     head_hit,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = $clog2(DEPTH);

  cmd_entry_t    mem [DEPTH];
  logic [AW-1:0] wptr, rptr, last;   // last: index of the current (newest) entry
  logic          do_push, do_pop;
  logic          same_bank, same_row, new_hit;

  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign empty   = (count == 0);
  assign full    = (count == DEPTH[$clog2(DEPTH+1)-1:0]);

  // Comparators: B (bank equal) and R (row equal); hit = not B, or R.
  assign same_bank = (mem[last].req.bank == push_req.bank);
  assign same_row  = (mem[last].req.row  == push_req.row);
  assign new_hit   = !same_bank || same_row;

  assign head_req = mem[rptr].req;
  assign head_hit = (do_push && !empty && (rptr == last)) ? (mem[rptr].hit & new_hit)
                                                          : mem[rptr].hit;

  function automatic logic [AW-1:0] incr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      last  <= '0;
      count <= '0;
    end else begin
      if (do_push) begin
        wptr <= incr(wptr);
        last <= wptr;
      end
      if (do_pop) rptr <= incr(rptr);
      count <= count + $bits(count)'(do_push) - $bits(count)'(do_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) begin
      mem[wptr] <= '{hit: 1'b1, req: push_req};
      // Update the current entry only while it is still queued.
      if (!empty && !(do_pop && rptr == last && count == 1))
        mem[last].hit <= mem[last].hit & new_hit;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(push && full))
    else $error("cmd_fifo: push while full");
endmodule
