// Synchronous FIFO used for the read and write data FIFOs of the external memory
// interface and for small queues in the memory sub-system.
//
// It is a circular buffer of DEPTH words with a read and a write pointer and an occupancy
// count. A word pushed in cycle t can be popped from cycle t+1; dout always shows the
// oldest word (first-word fall-through), so pop acts on the value currently visible.
// Pushing when full or popping when empty is ignored and flagged by an assertion.
// The document names the two data FIFOs and their widths (36-bit write beats, 32-bit
// read beats); depth and the fall-through behaviour are this design's choice.
module data_fifo #(
  parameter int unsigned WIDTH = 64,
  parameter int unsigned DEPTH = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       push,
  input  logic [WIDTH-1:0]           din,
  input  logic                       pop,
  output logic [WIDTH-1:0]           dout,
  output logic                       empty,
  output logic                       full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;

  logic do_push, do_pop;
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;

  assign empty = (count == 0);
  assign full  = (count == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign dout  = mem[rptr];

  function automatic logic [AW-1:0] incr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_push) wptr <= incr(wptr);
      if (do_pop)  rptr <= incr(rptr);
      count <= count + $bits(count)'(do_push) - $bits(count)'(do_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wptr] <= din;
  end

  // Overflow or underflow indicates a flow-control bug in the user of the FIFO.
  assert property (@(posedge clk) disable iff (!rst_n) !(push && full))
    else $error("data_fifo: push while full");
  assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty))
    else $error("data_fifo: pop while empty");
endmodule
