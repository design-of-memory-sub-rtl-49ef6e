// Single-port synchronous SRAM, one bank of the synchronization buffer.
//
// One access per clock: with en and we high, din is written to addr; with en high and we
// low, the word at addr appears on dout after the clock edge (one clock read latency).
// Written as an array so that a memory compiler or the synthesis tool can map it to a
// RAM macro. The document specifies SRAM banks; the single-port organisation is this
// design's choice.
module sp_sram #(
  parameter int unsigned WIDTH = 64,
  parameter int unsigned WORDS = 64
) (
  input  logic                     clk,
  input  logic                     en,
  input  logic                     we,
  input  logic [$clog2(WORDS)-1:0] addr,
  input  logic [WIDTH-1:0]         din,
  output logic [WIDTH-1:0]         dout
);
  logic [WIDTH-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= din;
      else    dout      <= mem[addr];
    end
  end
endmodule
