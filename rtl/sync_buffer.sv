// Synchronization buffer between the external DRAM and the video pipe.
//
// Two SRAM banks work as a ping-pong pair. While the DRAM side owns one bank - it first
// drains the reconstructed block the pipe left there, then fills it with the reference
// data of the next block - the video pipe works on the other bank: it reads the
// reference data fetched during the previous block period and writes the reconstructed
// block that goes back to DRAM. Each side signals the end of its work for the period
// with a one-clock done pulse; once both have done so, the banks swap (swap pulses for
// one clock and dram_bank toggles) and a new period begins. A done pulse arriving in
// the swap clock counts for the new period.
//
// Ports: d_* is the DRAM-side port and p_* the pipe-side port; both are single-port
// 64-bit wide (one read or write per clock, read data one clock after the request).
// Size: 2 banks x BANK_WORDS x 64 bits. The document gives two SRAM banks and an 8x8
// block granularity; the word organisation and the default of 128 words per bank are
// this design's. 128 words hold the worst 8x8 block of the document's Table I: four 4x4
// partitions, each with its own sub-pel window (4 x 9 lines x 2 bursts of luma, 4 x 3
// lines x 2 bursts of Cr/Cb), plus the 14-word reconstructed block and motion data.
module sync_buffer #(
  parameter int unsigned BANK_WORDS = 128,
  parameter int unsigned WIDTH      = 64
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // DRAM side
  input  logic                          d_en,
  input  logic                          d_we,
  input  logic [$clog2(BANK_WORDS)-1:0] d_addr,
  input  logic [WIDTH-1:0]              d_wdata,
  output logic [WIDTH-1:0]              d_rdata,
  input  logic                          d_done,
  // video pipe side
  input  logic                          p_en,
  input  logic                          p_we,
  input  logic [$clog2(BANK_WORDS)-1:0] p_addr,
  input  logic [WIDTH-1:0]              p_wdata,
  output logic [WIDTH-1:0]              p_rdata,
  input  logic                          p_done,
  // bank control
  output logic                          dram_bank,   // bank owned by the DRAM side
  output logic                          swap,
  output logic [31:0]                   n_swaps
);
  localparam int unsigned AW = $clog2(BANK_WORDS);

  logic             d_seen, p_seen;
  logic             en   [2];
  logic             we   [2];
  logic [AW-1:0]    addr [2];
  logic [WIDTH-1:0] din  [2];
  logic [WIDTH-1:0] dout [2];
  logic             d_bank_q;   // bank the DRAM side read from in the previous clock

  for (genvar i = 0; i < 2; i++) begin : g_bank
    always_comb begin
      if (dram_bank == 1'(i)) begin
        en[i] = d_en; we[i] = d_we; addr[i] = d_addr; din[i] = d_wdata;
      end else begin
        en[i] = p_en; we[i] = p_we; addr[i] = p_addr; din[i] = p_wdata;
      end
    end
    sp_sram #(.WIDTH(WIDTH), .WORDS(BANK_WORDS)) u_bank (
      .clk, .en(en[i]), .we(we[i]), .addr(addr[i]), .din(din[i]), .dout(dout[i])
    );
  end

  assign d_rdata = dout[d_bank_q];
  assign p_rdata = dout[!d_bank_q];
  assign swap    = (d_seen || d_done) && (p_seen || p_done);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dram_bank <= 1'b0;
      d_bank_q  <= 1'b0;
      d_seen    <= 1'b0;
      p_seen    <= 1'b0;
      n_swaps   <= '0;
    end else begin
      d_bank_q <= dram_bank;
      if (swap) begin
        dram_bank <= !dram_bank;
        d_seen    <= 1'b0;
        p_seen    <= 1'b0;
        n_swaps   <= n_swaps + 1'b1;
      end else begin
        d_seen <= d_seen || d_done;
        p_seen <= p_seen || p_done;
      end
    end
  end
endmodule
