// End-to-end test of the memory sub-system at its default parameters (1920x1088
// pictures, 4-picture DPB, 128-word synchronization buffer banks, 162 MHz DRAM timing,
// full 200 us power-up wait) connected to the mobile DDR SDRAM model.
//
// The testbench plays the video pipe. It decodes a stream of pictures in hierarchical-B
// coding order (I0 P8 B4 b2 b6 P16 B12 b10 b14, a deeper 8-picture pyramid, and after a
// flush one more anchor and B picture). Each picture is a number of block periods. In
// every period the pipe
//   - reads and checks, through the pipe port of the synchronization buffer, the data
//     fetched for it in the previous period: one luma and one chroma reference window
//     with random integer or fractional motion vectors, or, for one block in four, the
//     worst case of four 4x4 partitions with four fractional vectors, from a reference
//     frame store or any frame store, and the co-located motion data,
//   - writes the reconstructed 8x8 luma block, 4x4 Cb/Cr block and two motion words
//     that the memory sub-system stores in the next period,
//   - sends the block requests (stores, then fetches) and pulses fetch_done.
// The period ends with a buffer swap. Expected data comes from an independent model of
// the data arrangement (32x32 luma blocks in a bank checkerboard, one DRAM row per 2x2
// cluster, chroma with Cr/Cb interleaved after the luma, motion data after the chroma)
// and a record of every word stored; words never written read as the model's fill
// pattern. After each picture the frame store is handed to the bumping controller with
// sliding-window reference marking; its output order is checked against the POCs.
//
// Rate: the DRAM-side clocks of the periods are summed and the average per macroblock
// (4 periods) must stay within the real-time budget of 660 clocks (1920x1080 at 30
// pictures/s at 162 MHz); the worst-case blocks are averaged separately and must stay
// within the 940 clocks that Table I of the document gives for this case.
//
// Mechanism counters (failure if one never happens): activate, read, write, auto
// precharge, explicit single-bank precharge, precharge-all, auto refresh, power-down
// entry, row-hit column access, pipe stall on a busy translator, buffer swap, direct
// output, output from the DPB, regulation-buffer insert and regulation-buffer output.
// The DRAM model must report no protocol or timing violation.
//
// The stimulus and the checks are in mem_subsystem_e2e.svh, shared with the QCIF run.
`timescale 1ns/1ps
module tb_mem_subsystem;
  import mem_pkg::*;

  localparam int PIC_W = 1920, PIC_H = 1088;
`include "mem_subsystem_e2e.svh"

  mem_subsystem dut (.*);

  initial begin
    run_e2e();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
