// End-to-end test of the memory sub-system at QCIF size (176x144), the picture size of
// the test sequences the sub-system was first evaluated with. Same stimulus and checks
// as tb_mem_subsystem (see mem_subsystem_e2e.svh): the same hierarchical-B picture
// stream, 8x8 and worst-case four-partition fetches, stores with motion data, bumping
// order, every DRAM mechanism and the clocks-per-macroblock checks. Only PIC_W and
// PIC_H differ. At this size a frame store is 3 x 3 clusters of 64x64 luma, 9 DRAM rows
// per bank, so the run exercises the parameterised address map with another cluster
// pitch and frame-store spacing; block positions and the clipping of windows at the
// picture edges are drawn as in the HD run.
`timescale 1ns/1ps
module tb_mem_subsystem_qcif;
  import mem_pkg::*;

  localparam int PIC_W = 176, PIC_H = 144;
`include "mem_subsystem_e2e.svh"

  mem_subsystem #(.PIC_W(PIC_W), .PIC_H(PIC_H)) dut (.*);

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
