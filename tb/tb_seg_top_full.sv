// tb_seg_top_full: end-to-end test of the segmentation system at its default
// parameters on 352x288 frames (the size of the classic "Hall" test
// sequence), four frames: background capture, background reference, and two
// frames with the previous frame as reference. The camera delivers a pixel
// every cycle and the memory never stalls, so the frame time is checked
// against one pixel per clock.
// Interface: none (top-level testbench); ends with a TB_RESULT line and
// $finish, and a watchdog stops a hung run. Timing: stimulus is applied at the
// falling clock edge and checked at or after the rising edge.
// The expected values follow the document's description of the block; the
// stimulus and the reference model are this testbench's.
module tb_seg_top_full;
  localparam int W = 352, H = 288, NF = 4;
  localparam bit GAPS = 1'b0, CHECK_MECH = 1'b0;
  localparam int WATCHDOG = 2000000;
`include "seg_top_tb_body.svh"
endmodule
