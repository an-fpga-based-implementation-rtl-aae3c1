// tb_seg_top: end-to-end test of the segmentation system on small frames
// (64x40, six frames, random camera and memory stalls). See
// seg_top_tb_body.svh for the frame plan and the checks; every mechanism
// (background capture, background and previous-frame reference, on-line
// filter size change, camera stall, all DMA channels, ping-pong buffers,
// threshold steps up, down and hold) must occur.
// Interface: none (top-level testbench); ends with a TB_RESULT line and
// $finish, and a watchdog stops a hung run. Timing: stimulus is applied at the
// falling clock edge and checked at or after the rising edge.
// The expected values follow the document's description of the block; the
// stimulus and the reference model are this testbench's.
module tb_seg_top;
  localparam int W = 64, H = 40, NF = 6;
  localparam bit GAPS = 1'b1, CHECK_MECH = 1'b1;
  localparam int WATCHDOG = 400000;
`include "seg_top_tb_body.svh"
endmodule
