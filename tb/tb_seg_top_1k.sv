// tb_seg_top_1k: end-to-end run of the segmentation system on 1024x1024
// frames, the frame size used for the system's speed figure (segmentation of
// a 1024x1024 frame at 133 MHz). Two frames: background capture, then one
// frame with the background as reference, during which the edge frame of the
// first is produced. Every output is compared with the model of
// seg_top_tb_body.svh, and the frame time (gap-free camera, no memory stalls)
// is checked against one pixel per clock plus the per-line filter overhead.
// Interface: none (top-level testbench); ends with a TB_RESULT line and
// $finish, and a watchdog stops a hung run. Timing: stimulus is applied at the
// falling clock edge and checked at or after the rising edge.
// The frame size follows the document; the frame plan and the model are this
// testbench's.
module tb_seg_top_1k;
  localparam int W = 1024, H = 1024, NF = 2;
  localparam bit GAPS = 1'b0, CHECK_MECH = 1'b0;
  localparam int WATCHDOG = 3000000;
`include "seg_top_tb_body.svh"

  // Backstop in simulated time, beyond the cycle watchdog of the body.
  initial begin
    #(64'd50_000_000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
