// tb_block_extractor: self-checking test of the block extractor. Frames of
// several widths and block widths are streamed with gaps; every pixel must
// come out one cycle later on exactly the block that holds its column (the
// last block also takes any columns beyond M*blk_w).
// Interface: none (top-level testbench); ends with a TB_RESULT line and
// $finish, and a watchdog stops a hung run. Timing: stimulus is applied at the
// falling clock edge and checked at or after the rising edge.
// The expected values follow the document's description of the block; the
// stimulus and the reference model are this testbench's.
module tb_block_extractor;
  import seg_pkg::*;

  localparam int M = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, iv;
  logic [COORD_W-1:0] width, blk_w;
  pix_t ip, op;
  logic [M-1:0] ov;

  block_extractor #(.M(M)) dut (.clk, .rst_n, .start, .width, .blk_w, .in_valid(iv), .in_pix(ip),
                                .out_valid(ov), .out_pix(op));

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; iv = 0; ip = 0; width = 16; blk_w = 4;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 6; f++) begin
      int n, exp_blk;
      @(negedge clk);
      blk_w = COORD_W'(2 + $urandom_range(0, 10));
      width = (f % 2) ? blk_w * M : blk_w * M + COORD_W'($urandom_range(1, 5));
      start = 1;
      @(negedge clk);
      start = 0;
      n = 0;
      while (n < int'(width) * 5) begin
        iv = ($urandom_range(0, 3) != 0);
        ip = pix_t'($urandom_range(0, 255));
        exp_blk = (n % int'(width)) / int'(blk_w);
        if (exp_blk > M - 1) exp_blk = M - 1;
        @(posedge clk);
        #1;
        if (iv) begin
          check(ov == M'(1) << exp_blk && op == ip, $sformatf("pixel %0d block %0d got %b", n, exp_blk, ov));
          n++;
        end else check(ov == '0, "spurious output");
        @(negedge clk);
      end
      iv = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
