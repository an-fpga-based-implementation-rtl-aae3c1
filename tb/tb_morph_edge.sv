// tb_morph_edge: self-checking test of thresholding plus 2x2 morphological
// edge detection. Random blob frames of several sizes are thresholded and
// edge-detected; the edge frame is compared with a direct evaluation of the
// rule (a white pixel is an edge pixel if some 2x2 square inside the frame
// that contains it is not all white). The rate (one pixel per cycle plus a
// flush of width+1 cycles) is checked on a gap-free frame.
// Interface: none (top-level testbench); ends with a TB_RESULT line and
// $finish, and a watchdog stops a hung run. Timing: stimulus is applied at the
// falling clock edge and checked at or after the rising edge.
// The expected values follow the document's description of the block; the
// stimulus and the reference model are this testbench's.
module tb_morph_edge;
  import seg_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, dv, rdy, ev, eb, done;
  logic [COORD_W-1:0] width, height;
  pix_t thr, dp;

  morph_edge #(.MAXW(64)) dut (.clk, .rst_n, .start, .width, .height, .thr,
    .d_valid(dv), .d_pix(dp), .in_ready(rdy), .e_valid(ev), .e_bit(eb), .done);

  int checks = 0, failures = 0;
  int img [40][64];
  int nin = 1 << 20, ne = 0;
  bit gaps;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  function automatic bit bw(int x, int y); return img[y][x] > int'(thr); endfunction

  function automatic bit edge_ref(int x, int y);
    if (!bw(x, y)) return 0;
    for (int sy = y - 1; sy <= y; sy++)
      for (int sx = x - 1; sx <= x; sx++)
        if (sx >= 0 && sy >= 0 && sx + 1 < int'(width) && sy + 1 < int'(height))
          if (!(bw(sx, sy) && bw(sx+1, sy) && bw(sx, sy+1) && bw(sx+1, sy+1))) return 1;
    return 0;
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (dv && rdy) nin <= nin + 1;
    if (ev) begin
      check(eb == edge_ref(ne % int'(width), ne / int'(width)), $sformatf("E px %0d", ne));
      ne <= ne + 1;
    end
  end

  always @(negedge clk) begin
    int N;
    N = int'(width) * int'(height);
    dv = (nin < N) && (!gaps || $urandom_range(0, 3) != 0);
    dp = (nin < N) ? pix_t'(img[nin / int'(width)][nin % int'(width)]) : '0;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int whites = 0, edges = 0;
    start = 0; width = 8; height = 4; thr = 100; gaps = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 10; f++) begin
      int cyc;
      @(negedge clk);
      width = 2 + $urandom_range(0, 50); height = 2 + $urandom_range(0, 30);
      thr = pix_t'(60 + 10 * f);
      gaps = (f != 9);
      for (int y = 0; y < int'(height); y++) for (int x = 0; x < int'(width); x++) begin
        int cx, cy, d2;
        cx = int'(width) / 2; cy = int'(height) / 2;
        d2 = (x - cx) * (x - cx) + (y - cy) * (y - cy);
        img[y][x] = (d2 < (int'(width) * int'(height)) / 6 ? 180 : 30) + $urandom_range(0, 70);
        if (img[y][x] > int'(thr)) whites++;
      end
      start = 1; nin = 0; ne = 0;
      @(negedge clk);
      start = 0;
      cyc = 0;
      @(negedge clk);
      while (!done) begin @(negedge clk); cyc++; end
      check(ne == int'(width) * int'(height), $sformatf("E count %0d", ne));
      if (!gaps) check(cyc <= int'(width) * int'(height) + int'(width) + 4, $sformatf("rate %0d cycles", cyc));
    end
    check(whites > 0, "no white pixels generated");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
