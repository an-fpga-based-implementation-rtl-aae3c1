// tb_window_filter: self-checking test of the average and max window filters.
// Several frames of different sizes and every filter size combination are
// streamed (with random input gaps, and once without gaps to check the rate
// of one pixel per cycle); each output pixel is compared with a zero-padded
// reference filter computed here.
// Interface: none (top-level testbench); ends with a TB_RESULT line and
// $finish, and a watchdog stops a hung run. Timing: stimulus is applied at the
// falling clock edge and checked at or after the rising edge.
// The expected values follow the document's description of the block; the
// stimulus and the reference model are this testbench's.
module tb_window_filter;
  import seg_pkg::*;

  localparam int MAXW = 64;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start;
  logic [COORD_W-1:0] width, height;
  ksize_t kw, kh;
  logic in_valid;
  pix_t in_pix;
  logic rdy_a, rdy_m, ov_a, ov_m, done_a, done_m;
  pix_t op_a, op_m;

  window_filter #(.IS_MAX(1'b0), .MAXW(MAXW)) u_avg (.clk, .rst_n, .start, .width, .height,
    .kw, .kh, .in_valid(in_valid && rdy_m), .in_pix, .in_ready(rdy_a), .out_valid(ov_a), .out_pix(op_a), .done(done_a));
  window_filter #(.IS_MAX(1'b1), .MAXW(MAXW)) u_max (.clk, .rst_n, .start, .width, .height,
    .kw, .kh, .in_valid(in_valid && rdy_a), .in_pix, .in_ready(rdy_m), .out_valid(ov_m), .out_pix(op_m), .done(done_m));

  int checks = 0, failures = 0;
  pix_t img [64][64];
  int na = 0, nm = 0, nin = 1 << 20;
  bit gaps;

  function automatic int taps(ksize_t k); return (k == 0) ? 1 : (k == 1) ? 3 : 5; endfunction

  function automatic int ref_px(bit is_max, int x, int y);
    int s = 0, m = 0, rw, rh;
    rw = taps(kw) / 2; rh = taps(kh) / 2;
    for (int dy = -rh; dy <= rh; dy++)
      for (int dx = -rw; dx <= rw; dx++) begin
        int v = 0;
        if (x + dx >= 0 && x + dx < int'(width) && y + dy >= 0 && y + dy < int'(height))
          v = img[y + dy][x + dx];
        s += v;
        if (v > m) m = v;
      end
    if (is_max) return m;
    return (2 * s + taps(kw) * taps(kh)) / (2 * taps(kw) * taps(kh));
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (ov_a) begin
      check(int'(op_a) == ref_px(0, na % int'(width), na / int'(width)),
            $sformatf("avg px %0d got %0d exp %0d k=%0d,%0d", na, op_a, ref_px(0, na % int'(width), na / int'(width)), kw, kh));
      na <= na + 1;
    end
    if (ov_m) begin
      check(int'(op_m) == ref_px(1, nm % int'(width), nm / int'(width)), $sformatf("max px %0d", nm));
      nm <= nm + 1;
    end
    if (in_valid && rdy_a && rdy_m) nin <= nin + 1;
  end

  always @(negedge clk) begin
    in_valid = (nin < int'(width) * int'(height)) && (!gaps || $urandom_range(0, 2) != 0);
    in_pix   = (nin < int'(width) * int'(height)) ? img[nin / int'(width)][nin % int'(width)] : '0;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; width = 8; height = 4; kw = 0; kh = 0; nin = 1 << 20; na = 0; nm = 0; gaps = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 12; f++) begin
      int cyc;
      @(negedge clk);
      width  = (f == 11) ? 64 : 5 + $urandom_range(0, 30);
      height = (f == 11) ? 20 : 3 + $urandom_range(0, 12);
      kw = ksize_t'(f % 3); kh = ksize_t'((f / 3) % 3);
      gaps = (f != 11);
      for (int y = 0; y < int'(height); y++)
        for (int x = 0; x < int'(width); x++) img[y][x] = pix_t'($urandom_range(0, 255));
      start = 1; nin = 0; na = 0; nm = 0;
      @(negedge clk);
      start = 0;
      cyc = 0;
      @(negedge clk);
      while (!(done_a && done_m)) begin @(negedge clk); cyc++; end
      check(na == int'(width) * int'(height), $sformatf("avg count %0d", na));
      check(nm == int'(width) * int'(height), $sformatf("max count %0d", nm));
      if (!gaps)
        check(cyc <= int'(width) * (int'(height) + 2) + 8,
              $sformatf("rate: %0d cycles for %0dx%0d", cyc, width, height));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
