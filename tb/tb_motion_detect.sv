// tb_motion_detect: self-checking test of the motion detector. Random current
// and reference frames (with random stream gaps) go through abs-difference,
// average and max filtering; D(n) is compared with a reference model computed
// here, for several filter sizes and for the zero-reference (background
// capture) setting.
// Interface: none (top-level testbench); ends with a TB_RESULT line and
// $finish, and a watchdog stops a hung run. Timing: stimulus is applied at the
// falling clock edge and checked at or after the rising edge.
// The expected values follow the document's description of the block; the
// stimulus and the reference model are this testbench's.
module tb_motion_detect;
  import seg_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, ref_en;
  logic [COORD_W-1:0] width, height;
  ksize_t akw, akh, mkw, mkh;
  logic cv, cr, rv, rr, dv, done;
  pix_t cp, rp, dp;

  motion_detect #(.MAXW(64)) dut (.clk, .rst_n, .start, .width, .height,
    .avg_kw(akw), .avg_kh(akh), .max_kw(mkw), .max_kh(mkh), .ref_en,
    .cur_valid(cv), .cur_pix(cp), .cur_ready(cr), .ref_valid(rv), .ref_pix(rp), .ref_ready(rr),
    .d_valid(dv), .d_pix(dp), .done);

  int checks = 0, failures = 0;
  int cimg [48][48], rimg [48][48], ad [48][48], av [48][48], dref [48][48];
  int nc = 1 << 20, nr = 1 << 20, nd = 0;

  function automatic int taps(ksize_t k); return (k == 0) ? 1 : (k == 1) ? 3 : 5; endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  task automatic model();
    int W, H;
    W = int'(width); H = int'(height);
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
      int r = ref_en ? rimg[y][x] : 0;
      ad[y][x] = (cimg[y][x] > r) ? cimg[y][x] - r : r - cimg[y][x];
    end
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
      int s = 0, n = taps(akw) * taps(akh);
      for (int dy = -taps(akh)/2; dy <= taps(akh)/2; dy++)
        for (int dx = -taps(akw)/2; dx <= taps(akw)/2; dx++)
          if (x+dx >= 0 && x+dx < W && y+dy >= 0 && y+dy < H) s += ad[y+dy][x+dx];
      av[y][x] = (2 * s + n) / (2 * n);
    end
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
      int m = 0;
      for (int dy = -taps(mkh)/2; dy <= taps(mkh)/2; dy++)
        for (int dx = -taps(mkw)/2; dx <= taps(mkw)/2; dx++)
          if (x+dx >= 0 && x+dx < W && y+dy >= 0 && y+dy < H && av[y+dy][x+dx] > m) m = av[y+dy][x+dx];
      dref[y][x] = m;
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (cv && cr) nc <= nc + 1;
    if (rv && rr) nr <= nr + 1;
    if (dv) begin
      check(int'(dp) == dref[nd / int'(width)][nd % int'(width)], $sformatf("D px %0d got %0d exp %0d", nd, dp, dref[nd / int'(width)][nd % int'(width)]));
      nd <= nd + 1;
    end
  end

  always @(negedge clk) begin
    int N;
    N = int'(width) * int'(height);
    cv = (nc < N) && ($urandom_range(0, 3) != 0);
    cp = (nc < N) ? pix_t'(cimg[nc / int'(width)][nc % int'(width)]) : '0;
    rv = (nr < N) && ($urandom_range(0, 3) != 0);
    rp = (nr < N) ? pix_t'(rimg[nr / int'(width)][nr % int'(width)]) : '0;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; width = 8; height = 4; akw = 0; akh = 0; mkw = 0; mkh = 0; ref_en = 1;
    nc = 1 << 20; nr = 1 << 20; nd = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 8; f++) begin
      @(negedge clk);
      width = 6 + $urandom_range(0, 40); height = 3 + $urandom_range(0, 20);
      akw = ksize_t'($urandom_range(0, 2)); akh = ksize_t'($urandom_range(0, 2));
      mkw = ksize_t'($urandom_range(0, 2)); mkh = ksize_t'($urandom_range(0, 2));
      if (f == 0) begin akw = 2; akh = 2; mkw = 2; mkh = 2; end
      ref_en = (f != 3);
      for (int y = 0; y < int'(height); y++) for (int x = 0; x < int'(width); x++) begin
        // a moving bright square on a noisy background
        cimg[y][x] = $urandom_range(0, 20) + ((x > f && x < f + 6 && y > 1 && y < 6) ? 200 : 0);
        rimg[y][x] = $urandom_range(0, 20);
      end
      model();
      start = 1; nc = 0; nr = ref_en ? 0 : 1 << 20; nd = 0;
      @(negedge clk);
      start = 0;
      @(negedge clk);
      while (!done) @(negedge clk);
      check(nd == int'(width) * int'(height), $sformatf("D count %0d", nd));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
