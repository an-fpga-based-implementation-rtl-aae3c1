// tb_st_threshold: self-checking test of the spatio-temporal thresholding
// stage (block extractor, four IHA units, TE and STA together). Motion frames
// with a bright moving region are streamed with gaps; after each frame Tg,
// Ts, Tq and T are compared with a model of Eq. 1, Eq. 2, the quantizer and
// the temporal selection. The time from the end of the frame to the new
// threshold is checked against the 3 + 258 + (2M+2) + 1 cycles of the design.
// Interface: none (top-level testbench); ends with a TB_RESULT line and
// $finish, and a watchdog stops a hung run. Timing: stimulus is applied at the
// falling clock edge and checked at or after the rising edge.
// The expected values follow the document's description of the block; the
// stimulus and the reference model are this testbench's.
module tb_st_threshold;
  import seg_pkg::*;

  localparam int M = 4, L = 4, W = 50, H = 20;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, dv = 0, d_done = 0, t_valid, done, ready;
  pix_t dp = 0, tg, t;
  logic [16:0] ts;
  logic [1:0] tq_idx, t_idx;
  logic [31:0] recip;
  logic [15:0] sigma2;

  st_threshold #(.M(M), .L(L)) dut (.clk, .rst_n, .start, .width(COORD_W'(W)), .blk_w(COORD_W'(12)),
    .blk_recip(recip), .sigma2, .alpha(8'd64), .q0(8'd40), .q1(8'd80), .q2(8'd120),
    .d_valid(dv), .d_pix(dp), .d_done, .tg, .ts, .tq_idx, .t_idx, .t, .t_valid, .done, .ready);

  int checks = 0, failures = 0;
  int d [H][W];

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
    int tidx;
    tidx = -1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 24; f++) begin
      int acc, etg, ets, etq, et, cyc;
      sigma2 = 16'((f % 3) * 150 + (f / 8) * 97);
      for (int y = 0; y < H; y++) for (int x = 0; x < W; x++)
        d[y][x] = (x > 4 * (f % 10) && x < 4 * (f % 10) + 10 && y > 3 && y < 12) ? 150 + $urandom_range(0, 100) : $urandom_range(0, 30);
      // model: blocks of 12 columns, the last block takes columns 36..49
      acc = 0;
      for (int k = 0; k < M; k++) begin
        int hist [256], lam, x0, x1, n;
        longint unsigned sum, rc;
        for (int i = 0; i < 256; i++) hist[i] = 0;
        sum = 0;
        x0 = 12 * k; x1 = (k == M - 1) ? W : 12 * (k + 1);
        for (int y = 0; y < H; y++) for (int x = x0; x < x1; x++) begin hist[d[y][x]]++; sum += longint'(d[y][x]); end
        lam = 0;
        for (int l = 0; l < L; l++) begin
          int best, g;
          best = -1; g = 0;
          for (int b = l * 64; b < (l + 1) * 64; b++) if (hist[b] > best) begin best = hist[b]; g = b; end
          lam += g;
        end
        n = 12 * H;   // the reciprocal register describes a 12-column block
        rc = ((64'd1 << 32) + 64'(n) / 2) / 64'(n);
        acc += lam + int'((sum * rc + 64'h8000_0000) >> 32);
      end
      recip = 32'(((64'd1 << 32) + 64'(12 * H) / 2) / 64'(12 * H));
      etg = (2 * acc + M * (L + 1)) / (2 * M * (L + 1));
      ets = etg + (64 * int'(sigma2)) / 256;
      etq = (ets >= 120) ? 2 : (ets >= 80) ? 1 : 0;
      if (tidx < 0) tidx = etq; else if (etq > tidx) tidx++; else if (etq < tidx) tidx--;
      et = (tidx == 2) ? 120 : (tidx == 1) ? 80 : 40;
      @(negedge clk);
      while (!ready) @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      for (int i = 0; i < W * H; ) begin
        dv = ($urandom_range(0, 3) != 0);
        dp = pix_t'(d[i / W][i % W]);
        if (dv) i++;
        @(negedge clk);
      end
      dv = 0;
      d_done = 1;
      cyc = 0;
      while (!done) begin @(negedge clk); cyc++; end
      d_done = 0;
      check(int'(tg) == etg, $sformatf("frame %0d Tg %0d exp %0d", f, tg, etg));
      check(int'(ts) == ets, $sformatf("frame %0d Ts %0d exp %0d", f, ts, ets));
      check(int'(tq_idx) == etq, $sformatf("frame %0d Tq %0d exp %0d", f, tq_idx, etq));
      check(int'(t) == et, $sformatf("frame %0d T %0d exp %0d", f, t, et));
      check(cyc <= 3 + 258 + 2 * M + 2 + 4, $sformatf("threshold took %0d cycles after the frame", cyc));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
