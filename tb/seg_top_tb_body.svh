// Body shared by the end-to-end testbenches of seg_top. The including module
// defines W, H (frame size), NF (frames), GAPS (random camera gaps) and
// CHECK_MECH (require every mechanism to have occurred).
//
// Frame plan: frame 0 captures the background (reference channel off, I(0)
// stored as background); frame 1 uses the background as reference and also
// starts storing I(n); from frame 2 on the reference is the previous frame
// (reference mode switched on the fly). Filter sizes and the noise variance
// change from frame to frame. A model written here computes D(n), the
// threshold chain (block mu/lambda, Tg, Ts, Tq, T) and the edge frame E(n-1)
// for every frame; the E stream, the thresholds and the D and E frames stored
// in memory are compared with it.
// Interface: none of its own; it declares the DUT, the memory model and the
// checks inside the including module. Timing: 10 ns clock, stimulus at the
// falling edge, a WATCHDOG cycle limit set by the includer.
// Follows the document: the data flow, Eq. 1, Eq. 2 and the 2x2 edge rule.
// This testbench's choice: the frame plan and the stall pattern.

  import seg_pkg::*;

  localparam int M = 4, L = 4;
  localparam int FW = (W * H + 7) / 8;               // words per frame
  localparam int AWM = $clog2(6 * FW + 1);
  localparam int BASE_I = 0, BASE_BG = 2 * FW, BASE_D = 3 * FW, BASE_E = 5 * FW;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cfg_we = 0; logic [5:0] cfg_addr = 0; logic [31:0] cfg_wdata = 0, cfg_rdata;
  logic frame_start = 0, busy, frame_done;
  logic cam_valid = 0, cam_ready; pix_t cam_pix = 0;
  logic e_valid, e_bit;
  logic mem_valid, mem_ready, mem_we, mem_rvalid;
  addr_t mem_addr; word_t mem_wdata, mem_rdata;
  pix_t thr_cur, tg_cur;
  logic [1:0] thr_idx, thr_tq_idx;
  logic [16:0] thr_ts;
  logic thr_update, dma_parity, dma_busy, ovf;
  logic [2:0] dma_ch;

  seg_top dut (.clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata, .cfg_rdata, .frame_start, .busy,
    .frame_done, .cam_valid, .cam_pix, .cam_ready, .e_valid, .e_bit,
    .mem_valid, .mem_ready, .mem_we, .mem_addr, .mem_wdata, .mem_rvalid, .mem_rdata,
    .thr_cur, .tg_cur, .thr_idx, .thr_ts, .thr_tq_idx, .thr_update, .dma_parity, .dma_ch,
    .dma_busy, .ovf);

  ddr_model #(.AW(AWM), .LAT(6), .STALL(GAPS)) u_mem (.clk, .rst_n, .mem_valid, .mem_ready, .mem_we,
    .mem_addr, .mem_wdata, .mem_rvalid, .mem_rdata);

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 12) $display("FAIL: %s", what); end
  endtask

  // ---------------------------------------------------------------- model
  int img   [2][H][W];     // I(n) and I(n-1)
  int bg    [H][W];
  int ad    [H][W];
  int av    [H][W];
  int dcur  [H][W];        // D(n)
  int dprev [H][W];        // D(n-1)
  int ecur  [H][W];        // expected E(n-1)
  int t_model, t_prev_idx, tq_model, ts_model, tg_model, t_edge;
  int cur;                 // index of the current frame in img

  function automatic int taps(int k); return (k == 0) ? 1 : (k == 1) ? 3 : 5; endfunction

  task automatic gen_frame(int n);
    int ox, oy;
    ox = (n * W) / 8 + 2; oy = H / 4 + n;
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
      int v;
      v = ((x * 3 + y * 5) % 64) + 20 + $urandom_range(0, 7);
      if (x >= ox && x < ox + W / 6 && y >= oy && y < oy + H / 5) v = 200 + $urandom_range(0, 30);
      img[n % 2][y][x] = v;
    end
  endtask

  task automatic model_d(int n, int ref_mode, int akw, int akh, int mkw, int mkh);
    // ref_mode: 0 zero, 1 background, 2 previous frame
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
      int r, c;
      c = img[n % 2][y][x];
      r = (ref_mode == 0) ? 0 : (ref_mode == 1) ? bg[y][x] : img[(n + 1) % 2][y][x];
      ad[y][x] = (c > r) ? c - r : r - c;
    end
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
      int s, nn;
      s = 0; nn = taps(akw) * taps(akh);
      for (int dy = -taps(akh)/2; dy <= taps(akh)/2; dy++)
        for (int dx = -taps(akw)/2; dx <= taps(akw)/2; dx++)
          if (x+dx >= 0 && x+dx < W && y+dy >= 0 && y+dy < H) s += ad[y+dy][x+dx];
      av[y][x] = (2 * s + nn) / (2 * nn);
    end
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
      int m;
      m = 0;
      for (int dy = -taps(mkh)/2; dy <= taps(mkh)/2; dy++)
        for (int dx = -taps(mkw)/2; dx <= taps(mkw)/2; dx++)
          if (x+dx >= 0 && x+dx < W && y+dy >= 0 && y+dy < H && av[y+dy][x+dx] > m) m = av[y+dy][x+dx];
      dcur[y][x] = m;
    end
  endtask

  task automatic model_t(int n, int blk_w, longint unsigned recip, int sigma2, int alpha, int q0, int q1, int q2);
    int acc;
    acc = 0;
    for (int k = 0; k < M; k++) begin
      int hist [256], lam, x0, x1;
      longint unsigned sum;
      for (int i = 0; i < 256; i++) hist[i] = 0;
      sum = 0;
      x0 = k * blk_w; x1 = (k == M - 1) ? W : (k + 1) * blk_w;
      for (int y = 0; y < H; y++) for (int x = x0; x < x1; x++) begin
        hist[dcur[y][x]]++; sum += longint'(dcur[y][x]);
      end
      lam = 0;
      for (int l = 0; l < L; l++) begin
        int best, g;
        best = -1; g = 0;
        for (int b = l * 256 / L; b < (l + 1) * 256 / L; b++) if (hist[b] > best) begin best = hist[b]; g = b; end
        lam += g;
      end
      acc += lam + int'(((sum * recip) + 64'h8000_0000) >> 32);
    end
    tg_model = (2 * acc + M * (L + 1)) / (2 * M * (L + 1));
    ts_model = tg_model + (alpha * sigma2) / 256;
    tq_model = (ts_model >= q2) ? 2 : (ts_model >= q1) ? 1 : 0;
    if (n == 0) t_prev_idx = tq_model;
    else if (tq_model > t_prev_idx) t_prev_idx++;
    else if (tq_model < t_prev_idx) t_prev_idx--;
    t_model = (t_prev_idx == 2) ? q2 : (t_prev_idx == 1) ? q1 : q0;
  endtask

  task automatic model_e(int thr);
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
      bit e;
      e = 0;
      if (dprev[y][x] > thr)
        for (int sy = y - 1; sy <= y; sy++)
          for (int sx = x - 1; sx <= x; sx++)
            if (sx >= 0 && sy >= 0 && sx + 1 < W && sy + 1 < H)
              if (!(dprev[sy][sx] > thr && dprev[sy][sx+1] > thr && dprev[sy+1][sx] > thr && dprev[sy+1][sx+1] > thr))
                e = 1;
      ecur[y][x] = e;
    end
  endtask

  // --------------------------------------------------------- stimulus/monitor
  int nin = 1 << 30, ne = 0, nframe = 0;
  bit edge_on = 0;
  int stalls = 0, bursts [N_CH], parities [2], tq_lag = 0, t_hold = 0, t_up = 0, t_down = 0;
  int edge_px = 0, e_frames = 0, bg_frames = 0, capture_frames = 0, prev_frames = 0, size_changes = 0;
  logic dma_busy_q = 0;

  always @(posedge clk) if (rst_n) begin
    if (cam_valid && cam_ready) nin <= nin + 1;
    if (cam_valid && !cam_ready && busy) stalls <= stalls + 1;
    if (e_valid) begin
      if (!edge_on) check(0, "E output in a frame without edge detection");
      else begin
        check(int'(e_bit) == ecur[ne / W][ne % W], $sformatf("E(%0d) pixel %0d got %0d", nframe - 1, ne, e_bit));
        if (e_bit) edge_px <= edge_px + 1;
      end
      ne <= ne + 1;
    end
    dma_busy_q <= dma_busy;
    if (dma_busy && !dma_busy_q) begin
      bursts[dma_ch] <= bursts[dma_ch] + 1;
      parities[dma_parity] <= parities[dma_parity] + 1;
    end
  end

  always @(negedge clk) begin
    cam_valid = (nin < W * H) && (!GAPS || $urandom_range(0, 7) != 0);
    cam_pix   = (nin < W * H) ? pix_t'(img[cur][nin / W][nin % W]) : '0;
  end

  task automatic wr(int a, logic [31:0] d);
    @(negedge clk);
    cfg_we = 1; cfg_addr = 6'(a); cfg_wdata = d;
    @(negedge clk);
    cfg_we = 0;
  endtask

  function automatic logic [31:0] dsc(bit en, bit pp, bit ph, int base);
    return {en, pp, ph, 5'd0, 24'(base)};
  endfunction

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int blk_w, q0, q1, q2, alpha;
    longint unsigned recip;
    int prev_sizes;
    for (int c = 0; c < N_CH; c++) bursts[c] = 0;
    parities[0] = 0; parities[1] = 0;
    blk_w = W / M;
    recip = ((64'd1 << 32) + 64'(blk_w * H) / 2) / 64'(blk_w * H);
    q0 = 100; q1 = 150; q2 = 200; alpha = 128;
    prev_sizes = -1;
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    // reset values of the register file
    check(cfg_rdata == 32'd352, "reset width register");
    wr(0, W); wr(1, H); wr(3, blk_w); wr(4, 32'(recip));
    wr(6, alpha); wr(7, q0); wr(8, q1); wr(9, q2);
    for (int n = 0; n < NF; n++) begin
      int akw, akh, mkw, mkh, sigma2, ref_mode, cyc, sizes;
      cur = n % 2;
      gen_frame(n);
      if (n == 0) for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) bg[y][x] = img[0][y][x];
      // filter sizes: frame 0 with 5x5/5x5, then varying
      akw = (n == 0) ? 2 : n % 3;       akh = (n == 0) ? 2 : (n + 1) % 3;
      mkw = (n == 0) ? 2 : (n + 2) % 3; mkh = (n == 0) ? 2 : (n / 2) % 3;
      sizes = akw + 4 * akh + 16 * mkw + 64 * mkh;
      if (prev_sizes >= 0 && sizes != prev_sizes) size_changes++;
      prev_sizes = sizes;
      sigma2 = (n == 1 || n >= 4) ? 0 : 250;
      wr(2, {mkh[1:0], mkw[1:0], akh[1:0], akw[1:0]});
      wr(5, sigma2);
      // DMA descriptors for this frame
      ref_mode = (n == 0) ? 0 : (n == 1) ? 1 : 2;
      if (n == 0) begin
        wr(16 + CH_WR_I, dsc(1, 0, 0, BASE_BG));        // capture background
        wr(16 + CH_RD_R, dsc(0, 0, 0, 0));
        capture_frames++;
      end else if (n == 1) begin
        wr(16 + CH_WR_I, dsc(1, 1, 0, BASE_I));         // start keeping I(n)
        wr(16 + CH_RD_R, dsc(1, 0, 0, BASE_BG));        // background reference
        bg_frames++;
      end else begin
        wr(16 + CH_RD_R, dsc(1, 1, 1, BASE_I));         // previous-frame reference
        prev_frames++;
      end
      wr(16 + CH_WR_D, dsc(1, 1, 0, BASE_D));
      wr(16 + CH_RD_D, dsc(n > 0, 1, 1, BASE_D));
      wr(16 + CH_WR_E, dsc(n > 0, 0, 0, BASE_E));
      // model: E(n-1) with T(n-1), then D(n) and T(n)
      for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) dprev[y][x] = dcur[y][x];
      t_edge = t_model;
      if (n > 0) model_e(t_edge);
      model_d(n, ref_mode, akw, akh, mkw, mkh);
      begin
        int old_idx;
        old_idx = t_prev_idx;
        model_t(n, blk_w, recip, sigma2, alpha, q0, q1, q2);
        if (n > 0) begin
          if (t_prev_idx > old_idx) t_up++;
          else if (t_prev_idx < old_idx) t_down++;
          else t_hold++;
        end
        if (t_prev_idx != tq_model) tq_lag++;
      end
      // run the frame
      @(negedge clk);
      edge_on = (n > 0); ne = 0; nframe = n; nin = 0;
      frame_start = 1;
      @(negedge clk);
      frame_start = 0;
      cyc = 1;
      while (!frame_done) begin @(negedge clk); cyc++; end
      if (n > 0) e_frames++;
      $display("frame %0d: %0d cycles, Tg %0d Ts %0d Tq %0d T %0d (model Tg %0d Ts %0d Tq %0d T %0d)",
               n, cyc, tg_cur, thr_ts, thr_tq_idx, thr_cur, tg_model, ts_model, tq_model, t_model);
      check(nin == W * H, $sformatf("frame %0d: camera pixels taken %0d", n, nin));
      check(ne == ((n > 0) ? W * H : 0), $sformatf("frame %0d: E pixels %0d", n, ne));
      check(int'(tg_cur) == tg_model, $sformatf("frame %0d: Tg %0d exp %0d", n, tg_cur, tg_model));
      check(int'(thr_ts) == ts_model, $sformatf("frame %0d: Ts %0d exp %0d", n, thr_ts, ts_model));
      check(int'(thr_tq_idx) == tq_model, $sformatf("frame %0d: Tq %0d exp %0d", n, thr_tq_idx, tq_model));
      check(int'(thr_cur) == t_model, $sformatf("frame %0d: T %0d exp %0d", n, thr_cur, t_model));
      // D(n) in memory: buffer chosen by the DMA ping-pong parity of this frame
      begin
        int base_d, bad;
        base_d = BASE_D + ((dma_parity == 1'b1) ? FW : 0);
        bad = 0;
        for (int k = 0; k < W * H; k++)
          if (int'(u_mem.mem[base_d + k / 8][8 * (k % 8) +: 8]) != dcur[k / W][k % W]) bad++;
        check(bad == 0, $sformatf("frame %0d: %0d D pixels wrong in memory", n, bad));
        if (n > 0) begin
          bad = 0;
          for (int k = 0; k < W * H; k++)
            if (int'(u_mem.mem[BASE_E + k / 8][8 * (k % 8) +: 8]) != (ecur[k / W][k % W] ? 255 : 0)) bad++;
          check(bad == 0, $sformatf("frame %0d: %0d E pixels wrong in memory", n, bad));
        end
      end
      // rate: one pixel per clock plus about five rows of pipeline latency
      // (two filters and the edge flush) and a short DMA tail
      if (!GAPS) check(cyc <= W * (H + 5) + 600, $sformatf("frame %0d: %0d cycles", n, cyc));
    end
    check(!ovf, "a non-stallable stream overflowed its DMA FIFO");
    $display("mechanisms: capture=%0d bg_ref=%0d prev_ref=%0d size_changes=%0d stalls=%0d bursts=%0d/%0d/%0d/%0d/%0d parity=%0d/%0d T up=%0d down=%0d hold=%0d lag=%0d edge_px=%0d",
             capture_frames, bg_frames, prev_frames, size_changes, stalls, bursts[0], bursts[1], bursts[2], bursts[3], bursts[4],
             parities[0], parities[1], t_up, t_down, t_hold, tq_lag, edge_px);
    if (NF >= 3) check(capture_frames > 0 && bg_frames > 0 && prev_frames > 0, "reference modes not all used");
    for (int c = 0; c < N_CH; c++) check(bursts[c] > 0, $sformatf("DMA channel %0d never served", c));
    check(parities[0] > 0 && parities[1] > 0, "ping-pong buffers not both used");
    check(edge_px > 0, "no edge pixel produced");
    if (CHECK_MECH) begin
      check(size_changes > 0, "filter size never changed");
      check(stalls > 0, "camera stream never stalled");
      check(t_up > 0 && t_down > 0 && t_hold > 0, "temporal threshold adaptation cases missing");
      check(tq_lag > 0, "T never lagged Tq");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
