// tb_iha: self-checking test of the Intensity Histogram Analysis unit. Thirty
// blocks are streamed with random gaps: the smallest block (two pixels), a
// block of a single gray value sent without gaps (back-to-back equal pixels
// exercise the histogram forwarding), a block of values tied across all four
// sections (lowest level must win) and blocks of clustered values with runs.
// mu must equal the rounded average and lambda the sum of the per-section
// histogram peaks, both computed here; the scan time (256 + 2 cycles) is
// checked, and every frame after the first checks that the histogram was
// cleared.
// Interface: none (top-level testbench); ends with a TB_RESULT line and
// $finish, and a watchdog stops a hung run. Timing: stimulus is applied at the
// falling clock edge and checked at or after the rising edge.
// The expected values follow the document's description of the block; the
// stimulus and the reference model are this testbench's.
module tb_iha;
  import seg_pkg::*;

  localparam int L = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, iv, fe, rv, ready;
  pix_t ip, mu;
  logic [PIX_W+$clog2(L):0] lambda;
  logic [31:0] recip;

  iha #(.L(L)) dut (.clk, .rst_n, .start, .in_valid(iv), .in_pix(ip), .frame_end(fe),
                    .recip, .mu, .lambda, .res_valid(rv), .ready);

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; iv = 0; ip = 0; fe = 0; recip = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 30; f++) begin
      int n, k, hist [256], sum, lam, mu_ref, cyc;
      pix_t p;
      n = (f == 0) ? 2 : 50 + $urandom_range(0, 3000);   // smallest block: 2 pixels
      for (int i = 0; i < 256; i++) hist[i] = 0;
      sum = 0;
      @(negedge clk);
      while (!ready) @(negedge clk);
      recip = 32'(((64'd1 << 32) + 64'(n) / 2) / 64'(n));
      start = 1;
      @(negedge clk);
      start = 0;
      p = 0;
      k = 0;
      while (k < n) begin
        if (f == 1) p = 8'd77;                                      // one value only
        else if (f == 2) p = pix_t'(($urandom_range(0, 3) * 64) + 5); // ties across sections
        else if ($urandom_range(0, 2) != 0)                          // clustered values with runs
          p = pix_t'((f * 37 + $urandom_range(0, 60) * $urandom_range(0, 4)) % 256);
        iv = (f == 1) || ($urandom_range(0, 4) != 0);
        ip = p;
        if (iv) begin hist[p]++; sum += p; k++; end
        @(negedge clk);
      end
      iv = 0;
      // reference: most frequent gray level of each section (lowest on ties)
      lam = 0;
      for (int l = 0; l < L; l++) begin
        int best, g;
        best = -1; g = 0;
        for (int b = l * 256 / L; b < (l + 1) * 256 / L; b++) if (hist[b] > best) begin best = hist[b]; g = b; end
        lam += g;
      end
      mu_ref = (2 * sum + n) / (2 * n);
      fe = 1;
      @(negedge clk);
      fe = 0;
      cyc = 0;
      while (!rv) begin @(negedge clk); cyc++; end
      check(int'(lambda) == lam, $sformatf("frame %0d lambda %0d exp %0d", f, lambda, lam));
      check(int'(mu) == mu_ref, $sformatf("frame %0d mu %0d exp %0d", f, mu, mu_ref));
      check(cyc >= 256 && cyc <= 260, $sformatf("scan took %0d cycles", cyc));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
