// tb_threshold_estimator: self-checking test of the TE. Random mu/lambda
// sets (including the extremes) are given; Tg is compared with Eq. 1,
// round(sum(lambda_k + mu_k) / (K*L + K)), and the pass must take 2M+2 cycles.
// Interface: none (top-level testbench); ends with a TB_RESULT line and
// $finish, and a watchdog stops a hung run. Timing: stimulus is applied at the
// falling clock edge and checked at or after the rising edge.
// The expected values follow the document's description of the block; the
// stimulus and the reference model are this testbench's.
module tb_threshold_estimator;
  import seg_pkg::*;

  localparam int M = 4, L = 4;
  localparam int LAMW = PIX_W + $clog2(L) + 1;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic go, tv;
  pix_t mu [M];
  logic [LAMW-1:0] lambda [M];
  pix_t tg;

  threshold_estimator #(.M(M), .L(L)) dut (.clk, .rst_n, .go, .mu, .lambda, .tg, .tg_valid(tv));

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    go = 0;
    for (int k = 0; k < M; k++) begin mu[k] = 0; lambda[k] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      int s, exp_tg, cyc;
      @(negedge clk);
      s = 0;
      for (int k = 0; k < M; k++) begin
        mu[k]     = (t == 0) ? 255 : (t == 1) ? 0 : pix_t'($urandom_range(0, 255));
        lambda[k] = (t == 0) ? LAMW'(L * 255) : (t == 1) ? '0 : LAMW'($urandom_range(0, L * 255));
        s += int'(mu[k]) + int'(lambda[k]);
      end
      exp_tg = (2 * s + M * (L + 1)) / (2 * M * (L + 1));
      go = 1;
      @(negedge clk);
      go = 0;
      cyc = 1;
      while (!tv) begin @(negedge clk); cyc++; end
      check(int'(tg) == exp_tg, $sformatf("Tg %0d exp %0d", tg, exp_tg));
      check(cyc == 2 * M + 2, $sformatf("TE took %0d cycles", cyc));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
