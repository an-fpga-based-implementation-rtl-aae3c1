// tb_sta: self-checking test of the spatio-temporal adaptation. A sequence of
// Tg values with varying noise variance and weight is applied; Ts (Eq. 2),
// the three-level quantization Tq and the temporal selection of T(n) (one
// level towards Tq per frame, Tq directly on the first frame) are compared
// with a model kept here. Every up/down/hold case is required to occur.
// Interface: none (top-level testbench); ends with a TB_RESULT line and
// $finish, and a watchdog stops a hung run. Timing: stimulus is applied at the
// falling clock edge and checked at or after the rising edge.
// The expected values follow the document's description of the block; the
// stimulus and the reference model are this testbench's.
module tb_sta;
  import seg_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic go, tv;
  pix_t tg, q0, q1, q2, t;
  logic [15:0] sigma2;
  logic [7:0] alpha;
  logic [16:0] ts;
  logic [1:0] tq_idx, t_idx;

  sta dut (.clk, .rst_n, .go, .tg, .sigma2, .alpha, .q0, .q1, .q2, .ts, .tq_idx, .t_idx, .t, .t_valid(tv));

  int checks = 0, failures = 0;
  int ups = 0, downs = 0, holds = 0;

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
    int prev;
    go = 0; tg = 0; q0 = 20; q1 = 60; q2 = 120; sigma2 = 0; alpha = 0;
    prev = -1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      int ets, etq, et;
      @(negedge clk);
      tg = pix_t'($urandom_range(0, 160));
      sigma2 = 16'($urandom_range(0, 100));
      alpha = 8'($urandom_range(1, 255));
      ets = int'(tg) + (int'(alpha) * int'(sigma2)) / 256;
      etq = (ets >= int'(q2)) ? 2 : (ets >= int'(q1)) ? 1 : 0;
      if (prev < 0) et = etq;
      else if (etq > prev) begin et = prev + 1; ups++; end
      else if (etq < prev) begin et = prev - 1; downs++; end
      else begin et = prev; holds++; end
      go = 1;
      @(negedge clk);
      go = 0;
      check(tv, "t_valid one cycle after go");
      check(int'(ts) == ets, $sformatf("Ts %0d exp %0d", ts, ets));
      check(int'(tq_idx) == etq, $sformatf("Tq %0d exp %0d", tq_idx, etq));
      check(int'(t_idx) == et, $sformatf("T idx %0d exp %0d", t_idx, et));
      check(int'(t) == ((et == 2) ? int'(q2) : (et == 1) ? int'(q1) : int'(q0)), "T value");
      prev = et;
    end
    check(ups > 0 && downs > 0 && holds > 0, "not all temporal cases seen");
    $display("ups=%0d downs=%0d holds=%0d", ups, downs, holds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
