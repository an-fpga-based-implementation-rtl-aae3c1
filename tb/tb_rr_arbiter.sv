// tb_rr_arbiter: self-checking test of the round-robin arbiter with five
// requesters. Random request patterns are applied; each grant must be the
// first requester after the previously granted one (cyclically), and with
// all five requesting continuously every channel must be served once in
// every five grants.
// Interface: none (top-level testbench); ends with a TB_RESULT line and
// $finish, and a watchdog stops a hung run. Timing: stimulus is applied at the
// falling clock edge and checked at or after the rising edge.
// The expected values follow the document's description of the block; the
// stimulus and the reference model are this testbench's.
module tb_rr_arbiter;
  localparam int N = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [N-1:0] req = 0, gnt;
  logic [2:0] gnt_idx;
  logic gnt_valid, advance = 0;

  rr_arbiter #(.N(N)) dut (.clk, .rst_n, .req, .advance, .gnt, .gnt_idx, .gnt_valid);

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
    int last, served [N];
    last = N - 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      int exp_idx;
      @(negedge clk);
      req = (i >= 4000) ? '1 : N'($urandom_range(0, (1 << N) - 1));
      advance = ($urandom_range(0, 3) != 0);
      #1;
      exp_idx = -1;
      for (int k = 1; k <= N; k++) if (exp_idx < 0 && req[(last + k) % N]) exp_idx = (last + k) % N;
      check(gnt_valid == (req != 0), "gnt_valid");
      if (exp_idx >= 0) begin
        check(int'(gnt_idx) == exp_idx && gnt == N'(1) << exp_idx,
              $sformatf("req %b last %0d: grant %0d exp %0d", req, last, gnt_idx, exp_idx));
        if (advance) last = exp_idx;
      end
      if (i == 4000) for (int k = 0; k < N; k++) served[k] = 0;
      if (i >= 4000 && advance) served[exp_idx]++;
    end
    begin
      int mn, mx;
      mn = 1 << 30; mx = 0;
      for (int k = 0; k < N; k++) begin if (served[k] < mn) mn = served[k]; if (served[k] > mx) mx = served[k]; end
      check(mx - mn <= 1, $sformatf("unfair service %0d..%0d", mn, mx));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
