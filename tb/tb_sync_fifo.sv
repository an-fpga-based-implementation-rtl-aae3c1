// tb_sync_fifo: self-checking test of the channel FIFO at its default size
// (512 x 64 bits = 4 KB). Random pushes and pops are compared with a queue
// model; level, full and empty are checked every cycle, and the FIFO is
// filled completely once and drained completely once.
// Interface: none (top-level testbench); ends with a TB_RESULT line and
// $finish, and a watchdog stops a hung run. Timing: stimulus is applied at the
// falling clock edge and checked at or after the rising edge.
// The expected values follow the document's description of the block; the
// stimulus and the reference model are this testbench's.
module tb_sync_fifo;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic push = 0, pop = 0, full, empty;
  logic [63:0] wdata = 0, rdata;
  logic [9:0] level;

  sync_fifo dut (.clk, .rst_n, .push, .wdata, .pop, .rdata, .full, .empty, .level);

  int checks = 0, failures = 0;
  logic [63:0] q [$];
  bit seen_full = 0, seen_empty = 0;

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
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      int bias;
      @(negedge clk);
      check(int'(level) == q.size(), $sformatf("level %0d exp %0d", level, q.size()));
      check(full == (q.size() == 512) && empty == (q.size() == 0), "flags");
      if (q.size() > 0) check(rdata == q[0], "head data");
      if (full) seen_full = 1;
      if (empty && i > 100) seen_empty = 1;
      // phases: fill, random, drain, random
      bias = (i < 5000) ? 9 : (i < 10000) ? 5 : (i < 15000) ? 1 : 5;
      push = !full && ($urandom_range(0, 9) < bias);
      pop  = !empty && ($urandom_range(0, 9) >= bias);
      wdata = {$urandom, $urandom};
      @(posedge clk);
      if (pop) void'(q.pop_front());
      if (push) q.push_back(wdata);
    end
    check(seen_full && seen_empty, "FIFO never reached full and empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
