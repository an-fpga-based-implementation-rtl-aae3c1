// tb_seg_regs: self-checking test of the configuration registers: reset
// values, write/read-back of every register, the decoded outputs, and that
// unmapped addresses neither change anything nor read non-zero.
// Interface: none (top-level testbench); ends with a TB_RESULT line and
// $finish, and a watchdog stops a hung run. Timing: stimulus is applied at the
// falling clock edge and checked at or after the rising edge.
// The expected values follow the document's description of the block; the
// stimulus and the reference model are this testbench's.
module tb_seg_regs;
  import seg_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cfg_we = 0; logic [5:0] cfg_addr = 0; logic [31:0] cfg_wdata = 0, cfg_rdata;
  seg_cfg_t cfg;
  dma_desc_t desc [N_CH];

  seg_regs dut (.clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata, .cfg_rdata, .cfg, .desc);

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  task automatic wr(int a, logic [31:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = 6'(a); cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask

  task automatic rd(int a, output logic [31:0] d);
    cfg_addr = 6'(a);
    #1;
    d = cfg_rdata;
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] masks [10];
    logic [31:0] got;
    masks = '{32'hFFF, 32'hFFF, 32'hFF, 32'hFFF, 32'hFFFF_FFFF, 32'hFFFF, 32'hFF, 32'hFF, 32'hFF, 32'hFF};
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(cfg.width == 352 && cfg.height == 288 && cfg.blk_w == 88, "reset geometry");
    check(cfg.q0 == 16 && cfg.q1 == 32 && cfg.q2 == 64 && cfg.alpha == 128, "reset levels");
    for (int c = 0; c < N_CH; c++) check(!desc[c].en, "reset descriptor disabled");
    for (int r = 0; r < 3; r++) begin
      logic [31:0] v [10];
      logic [31:0] dv [N_CH];
      for (int a = 0; a < 10; a++) begin v[a] = $urandom & masks[a]; wr(a, v[a]); end
      for (int c = 0; c < N_CH; c++) begin dv[c] = $urandom & 32'hE0FF_FFFF; wr(16 + c, dv[c]); end
      wr(12, 32'hFFFF_FFFF);   // unmapped
      @(negedge clk);
      for (int a = 0; a < 10; a++) begin
        rd(a, got); check(got == v[a], $sformatf("reg %0d read %h exp %h", a, got, v[a]));
      end
      for (int c = 0; c < N_CH; c++) begin rd(16 + c, got); check(got == dv[c], $sformatf("desc %0d", c)); end
      rd(12, got); check(got == 0, "unmapped reads zero");
      check(cfg.width == v[0][11:0] && cfg.height == v[1][11:0], "width/height outputs");
      check({cfg.max_kh, cfg.max_kw, cfg.avg_kh, cfg.avg_kw} == v[2][7:0], "filter size outputs");
      check(cfg.blk_recip == v[4] && cfg.sigma2 == v[5][15:0] && cfg.q2 == v[9][7:0], "threshold outputs");
      for (int c = 0; c < N_CH; c++)
        check(desc[c].en == dv[c][31] && desc[c].pp == dv[c][30] && desc[c].ph == dv[c][29] &&
              desc[c].base == dv[c][23:0], $sformatf("desc %0d outputs", c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
