// tb_dma: self-checking test of the DMA (channels, FIFOs, controller and
// round-robin arbiter) against the behavioural memory model.
// Three frames of 2999 pixels (a partial last word) are run. Frame 1 only
// writes; frames 2 and 3 write new data while the two read channels read back
// the ping-pong buffers written in the previous frame. The memory contents,
// the read streams and the ping-pong placement are compared with patterns
// computed in the testbench.
// Interface: none (top-level testbench); ends with a TB_RESULT line and
// $finish, and a watchdog stops a hung run. Timing: stimulus is applied at the
// falling clock edge and checked at or after the rising edge.
// The expected values follow the document's description of the block; the
// stimulus and the reference model are this testbench's.
module tb_dma;
  import seg_pkg::*;

  localparam int NPIX = 2999;
  localparam int NW   = (NPIX + 7) / 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start;
  dma_desc_t desc [N_CH];
  logic wr_valid [N_WR]; pix_t wr_pix [N_WR]; logic wr_ready [N_WR]; logic wr_done [N_WR];
  logic rd_valid [N_RD]; pix_t rd_pix [N_RD]; logic rd_ready [N_RD];
  logic mem_valid, mem_ready, mem_we, mem_rvalid, frame_parity, busy;
  addr_t mem_addr; word_t mem_wdata, mem_rdata;
  logic [2:0] cur_ch;

  dma dut (.clk, .rst_n, .start, .frame_pixels(24'(NPIX)), .desc,
           .wr_valid, .wr_pix, .wr_ready, .wr_done, .rd_valid, .rd_pix, .rd_ready,
           .mem_valid, .mem_ready, .mem_we, .mem_addr, .mem_wdata, .mem_rvalid, .mem_rdata,
           .frame_parity, .cur_ch, .busy);

  ddr_model #(.AW(16), .LAT(5)) mem (.clk, .rst_n, .mem_valid, .mem_ready, .mem_we, .mem_addr,
           .mem_wdata, .mem_rvalid, .mem_rdata);

  int checks = 0, failures = 0;
  int frame;
  int wcnt [N_WR];
  int rcnt [N_RD];
  int contention = 0;
  int grants [N_CH];
  logic busy_q = 0;
  logic [2:0] last_ch = 0;

  function automatic pix_t pat(int f, int ch, int k);
    return pix_t'(k * 7 + ch * 31 + f * 13 + (k >> 8));
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  // write sources and read sinks with random pacing
  always_ff @(posedge clk) begin
    for (int c = 0; c < N_WR; c++) begin
      if (wr_valid[c] && wr_ready[c]) wcnt[c] <= wcnt[c] + 1;
    end
    for (int c = 0; c < N_RD; c++) begin
      if (rd_valid[c] && rd_ready[c]) begin
        // read channel 0 (R) reads write channel 0, channel 1 reads write channel 1
        if (rd_pix[c] !== pat(frame - 1, c, rcnt[c])) begin
          failures <= failures + 1;
          if (failures < 10) $display("FAIL: rd ch%0d pix %0d = %0d exp %0d", c, rcnt[c], rd_pix[c], pat(frame-1, c, rcnt[c]));
        end
        checks <= checks + 1;
        rcnt[c] <= rcnt[c] + 1;
      end
    end
    busy_q <= busy;
    if (busy && !busy_q) begin
      grants[cur_ch] <= grants[cur_ch] + 1;
      // round robin: after a burst of channel c, the same channel is granted
      // again only if no other was waiting; count switches as evidence
      if (cur_ch != last_ch) contention <= contention + 1;
      last_ch <= cur_ch;
    end
  end

  always_comb begin
    for (int c = 0; c < N_WR; c++) begin
      wr_pix[c] = pat(frame, c, wcnt[c]);
    end
  end
  always @(negedge clk) begin
    for (int c = 0; c < N_WR; c++) wr_valid[c] = (wcnt[c] < NPIX) && ($urandom_range(0, 3) != 0);
    for (int c = 0; c < N_RD; c++) rd_ready[c] = ($urandom_range(0, 3) != 0);
  end

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; frame = 0;
    for (int c = 0; c < N_CH; c++) grants[c] = 0;
    for (int c = 0; c < N_WR; c++) wcnt[c] = NPIX;
    for (int c = 0; c < N_RD; c++) rcnt[c] = NPIX;
    desc[CH_WR_I] = '{en: 1, pp: 1, ph: 0, base: 24'h0000};
    desc[CH_WR_D] = '{en: 1, pp: 1, ph: 0, base: 24'h2000};
    desc[CH_WR_E] = '{en: 1, pp: 0, ph: 0, base: 24'h4000};
    desc[CH_RD_R] = '{en: 0, pp: 1, ph: 1, base: 24'h0000};
    desc[CH_RD_D] = '{en: 0, pp: 1, ph: 1, base: 24'h2000};
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 1; f <= 3; f++) begin
      int cyc;
      @(posedge clk);
      frame <= f;
      for (int c = 0; c < N_WR; c++) wcnt[c] <= 0;
      for (int c = 0; c < N_RD; c++) rcnt[c] <= (f == 1) ? NPIX : 0;
      start <= 1;
      @(posedge clk);
      start <= 0;
      @(negedge clk);
      desc[CH_RD_R].en = 1; desc[CH_RD_D].en = 1;   // takes effect next frame
      @(posedge clk);
      cyc = 0;
      while (!(wr_done[0] && wr_done[1] && wr_done[2] && rcnt[0] == NPIX && rcnt[1] == NPIX && !busy)) begin
        @(posedge clk); cyc++;
      end
      // memory image of this frame
      for (int c = 0; c < N_WR; c++) begin
        int base;
        base = (c == 0) ? 0 : (c == 1) ? 'h2000 : 'h4000;
        if (c < 2 && (f % 2 == 0)) base += NW;     // second ping-pong buffer
        for (int k = 0; k < NPIX; k++)
          check(mem.mem[base + k / 8][8 * (k % 8) +: 8] == pat(f, c, k),
                $sformatf("mem frame %0d ch %0d pix %0d", f, c, k));
      end
      // five channels of NPIX each at 1 pixel per ~1.33 cycles must not take much longer than the sources
      check(cyc < 2 * NPIX, $sformatf("frame %0d took %0d cycles", f, cyc));
    end
    for (int c = 0; c < N_CH; c++) check(grants[c] > 0, $sformatf("channel %0d never granted", c));
    check(contention > 10, "arbiter never switched channels");
    $display("contention events=%0d", contention);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
