// dma: the multi-channel DMA that moves every frame between the processing
// blocks and the external memory. Three write channels (I(n), D(n), E) and two
// read channels (R(n), D(n-1)), each with a 4 KB FIFO, share one memory port
// through the DMA controller (dma_ctrl), which holds the channels' descriptors
// and arbitrates round-robin.
//
// Pixel streams use valid/ready. Channel numbering and descriptor layout are
// in seg_pkg. `start` (one cycle, with the DMA idle between frames) loads the
// descriptors for the next frame. wr_done[c] rises once write channel c has
// stored its whole frame.
// Interface: arrays wr_*[3] and rd_*[2] of pixel streams, desc[5], and the
// word-addressed memory port (mem_*). Timing: each channel moves one pixel per
// cycle; the memory port moves one 64-bit word per cycle during a burst.
// Follows the document: 4 KB FIFO per channel, 2 KB write bursts, half-empty
// read requests, round-robin arbitration, a descriptor cache. This design's
// choice: five channels, 64-bit words, ping-pong descriptors.
module dma
  import seg_pkg::*;
#(
  parameter int unsigned DEPTH = FIFO_BYTES / (MEM_W / 8),
  parameter int unsigned BURST = BURST_BYTES / (MEM_W / 8),
  localparam int unsigned CW = $clog2(N_CH)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [2*COORD_W-1:0] frame_pixels,
  input  dma_desc_t   desc [N_CH],
  // write channel pixel inputs
  input  logic        wr_valid [N_WR],
  input  pix_t        wr_pix   [N_WR],
  output logic        wr_ready [N_WR],
  output logic        wr_done  [N_WR],
  // read channel pixel outputs
  output logic        rd_valid [N_RD],
  output pix_t        rd_pix   [N_RD],
  input  logic        rd_ready [N_RD],
  // memory port
  output logic        mem_valid,
  input  logic        mem_ready,
  output logic        mem_we,
  output addr_t       mem_addr,
  output word_t       mem_wdata,
  input  logic        mem_rvalid,
  input  word_t       mem_rdata,
  output logic        frame_parity,
  output logic [CW-1:0] cur_ch,
  output logic        busy
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [AW:0] wr_level [N_WR];
  logic        wr_packed [N_WR];
  word_t       wr_data [N_WR];
  logic        wr_pop [N_WR];
  logic [AW:0] rd_level [N_RD];
  logic        rd_push [N_RD];

  for (genvar c = 0; c < N_WR; c++) begin : g_wr
    dma_wr_channel #(.DEPTH(DEPTH)) u_ch (
      .clk, .rst_n, .start, .frame_pixels,
      .pix_valid(wr_valid[c]), .pix(wr_pix[c]), .pix_ready(wr_ready[c]),
      .ctl_pop(wr_pop[c]), .ctl_data(wr_data[c]), .ctl_level(wr_level[c]),
      .packed_all(wr_packed[c])
    );
  end

  for (genvar c = 0; c < N_RD; c++) begin : g_rd
    dma_rd_channel #(.DEPTH(DEPTH)) u_ch (
      .clk, .rst_n, .start, .frame_pixels,
      .pix_valid(rd_valid[c]), .pix(rd_pix[c]), .pix_ready(rd_ready[c]),
      .ctl_push(rd_push[c]), .ctl_data(mem_rdata), .ctl_level(rd_level[c])
    );
  end

  dma_ctrl #(.DEPTH(DEPTH), .BURST(BURST)) u_ctrl (
    .clk, .rst_n, .start, .frame_pixels, .desc_in(desc),
    .wr_level, .wr_packed, .wr_data, .wr_pop, .wr_done,
    .rd_level, .rd_push,
    .mem_valid, .mem_ready, .mem_we, .mem_addr, .mem_wdata, .mem_rvalid,
    .frame_parity, .cur_ch, .busy
  );

endmodule
