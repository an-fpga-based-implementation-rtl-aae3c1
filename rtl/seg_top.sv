// seg_top: spatio-temporal video object segmentation, one pixel per clock.
//
// Data flow per frame period n (all streams in raster order):
//   camera I(n) --+--> DMA write channel I  (stored as next reference or as
//                 |                          the background frame)
//                 +--> motion_detect <-- DMA read channel R (reference R(n))
//                         |
//                         D(n) --+--> DMA write channel D (kept for one frame)
//                                +--> st_threshold --> T(n) at frame end
//   DMA read channel D (D(n-1)) --> morph_edge (threshold T(n-1)) --> E(n-1)
//                                     --> DMA write channel E, and e_valid/e_bit
// The thresholding needs the whole frame before its threshold exists, so the
// motion frame is parked in memory and thresholded and edge-detected during
// the next frame period, with the threshold computed from it. Segmented
// output therefore lags the camera by one frame.
//
// Frame control: the host programs seg_regs (cfg_*), then pulses frame_start.
// When every unit is idle the controller issues one internal `start`, which
// makes the DMA load its descriptors and flip its ping-pong parity and makes
// each processing unit clear its counters; it also latches the threshold used
// for this frame's edge detection and whether the reference and D(n-1) read
// channels are enabled. With the reference channel disabled (capturing a
// background frame) the motion detector uses zero as reference; with the
// D(n-1) channel disabled (the first frame) the edge path stays idle. The
// frame ends (frame_done pulse, busy low) when D(n) has been produced, T(n)
// computed, E(n-1) produced and every write channel has stored its frame.
//
// Memory port: word-addressed 64-bit port to the DDR controller (request
// valid/ready, in-order read data). ovf is a sticky flag raised if a stream
// that cannot be stalled (D(n) or E) ever found its DMA FIFO full.
// Reference-mode switching is done by reprogramming descriptors between
// frames, as the described design does through its DMA registers.
// Timing: one pixel per clock; a frame of W x H pixels takes about
// W x (H+4) cycles plus a short DMA tail.
// Follows the document: the blocks, the data flow and the one-frame buffering
// of D(n). This design's choice: the frame controller, the start handshake and
// the zero reference during background capture.
module seg_top
  import seg_pkg::*;
#(
  parameter int unsigned MAXW = MAX_LINE,   // maximum line width
  parameter int unsigned M    = 4,          // vertical blocks / IHA units
  parameter int unsigned L    = 4           // histogram sections
) (
  input  logic        clk,
  input  logic        rst_n,
  // host registers
  input  logic        cfg_we,
  input  logic [5:0]  cfg_addr,
  input  logic [31:0] cfg_wdata,
  output logic [31:0] cfg_rdata,
  // frame control
  input  logic        frame_start,
  output logic        busy,
  output logic        frame_done,
  // camera input I(n)
  input  logic        cam_valid,
  input  pix_t        cam_pix,
  output logic        cam_ready,
  // edge output E(n-1)
  output logic        e_valid,
  output logic        e_bit,
  // memory port to the DDR controller
  output logic        mem_valid,
  input  logic        mem_ready,
  output logic        mem_we,
  output addr_t       mem_addr,
  output word_t       mem_wdata,
  input  logic        mem_rvalid,
  input  word_t       mem_rdata,
  // status
  output pix_t        thr_cur,      // T(n) of the last completed frame
  output pix_t        tg_cur,       // its Tg
  output logic [1:0]  thr_idx,      // its level index
  output logic [16:0] thr_ts,       // its noise-adapted Ts
  output logic [1:0]  thr_tq_idx,   // its quantized Tq index
  output logic        thr_update,   // pulses when a new T has been computed
  output logic        dma_parity,   // ping-pong buffer parity of this frame
  output logic [2:0]  dma_ch,       // channel served by the DMA controller
  output logic        dma_busy,     // DMA controller inside a burst
  output logic        ovf
);

  seg_cfg_t  cfg;
  dma_desc_t desc [N_CH];

  seg_regs u_regs (.clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata, .cfg_rdata, .cfg, .desc);

  // ------------------------------------------------------------ frame control
  typedef enum logic [1:0] {F_IDLE, F_WAIT, F_RUN} fstate_t;
  fstate_t fstate;
  logic    start;
  logic    ref_en, edge_en, wri_en;
  pix_t    thr_edge;
  logic    md_done, st_done, st_ready, me_done, all_written;
  logic    wr_done [N_WR];
  logic [2*COORD_W-1:0] frame_pixels;

  assign frame_pixels = (2*COORD_W)'(cfg.width) * (2*COORD_W)'(cfg.height);
  assign all_written  = wr_done[CH_WR_I] && wr_done[CH_WR_D] && wr_done[CH_WR_E];
  assign start        = (fstate == F_WAIT) && !dma_busy && st_ready;
  assign busy         = (fstate != F_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fstate <= F_IDLE; frame_done <= 1'b0;
      wri_en <= 1'b0; ref_en <= 1'b0; edge_en <= 1'b0; thr_edge <= '0;
    end else begin
      frame_done <= 1'b0;
      case (fstate)
        F_IDLE: if (frame_start) fstate <= F_WAIT;
        F_WAIT: if (start) begin
          fstate   <= F_RUN;
          wri_en   <= desc[CH_WR_I].en;
          ref_en   <= desc[CH_RD_R].en;
          edge_en  <= desc[CH_RD_D].en;
          thr_edge <= thr_cur;
        end
        F_RUN: if (md_done && st_done && (me_done || !edge_en) && all_written && !dma_busy) begin
          fstate     <= F_IDLE;
          frame_done <= 1'b1;
        end
        default: fstate <= F_IDLE;
      endcase
    end
  end

  // -------------------------------------------------------------------- DMA
  logic wr_valid [N_WR]; pix_t wr_pix [N_WR]; logic wr_ready [N_WR];
  logic rd_valid [N_RD]; pix_t rd_pix [N_RD]; logic rd_ready [N_RD];

  dma u_dma (
    .clk, .rst_n, .start, .frame_pixels, .desc,
    .wr_valid, .wr_pix, .wr_ready, .wr_done,
    .rd_valid, .rd_pix, .rd_ready,
    .mem_valid, .mem_ready, .mem_we, .mem_addr, .mem_wdata, .mem_rvalid, .mem_rdata,
    .frame_parity(dma_parity), .cur_ch(dma_ch), .busy(dma_busy)
  );

  // ------------------------------------------------------- motion detection
  logic md_cur_ready, d_valid;
  pix_t d_pix;
  logic wr_i_ok;
  logic running;

  assign running  = (fstate == F_RUN);
  // the camera pixel goes to the motion detector and, if enabled, to memory
  assign wr_i_ok  = wr_ready[CH_WR_I] || !wri_en;
  assign cam_ready = running && md_cur_ready && wr_i_ok;
  assign wr_valid[CH_WR_I] = running && cam_valid && md_cur_ready && wri_en;
  assign wr_pix[CH_WR_I]   = cam_pix;

  motion_detect #(.MAXW(MAXW)) u_md (
    .clk, .rst_n, .start, .width(cfg.width), .height(cfg.height),
    .avg_kw(cfg.avg_kw), .avg_kh(cfg.avg_kh), .max_kw(cfg.max_kw), .max_kh(cfg.max_kh),
    .ref_en,
    .cur_valid(running && cam_valid && wr_i_ok), .cur_pix(cam_pix), .cur_ready(md_cur_ready),
    .ref_valid(rd_valid[CH_RD_R - N_WR]), .ref_pix(rd_pix[CH_RD_R - N_WR]),
    .ref_ready(rd_ready[CH_RD_R - N_WR]),
    .d_valid, .d_pix, .done(md_done)
  );

  assign wr_valid[CH_WR_D] = d_valid;
  assign wr_pix[CH_WR_D]   = d_pix;

  // -------------------------------------------- spatio-temporal thresholding
  st_threshold #(.M(M), .L(L)) u_st (
    .clk, .rst_n, .start, .width(cfg.width), .blk_w(cfg.blk_w), .blk_recip(cfg.blk_recip),
    .sigma2(cfg.sigma2), .alpha(cfg.alpha), .q0(cfg.q0), .q1(cfg.q1), .q2(cfg.q2),
    .d_valid, .d_pix, .d_done(md_done && running),
    .tg(tg_cur), .ts(thr_ts), .tq_idx(thr_tq_idx), .t_idx(thr_idx), .t(thr_cur),
    .t_valid(thr_update),
    .done(st_done), .ready(st_ready)
  );

  // ------------------------------------------- morphological edge detection
  logic me_ready;

  morph_edge #(.MAXW(MAXW)) u_me (
    .clk, .rst_n, .start(start && desc[CH_RD_D].en), .width(cfg.width), .height(cfg.height),
    .thr(thr_edge),
    .d_valid(rd_valid[CH_RD_D - N_WR]), .d_pix(rd_pix[CH_RD_D - N_WR]), .in_ready(me_ready),
    .e_valid, .e_bit, .done(me_done)
  );

  assign rd_ready[CH_RD_D - N_WR] = me_ready;
  assign wr_valid[CH_WR_E] = e_valid;
  assign wr_pix[CH_WR_E]   = e_bit ? 8'hFF : 8'h00;

  // ----------------------------------------------------------------- status
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ovf <= 1'b0;
    else if ((wr_valid[CH_WR_D] && !wr_ready[CH_WR_D]) ||
             (wr_valid[CH_WR_E] && !wr_ready[CH_WR_E])) ovf <= 1'b1;
  end


endmodule
