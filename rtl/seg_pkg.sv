// seg_pkg: types and constants shared by the spatio-temporal object
// segmentation pipeline.
//
// Pixels are 8-bit gray levels. The external memory is word addressed with
// 64-bit words (eight pixels per word). The DMA has three write channels
// (current frame I(n), motion frame D(n), edge frame E) and two read channels
// (reference frame R(n), previous motion frame D(n-1)). Each channel is
// described by a descriptor held in the DMA's descriptor cache. The 64-bit
// memory word, the channel numbering and the descriptor layout are choices of
// this design; the 4 KB FIFO depth, the 2 KB write burst, the half-empty read
// trigger, the 2 KB maximum line width and the 1x1..5x5 filter range follow
// the described architecture.
// Interface: constants, the dma_desc_t and seg_cfg_t structs and the ktaps()
// helper, imported by every module. Timing: none (no logic).
package seg_pkg;

  localparam int unsigned PIX_W       = 8;              // gray level width
  localparam int unsigned MEM_W       = 64;             // memory word width
  localparam int unsigned PIX_PER_WORD = MEM_W / PIX_W; // 8
  localparam int unsigned ADDR_W      = 24;             // word address width (128 MB)
  localparam int unsigned MAX_LINE    = 2048;           // maximum line width in pixels
  localparam int unsigned COORD_W     = 12;             // x/y coordinate width
  localparam int unsigned FIFO_BYTES  = 4096;           // per-channel FIFO size
  localparam int unsigned BURST_BYTES = 2048;           // maximum transfer size

  localparam int unsigned N_WR = 3;   // write channels
  localparam int unsigned N_RD = 2;   // read channels
  localparam int unsigned N_CH = N_WR + N_RD;

  // Channel numbers as seen by the descriptor cache and the arbiter.
  localparam int unsigned CH_WR_I = 0;  // current frame I(n) -> memory
  localparam int unsigned CH_WR_D = 1;  // motion frame D(n) -> memory
  localparam int unsigned CH_WR_E = 2;  // edge frame E -> memory
  localparam int unsigned CH_RD_R = 3;  // reference frame R(n) <- memory
  localparam int unsigned CH_RD_D = 4;  // previous motion frame D(n-1) <- memory

  typedef logic [PIX_W-1:0]  pix_t;
  typedef logic [MEM_W-1:0]  word_t;
  typedef logic [ADDR_W-1:0] addr_t;

  // One DMA channel descriptor. A channel whose pp bit is set alternates
  // between two buffers, base and base+frame_words, with the frame parity; ph
  // selects which of the two it uses first, so a reader with ph=1 sees the
  // buffer its writer (ph=0) filled during the previous frame.
  typedef struct packed {
    logic  en;
    logic  pp;
    logic  ph;
    addr_t base;
  } dma_desc_t;

  // Filter size code: 0 -> 1, 1 -> 3, 2 -> 5 taps.
  typedef logic [1:0] ksize_t;

  // Run-time configuration written by the host through seg_regs.
  typedef struct packed {
    logic [COORD_W-1:0] width;      // pixels per line
    logic [COORD_W-1:0] height;     // lines per frame
    ksize_t             avg_kw;     // average filter width code
    ksize_t             avg_kh;     // average filter height code
    ksize_t             max_kw;     // max filter width code
    ksize_t             max_kh;     // max filter height code
    logic [COORD_W-1:0] blk_w;      // width of one vertical block
    logic [31:0]        blk_recip;  // round(2^32 / pixels per block)
    logic [15:0]        sigma2;     // noise variance
    logic [7:0]         alpha;      // weight a of Eq. 2, Q0.8
    logic [PIX_W-1:0]   q0;         // quantization level 0 (lowest)
    logic [PIX_W-1:0]   q1;         // quantization level 1
    logic [PIX_W-1:0]   q2;         // quantization level 2 (highest)
  } seg_cfg_t;

  // Filter taps from the size code.
  function automatic int unsigned ktaps(ksize_t k);
    return (k == 2'd0) ? 1 : (k == 2'd1) ? 3 : 5;
  endfunction

endpackage
