// dma_wr_channel: one DMA write channel. Packs a pixel stream into 64-bit
// memory words and queues them in the channel's 4 KB FIFO until the DMA
// controller moves them to memory.
//
// Pixel k of a frame goes to byte lane k mod 8 of its word (lane 0 in the
// low byte). The last word of a frame is pushed even if it is not full, so a
// frame of frame_pixels pixels fills ceil(frame_pixels/8) words. `start`
// (one cycle, between frames) clears the packer. The channel does not decide
// when to transfer: it reports its FIFO level and whether the frame has been
// packed completely, and the controller pops words (ctl_pop) while it writes
// them to memory. pix_ready falls only when the FIFO is full.
// Interface: start, frame_pixels, pix_valid/pix/pix_ready from the producer,
// ctl_level/ctl_data/packed_all to the controller and ctl_pop from it. Timing:
// one pixel per cycle; a word enters the FIFO the cycle after its eighth pixel.
// Follows the document: 4 KB FIFO per write channel, filled before a request.
// This design's choice: 64-bit words, byte lane order, the partial last word.
module dma_wr_channel
  import seg_pkg::*;
#(
  parameter int unsigned DEPTH = FIFO_BYTES / (MEM_W / 8),
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [2*COORD_W-1:0] frame_pixels,
  // pixel side
  input  logic        pix_valid,
  input  pix_t        pix,
  output logic        pix_ready,
  // controller side
  input  logic        ctl_pop,
  output word_t       ctl_data,
  output logic [AW:0] ctl_level,
  output logic        packed_all
);

  logic [2:0]              lane;
  logic [2*COORD_W-1:0]    count;
  logic [MEM_W-PIX_W-1:0]  acc;      // lanes 0..6 collected so far
  logic                    full, empty;
  logic                    push;
  word_t                   wword;

  wire take     = pix_valid && pix_ready;
  wire last_pix = (count + 1'b1 == frame_pixels);

  assign pix_ready  = !full && !packed_all && !start;
  assign push       = take && (lane == 3'd7 || last_pix);

  // the incoming pixel joins the lanes already collected
  assign wword = word_t'(acc) | (word_t'(pix) << (8 * lane));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lane <= '0; count <= '0; acc <= '0; packed_all <= 1'b0;
    end else if (start) begin
      lane <= '0; count <= '0; acc <= '0; packed_all <= (frame_pixels == '0);
    end else if (take) begin
      count <= count + 1'b1;
      lane  <= lane + 1'b1;
      if (push) begin
        acc  <= '0;
        lane <= '0;
      end else begin
        acc[lane*8 +: 8] <= pix;
      end
      if (last_pix) packed_all <= 1'b1;
    end
  end

  sync_fifo #(.WIDTH(MEM_W), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n,
    .push(push), .wdata(wword),
    .pop(ctl_pop), .rdata(ctl_data),
    .full(full), .empty(empty), .level(ctl_level)
  );

endmodule
