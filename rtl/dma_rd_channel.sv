// dma_rd_channel: one DMA read channel. The controller fills the channel's
// 4 KB FIFO with 64-bit words from memory; the channel unpacks each word into
// eight pixels (byte lane 0 first) and streams exactly frame_pixels pixels per
// frame with a valid/ready handshake.
//
// The channel only reports its FIFO level; the controller starts a new read
// burst whenever the FIFO is at least half empty. `start` (one cycle, between
// frames) clears the unpacker. Pixels beyond frame_pixels in the last word
// are dropped.
// Interface: start, frame_pixels, ctl_push/ctl_data from the controller,
// ctl_level to it, pix_valid/pix/pix_ready to the consumer. Timing: one pixel
// per cycle while the FIFO holds data; a word is popped with its eighth pixel.
// Follows the document: 4 KB FIFO per read channel, half-empty refill. This
// design's choice: 64-bit words and byte lane order.
module dma_rd_channel
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
  output logic        pix_valid,
  output pix_t        pix,
  input  logic        pix_ready,
  // controller side
  input  logic        ctl_push,
  input  word_t       ctl_data,
  output logic [AW:0] ctl_level
);

  logic [2:0]           lane;
  logic [2*COORD_W-1:0] count;
  logic                 full, empty;
  word_t                rword;

  wire more     = (count < frame_pixels);
  wire last_pix = (count + 1'b1 == frame_pixels);
  wire take     = pix_valid && pix_ready;
  wire pop      = take && (lane == 3'd7 || last_pix);

  assign pix_valid = !empty && more && !start;
  assign pix       = rword[lane*8 +: 8];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lane <= '0; count <= '0;
    end else if (start) begin
      lane <= '0; count <= '0;
    end else if (take) begin
      count <= count + 1'b1;
      lane  <= pop ? 3'd0 : lane + 1'b1;
    end
  end

  sync_fifo #(.WIDTH(MEM_W), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n,
    .push(ctl_push), .wdata(ctl_data),
    .pop(pop), .rdata(rword),
    .full(full), .empty(empty), .level(ctl_level)
  );

endmodule
