// block_extractor: the block extractor (BE) of the spatio-temporal
// thresholding. It splits the D(n) stream into M vertical blocks, columns
// [k*blk_w, (k+1)*blk_w) going to block k, and hands each pixel to the IHA of
// its block. No frame store is needed: a column counter and a block counter
// follow the raster scan.
//
// Interface: in_valid/in_pix (raster order, no back-pressure); out_valid is
// one-hot over the M blocks, out_pix is the registered pixel for all of them.
// One cycle of latency. Columns past M*blk_w (a width that is not a multiple
// of blk_w) are given to the last block. `start` clears the counters.
// Timing: one pixel per cycle, one cycle latency.
// Follows the document: M vertical blocks taken from the stream without a frame
// store. This design's choice: M = 4 by default, blocks as full-height column
// strips, and the rule for left-over columns.
module block_extractor
  import seg_pkg::*;
#(
  parameter int unsigned M = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [COORD_W-1:0] width,
  input  logic [COORD_W-1:0] blk_w,
  input  logic               in_valid,
  input  pix_t               in_pix,
  output logic [M-1:0]       out_valid,
  output pix_t               out_pix
);

  localparam int unsigned KW = (M > 1) ? $clog2(M) : 1;

  logic [COORD_W-1:0] x, bx;   // column in the line, column in the block
  logic [KW-1:0]      k;       // current block

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x <= '0; bx <= '0; k <= '0;
      out_valid <= '0; out_pix <= '0;
    end else if (start) begin
      x <= '0; bx <= '0; k <= '0;
      out_valid <= '0;
    end else begin
      out_valid <= '0;
      if (in_valid) begin
        out_valid[k] <= 1'b1;
        out_pix      <= in_pix;
        if (x == width - 1'b1) begin
          x <= '0; bx <= '0; k <= '0;
        end else begin
          x <= x + 1'b1;
          if (bx == blk_w - 1'b1 && k != KW'(M - 1)) begin
            bx <= '0;
            k  <= k + 1'b1;
          end else begin
            bx <= bx + 1'b1;
          end
        end
      end
    end
  end

endmodule
