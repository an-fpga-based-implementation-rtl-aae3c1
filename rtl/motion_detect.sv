// motion_detect: the motion detection stage. It joins the current frame I(n)
// with the reference frame R(n) (the stored background or the previous
// frame, whichever the DMA has been set up to deliver), forms the absolute
// difference AD(n) = |I(n) - R(n)| with one subtractor, and filters AD(n)
// first with the spatial average filter and then with the spatial max filter
// to give the motion frame D(n).
//
// Interface: cur_* and ref_* are valid/ready pixel streams in raster order; a
// pixel pair is taken when both are valid and the average filter can accept
// it. With ref_en low the reference is taken as zero and ref_* is ignored
// (used while a background frame is being captured). d_valid/d_pix is the
// D(n) stream, raster order, no back-pressure. Filter sizes (1x1..5x5 each)
// and frame size are run-time inputs; `start` begins a frame, `done` rises
// when the whole D(n) frame has been produced.
// Timing: one D(n) pixel per cycle once the pipeline is full; about
// four rows plus a few cycles of latency from I(n) to D(n).
// The average-then-max order is the one the described algorithm gives.
module motion_detect
  import seg_pkg::*;
#(
  parameter int unsigned MAXW = MAX_LINE
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [COORD_W-1:0] width,
  input  logic [COORD_W-1:0] height,
  input  ksize_t             avg_kw,
  input  ksize_t             avg_kh,
  input  ksize_t             max_kw,
  input  ksize_t             max_kh,
  input  logic               ref_en,
  input  logic               cur_valid,
  input  pix_t               cur_pix,
  output logic               cur_ready,
  input  logic               ref_valid,
  input  pix_t               ref_pix,
  output logic               ref_ready,
  output logic               d_valid,
  output pix_t               d_pix,
  output logic               done
);

  logic avg_ready, ad_valid, a_valid, max_ready, avg_done, max_done;
  pix_t ad, a_pix, r;

  assign r         = ref_en ? ref_pix : '0;
  assign ad_valid  = cur_valid && (ref_valid || !ref_en);
  assign cur_ready = avg_ready && (ref_valid || !ref_en);
  assign ref_ready = avg_ready && cur_valid && ref_en;
  assign ad        = (cur_pix > r) ? cur_pix - r : r - cur_pix;

  window_filter #(.IS_MAX(1'b0), .MAXW(MAXW)) u_avg (
    .clk, .rst_n, .start, .width, .height, .kw(avg_kw), .kh(avg_kh),
    .in_valid(ad_valid), .in_pix(ad), .in_ready(avg_ready),
    .out_valid(a_valid), .out_pix(a_pix), .done(avg_done)
  );

  window_filter #(.IS_MAX(1'b1), .MAXW(MAXW)) u_max (
    .clk, .rst_n, .start, .width, .height, .kw(max_kw), .kh(max_kh),
    .in_valid(a_valid), .in_pix(a_pix), .in_ready(max_ready),
    .out_valid(d_valid), .out_pix(d_pix), .done(max_done)
  );

  assign done = avg_done && max_done;

  // the max filter runs at the rate of the average filter, so it never has
  // to refuse a pixel
  a_max_keeps_up: assert property (@(posedge clk) disable iff (!rst_n) a_valid |-> max_ready);

endmodule
