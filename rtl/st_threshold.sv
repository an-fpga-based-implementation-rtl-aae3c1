// st_threshold: the spatio-temporal thresholding stage. It turns one motion
// frame D(n) into the threshold T(n) without storing the frame: the block
// extractor splits the stream into M vertical blocks, M Intensity Histogram
// Analysis units (iha) compute mu_k and lambda_k in parallel as the pixels
// pass, the Threshold Estimator combines them into Tg (Eq. 1) and the
// Spatio-Temporal Adaptation unit (sta) gives Ts, Tq and T(n).
//
// Sequence per frame: `start` opens the frame; d_valid/d_pix deliver D(n) in
// raster order; once `d_done` (the motion detector has produced the whole
// frame) is seen, the IHAs are told the frame has ended (three cycles later,
// so the last pixel has passed the extractor and the histogram pipeline), they
// scan their histograms, TE runs and STA updates T. `done` rises with the new
// threshold and stays high until the next `start`; `t` holds T(n) until the
// next update. Timing after d_done: 3 + 258 + (2M+2) + 1 cycles, far below a
// frame time, so the threshold is ready when the frame has been stored.
// Interface: start, width, blk_w, blk_recip, sigma2, alpha, q0..q2,
// d_valid/d_pix/d_done in; tg, ts, tq_idx, t_idx, t, t_valid, done, ready out.
// Follows the document: BE, parallel IHAs, TE, STA. This design's choice: M, L,
// and the sequencing delays.
module st_threshold
  import seg_pkg::*;
#(
  parameter int unsigned M = 4,
  parameter int unsigned L = 4,
  localparam int unsigned LAMW = PIX_W + $clog2(L) + 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [COORD_W-1:0] width,
  input  logic [COORD_W-1:0] blk_w,
  input  logic [31:0]        blk_recip,
  input  logic [15:0]        sigma2,
  input  logic [7:0]         alpha,
  input  pix_t               q0,
  input  pix_t               q1,
  input  pix_t               q2,
  input  logic               d_valid,
  input  pix_t               d_pix,
  input  logic               d_done,
  output pix_t               tg,
  output logic [16:0]        ts,
  output logic [1:0]         tq_idx,
  output logic [1:0]         t_idx,
  output pix_t               t,
  output logic               t_valid,
  output logic               done,
  output logic               ready
);

  typedef enum logic [2:0] {P_IDLE, P_ACC, P_END, P_IHA, P_TE, P_STA, P_DONE} phase_t;
  phase_t phase;

  logic [M-1:0]    be_valid;
  pix_t            be_pix;
  pix_t            mu     [M];
  logic [LAMW-1:0] lambda [M];
  logic [M-1:0]    res_valid, iha_ready;
  logic            frame_end, te_go, tg_valid, sta_go;
  logic [1:0]      dly;

  block_extractor #(.M(M)) u_be (
    .clk, .rst_n, .start, .width, .blk_w,
    .in_valid(d_valid), .in_pix(d_pix), .out_valid(be_valid), .out_pix(be_pix)
  );

  for (genvar k = 0; k < M; k++) begin : g_iha
    iha #(.L(L)) u_iha (
      .clk, .rst_n, .start, .in_valid(be_valid[k]), .in_pix(be_pix),
      .frame_end, .recip(blk_recip),
      .mu(mu[k]), .lambda(lambda[k]), .res_valid(res_valid[k]), .ready(iha_ready[k])
    );
  end

  threshold_estimator #(.M(M), .L(L)) u_te (
    .clk, .rst_n, .go(te_go), .mu, .lambda, .tg, .tg_valid
  );

  sta u_sta (
    .clk, .rst_n, .go(sta_go), .tg, .sigma2, .alpha, .q0, .q1, .q2,
    .ts, .tq_idx, .t_idx, .t, .t_valid
  );

  assign frame_end = (phase == P_END) && (dly == 2'd2);
  assign te_go     = (phase == P_IHA) && (&res_valid);
  assign sta_go    = (phase == P_TE) && tg_valid;
  assign done      = (phase == P_DONE);
  assign ready     = &iha_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= P_IDLE; dly <= '0;
    end else if (start) begin
      phase <= P_ACC; dly <= '0;
    end else begin
      case (phase)
        P_ACC:  if (d_done) phase <= P_END;
        P_END: begin
          dly <= dly + 1'b1;
          if (frame_end) phase <= P_IHA;
        end
        P_IHA:  if (te_go) phase <= P_TE;
        P_TE:   if (sta_go) phase <= P_STA;
        P_STA:  if (t_valid) phase <= P_DONE;
        default: ;
      endcase
    end
  end

  a_start_ready: assert property (@(posedge clk) disable iff (!rst_n) start |-> ready);

endmodule
