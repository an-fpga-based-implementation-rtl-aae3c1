// sta: Spatio-Temporal Adaptation of the threshold.
//
// 1. An adder forms the noise-adapted threshold of Eq. 2,
//        Ts = Tg + a * sigma^2,
//    with a in Q0.8 (0 < a < 1) and sigma^2 supplied from outside (a noise
//    estimator or the host).
// 2. A priority encoder quantizes Ts to one of three levels held in
//    programmable registers q0 < q1 < q2: Tq is the highest level not above
//    Ts, or q0 when Ts is below all of them.
// 3. A second priority encoder chooses the frame threshold T(n) from Tq and
//    the stored T(n-1): T moves one level towards Tq per frame (up, down or
//    unchanged), which keeps it stable over time. The first frame after reset
//    takes Tq directly.
// The levels are kept as an index (0..2), so reprogramming q0..q2 takes
// effect at once.
//
// Interface: `go` (one cycle, tg valid) runs one update; `t_valid` pulses one
// cycle later with the new t. Eq. 2 and the two encoders follow the described
// design; the Q0.8 format, the "highest level not above Ts" rule and the
// one-level step towards Tq are choices of this implementation.
module sta
  import seg_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        go,
  input  pix_t        tg,
  input  logic [15:0] sigma2,
  input  logic [7:0]  alpha,
  input  pix_t        q0,
  input  pix_t        q1,
  input  pix_t        q2,
  output logic [16:0] ts,
  output logic [1:0]  tq_idx,
  output logic [1:0]  t_idx,
  output pix_t        t,
  output logic        t_valid
);

  logic [23:0] wsig;
  logic [1:0]  tq_n, t_n;
  logic        first;

  assign wsig = 24'(alpha) * 24'(sigma2);
  assign ts   = 17'(tg) + 17'(wsig >> 8);

  // first encoder: quantization of Ts
  always_comb begin
    if (ts >= 17'(q2))      tq_n = 2'd2;
    else if (ts >= 17'(q1)) tq_n = 2'd1;
    else                    tq_n = 2'd0;
  end

  // second encoder: temporal selection from Tq and T(n-1)
  always_comb begin
    if (first)              t_n = tq_n;
    else if (tq_n > t_idx)  t_n = t_idx + 1'b1;
    else if (tq_n < t_idx)  t_n = t_idx - 1'b1;
    else                    t_n = t_idx;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t_idx <= 2'd0; tq_idx <= 2'd0; first <= 1'b1; t_valid <= 1'b0;
    end else begin
      t_valid <= go;
      if (go) begin
        tq_idx <= tq_n;
        t_idx  <= t_n;
        first  <= 1'b0;
      end
    end
  end

  assign t = (t_idx == 2'd2) ? q2 : (t_idx == 2'd1) ? q1 : q0;

endmodule
