// threshold_estimator: the Threshold Estimator (TE). It computes the global
// spatial threshold of Eq. 1,
//     Tg = sum_k (lambda_k + mu_k) / (K*L + K),
// from the results of the K = M block analysers.
//
// How it works: the 2M operands are taken one per cycle through two
// multiplexers (block index, and mu or lambda) into a single accumulator, so
// one adder serves all blocks. The division by the constant K*(L+1) is a
// multiplication by ceil(2^24 / (K*(L+1))) with rounding, which gives the
// round-to-nearest quotient for every reachable sum at the default sizes.
// The result is held in the output register (REG1).
//
// Interface: `go` (one cycle, all mu/lambda inputs valid and stable) starts a
// pass; `tg_valid` pulses when tg has been updated. Timing: 2M + 2 cycles.
// Follows the document: Eq. 1, the operand multiplexers, one accumulator,
// REG1. This design's choice: the reciprocal divider and its rounding.
module threshold_estimator
  import seg_pkg::*;
#(
  parameter int unsigned M = 4,
  parameter int unsigned L = 4,
  localparam int unsigned LAMW = PIX_W + $clog2(L) + 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            go,
  input  pix_t            mu     [M],
  input  logic [LAMW-1:0] lambda [M],
  output pix_t            tg,
  output logic            tg_valid
);

  localparam int unsigned ACCW  = LAMW + $clog2(M) + 2;
  localparam int unsigned DIV   = M * (L + 1);
  localparam longint unsigned RECIP = ((64'd1 << 24) + 64'(DIV) - 64'd1) / 64'(DIV);
  localparam int unsigned IW    = $clog2(2 * M + 1);

  logic            busy;
  logic [IW-1:0]   idx;            // operand counter: block idx/2, mu or lambda by idx[0]
  logic [ACCW-1:0] acc;
  logic [ACCW-1:0] operand;
  logic [ACCW+25:0] prod;

  always_comb begin
    operand = '0;
    for (int k = 0; k < M; k++)
      if (idx[IW-1:1] == (IW-1)'(k))
        operand = idx[0] ? ACCW'(lambda[k]) : ACCW'(mu[k]);
  end

  assign prod = (ACCW+26)'(acc) * (ACCW+26)'(RECIP) + (ACCW+26)'(1 << 23);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; idx <= '0; acc <= '0; tg <= '0; tg_valid <= 1'b0;
    end else begin
      tg_valid <= 1'b0;
      if (go && !busy) begin
        busy <= 1'b1; idx <= '0; acc <= '0;
      end else if (busy) begin
        if (idx == IW'(2 * M)) begin
          busy     <= 1'b0;
          tg       <= pix_t'(prod >> 24);
          tg_valid <= 1'b1;
        end else begin
          acc <= acc + operand;
          idx <= idx + 1'b1;
        end
      end
    end
  end

endmodule
