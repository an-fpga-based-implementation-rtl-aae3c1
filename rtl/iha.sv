// iha: Intensity Histogram Analysis of one block W_k of the motion frame.
// It produces the block average mu_k and lambda_k, the sum over the L equal
// sections of the gray-level histogram of the most frequent gray level of
// each section.
//
// How it works. While the block streams in (S_ACC) an adder accumulates the
// pixel sum, and the histogram is built in a 256-entry block RAM by
// read-modify-write: the read is issued when a pixel arrives and the
// incremented count is written one cycle later; a pixel equal to the one
// written in the previous cycle takes the count being written (forwarding),
// so back-to-back equal pixels count correctly. After `frame_end` the
// controller scans the histogram (S_SCAN), bin 0 to 255: within each section a
// register holds the highest count seen so far (Reg 2) and another its gray
// level g_pl (Reg 3; on equal counts the lower gray level is kept); at the end
// of a section g_pl is added into the lambda register (Reg 4). Each bin is
// cleared as it is read, so the histogram is empty for the next frame; after
// reset the controller clears it once (S_CLEAR). The average is the sum
// multiplied by recip = round(2^32 / pixels in the block) (blocks of at least
// two pixels, so that it fits in 32 bits), a multiplier used
// as a divider, rounded to nearest.
//
// Interface: `start` opens a frame, in_valid/in_pix deliver the block's
// pixels, `frame_end` (one cycle, after the last pixel) starts the scan.
// `res_valid` stays high with mu/lambda from the end of the scan until the
// next `start`. Timing: the scan takes 256 + 2 cycles.
// Sections, Reg 2/3/4 and the multiplier-as-divider follow the described
// design; the forwarding, the clearing and the rounding are this design's.
module iha
  import seg_pkg::*;
#(
  parameter int unsigned L     = 4,    // histogram sections
  parameter int unsigned CNT_W = 22    // histogram count width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic                 in_valid,
  input  pix_t                 in_pix,
  input  logic                 frame_end,
  input  logic [31:0]          recip,
  output pix_t                 mu,
  output logic [PIX_W+$clog2(L):0] lambda,
  output logic                 res_valid,
  output logic                 ready      // idle, histogram clear
);

  localparam int unsigned BINS  = 1 << PIX_W;
  localparam int unsigned SEC   = BINS / L;
  localparam int unsigned LAMW  = PIX_W + $clog2(L) + 1;

  typedef enum logic [2:0] {S_CLEAR, S_IDLE, S_ACC, S_SCAN, S_DONE} state_t;
  state_t state;

  logic [CNT_W-1:0] hist [BINS];
  logic [CNT_W-1:0] hq;              // synchronous read data

  // accumulation pipeline
  logic             s2_v;
  pix_t             s2_a;
  logic             w_v;
  pix_t             w_a;
  logic [CNT_W-1:0] w_d;
  logic [CNT_W-1:0] base;
  logic [31:0]      sum;

  // scan
  logic [PIX_W:0]   ra;              // address being read
  logic             sv;              // scan data valid next to hq
  pix_t             sa;              // bin of hq during scan
  logic [CNT_W-1:0] reg2;            // max count in section
  pix_t             reg3;            // gray level of that max
  logic [LAMW-1:0]  reg4;            // lambda accumulator

  // memory port multiplexing
  pix_t             rd_addr;
  logic             we;
  pix_t             wa;
  logic [CNT_W-1:0] wd;

  assign base = (w_v && w_a == s2_a) ? w_d : hq;

  always_comb begin
    rd_addr = in_pix;
    we      = 1'b0;
    wa      = s2_a;
    wd      = base + 1'b1;
    case (state)
      S_CLEAR: begin we = 1'b1; wa = ra[PIX_W-1:0]; wd = '0; end
      S_ACC:   begin we = s2_v; end
      S_SCAN:  begin rd_addr = ra[PIX_W-1:0]; we = sv; wa = sa; wd = '0; end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (we) hist[wa] <= wd;
    hq <= hist[rd_addr];
  end

  wire   sec_first = (sa % PIX_W'(SEC)) == '0;
  wire   sec_last  = (sa % PIX_W'(SEC)) == PIX_W'(SEC - 1);
  // Reg 2/Reg 3 after taking the current bin into account
  logic [CNT_W-1:0] n2;
  pix_t             n3;
  always_comb begin
    n2 = reg2; n3 = reg3;
    if (sec_first || hq > reg2) begin n2 = hq; n3 = sa; end
  end

  logic [63:0] prod;
  assign prod = 64'(sum) * 64'(recip) + 64'h8000_0000;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_CLEAR; ra <= '0; sv <= 1'b0; sa <= '0;
      s2_v <= 1'b0; s2_a <= '0; w_v <= 1'b0; w_a <= '0; w_d <= '0;
      sum <= '0; reg2 <= '0; reg3 <= '0; reg4 <= '0;
      mu <= '0; lambda <= '0; res_valid <= 1'b0;
    end else begin
      w_v  <= 1'b0;
      s2_v <= 1'b0;
      sv   <= 1'b0;
      case (state)
        S_CLEAR: begin
          ra <= ra + 1'b1;
          if (ra == (PIX_W+1)'(BINS - 1)) state <= S_IDLE;
        end
        S_IDLE, S_DONE: begin
          if (start) begin
            state <= S_ACC; sum <= '0; res_valid <= 1'b0;
          end
        end
        S_ACC: begin
          s2_v <= in_valid;
          s2_a <= in_pix;
          if (in_valid) sum <= sum + 32'(in_pix);
          if (s2_v) begin
            w_v <= 1'b1; w_a <= s2_a; w_d <= base + 1'b1;
          end
          if (frame_end) begin
            state <= S_SCAN; ra <= '0; reg4 <= '0;
          end
        end
        S_SCAN: begin
          // the last accumulation write lands in the first scan cycle,
          // before bin 0's data is used
          if (ra <= (PIX_W+1)'(BINS - 1)) begin
            ra <= ra + 1'b1;
            sv <= 1'b1;
            sa <= ra[PIX_W-1:0];
          end
          if (sv) begin
            reg2 <= n2;
            reg3 <= n3;
            if (sec_last) reg4 <= reg4 + LAMW'(n3);
            if (sa == PIX_W'(BINS - 1)) begin
              state     <= S_DONE;
              mu        <= pix_t'(prod >> 32);
              lambda    <= reg4 + LAMW'(n3);
              res_valid <= 1'b1;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign ready = (state == S_IDLE) || (state == S_DONE);

  a_frame_end_in_acc: assert property (@(posedge clk) disable iff (!rst_n)
    frame_end |-> state == S_ACC);

endmodule
