// morph_edge: global thresholding and morphological edge detection.
//
// Each pixel of the motion frame is first compared with the frame threshold
// T (B = D > T, white = 1). A 2x2 morphological engine (ME) then moves over
// the binary frame B: for every 2x2 position whose four pixels are not all
// white, each of its white pixels is marked as an edge pixel; pixels inside
// an all-white square are not marked by that square. A pixel belongs to up to
// four such squares, from two pairs of rows, so the result is collected in a
// dual-port line buffer (DPLB) of one bit per column: while row y streams in,
// the engine reads the partial edge bit of row y-1 (from the squares of rows
// y-2, y-1), completes it with the squares of rows y-1, y and sends it out,
// and writes back the partial bit of row y in the same place. After each line
// has been modified twice it is final. A second one-bit line buffer holds B of
// the previous row. The last column of a row is completed at the first column
// of the next row, and the last row is read out of the DPLB after the frame.
//
// Interface: `start` begins a frame (width >= 2, height >= 2); d_valid/d_pix
// with in_ready deliver the motion frame in raster order (in_ready is low only
// while the last row is being flushed); e_valid/e_bit give the edge frame E in
// raster order, one cycle after the input that completes each pixel; `done`
// rises when the whole edge frame has been sent. Timing: one input pixel per
// cycle; the frame ends width+1 cycles after its last input pixel.
// The 2x2 rule and the DPLB follow the described design; the exact
// read/complete/write-back order is this implementation's.
module morph_edge
  import seg_pkg::*;
#(
  parameter int unsigned MAXW = MAX_LINE
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [COORD_W-1:0] width,
  input  logic [COORD_W-1:0] height,
  input  pix_t               thr,
  input  logic               d_valid,
  input  pix_t               d_pix,
  output logic               in_ready,
  output logic               e_valid,
  output logic               e_bit,
  output logic               done
);

  localparam int unsigned XW = $clog2(MAXW);

  typedef enum logic [1:0] {M_RUN, M_TAIL, M_FLUSH, M_DONE} mstate_t;
  mstate_t state;

  logic               bprev [MAXW];   // B of the previous row
  logic               dplb  [MAXW];   // partial edge bits
  logic [COORD_W-1:0] x, y;
  logic               al, bl;         // B(x-1, y-1), B(x-1, y)
  logic               ct, cb;         // contributions of the square at x-1 to its right column
  logic               b, bt, f, p;
  logic [XW-1:0]      pa;             // DPLB address this cycle
  logic               pwe, pwd;
  logic               ev, eb;

  assign in_ready = (state == M_RUN) && !start;
  wire   take     = d_valid && in_ready;
  wire   lastcol  = (x == width - 1'b1);

  assign b  = (d_pix > thr);
  assign bt = bprev[x[XW-1:0]];
  assign f  = !(al && bt && bl && b);

  always_comb begin
    pa  = (x == '0 || state == M_TAIL) ? XW'(width - 1'b1) : XW'(x - 1'b1);
    if (state == M_FLUSH) pa = x[XW-1:0];
    p   = dplb[pa];
    pwe = 1'b0;
    pwd = 1'b0;
    ev  = 1'b0;
    eb  = 1'b0;
    case (state)
      M_RUN: if (take) begin
        if (y == '0) begin
          // first row: no square yet, clear the partial bits
          pa = x[XW-1:0]; pwe = 1'b1; pwd = 1'b0;
        end else if (x == '0) begin
          // complete the last column of row y-2, store partial of row y-1
          if (y >= 2) begin
            pwe = 1'b1; pwd = cb;
            ev  = 1'b1; eb  = p | ct;
          end
        end else begin
          pwe = 1'b1; pwd = cb | (f & bl);
          ev  = 1'b1; eb  = p | ct | (f & al);
        end
      end
      M_TAIL: begin
        pwe = 1'b1; pwd = cb;
        ev  = 1'b1; eb  = p | ct;
      end
      M_FLUSH: begin
        ev = 1'b1; eb = p;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (pwe) dplb[pa] <= pwd;
    if (take) bprev[x[XW-1:0]] <= b;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= M_DONE; x <= '0; y <= '0;
      al <= 1'b0; bl <= 1'b0; ct <= 1'b0; cb <= 1'b0;
      e_valid <= 1'b0; e_bit <= 1'b0;
    end else begin
      e_valid <= ev;
      e_bit   <= eb;
      if (start) begin
        state <= M_RUN; x <= '0; y <= '0;
        e_valid <= 1'b0;
      end else begin
        case (state)
          M_RUN: if (take) begin
            al <= bt;
            bl <= b;
            if (x == '0 || y == '0) begin
              ct <= 1'b0; cb <= 1'b0;
            end else begin
              ct <= f & bt; cb <= f & b;
            end
            if (lastcol) begin
              x <= '0;
              y <= y + 1'b1;
              if (y == height - 1'b1) state <= M_TAIL;
            end else begin
              x <= x + 1'b1;
            end
          end
          M_TAIL: state <= M_FLUSH;
          M_FLUSH: begin
            if (lastcol) state <= M_DONE;
            else         x <= x + 1'b1;
          end
          default: ;
        endcase
      end
    end
  end

  assign done = (state == M_DONE) && !e_valid;

endmodule
