// window_filter: spatial filter of the motion detector, an average filter
// (IS_MAX=0) or a max filter (IS_MAX=1) whose window can be set on-line to any
// odd size from 1x1 to 5x5 (kw, kh: 0 -> 1, 1 -> 3, 2 -> 5 taps) for frames up
// to MAXW pixels per line. Frame width and height are run-time inputs.
//
// How it works: the input stream is written into six line buffers (block
// RAMs) used as a ring, one frame row per buffer. The output side scans each
// output row yo over columns xc = 0 .. width-1, reading column xc of rows
// yo-2 .. yo+2 from the ring (one synchronous read per buffer) and shifting it
// into a 5x5 window register; the window is then centred on the column read
// two steps earlier, the output pixel. The scan runs on into the next row
// without idle steps, so the window can hold columns of two rows: each window
// column carries its x position and the taps that lie outside the centre
// pixel's row are masked. Two flush steps after the last row push its last
// pixels out. The scan waits until the input has delivered the pixels it
// needs, so the filter has no frame-size dependent latency beyond two lines.
// Pixels outside the frame count as zero (zero padding). The average is the window
// sum times a reciprocal ceil(2^18/n), rounded, which equals the
// round-to-nearest quotient for every possible sum; the max is a comparator
// tree over the enabled taps.
//
// Interface: in_valid/in_ready input stream in raster order (in_ready drops
// while the ring is full, i.e. when the input is four rows ahead of the
// output); out_valid/out_pix output stream in raster order, no back-pressure.
// `start` (one cycle, between frames) clears the counters; `done` is high
// once every output pixel of the frame has been produced.
// Timing: one output pixel per cycle once the pipeline is full (a row takes
// width cycles, the frame two more); an output pixel appears two cycles
// after the scan step that reads the column two places to its right.
// The filter sizes, their on-line setting and the line buffers in block RAM
// follow the described design; the ring of six rows, the tap masking, zero
// padding and the reciprocal width are choices of this implementation.
module window_filter
  import seg_pkg::*;
#(
  parameter bit          IS_MAX = 1'b0,
  parameter int unsigned MAXW   = MAX_LINE
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [COORD_W-1:0] width,
  input  logic [COORD_W-1:0] height,
  input  ksize_t             kw,
  input  ksize_t             kh,
  input  logic               in_valid,
  input  pix_t               in_pix,
  output logic               in_ready,
  output logic               out_valid,
  output pix_t               out_pix,
  output logic               done
);

  localparam int unsigned XW = $clog2(MAXW);
  typedef logic [2:0] slot_t;

  function automatic slot_t slot_inc(slot_t s, int unsigned d);
    int unsigned t;
    t = (int'(s) + d) % 6;
    return slot_t'(t);
  endfunction

  // ---------------------------------------------------------------- input side
  logic [COORD_W-1:0] xi, yi;
  slot_t              ws;
  logic               in_done;
  logic [COORD_W-1:0] yo;

  assign in_done  = (yi >= height);
  assign in_ready = !in_done && !start && ({1'b0, yi} < {1'b0, yo} + 13'd4);
  wire   take     = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xi <= '0; yi <= '0; ws <= '0;
    end else if (start) begin
      xi <= '0; yi <= '0; ws <= '0;
    end else if (take) begin
      if (xi == width - 1'b1) begin
        xi <= '0;
        yi <= yi + 1'b1;
        ws <= slot_inc(ws, 1);
      end else begin
        xi <= xi + 1'b1;
      end
    end
  end

  // six line buffers, one write port (input) and one read port (output scan)
  logic [COORD_W-1:0] xc;
  pix_t               lb_q [6];
  for (genvar j = 0; j < 6; j++) begin : g_lb
    pix_t mem [MAXW];
    always_ff @(posedge clk) begin
      if (take && ws == slot_t'(j)) mem[xi[XW-1:0]] <= in_pix;
      lb_q[j] <= mem[xc[XW-1:0]];
    end
  end

  // --------------------------------------------------------------- output scan
  // The scan reads one column per step, xc = 0 .. width-1 for every output row,
  // with no idle steps between rows; two flush steps follow the last row so
  // that its last two pixels leave the window.
  slot_t              rs0;                 // slot of row yo-2
  logic               out_active;
  logic [1:0]         fl;                  // flush steps done
  logic [COORD_W:0]   need;
  logic               avail, fire, flush;

  assign out_active = (yo < height);
  assign flush      = !out_active && (fl != 2'd2);
  assign need       = {1'b0, yo} + 13'd2;
  always_comb begin
    if (need >= {1'b0, height})
      avail = in_done;
    else
      avail = ({1'b0, yi} > need) || ({1'b0, yi} == need && xi > xc);
  end
  assign fire = ((out_active && avail) || flush) && !start;

  // stage 1 registers (aligned with the synchronous read data)
  logic               v1, real1;
  logic [COORD_W-1:0] xc1;
  logic [4:0]         rowok1;
  slot_t              rs1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xc <= '0; yo <= '0; rs0 <= 3'd4; fl <= '0;
      v1 <= 1'b0; real1 <= 1'b0; xc1 <= '0; rowok1 <= '0; rs1 <= '0;
    end else if (start) begin
      xc <= '0; yo <= '0; rs0 <= 3'd4; fl <= '0;
      v1 <= 1'b0;
    end else begin
      v1 <= fire;
      if (fire) begin
        xc1   <= xc;
        rs1   <= rs0;
        real1 <= out_active;
        for (int i = 0; i < 5; i++) begin
          logic signed [COORD_W+1:0] r;
          r = $signed({2'b0, yo}) + (COORD_W+2)'(i) - (COORD_W+2)'(2);
          rowok1[i] <= out_active && (r >= 0) && (r < $signed({2'b0, height}));
        end
        if (!out_active) begin
          fl <= fl + 1'b1;
        end else if (xc == width - 1'b1) begin
          xc  <= '0;
          yo  <= yo + 1'b1;
          rs0 <= slot_inc(rs0, 1);
        end else begin
          xc <= xc + 1'b1;
        end
      end
    end
  end

  // stage 2: window shift and filter arithmetic. The window holds the last
  // five columns read, which may span two output rows; each column keeps its
  // x position and whether it is a real column, and taps that fall outside
  // the centre pixel's row are masked (zero padding).
  pix_t               win  [5][5];   // [row][col], col 4 newest
  pix_t               nwin [5][5];
  logic [COORD_W-1:0] wx   [5];
  logic [COORD_W-1:0] nwx  [5];
  logic [4:0]         wreal, nreal;

  always_comb begin
    for (int i = 0; i < 5; i++) begin
      for (int c = 0; c < 4; c++) nwin[i][c] = win[i][c+1];
      nwin[i][4] = rowok1[i] ? lb_q[slot_inc(rs1, i)] : '0;
    end
    for (int c = 0; c < 4; c++) begin
      nwx[c]   = wx[c+1];
      nreal[c] = wreal[c+1];
    end
    nwx[4]   = xc1;
    nreal[4] = real1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 5; i++) for (int c = 0; c < 5; c++) win[i][c] <= '0;
      for (int c = 0; c < 5; c++) wx[c] <= '0;
      wreal <= '0;
    end else if (start) begin
      wreal <= '0;
    end else if (v1) begin
      win   <= nwin;
      wx    <= nwx;
      wreal <= nreal;
    end
  end

  // columns of the window inside the centre pixel's row
  logic [4:0] colok;
  always_comb begin
    colok[0] = (nwx[2] >= 2);
    colok[1] = (nwx[2] >= 1);
    colok[2] = 1'b1;
    colok[3] = ({1'b0, nwx[2]} + 13'd1 < {1'b0, width});
    colok[4] = ({1'b0, nwx[2]} + 13'd2 < {1'b0, width});
  end

  // taps enabled by the configured size, around the centre (row 2, col 2)
  function automatic logic tap_on(ksize_t k, int unsigned pos);
    int unsigned r;
    r = (k == 2'd0) ? 0 : (k == 2'd1) ? 1 : 2;
    return (pos + r >= 2) && (pos <= 2 + r);
  endfunction

  logic [12:0] sum;
  pix_t        mx;
  logic [17:0] recip;
  logic [30:0] prod;
  pix_t        result;

  always_comb begin
    sum = '0;
    mx  = '0;
    for (int i = 0; i < 5; i++)
      for (int c = 0; c < 5; c++)
        if (tap_on(kh, i) && tap_on(kw, c) && colok[c]) begin
          sum = sum + 13'(nwin[i][c]);
          if (nwin[i][c] > mx) mx = nwin[i][c];
        end
    // ceil(2^18 / taps)
    case ({kh, kw})
      4'b00_00:                       recip = 18'd262143;  // 1 tap: 2^18-1, exact after rounding
      4'b00_01, 4'b01_00:             recip = 18'd87382;   // 3
      4'b00_10, 4'b10_00:             recip = 18'd52429;   // 5
      4'b01_01:                       recip = 18'd29128;   // 9
      4'b01_10, 4'b10_01:             recip = 18'd17477;   // 15
      default:                        recip = 18'd10486;   // 25
    endcase
    prod   = 31'(sum) * 31'(recip) + 31'(1 << 17);
    result = IS_MAX ? mx : pix_t'(prod >> 18);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_pix   <= '0;
    end else begin
      out_valid <= v1 && !start && nreal[2];
      out_pix   <= result;
    end
  end

  assign done = !out_active && (fl == 2'd2) && !v1 && !out_valid;

endmodule
