// dma_ctrl: the DMA controller (DMACTLR). It holds the descriptor cache of
// all channels, arbitrates their requests round-robin and moves one burst at a
// time between a channel FIFO and the memory port.
//
// Requests:
//   write channel: its FIFO holds a full burst (BURST words, 2 KB), or the
//                  frame has been packed completely and words remain;
//   read channel:  words of the frame remain to be fetched and its FIFO is at
//                  least half empty, so a whole burst always fits.
// A burst is at most BURST words and never runs past the end of the frame.
// On `start` the descriptors are copied from `desc_in` into the cache, the
// frame parity toggles (it selects the buffer of ping-pong channels) and
// every channel's word offset returns to zero; descriptors may therefore be
// rewritten by the host during a frame and take effect at the next one.
//
// Memory port: one word per accepted request (mem_valid && mem_ready), word
// addressed; read data return in order on mem_rvalid, any number of cycles
// later. The controller waits for all read data of a burst before granting
// the next one. `wr_done[c]` says write channel c has written its whole frame
// (or is disabled).
// Interface: desc_in, per-channel FIFO levels/data/pops, start, frame_pixels,
// the memory port, and status (frame_parity, cur_ch, busy). Timing: one cycle
// from request to grant; a burst then issues one word per accepted cycle.
// Follows the document: cache, request rules, round-robin. This design's
// choice: the end-of-frame tail request, one burst at a time, ping-pong bits.
module dma_ctrl
  import seg_pkg::*;
#(
  parameter int unsigned DEPTH = FIFO_BYTES / (MEM_W / 8),
  parameter int unsigned BURST = BURST_BYTES / (MEM_W / 8),
  localparam int unsigned AW = $clog2(DEPTH),
  localparam int unsigned CW = $clog2(N_CH)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [2*COORD_W-1:0] frame_pixels,
  input  dma_desc_t   desc_in [N_CH],
  // write channels
  input  logic [AW:0] wr_level [N_WR],
  input  logic        wr_packed [N_WR],
  input  word_t       wr_data [N_WR],
  output logic        wr_pop [N_WR],
  output logic        wr_done [N_WR],
  // read channels
  input  logic [AW:0] rd_level [N_RD],
  output logic        rd_push [N_RD],
  // memory port
  output logic        mem_valid,
  input  logic        mem_ready,
  output logic        mem_we,
  output addr_t       mem_addr,
  output word_t       mem_wdata,
  input  logic        mem_rvalid,
  // status
  output logic        frame_parity,
  output logic [CW-1:0] cur_ch,
  output logic        busy
);

  typedef logic [2*COORD_W-4:0] woff_t;   // offset in words within a frame

  typedef enum logic [1:0] {S_IDLE, S_WRITE, S_READ} state_t;

  dma_desc_t desc [N_CH];        // descriptor cache
  woff_t     offset [N_CH];      // next word of the frame per channel
  woff_t     frame_words;
  state_t    state;
  woff_t     issue_left, ret_left;
  logic [N_CH-1:0] req, gnt;
  logic [CW-1:0]   gidx;
  logic            gvalid;
  woff_t           len [N_CH];

  assign frame_words = woff_t'((32'(frame_pixels) + 32'd7) >> 3);

  // request and burst length per channel
  always_comb begin
    for (int c = 0; c < N_CH; c++) begin
      woff_t remain;
      remain = frame_words - offset[c];
      req[c] = 1'b0;
      len[c] = '0;
      if (c < N_WR) begin
        woff_t lvl;
        lvl = woff_t'(wr_level[c]);
        len[c] = (lvl > woff_t'(BURST)) ? woff_t'(BURST) : lvl;
        req[c] = desc[c].en && (remain != '0) &&
                 ((lvl >= woff_t'(BURST)) || (wr_packed[c] && lvl != '0));
      end else begin
        len[c] = (remain > woff_t'(BURST)) ? woff_t'(BURST) : remain;
        req[c] = desc[c].en && (remain != '0) &&
                 (woff_t'(rd_level[c-N_WR]) <= woff_t'(DEPTH / 2));
      end
    end
  end

  rr_arbiter #(.N(N_CH)) u_arb (
    .clk, .rst_n, .req(req), .advance(state == S_IDLE && !start),
    .gnt(gnt), .gnt_idx(gidx), .gnt_valid(gvalid)
  );

  // effective word address of the current channel
  function automatic addr_t buf_base(dma_desc_t d, logic parity, woff_t fw);
    logic second;
    second = d.pp && (parity ^ d.ph);
    return d.base + (second ? addr_t'(fw) : addr_t'(0));
  endfunction

  wire wr_fire = (state == S_WRITE) && mem_valid && mem_ready;
  wire rd_fire = (state == S_READ)  && mem_valid && mem_ready;

  assign mem_valid = (state == S_WRITE) ? (issue_left != '0)
                   : (state == S_READ)  ? (issue_left != '0) : 1'b0;
  assign mem_we    = (state == S_WRITE);
  assign mem_addr  = buf_base(desc[cur_ch], frame_parity, frame_words) + addr_t'(offset[cur_ch]);
  assign mem_wdata = wr_data[(cur_ch < CW'(N_WR)) ? 2'(cur_ch) : 2'd0];
  assign busy      = (state != S_IDLE);

  always_comb begin
    for (int c = 0; c < N_WR; c++) begin
      wr_pop[c]  = wr_fire && (cur_ch == CW'(c));
      wr_done[c] = !desc[c].en || (offset[c] == frame_words);
    end
    for (int c = 0; c < N_RD; c++)
      rd_push[c] = (state == S_READ) && mem_rvalid && (cur_ch == CW'(c + N_WR));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      cur_ch       <= '0;
      issue_left   <= '0;
      ret_left     <= '0;
      frame_parity <= 1'b1;
      for (int c = 0; c < N_CH; c++) begin
        desc[c]   <= '0;
        offset[c] <= '0;
      end
    end else begin
      if (start) begin
        frame_parity <= !frame_parity;
        for (int c = 0; c < N_CH; c++) begin
          desc[c]   <= desc_in[c];
          offset[c] <= '0;
        end
      end
      case (state)
        S_IDLE: if (gvalid && !start) begin
          cur_ch     <= gidx;
          issue_left <= len[gidx];
          ret_left   <= len[gidx];
          state      <= (gidx < CW'(N_WR)) ? S_WRITE : S_READ;
        end
        S_WRITE: begin
          if (wr_fire) begin
            offset[cur_ch] <= offset[cur_ch] + 1'b1;
            issue_left     <= issue_left - 1'b1;
            if (issue_left == woff_t'(1)) state <= S_IDLE;
          end
        end
        S_READ: begin
          if (rd_fire) begin
            offset[cur_ch] <= offset[cur_ch] + 1'b1;
            issue_left     <= issue_left - 1'b1;
          end
          if (mem_rvalid) begin
            ret_left <= ret_left - 1'b1;
            if (ret_left == woff_t'(1)) state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);
  a_no_stray_read: assert property (@(posedge clk) disable iff (!rst_n) mem_rvalid |-> state == S_READ);

endmodule
