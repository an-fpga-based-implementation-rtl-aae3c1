// seg_regs: host-programmable configuration registers of the segmentation
// system: frame size, the two spatial filter sizes, the block geometry of the
// thresholding stage, the noise variance and its weight, the three threshold
// quantization levels, and the five DMA channel descriptors.
//
// Register map (word registers, cfg_addr selects one):
//   0 width        1 height       2 filter sizes {max_kh, max_kw, avg_kh, avg_kw}, 2 bits each
//   3 block width  4 block reciprocal round(2^32 / (block width * height))
//   5 sigma^2      6 a (Q0.8)     7 q0   8 q1   9 q2
//   16+c descriptor of DMA channel c: bit 31 enable, 30 ping-pong, 29 phase,
//        23:0 base word address
// Writes take effect in the next cycle; the processing blocks and the DMA
// sample what they need at the start of each frame, so the host may
// reprogram everything on the fly (e.g. switch between background and
// previous-frame reference) while a frame is running. Reads return the
// register addressed, combinationally. Reset values describe a 352x288 frame,
// 3x3 filters, four 88-column blocks and levels 16/32/64, with all DMA
// channels disabled. The map and reset values are this design's choice.
module seg_regs
  import seg_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cfg_we,
  input  logic [5:0]  cfg_addr,
  input  logic [31:0] cfg_wdata,
  output logic [31:0] cfg_rdata,
  output seg_cfg_t    cfg,
  output dma_desc_t   desc [N_CH]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg.width     <= COORD_W'(352);
      cfg.height    <= COORD_W'(288);
      cfg.avg_kw    <= 2'd1;
      cfg.avg_kh    <= 2'd1;
      cfg.max_kw    <= 2'd1;
      cfg.max_kh    <= 2'd1;
      cfg.blk_w     <= COORD_W'(88);
      cfg.blk_recip <= 32'd169467;     // round(2^32 / (88 * 288))
      cfg.sigma2    <= '0;
      cfg.alpha     <= 8'd128;
      cfg.q0        <= 8'd16;
      cfg.q1        <= 8'd32;
      cfg.q2        <= 8'd64;
      for (int c = 0; c < N_CH; c++) desc[c] <= '0;
    end else if (cfg_we) begin
      case (cfg_addr)
        6'd0: cfg.width     <= cfg_wdata[COORD_W-1:0];
        6'd1: cfg.height    <= cfg_wdata[COORD_W-1:0];
        6'd2: {cfg.max_kh, cfg.max_kw, cfg.avg_kh, cfg.avg_kw} <= cfg_wdata[7:0];
        6'd3: cfg.blk_w     <= cfg_wdata[COORD_W-1:0];
        6'd4: cfg.blk_recip <= cfg_wdata;
        6'd5: cfg.sigma2    <= cfg_wdata[15:0];
        6'd6: cfg.alpha     <= cfg_wdata[7:0];
        6'd7: cfg.q0        <= cfg_wdata[7:0];
        6'd8: cfg.q1        <= cfg_wdata[7:0];
        6'd9: cfg.q2        <= cfg_wdata[7:0];
        default:
          for (int c = 0; c < N_CH; c++)
            if (cfg_addr == 6'(16 + c))
              desc[c] <= '{en: cfg_wdata[31], pp: cfg_wdata[30], ph: cfg_wdata[29],
                           base: cfg_wdata[ADDR_W-1:0]};
      endcase
    end
  end

  always_comb begin
    cfg_rdata = '0;
    case (cfg_addr)
      6'd0: cfg_rdata = 32'(cfg.width);
      6'd1: cfg_rdata = 32'(cfg.height);
      6'd2: cfg_rdata = 32'({cfg.max_kh, cfg.max_kw, cfg.avg_kh, cfg.avg_kw});
      6'd3: cfg_rdata = 32'(cfg.blk_w);
      6'd4: cfg_rdata = cfg.blk_recip;
      6'd5: cfg_rdata = 32'(cfg.sigma2);
      6'd6: cfg_rdata = 32'(cfg.alpha);
      6'd7: cfg_rdata = 32'(cfg.q0);
      6'd8: cfg_rdata = 32'(cfg.q1);
      6'd9: cfg_rdata = 32'(cfg.q2);
      default:
        for (int c = 0; c < N_CH; c++)
          if (cfg_addr == 6'(16 + c))
            cfg_rdata = {desc[c].en, desc[c].pp, desc[c].ph, 5'd0, desc[c].base};
    endcase
  end

endmodule
