# Spatio-temporal video object segmentation in one pixel-per-clock pipeline

This RTL separates moving objects from the background of a gray-level video
stream and outputs their outlines, one binary edge frame per camera frame. It
works frame by frame in three stages:

1. **Motion detection.** Form the absolute difference between the current frame
   I(n) and a reference frame R(n). The reference is either a stored background
   or the previous camera frame. The difference is then smoothed by a spatial
   average filter and a spatial max filter, giving the motion frame D(n).
2. **Spatio-temporal thresholding.** Derive one threshold T(n) per frame from
   the statistics of D(n). These are block averages and histogram peaks. The
   threshold is then raised by a noise term, quantized to one of three levels,
   and limited to move by at most one level per frame so that it stays stable
   over time.
3. **Morphological edge detection.** Binarize D(n) with T(n). A 2x2 window then
   keeps only the white pixels that lie on the border of a white region,
   giving the edge frame E(n).

The hardware is a streaming pipeline that takes one camera pixel per clock. A
multi-channel DMA engine moves the frames between the processing blocks and
an external DDR memory. The threshold of a frame exists only once the whole
frame has been seen. So D(n) is parked in memory, and it is binarized and
edge-detected during the next frame period, while D(n+1) is being produced.
**The edge output therefore lags the camera by exactly one frame.**

Everything is written in synthesizable SystemVerilog, with parameters for the
maximum line width and the block and section counts. The frame size, the
filter sizes, the threshold levels, the noise term and the memory layout are
run-time registers. The DDR controller itself is not part of the RTL. The top
module brings out a simple word-addressed memory port for it.

## Frame period: what happens while frame n streams in

```
 camera I(n) ─┬─────────────────────────────► DMA wr ch 0 (I)  ── stored as next
              │                                                  reference / background
              └─► motion_detect ◄── DMA rd ch 3 (R(n): background or I(n-1))
                      │
                      D(n) ─┬──────────────► DMA wr ch 1 (D)  ── kept one frame
                            └──► st_threshold ──► T(n) at end of frame
 DMA rd ch 4 (D(n-1)) ──► morph_edge (threshold T(n-1)) ──► E(n-1)
                                 ├──────────────────────► DMA wr ch 2 (E)
                                 └──────────────────────► e_valid / e_bit port
```

All five streams run concurrently, in raster order, with valid/ready
handshakes on the DMA side. A frame period is one pass of all of them.

**Start.** The host pulses `frame_start`. As soon as the DMA and the
thresholding stage are idle, the frame controller in `seg_top` issues a single
internal `start`. At that edge:

- The DMA copies all five channel descriptors from the registers into its
  descriptor cache and flips its ping-pong parity.
- Every processing block clears its counters. The frame size and filter sizes
  are sampled from the registers.
- The controller latches the threshold used for this frame's edge detection.
  This is the T(n-1) computed at the end of the previous frame. It also latches
  whether the reference channel and the D(n-1) channel are enabled.

Because everything is sampled at `start`, the host can rewrite any register
while a frame runs. The change takes effect at the next frame. This is how
the system switches between background and previous-frame reference on the
fly.

**Special frames.**
- *Background capture.* With the reference read channel disabled, the motion
  detector uses 0 as the reference. Channel 0 is then pointed at the
  background buffer and stores the frame there.
- *First frame.* With the D(n-1) read channel disabled there is no previous
  motion frame yet, and the edge path stays idle.

**End.** The frame ends (`frame_done` pulse, `busy` low) when all of these
hold:
- D(n) has been fully produced;
- T(n) has been computed;
- E(n-1) has been fully produced, or edge detection is off;
- every enabled write channel has written its last word to memory.

**Overflow.** Two streams cannot be stalled: the motion frame (its filters
have no back-pressure) and the edge frame. If either finds its DMA FIFO full,
the sticky `ovf` flag is set. With the 4 KB FIFOs and the memory port below
its bandwidth limit, this does not happen in any test.

## DMA engine

The DMA (`dma`) has three write channels and two read channels. Each channel
has its own 4 KB FIFO of 512 x 64-bit words (`sync_fifo`). The channels share
one memory port through the controller `dma_ctrl`.

**Packing.** Pixels are packed eight to a 64-bit word, pixel k of a frame in
byte lane k mod 8, with lane 0 in the low byte. A frame of P pixels occupies
ceil(P/8) words. The last word is written even when it is partly filled.

**Descriptors.** Each channel has a descriptor register (address 16 + c):

| bits  | field | meaning |
|-------|-------|---------|
| 31    | en    | channel takes part in this frame |
| 30    | pp    | ping-pong: alternate between two buffers |
| 29    | ph    | phase of the ping-pong |
| 23:0  | base  | word address of buffer 0 |

The buffer used in a frame is `base + (pp & (parity ^ ph)) * frame_words`. The
parity starts at 0 on the first frame after reset and toggles at every
`start`. A writer with ph = 0 and a reader with ph = 1 on the same base
therefore always use opposite buffers. What the writer stores in frame n is
what the reader gets in frame n+1. This is how both I(n-1) and D(n-1) are
delivered. A background is a non-ping-pong buffer that is written once (pp = 0)
and then read every frame by the reference channel.

Example layout, in words, with F = frame_words:

| channel | frame 0 (capture) | frame 1 (background reference) | frame ≥ 2 (previous-frame reference) |
|---|---|---|---|
| 0 wr I    | en, base BG        | en, pp, ph=0, base I | en, pp, ph=0, base I |
| 3 rd R    | off                | en, base BG          | en, pp, ph=1, base I |
| 1 wr D    | en, pp, ph=0, base D | same               | same |
| 4 rd D    | off                | en, pp, ph=1, base D | same |
| 2 wr E    | off                | en, base E           | same |

**Requests.** The controller uses three rules:
- A write channel requests a burst when its FIFO holds 256 words (2 KB). It
  also requests once the whole frame has been packed and words remain, so the
  tail of the frame is flushed.
- A read channel requests when words of its frame remain to be fetched and its
  FIFO is at least half empty. A 256-word burst then always fits.
- A burst never runs past the end of the channel's frame.

**Arbitration and bursts.** A round-robin arbiter (`rr_arbiter`) picks one
requester per burst. It searches upward from the channel after the one served
last, so every channel is served within five bursts. During a burst the
controller issues one word per cycle in which `mem_ready` is high. For a read
burst it waits until all read data have returned before it grants the next
burst. The descriptor cache also holds each channel's running word offset.

**Memory port.**
- Requests: `mem_valid`, `mem_ready`, `mem_we`, `mem_addr` (24-bit word
  address) and `mem_wdata` (64 bits).
- Read data: `mem_rvalid` and `mem_rdata`. Read data must come back in request
  order, with any latency.

**Bandwidth.** The five streams need 5 bytes per pixel, which is 0.625 words
per clock at one pixel per clock. That is below the port's one word per clock,
so short memory stalls are absorbed by the FIFOs.

## Motion detector and its window filters

`motion_detect` joins the camera stream with the reference stream. A pixel pair
is taken only when both are present and the first filter can accept it. The
detector forms |I − R| with one subtractor and feeds it through two instances
of `window_filter`: the average filter first, then the max filter.

**Window sizes.** Each filter's window is set per frame, independently in each
direction, to 1, 3 or 5 taps. This covers every window from 1x1 to 5x5 with
odd sides.

**Line buffers.** The lines of the frame are held in six line buffers of MAXW
pixels each, block RAMs used as a ring. A 5-row window needs five rows. The
sixth lets the input write the next row while the output side still reads the
oldest one.

**Output scan.** The output side scans each output row over columns
0 … width−1. At each step it reads one column of the five rows around the
output row, one synchronous read per buffer, and shifts it into a 5x5 register
window. The centre of the window is the column read two steps earlier, which
is the output pixel.

**Crossing rows without idle cycles.** The scan goes straight from the last
column of one output row to column 0 of the next. Near a row boundary the
window therefore holds columns of two different output rows: the last two
columns of row y and the first columns of row y+1. Each window column carries
its x position. The taps are masked relative to the centre pixel: a tap whose
column would lie left of 0 or right of width−1 counts as zero. This gives
exactly the zero-padded result while never pausing the scan. Only after the
last row of the frame are two flush steps needed.

**Rate.** One output pixel per clock. The frame takes width × height cycles
plus the latency of about two rows.

**Back-pressure.** The output waits for the input rows it needs. The input is
stalled (`in_ready` low) only when it is four rows ahead of the output.

**Borders.** Pixels outside the frame count as 0 (zero padding), for both the
average and the max filter. Rows outside the frame are zeroed when a column is
loaded; columns outside the row are masked as described above.

**Average.** The sum of the n enabled taps is multiplied by ceil(2^18 / n) and
rounded. For every sum that can occur, with n up to 25 and pixels up to 255,
this equals the round-to-nearest quotient. No divider is needed.

**Max.** A comparator tree over the enabled taps gives the maximum.

**Latency.** From I(n) to D(n) the latency is about four rows.

## Spatio-temporal thresholding

`st_threshold` computes T(n) from D(n) without storing the frame. Everything
happens as the pixels pass, plus a few hundred cycles after the frame.

### Block extractor

`block_extractor` splits the frame into M = 4 vertical strips, each `blk_w`
columns wide. It routes each pixel to the analyser of its strip using a column
counter and a block counter that follow the raster scan. Columns beyond
M·blk_w go to the last strip. It adds one cycle of latency.

### Intensity histogram analysis (one per block)

Each `iha` produces two numbers for its block.

**Block average μ.**
- While the block streams in, the IHA accumulates the pixel sum.
- The average is `(sum · blk_recip + 2^31) >> 32`. The host register
  `blk_recip` = round(2^32 / pixels per block), for blocks of at least two
  pixels so that it fits in 32 bits. A multiplier thus replaces the
  divider.

**Histogram peak sum λ.** λ is the sum, over L = 4 equal sections of the gray
scale (64 levels each), of the most frequent gray level in each section.

*Building the histogram.*
- The 256-bin histogram lives in a block RAM and is built by
  read-modify-write. The count is read when a pixel arrives, and the
  incremented count is written one cycle later.
- If the next pixel has the same value, the read would return a stale count.
  The RAM output is therefore bypassed by the value being written
  (forwarding), so runs of equal pixels are counted correctly.

*Scanning the histogram.* After the frame's last pixel the histogram is
scanned from bin 0 to 255. Within a section:
- one register holds the largest count seen so far;
- a second register holds its gray level (on a tie the lower level is kept).

At the end of each section the gray level is added into the λ register. Each
bin is cleared as it is read, so the next frame starts from an empty
histogram. After reset the histogram is cleared once before the first frame.
The scan takes 258 cycles.

### Threshold estimator

`threshold_estimator` evaluates

    Tg = Σk (λk + μk) / (K·L + K),   K = M blocks

It uses one accumulator fed through two multiplexers, one choosing the block
and one choosing μ or λ, so it takes one operand per cycle. The division by
the constant K(L+1) = 20 is a multiplication by ceil(2^24/20) with rounding.
A pass takes 2M + 2 cycles, and the result is held in an output register.

### Spatio-temporal adaptation

`sta` takes Tg and produces the frame threshold in three steps.

**Noise adaptation.**

    Ts = Tg + ((a · σ²) >> 8)

- a is an 8-bit fraction (Q0.8).
- σ² is the noise variance, a 16-bit register. The noise estimator is outside
  this design, so the host or another block writes it.
- Ts is 17 bits wide and is not clipped.

**Quantization (first priority encoder).** The three registers q0 < q1 < q2
hold the quantization levels. Tq is the highest level not above Ts, or q0 if
Ts is below all three.

**Temporal selection (second priority encoder).** The threshold is kept as a
level index:
- On the first frame after reset, T(n) = Tq.
- After that, T(n) moves one level from T(n-1) towards Tq: up, down or
  unchanged.

Steps of at most one level per frame keep the threshold, and with it the
segmentation, from flickering between frames.

The threshold output is `q[index]`, so reprogramming the levels takes effect
at once.

### Timing

Once the motion detector reports that D(n) is complete, the thresholding stage
takes 3 + 258 + (2M + 2) + 1 = 272 cycles to deliver T(n). That is far less
than the time the DMA needs to finish storing D(n), so the threshold never
delays the next frame.

## Morphological edge detection and the dual-port line buffer

`morph_edge` binarizes the incoming D(n-1) with the latched threshold
(B = D > T, strictly greater) and applies the following rule:

> a white pixel is an edge pixel if at least one 2x2 square inside the frame
> that contains it is not entirely white; black pixels, and white pixels that
> sit only in all-white squares, are black in E.

**Where the difficulty lies.** A pixel belongs to up to four 2x2 squares,
spanning two pairs of rows. Its edge bit is only final after the squares from
both pairs have been evaluated.

**The two one-bit buffers.**
- The DPLB (dual-port line buffer), one bit per column, holds the partially
  built edge bits of the previous row.
- A second one-bit line buffer holds the binary pixels of the previous row.

**Per-pixel step.** When pixel (x, y) arrives, the 2x2 square with corners
(x-1, y-1) and (x, y) becomes complete. The engine then:

- reads the DPLB bit of row y-1. This bit already holds the contribution of
  the squares from rows y-2 and y-1;
- ORs in the contribution of the squares from rows y-1 and y;
- sends the now final edge bit of row y-1 to the output;
- writes the partial bit of row y back into the same DPLB entry, through the
  second port, in the same cycle.

Each DPLB line is therefore modified twice before it is read out.

**Row and frame ends.**
- Row 0 only initializes the DPLB.
- The last column of a row is finished when the first pixel of the next row
  arrives.
- After the last input pixel, the final row is flushed from the DPLB in
  width + 1 cycles. During the flush `in_ready` is low.

**Output.** The edge frame comes out in raster order at one pixel per clock. It
goes both to the `e_valid`/`e_bit` port and to DMA channel 2, stored as 0xFF
for an edge pixel and 0x00 otherwise.

## Registers

`seg_regs` holds all run-time settings. Writes (`cfg_we`, `cfg_addr`,
`cfg_wdata`) take effect in the next cycle. Reads (`cfg_rdata`) are
combinational. Unmapped addresses read 0.

| addr | field | reset |
|------|-------|-------|
| 0 | frame width (pixels, ≤ MAXW) | 352 |
| 1 | frame height (lines, < 4096) | 288 |
| 2 | filter sizes, 2 bits each: {max_kh, max_kw, avg_kh, avg_kw}; 0 = 1 tap, 1 = 3 taps, 2 = 5 taps | 3x3 and 3x3 |
| 3 | block width `blk_w` (columns per strip) | 88 |
| 4 | `blk_recip` = round(2^32 / (blk_w · height)) | 169467 |
| 5 | σ² (16 bits) | 0 |
| 6 | a (Q0.8) | 128 (0.5) |
| 7, 8, 9 | quantization levels q0, q1, q2 (ascending) | 16, 32, 64 |
| 16 … 20 | DMA descriptors of channels 0 … 4 (see the DMA section) | disabled |

Channel numbers: 0 write I(n), 1 write D(n), 2 write E, 3 read R(n), 4 read
D(n-1).

## Top-level ports of `seg_top`

| group | signals |
|---|---|
| host | `cfg_we`, `cfg_addr[5:0]`, `cfg_wdata[31:0]`, `cfg_rdata[31:0]`, `frame_start`, `busy`, `frame_done` |
| camera | `cam_valid`, `cam_pix[7:0]`, `cam_ready` |
| edge output | `e_valid`, `e_bit` |
| memory | `mem_valid`, `mem_ready`, `mem_we`, `mem_addr[23:0]`, `mem_wdata[63:0]`, `mem_rvalid`, `mem_rdata[63:0]` |
| status | `thr_cur` (T in use), `tg_cur`, `thr_idx`, `thr_ts`, `thr_tq_idx`, `thr_update`, `dma_parity`, `dma_ch`, `dma_busy`, `ovf` |

Parameters:
- `MAXW` = 2048, the maximum line width and the depth of every line buffer.
- `M` = 4, the number of vertical blocks.
- `L` = 4, the number of histogram sections.

## Performance and size

Every stage takes one pixel per clock. A frame of W x H pixels therefore takes
about W·(H + 4) cycles, with a camera that never pauses and memory that never
stalls. The extra rows are the latency of the two filters and the flush of
the edge detector's last row. Simulated at full size:

| frame | cycles per frame | pixels per clock | at 133 MHz |
|---|---|---|---|
| 352 x 288 | 103,078 | 0.983 | 0.78 ms |
| 1024 x 1024 | 1,052,966 | 0.996 | 7.92 ms |

The original description of this architecture quotes 7.5 ms for a 1024x1024
frame at 133 MHz. One pixel per clock alone would take 7.88 ms, so that figure
cannot be reached at one pixel per clock and 133 MHz. This implementation is
within 0.5 % of the one-pixel-per-clock bound. Clock rate and FPGA resource
use have not been measured here.

Coarse synthesis of the top at default parameters gives 387,472 memory bits:

| memory | bits |
|---|---|
| window-filter line buffers, 2 x 6 x 2048 x 8 | 196,608 |
| DMA FIFOs, 5 x 4 KB | 163,840 |
| histograms, 4 x 256 x 22 | 22,528 |
| one-bit line buffers, 2 x 2048 | 4,096 |

It also gives about 2,260 flip-flop bits and 2,310 cells in total.

## How far it follows the original architecture, and where it departs

These parts follow the original description:
- the stage order: abs difference, average filter, max filter;
- on-line filter sizes up to 5x5 with block-RAM line buffers;
- a programmable frame size up to a 2 K line;
- 4 KB FIFOs on every DMA channel, 2 KB write bursts, read requests at half
  empty, a descriptor cache and round-robin arbitration;
- D(n) buffered in memory for one frame while D(n-1) is edge-detected;
- the block extractor working without a frame store;
- per block, an average computed by multiply-by-reciprocal and a BRAM
  histogram with max, argmax and accumulate registers;
- Eq. Tg = Σ(λ+μ)/(KL+K) computed with a serially multiplexed accumulator;
- Ts = Tg + a·σ², two priority encoders with three programmable levels;
- the 2x2 edge rule with a dual-port line buffer.

These are this design's own choices, where the description leaves the detail
open:
- **Temporal rule.** T moves one quantization level per frame towards Tq.
  The original only says that the second encoder selects T(n) from Tq and
  T(n-1).
- **Quantizer.** Tq is the highest level not above Ts.
- **Counts and widths.** M = 4 blocks and L = 4 sections; the original gives no
  values. The memory word is 64 bits, eight pixels. There are five DMA
  channels with ping-pong descriptors.
- **Filter borders.** Zero padding at the frame border, done by masking taps
  so that the scan never pauses between rows.
- **Odd window sizes only** (1, 3, 5 taps per direction).
- **Binarization.** B = D > T (strict).
- **The 2x2 rule.** Squares that would stick out of the frame are not
  evaluated.
- **Frame control.** The frame handshake, the register map and the reset
  values are this design's own.
- **Background capture.** During capture the reference is zero, so the motion
  and threshold results of that frame are not meaningful. Its edge frame is
  produced one frame later like any other.

Not included:
- the DDR memory controller and the DRAM. The top exposes the simple port
  described above; testbenches use a behavioural memory with random stalls
  (`tb/ddr_model.sv`).
- the estimation of the noise variance σ², which is a register here.
- the contour tracing and filling that would turn edges into labelled objects.
  The original architecture does not build this step either.

## Simulation

Everything runs with plain Verilator 5. Each testbench is self-checking. It
ends by printing `TB_RESULT checks=<n> failures=<n>` and stops itself through
a watchdog if the design hangs.

```sh
# end-to-end, 64x40, six frames with camera and memory stalls
verilator --binary --timing -Irtl -Itb -y rtl -y tb rtl/seg_pkg.sv \
          tb/tb_seg_top.sv --top-module tb_seg_top -Mdir obj_top
./obj_top/Vtb_seg_top

# same for tb_seg_top_full (352x288, defaults) or tb_seg_top_1k (1024x1024)
```

Add `-Wno-fatal` if your Verilator version treats lint warnings as errors.
Block-level benches follow the same pattern (`tb_<block>.sv`).

**Block-level benches.** Each compares the block with an independent model
written in the testbench:
- `tb_sync_fifo`, `tb_rr_arbiter` and `tb_dma`. The DMA bench runs three frames
  with a partial last word, ping-pong read-back and memory stalls.
- `tb_window_filter` and `tb_motion_detect`. They cover every filter-size
  combination and zero reference, and check the one-pixel-per-clock rate.
- `tb_block_extractor`, `tb_iha`, `tb_threshold_estimator`, `tb_sta` and
  `tb_st_threshold`. They check the exact Eq. 1 and Eq. 2 results, the
  quantizer, the temporal steps and the cycle counts.
- `tb_morph_edge`, which checks against a direct evaluation of the 2x2 rule,
  including the flush timing.
- `tb_seg_regs`.

**End-to-end benches.** They share `tb/seg_top_tb_body.svh`, which holds a full
software model of the pipeline. The model covers D(n), block statistics, Tg,
Ts, Tq, T and E(n-1). The benches compare:
- the edge stream, bit by bit;
- the thresholds, every frame;
- the D and E frames left in memory, word by word.

The small bench also counts each mechanism and fails if one never occurred:
- background capture, background reference and previous-frame reference;
- filter size changes;
- camera stalls;
- bursts on all five channels;
- both ping-pong buffers;
- threshold steps up, down and hold;
- the one-frame output lag.

**Changing the design.**
- A wider line: raise `MAXW`, which sizes all line buffers. The coordinate
  width (`COORD_W` in `seg_pkg`) allows up to 4095.
- Different M or L: change the parameters of `seg_top`. The threshold
  estimator's reciprocal constant follows them. The default block width and
  reciprocal in `seg_regs` assume 352x288 with four blocks, so a host must
  program `blk_w` and `blk_recip` for other frame sizes.
