# Global motion compensation engine for MPEG-4 Advanced Simple Profile

Global motion compensation (GMC) predicts a macroblock from a reference
frame that has been warped by one camera motion for the whole picture.
That motion may be a pan, a zoom or a rotation. Unlike ordinary block
motion compensation, the reference pixels a block needs do not lie on a
square grid. Each predicted pixel falls between four reference pixels,
and the set of reference pixels a block touches is a tilted, stretched
quadrilateral. This RTL computes the GMC prediction of one 16x16 luma
block and two 8x8 chroma blocks per macroblock, for the stationary,
translational, isotropic and affine motion models, at the MPEG-4 ASP@L5
frame size (720x576).

Four ideas make it cheap:

* **Scanline addressing.** The affine warp is evaluated by additions
  only. There are four multiplications per block for the top-left corner;
  every other pixel costs one addition per coordinate.
* **Load the bounding region once.** Before loading anything, the engine
  computes the box of reference pixels a block can touch. It reads each
  byte of that box from the frame memory exactly once.
* **Interleaved local memory with cascaded scheduling.** Four small
  two-port banks hold eight reference rows. Any 2x2 neighbourhood is read
  in one cycle. Rows no longer needed are overwritten by the next rows,
  including the chroma rows of the same macroblock, while luma warping
  is still going on.
* **Shared multipliers.** Parameter generation, macroblock setting and
  the interpolation filter never run at the same time. So three
  multipliers serve all of them, lent by the controller.

## Arithmetic

Sprite points are the warped positions of three frame corners:
top-left (0,0), top-right (W,0) and bottom-left (0,H). They are given in
half-pel units. From them the engine derives, once per frame:

```
m0 = W'(x'1 - x'0)/W    m1 = H'(x'2 - x'0)/H    m2 = x'0
m3 = W'(y'1 - y'0)/W    m4 = H'(y'2 - y'0)/H    m5 = y'0
```

Here W' = H' = 2^10. The result is a position in the reference frame
for every current pixel (x, y):

```
x' = m2 + m0*x + m1*y,   y' = m5 + m3*x + m4*y
```

All positions and parameters are signed 32-bit fixed point in units of
1/2048 pixel, which is the half-pel unit with 10 more fraction bits.
`gmc_pkg` defines `ALPHA`, `FRAC = ALPHA + 1` and the helper functions.
The divisions by W and H are done by multiplying with a rounded
reciprocal `round(2^(10+16)/W)` and shifting right by 16 bits with
rounding. The reduced models fill in the missing points:

| num_pts | model | m0, m4 | m1, m3 |
|---|---|---|---|
| 0 | stationary | 1.0 | 0 (and m2 = m5 = 0) |
| 1 | translational | 1.0 | 0 |
| 2 | isotropic | m4 = m0 | m1 = -m3 |
| 3 | affine | from the points | from the points |

Chroma (4:2:0) uses the same per-pixel increments and half the
translation. The MPEG-4 chroma sample-position offset is not modelled.
The predicted pixel is the bilinear blend of its four neighbours. The
weights are the top four fraction bits (1/16 pel), and the result is
rounded half up:
`((16-fy)((16-fx)p00 + fx p01) + fy((16-fx)p10 + fx p11) + 128) >> 8`.

## Units and data flow

```
 sprite points ──► gmc_param_gen ──► m0..m5 ──┐
                                               ▼
 mb_start ──► gmc_controller ──► gmc_mb_setting ──► per block: start x'/y',
                                               │    region box, row spread
                                               ▼
                                         gmc_warping
   frame memory ◄── ext_req/addr ── gmc_ext_addr_gen      (region rows)
   frame memory ──► rdata ─────────► gmc_mem_loc_decision ──► 4 x gmc_local_mem_bank
                                     gmc_warp_addr_gen (2 x gmc_warp_addr_pe)
                                        │ x', y' of each pixel
                                        ▼ 4 bank reads
                                     gmc_interp ──► out_valid/out_addr/out_data
                    gmc_warp_ctrl schedules both sides

 gmc_mult_bank: 3 multipliers, lent by gmc_controller to gmc_param_gen,
                gmc_mb_setting or gmc_interp
```

| module | role |
|---|---|
| `gmc_top` | the engine; ports listed in its header |
| `gmc_controller` | frame and macroblock sequencing; lends the multipliers; skips unsupported macroblocks |
| `gmc_param_gen` | m0..m5 once per frame; one multiplier of the bank, 5 cycles |
| `gmc_mb_setting` | corner position and region box of Y, Cb, Cr; Y after 5 cycles, all after 15 |
| `gmc_warping` | loading, local memory, warping and interpolation pipeline |
| `gmc_ext_addr_gen` | frame memory addresses of the three regions, row by row, clamped to the picture |
| `gmc_mem_loc_decision` | bank and address of each loaded byte |
| `gmc_local_mem_bank` | 40 x 8 two-port RAM, four instances (1280 bits in total) |
| `gmc_warp_addr_gen`, `gmc_warp_addr_pe` | scanline x'/y' generation |
| `gmc_warp_ctrl` | cascaded scheduling of loading and warping |
| `gmc_interp` | bilinear filter; three multipliers of the bank, 2 cycles |
| `gmc_mult_bank` | three multipliers lent to one unit at a time |

## Region box

For a block of N x N pixels with top-left position P, the box edges are
P plus the negative (left and top) or positive (right and bottom) parts
of (N-1)m0, (N-1)m1, (N-1)m3 and (N-1)m4. This picks the corner that
decides each edge from the signs of the parameters, so the four corners
are never computed. For example, a negative m3 makes the top-right
corner decide the top edge. One more column and row are added for the
interpolation neighbours. With zero motion a luma region is 17x17 bytes
and a chroma region 9x9, so 451 bytes are read per macroblock.

## Local memory layout

The three regions of a macroblock are loaded as one stream of rows. Each
row has a running number `seq`: the Y rows first, then Cb, then Cr. Row
`seq` goes to buffer row `r = seq mod 8`. Column `c` (counted from the
box's left edge, at most 20 wide) goes to:

```
bank    = {r[0], c[0]}                       (2x2 neighbours hit four different banks)
address = 20*r[2] + 10*r[1] + c/2           (rows 0-3 in the first half, 4-7 in the second)
```

Each bank is 40 x 8 bits. The size comes from the per-bank requirement
S = (15(m0 + m1) + 2) x 2, which is 40 for scaling up to 1.1 and
rotation up to ±0.1. A region wider than 20 pixels cannot be held.

## Cascaded scheduling (the subtle part)

`gmc_warp_ctrl` lets loading and warping run at the same time, under two
rules:

1. **Warping waits for data.** Before the first pixel of a block row, it
   computes the reference rows that the row can touch:
   `floor(Y0 + row_lo_off)` to `floor(Y0 + row_hi_off) + 1`. Here Y0 is
   the row's first y' and `row_lo_off`/`row_hi_off` =
   min/max(0, (N-1)m3), from the macroblock setting. The row starts only
   when all of those rows are completely in the banks. Otherwise the
   address generator stalls (`warp_stall`).
2. **Loading never overwrites a needed row.** A row `seq` may be
   requested only if `seq < min_needed + 8`. `min_needed` is the first
   reference row touched by the block row now being warped. Because
   m4 >= 0, later rows never need earlier reference rows, so everything
   above `min_needed` is discarded. Otherwise loading waits
   (`load_wait`).

Nothing else separates luma from chroma. Once the luma region is fully
loaded, chroma rows flow into the slots that finished luma rows free up,
while luma is still being warped (`cascade` counts those requests).
`min_needed` is updated the cycle after a row starts, and a request
writes its bank at least two cycles later. So the last read of a
discarded row always comes before it is overwritten.

The rules can only deadlock if one block row touches more than 7
reference rows. `gmc_mb_setting` therefore flags a block as unsupported
in any of these cases:

* the region is wider than 20 pixels;
* a block row touches more than 6 rows;
* m4 < 0.

The controller then skips the macroblock and pulses `mb_error` with
`mb_done`. Only the Y block's flag is consulted. A chroma block covers 7
pixel steps where the Y block covers 15, with the same increments, so
its region is never the larger one. An assertion in `gmc_top` checks
this.

## Timing

* One reference byte per frame memory cycle, and one predicted pixel per
  cycle when warping is not stalled. Loading is normally the bottleneck.
* Measured with a memory that grants every cycle (latency 2):
  * zero or translational motion: 476 cycles per macroblock;
  * zoom up to 1.08 with rotation about 0.08: 528-586 cycles;
  * zoom-out 0.7: 442 cycles;
  * a rejected macroblock: 18 cycles.
* At 25 MHz, 720x576 (1620 macroblocks) needs at most 514 cycles per
  macroblock for 30 frames/s. Zero motion reaches 32.4 frames/s.
* A whole frame under mild camera motion (zoom 1.02, rotation 0.01)
  takes 821,564 cycles, or 30.4 frames/s at 25 MHz. It reads 781,064
  bytes.
* Each macroblock costs the bytes of its three regions plus about 25
  cycles, so strongly zoomed content runs slower. Of those cycles:
  * about 10 come before the first load: the Y block's setting takes 5
    of them;
  * about 15 come after the last load: the last Cr row, the filter
    pipeline and the done handshake.
* Warping starts as soon as the Y block is set up. Macroblock setting
  finishes Cb and Cr while the Y region loads.
* The next macroblock does not start until the current one is done.
  Overlapping them would need the multipliers in two places at once.
* Pipeline: the pixel is offered by the address generator in cycle t.
  The banks are read at the end of t, and the filtered result appears in
  t+3 with its frame memory address (`out_addr`, same plane layout as the
  input).
* Frame memory layout: the Y plane (W x H bytes) at address 0, then Cb,
  then Cr (each W/2 x H/2), row by row.
* Read port: `ext_req`/`ext_addr` is taken when `ext_gnt` is high.
  `ext_rvalid`/`ext_rdata` return one byte per request, in order, after
  any latency. Up to 8 requests may be outstanding.

## Where this departs from, or adds to, the architecture it follows

* The published parameter formulas pair m1 with W'/W and m3 with H'/H.
  Here m1 is scaled by the picture height and m3 by its width, as the
  corner geometry requires. With W' = H' this changes nothing but the
  divisor.
* The scanline element drawing labels its multiplexer inputs (0, m1, m3)
  and (0, m0, m4). This RTL pairs m0/m1 for x' and m3/m4 for y', as the
  increment equations do.
* Multiplier sharing: three multipliers (`gmc_mult_bank`) serve all
  units. The controller's state picks the owner: the parameter
  generator, then macroblock setting, then warping. Setting finishes
  long before the filter's first pixel, even though warping starts
  early. The filter is
  rewritten so that three products suffice:
  `top = 16*p00 + fx*(p01-p00)`, `bot = 16*p10 + fx*(p11-p10)`,
  `16*top + fy*(bot-top)`. The last product uses registered `top` and
  `bot`, so the filter takes two cycles. The number of multipliers and
  this split are choices of this RTL.
* Unit-level choices of this RTL, not taken from the original:
  * frame memory layout and handshakes;
  * 1/16-pel interpolation with round-half-up;
  * clamping of positions outside the picture;
  * the unsupported-macroblock rule;
  * the controller's start/done protocol;
  * starting to load the Y region before Cb and Cr are set up.
* Not modelled: the perspective model (the architecture handles the
  other four models only), the non-cascaded baseline, and
  the off-chip frame memory itself. The frame memory is a test model,
  `tb/gmc_frame_mem.sv`.

## Simulating

Every testbench is self-checking and prints `TB_RESULT checks=N
failures=M`. With Verilator 5 (the testbenches mix integer widths freely, hence `-Wno-fatal`):

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb rtl/gmc_pkg.sv tb/tb_gmc_top.sv \
          --top-module tb_gmc_top -o sim && ./obj_dir/sim
```

The same command works for each unit testbench. Replace the top with
`tb_gmc_param_gen`, `tb_gmc_mb_setting`, `tb_gmc_warp_addr_pe`,
`tb_gmc_warp_addr_gen`, `tb_gmc_ext_addr_gen`, `tb_gmc_mem_loc_decision`,
`tb_gmc_local_mem_bank`, `tb_gmc_interp`, `tb_gmc_warp_ctrl`,
`tb_gmc_warping`, `tb_gmc_controller` or `tb_gmc_mult_bank`.

`tb_gmc_top` runs the engine at its default size (720x576). It compares
every predicted pixel and address against a direct, non-incremental
evaluation of the affine formula and the bilinear filter. It covers:

* all four motion models;
* border macroblocks;
* random grant gaps on the memory port;
* a rejected macroblock;
* stalls, load waits and cascaded loading, which it requires to have
  happened.

It also checks the 496-cycle budget (31 frames/s) for zero motion.
`tb_gmc_frame` runs one complete frame of 1620 macroblocks. It checks
all 622,080 pixels and reports the cycle count and frame rate. The
reference frame is a computed pattern (`pix()` in the memory model), so
no data files are needed.

## Changing it

* Frame size: the `FRAME_W`/`FRAME_H` parameters of `gmc_top`. `AW`
  must hold 1.5 x W x H addresses.
* Supported motion range: `LM_COLS`, `LM_DEPTH` in `gmc_pkg`, the bank
  address map in `lm_addr()`, and the unsupported rule in
  `gmc_mb_setting`.
* Interpolation accuracy: `IFRAC` in `gmc_pkg`.
