# Crack-detection particle filter: programmable-logic accelerators

A camera on a small robot or drone looks at a concrete surface, and a particle
filter finds the cracks in each frame. The particles are single-pixel points
scattered over the image. They are weighted by how close the colour under them
is to a dark "crack" colour, and how close they sit to a strong edge. They are
then resampled towards the heavy ones, twice per frame. On a Zynq-7030
(dual ARM Cortex-A9 plus FPGA fabric) the filter itself is cheap. Two
whole-frame image passes make up about 95 % of the software run time:

* the **Sobel edge filter**, which makes the edge map used by the likelihood
  step (84 % of the time);
* the **YUY2-to-RGB conversion**, which makes the colour image the likelihood
  compares with the target colour (11 %).

This RTL is those two passes as stream accelerators in the programmable logic,
plus a small register block through which the processor controls them. The
particle filter steps stay in software on the processor and are not part of
this RTL. These steps are particle placement, noise ("uncertainty"),
likelihood and resampling. The reference system measured 15 frames/s with these
two passes in hardware, against 2.3 frames/s in software only.

```
              AXI4-Lite (processor)
                     |
             +-------v---------+  edge_enable, centre_weight
             | accel_ctrl_regs |-------------------+
             +-------^---------+                   |
                     | frame_done x2               |
   YUY2 frame  +-----+-----------------------------v--+
  ------------>|  sobel_edge_filter                    |----> edge map (YUY2)
   (16 b/px)   +---------------------------------------+
   YUY2 frame  +---------------------------------------+
  ------------>|  yuy2_to_rgb                          |----> RGB (24 b/px)
               +---------------------------------------+
                            cdpf_pl_accel (top)
```

The two accelerators are independent. Each has its own input and output
stream, which the processor's stream DMA (not in this RTL) connects to the frame
buffers in DDR memory. Both can work on the same frame at the same time.

## Pixel format on the streams

The camera delivers 1280 x 1024 frames in YUY2, a YUV 4:2:2 format with 16 bits
per pixel. In memory, two neighbouring pixels occupy four bytes in the order
`Y0 U0 Y1 V0`, so they share one blue-difference byte U (Cb) and one
red-difference byte V (Cr). On every stream here, one beat is one pixel:

| stream | tdata | meaning |
|---|---|---|
| YUY2 in, edge out | 16 bits | `[7:0]` Y, `[15:8]` U on even pixels, V on odd pixels |
| RGB out | 24 bits | `[7:0]` R, `[15:8]` G, `[23:16]` B |

The side-band signals follow AXI4-Stream video practice: `tuser` marks the
first pixel of a frame and `tlast` the last pixel of a line. Valid/ready
handshakes apply on both sides, and an output beat holds still until it is
taken. Assertions in the modules check that rule.

The frame buffers in memory have a stride of 2048 pixels per line. The DMA
skips the stride, so the accelerators see only the 1280 active pixels of each
line.

## The edge filter (`sobel_edge_filter`)

### What it computes

The Y byte is already the grey level, so the filter works on it directly. With
the three columns of the 3x3 window called left, middle and right, and the
rows top, middle and bottom:

```
Ex = (top_R + K*mid_R + bot_R) - (top_L + K*mid_L + bot_L)
Ey = (bot_L + K*bot_M + bot_R) - (top_L + K*top_M + top_R)
E  = min(255, |Ex| + |Ey|)
```

K = 2 is the standard [1 2 1] Sobel operator and the default. K = 1 gives a
weaker operator with less noise, and K = 5 a stronger one that finds more edges
and more noise. K is a 3-bit register, so any value from 0 to 7 works. The sum
of absolute values replaces the square root of the sum of squares. It costs
nothing in logic and is what the reference system uses.

The edge map leaves the filter as a grey YUY2 frame: Y = E and chroma = 0x80.
The first and last rows and columns of the output are 0, because their window
would leave the image. With the filter switched off (`enable = 0`), frames pass
through unchanged, with the same timing. `enable` and `centre_weight` are
sampled with the first pixel of a frame, so a frame is never half one mode and
half the other.

### How the window moves (the part to read carefully)

A 3x3 window needs the two rows above the incoming pixel. These are kept in two
line buffers of WIDTH entries:

* `lb_top` holds the Y byte of row r-2;
* `lb_mid` holds the full 16-bit word of row r-1, so that pass-through mode can
  return the chroma too.

A 3x2 register window holds columns c-2 and c-1. Column c is formed from the
two line-buffer reads and the incoming pixel. Each time the window advances,
the old middle value moves into `lb_top` and the new pixel into `lb_mid` at the
same column, and the window shifts left by one column.

Output pixel (r-1, c-1) is complete when input pixel (r, c) arrives. A plain
implementation would therefore hold back the last column of every line, and
the last line of every frame, until the next frame pushed them out. To avoid
that, the filter walks a **virtual raster of (HEIGHT+1) x (WIDTH+1)
positions**. The extra column at the end of every line and the extra line at
the end of the frame are padding positions. They take no input (`s_tready` is
low there) and feed zeros into the window. At every position with r >= 1 and
c >= 1 the filter emits output pixel (r-1, c-1). Every output therefore leaves
one line and one pixel after its input, and the whole frame leaves before the
next one starts. The padding only affects border pixels, which are forced to 0
anyway.

The line buffers have a registered read port, so they fit block RAM. The read
address is the current column while the raster waits and the next column when
it advances. This keeps the read register on column c at all times.

The raster waits at position (0,0) for a beat with `tuser`. Beats without
`tuser` that arrive there are dropped, which resynchronises the filter after a
broken frame. Input `tlast` is not used, because lines are counted.

### Rate

The filter handles one raster position per clock unless the output is stalled.
A 1280 x 1024 frame takes (1024+1) x (1280+1) = 1,313,025 cycles. The reference
system measured 30.7 ms per frame for this step, including software and data
movement, which this filter would match at about 43 MHz.

## The colour converter (`yuy2_to_rgb`)

For each pixel, with Cb = U - 128 and Cr = V - 128:

```
R = Y + 1.402525 Cr
G = Y - 0.343730 Cb - 0.714401 Cr
B = Y + 1.769905 Cb + 0.000013 Cr
```

Each result is rounded to nearest and clamped to 0..255. The coefficients are
16-bit fixed point (value x 65536, rounded; `cdpf_pkg`). The result differs
from a floating-point evaluation by at most 1 in any channel.

An even pixel carries U and its odd neighbour carries V, so the converter holds
the even word until the odd one arrives. It then converts both pixels at once,
sending the first to the output register and parking the second in a one-entry
pending register that follows it out. Pixels are paired by alternation, so
lines must have an even length. The converter sustains one pixel per clock: a
1280 x 1024 frame takes 1,310,720 cycles plus two cycles of latency.
`frame_done` pulses with the last pixel of line HEIGHT-1, found by counting
`tlast`.

## Control registers (`accel_ctrl_regs`)

AXI4-Lite, 32-bit data, 4-bit byte address. All responses are OKAY.

| addr | name | bits |
|---|---|---|
| 0x0 | CTRL | `[0]` edge filter on (reset 0 = off, as the reference application starts), `[6:4]` centre weight K (reset 2) |
| 0x4 | EDGE_FRAMES | frames finished by the edge filter (read only, wraps) |
| 0x8 | RGB_FRAMES | frames finished by the colour converter (read only, wraps) |
| 0xC | GEOMETRY | `[15:0]` WIDTH, `[31:16]` HEIGHT (read only) |

A write is accepted when address and data are both valid. It is answered one
cycle later, and the next write waits until the response has been taken. Only
byte 0 of CTRL is writable, and `WSTRB[0]` must be set.

## Parameters

| parameter | default | where |
|---|---|---|
| `WIDTH` | 1280 | top, edge filter, registers: active pixels per line (line-buffer depth) |
| `HEIGHT` | 1024 | all: lines per frame |

The package `cdpf_pkg` holds the defaults, the colour coefficients, the pixel
structs and the register addresses. Logic cost is small: about 30 kbit of
line-buffer memory, roughly 300 flip-flops, and the multipliers of the colour
converter.

## Where this RTL departs from the reference system, or goes beyond it

* The reference accelerators were generated from C++ by high-level synthesis,
  and the Sobel filter came from a vendor reference design. This RTL is written
  by hand. Its stream handshake, border handling, padding raster, edge-map
  output format and registers are its own.
* Colour conversion is fixed point here. The reference used floating point
  (14 DSP blocks).
* The Sobel centre weight, which the reference treats as a tuning choice, is
  a run-time register here.
* The edge filter's pass-through mode stands for the "filter on/off" control
  of the reference video application.
* Nothing of the particle filter is in logic, as in the reference system. The
  reference also built a hardware resampler but dropped it, because its wide
  float arguments used too many I/O pins next to the two accelerators. It is
  not included.
* The output RGB byte order (R in the lowest byte) and the chroma offset of
  128 are assumptions. The reference formula does not fix them.

## Files

| file | content |
|---|---|
| `rtl/cdpf_pkg.sv` | constants, coefficients, pixel structs, register map |
| `rtl/sobel_edge_filter.sv` | streaming 3x3 Sobel filter with pass-through |
| `rtl/yuy2_to_rgb.sv` | streaming YUY2-to-RGB converter |
| `rtl/accel_ctrl_regs.sv` | AXI4-Lite control/status registers |
| `rtl/cdpf_pl_accel.sv` | top: the three blocks side by side |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Each testbench computes its expected results independently, ends by printing
`TB_RESULT checks=N failures=M`, and has a watchdog.

* `tb_sobel_edge_filter` runs 12 x 9 frames with K = 2, 1 and 5, a step edge,
  pass-through mode, junk beats before a frame start, and a mode change
  requested in mid-frame. Random input gaps and output back-pressure are on.
  The cycle count of an unstalled frame is checked against (H+1)(W+1).
* `tb_yuy2_to_rgb` runs 8 x 4 frames with random and corner-case pixels,
  including black, white and saturating chroma. It checks each output against
  the formula in real arithmetic, within 1 LSB, and checks that a continuous
  stream is never refused.
* `tb_accel_ctrl_regs` checks reset values, write/read-back, WSTRB, read-only
  registers, frame counters, and responses held while the master is not ready.
* `tb_cdpf_pl_accel` is the end-to-end test at the full 1280 x 1024 size with
  default parameters. It uses a synthetic concrete image with a wandering
  dark crack and a saturated colour patch. Three frames go through both
  accelerators at once: filter on with K = 2 at full rate, and timed; filter
  off with gaps and stalls; and filter on with K = 5. The frame counters are
  read back at the end. It counts every mechanism and fails if one never
  happened: edge mode, pass-through, operator change, edge saturation, RGB
  clamping, input gaps and output stalls. It runs in a few seconds.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/cdpf_pkg.sv tb/tb_cdpf_pl_accel.sv --top-module tb_cdpf_pl_accel
./obj_dir/Vtb_cdpf_pl_accel
```

Lint with `verilator --lint-only -Wall -y rtl rtl/cdpf_pkg.sv rtl/<module>.sv`.
Two kinds of lint warning remain and are harmless. One reports package
constants that a given module does not use. The other reports `rst_n` used
both as an asynchronous reset and in the `disable iff` of the assertions.

What has not been checked: timing closure and resource use on a real FPGA, and
operation with the real camera and DMA.
