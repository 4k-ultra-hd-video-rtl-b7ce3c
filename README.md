# 4K video noise reduction and gray-scale conversion in SystemVerilog

This design processes 3840x2160 RGB video (8 bits per channel) in one of two
modes, one at a time:

* **Noise reduction.** Each colour channel goes through a 3x3 mean filter:
  every output pixel is the average of the nine pixels around it,
  `Y(x,y) = sum P(i,j) / 9` for `i = x-1..x+1`, `j = y-1..y+1`.
* **Gray-scale.** `Y = 0.3 R + 0.59 G + 0.11 B`.

A 4K frame has 8,294,400 pixels. At 60 frames/s that is about 500 million
pixels per second. The filter pipeline here accepts one pixel every second
clock cycle. A single pipeline would therefore need a clock near 1 GHz. The
design instead cuts the frame into **four equal regions**, each with its own
pipeline. Each region has 2,073,600 pixels, so the clock comes down to about
**249 MHz** (2 × 2,073,600 × 60). Four regions with three colour channels
each give twelve filter datapaths running at once.

The arithmetic is built from multipliers that take **two cycles** and adders
that take **one cycle**. Each adder is used twice per pixel through
multiplexers. The filter has a latency of 6 cycles and accepts a new pixel
every 2 cycles. The gray converter has a latency of 4 cycles and the same
2-cycle rate.

## Structure

```
nr_system                       four regions side by side, one mode input
└─ nr_region_unit  (x4)         one region: mode register, stream routing
   ├─ window_generator          pixel stream -> 3x3 windows (2 line buffers)
   ├─ fir_filter                R, G, B filtered in parallel
   │  └─ fir_channel (x3)       9 multipliers, 3+1 shared adders, 6-cycle latency
   └─ gray_converter            3 multipliers, 1 shared adder, 4-cycle latency
nr_pkg                          pixel, window, tag and mode types; coefficients
```

In noise-reduction mode a region's pixels go through the window generator and
then the FIR filter. In gray-scale mode the raw pixels go straight to the gray
converter. Both datapaths are always present. A mode register picks which one
takes the input and drives the output. This register stands in for
reconfiguring a device between two single-mode configurations.

## Streams and framing

Every region has one input stream and one output stream, both in raster order.

Input: `in_valid` / `in_ready` / `in_pix`, plus two flags carried with the
pixel:

* `in_hsync` is set on the **last pixel of a row**.
* `in_vsync` is set on the **last pixel of the frame**, instead of hsync.

A pixel is taken on a rising clock edge where `in_valid && in_ready`. A low
`in_ready` is the block's BUSY. The window generator gets the frame's width
and height from these flags. `REGION_W` only sets the length of its line
buffers, so any frame from 2x2 up to `REGION_W` columns works.

Output: `out_valid` is a one-cycle strobe with `out_pix` and `out_tag`.
`out_tag.eol` marks the last result of a row and `out_tag.eof` the last result
of the frame. There is no back-pressure on results: the sink must take one
whenever `out_valid` is high, at most one every 2 cycles. In gray-scale mode
the gray value appears on all three channels of `out_pix`. `mode` shows each
region's active mode.

Every input pixel produces exactly one output pixel, so the output frame has
the same size as the input frame. Neighbours outside the frame count as
**zero**, which is constant zero padding. Each region is filtered as an image
of its own. As a result, the pixels along an internal border between two
regions also see zeros, not the neighbouring region's pixels. Feeding each
region one extra row and column of its neighbours would avoid this. That would
be a change in the surrounding system, not in these modules.

Reset is asynchronous and active low (`rst_n`).

## The window generator

Two line buffers of `MAX_W` RGB pixels hold the two rows above the incoming
one. When pixel `(x, y)` arrives, three pixels are read at column `x`:
`(x, y-2)` and `(x, y-1)` from the buffers, and the new pixel itself. These
form a column that shifts into a three-column window. The incoming pixel then
overwrites `(x, y-1)` in the first buffer, and the old value moves to the
second buffer. At that point the window centred on `(x-1, y-1)` is complete
and is emitted. Rows above the frame and the column left of it are replaced
by zeros.

The one-pixel delay means two kinds of window have no input pixel to trigger
them:

* **Row end.** The window centred on the last pixel of a row needs a zero
  column on its right. It is emitted in one extra cycle after the row's final
  pixel. `in_ready` is low during that cycle.
* **Last row.** After the frame's final pixel, the last row is emitted by
  sweeping the line buffers once more with a zero row below (the flush). This
  takes about one row's worth of window slots. `in_ready` stays low for the
  whole sweep.

The output is a register that holds its window until the filter takes it.
Whenever the filter is busy, that stall reaches the input as `in_ready` low.
While row 0 fills the buffers and nothing is emitted, the generator accepts a
pixel every cycle. After that the filter limits the rate to one pixel every 2
cycles. A frame is taken in within 2·W·H + 2·H cycles.

## The FIR channel: two-cycle multipliers and reused adders

This is the least obvious part of the design. Each colour channel computes
`sum(P_i * C_i)` over the nine window pixels `P1..P9` (raster order) using:

* nine multipliers of two cycles each: an operand register, then product
  registers `A..I`;
* a first stage of three adders, each used twice;
* a second stage of one adder, used twice.

The schedule for a window presented in cycle 0:

| cycle | registers after the edge | operation |
|---|---|---|
| 1 | operand registers | multiply, 1st cycle |
| 2 | `A..I` = `P_i*C_i` | multiply, 2nd cycle |
| 3 | `J,K,L = A+B, D+E, G+H` | stage 1, pass 1 |
| 4 | `J,K,L += C, F, I` | stage 1, pass 2 (feedback) |
| 5 | `M = J+K`, `LH = L` | stage 2, pass 1 |
| 6 | `Y = round(M + LH)`, `y_valid` | stage 2, pass 2 |

After stage 1, `J`, `K` and `L` hold the three row sums, and stage 2 adds
them. Every resource is busy for two consecutive cycles per pixel, so a new
window can enter every 2 cycles. `fir_filter` enforces that rule by raising
`busy` for one cycle after each window it takes. The next window's first
stage-1 pass overwrites `L` in cycle 5, one cycle before stage 2 needs it.
`LH` keeps a copy of `L` for that second pass. `LH` is this design's
addition: without it the 2-cycle rate is impossible with one stage-2 adder.

`fir_filter` splits the window into its R, G and B planes and runs three
`fir_channel`s in lock step. It delays each window's tag by the same 6 cycles.

## The gray converter

This uses the same idea with three multipliers and one adder. Products
`A = 0.3R`, `B = 0.59G` and `C = 0.11B` are ready in cycle 2. Then
`S = A+B` in cycle 3 and `Y = round(S+C)` in cycle 4. A pixel can enter every
2 cycles, and `busy` is high for the cycle after each accepted pixel.

## Fixed-point arithmetic

Coefficients are unsigned Q0.16 fractions (`nr_pkg`):

| constant | value | meaning |
|---|---|---|
| `FIR_TAP_MEAN` | 7282 | 1/9 (round(65536/9)) |
| `GRAY_COEF_R` | 19661 | 0.30 |
| `GRAY_COEF_G` | 38666 | 0.59 |
| `GRAY_COEF_B` | 7209 | 0.11, rounded up so the three sum to exactly 1.0 |

Products are 24 bits wide and sums are kept at full width. The result is
rounded to nearest (`+2^15`, `>>16`) and saturated to 255. The FIR result is
always within half a step of the exact average. The gray result is within
about half a step of the exact weighted sum. The filter taps are a parameter
(`FIR_COEF`, nine Q0.16 values, C1 upper left to C9 lower right), so other
3x3 kernels with non-negative taps can be used.

## Mode changes

`mode_i` is shared by all regions. When it differs from a region's active
mode, that region stops taking pixels at its next frame boundary, which is the
first point where no frame is half taken in. It waits until the last result
of earlier frames has left, then switches. A frame is therefore never split
between modes, and the two datapaths never produce results in the same cycle
(checked by an assertion). Each region switches on its own.

## Sizing and rates at the default parameters

| configuration | storage | cycles per frame | clock for 60 fps |
|---|---|---|---|
| 4 regions of 1920x1080, noise reduction | 2 × 1920 × 24 bit line buffers per region | ≈ 2 × 1920 × 1080 = 4.15 M | ≈ 249 MHz |
| 4 regions of 1920x1080, gray-scale | none | 2 × 2,073,600 = 4.15 M | ≈ 249 MHz |
| 1 unit for 3840x2160 (`NUM_REGIONS=1, REGION_W=3840`) | 2 × 3840 × 24 bit | ≈ 16.6 M | ≈ 995 MHz |

Whether a given FPGA or process reaches these clocks is outside the RTL.

## Departures and gaps

* **Region splitting is not included.** The top takes one stream per region.
  Producing four region streams from a camera's raster output needs frame
  buffering and a merge on the output side. How to do that depends on the
  surrounding system.
* **Region borders** are zero-padded, as described above.
* **Reconfiguration** between modes is a multiplexer over two resident
  datapaths, not a device reconfiguration.
* **Output widths.** Results are 8 bits per channel: 24-bit RGB, or an 8-bit
  gray value repeated on R, G and B. Wider raw sums are available inside the
  channels if a different output format is needed.
* **Schedule.** Each addition stage takes 2 cycles, for a total latency of
  6 cycles. A 3-cycle addition step would not fit the 6-cycle latency and
  2-cycle rate that the rest of the design relies on.
* **Non-pipelined variants** are not included: a filter with eight separate
  adders in a tree, and a gray converter without adder sharing. Neither is
  needed for the pipelined system.
* **No back-pressure on results.** A sink that can stall would need a FIFO
  behind each region.

## Files

* `rtl/nr_pkg.sv`: shared types (`rgb_t`, `window_t`, `tag_t`, `mode_e`)
  and coefficients.
* `rtl/fir_channel.sv`, `rtl/fir_filter.sv`, `rtl/gray_converter.sv`,
  `rtl/window_generator.sv`, `rtl/nr_region_unit.sv`, `rtl/nr_system.sv`:
  one module each, described above.
* `tb/tb_<module>.sv`: a self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M`.
* `tb/tb_stream_agent.sv`: a per-region driver and checker used by the
  system-level testbenches. Pixel values come from a hash of
  (region, frame, x, y), so the expected output of any pixel can be
  recomputed without storing frames.
* `tb/tb_nr_system_full.sv`: the system at its default parameters. One full
  3840x2160 frame (four 1920x1080 regions) in noise reduction, then one in
  gray-scale. About 8.3 M cycles and 25 M checks; roughly half a minute in
  Verilator.
* `tb/tb_nr_system_single_unit.sv`: one unit with 3840-pixel line buffers
  filters a whole 4K frame. About 16.6 M cycles.
* `tb/tb_noise_reduction.sv`: adds roughly Gaussian noise (σ ≈ 29 levels)
  to a smooth test image and measures the error against the clean image
  before and after filtering. The noise power falls by about 9x, the
  expected factor for a 3x3 mean of independent noise.

## Simulating

With Verilator 5, from the project root:

```sh
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/nr_pkg.sv tb/tb_nr_system.sv --top-module tb_nr_system -o sim
./obj_dir/sim
```

Substitute any other testbench name. The unit testbenches run in well under
a second each. They check:

* every result against an independently computed value (integer model and
  floating-point average or weighting);
* the exact latencies of 6 and 4 cycles;
* the 2-cycle pixel rate;
* tag placement;
* stalls;
* row-end and last-row windows, frames of random sizes and random output
  back-pressure (window generator);
* mode changes, and all four regions producing results in the same cycle
  (system test).

All of these testbenches pass.
