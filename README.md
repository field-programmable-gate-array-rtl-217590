# Number-plate binarisation and tilt adjustment in hardware

An automatic number-plate recognition (ANPR) chain first finds the plate in a
car image, then cuts the plate into characters, then reads them. Between
finding and cutting, two things go wrong in real images. Uneven lighting makes a
single global threshold useless. A plate photographed at an angle is tilted and
sheared, and that breaks character segmentation. This RTL is the
pre-processing stage that sits between the two. It turns the grey plate into a
clean black-and-white image with a local threshold. It then levels the plate and
removes its slant, all in a streaming pipeline of one pixel per clock.

The algorithm and block structure follow the FPGA architecture published by
X. Zhai, F. Bensaali and R. Sotudeh, "Field Programmable Gate Array-based
Number Plate Binarisation and Adjustment for ANPR Systems". The widths,
handshakes, scan margins, fixed-point formats and flow control are this
implementation's own. They are listed in [Departures and own choices](#departures-and-own-choices).

## Where it sits

The plate localiser leaves two 640x480 frames in two external memories, so
both can be read in parallel:

* the greyscale car image, 8 bits per pixel;
* its own binary output image, 1 bit per pixel, in which the plate region is
  a block of 1s.

It also reports the plate's corners `(x0,y0)` and `(x1,y1)`, both inclusive. In
what follows, `a = y1-y0+1` is the plate height and `b = x1-x0+1` its width. Pixel
`(x,y)` of a frame is at address `640*y + x`.

```
              greyscale frame                      binary localiser frame
                    |                                       |
   +----------------v---------------------+   +-------------v-------------+
   | binarisation                         |   | adjustment                |
   |  np_reader -> mean_filter ->         |   |  rotation_angle_calc      |
   |   (window_shifter, averaging_filter) |   |        | alpha, Va        |
   |  -> local_threshold_filter           |   |  scan (x1,y1) -> coord_   |
   |        256x1 circular buffer  <------+---+--correction -> pixel_     |
   |        (binary plate)  ------------->+---+->reader -> 256x1, 2048x1  |
   +--------------------------------------+   +---------------------------+
                                                     to character segmentation
```

`np_preproc_top` contains the two modules. They run at the same time: the
adjustment reads the binarised pixels back out of the small circular buffer
shortly after the binarisation writes them.

## Binarisation: an 8x8 local mean threshold

Each plate pixel `f(x,y)` is compared with the mean of the 8x8 window around it:

```
mean(x,y) = floor( sum of f over columns x-3..x+4, rows y-3..y+4 / 64 )
b(x,y)    = 0  if f(x,y) <= mean(x,y) - 6,   else 1
```

The window size 8 and the offset 6 are the published values.

**Scan (`np_reader`).** The plate is read column by column, left to right, one
pixel per clock. To give every plate pixel, edges included, a full window of
real image pixels, the reader widens the scan. It starts 3 columns and 3 rows
before the plate and ends 4 after it. Coordinates that fall outside the frame
are clamped, which repeats the border pixel. A plate therefore costs
`(a+7)*(b+7)` memory reads. The reader's side-band signals (`px_row`, `px_col`,
`px_last`) are delayed by the memory latency `MEM_LAT` so that they arrive
together with the data.

**Window (`window_shifter`).** A LineBuffer RAM has one 64-bit word per scan row,
and that word holds the row's last eight pixels. For each incoming pixel `Y`, the
word of its row is read as `Yout`, and `(Yout << 8) | Y` is written back. The same
value enters the first row of an 8x8 register matrix, and every matrix row moves
down by one. After scan position `(col, row)` has been shifted in, matrix row
`k`, byte `j`, holds pixel `(col-j, row-k)`. The window is complete and belongs to
a plate pixel when the scan row and column are both at least 7. The centre
pixel is matrix row 4, byte 4. The LineBuffer depth is `MAX_H + 7` words, for
plates up to `MAX_H = 64` rows.

**Mean (`averaging_filter`).** A tree of 21 four-input adders computes the sum,
with 16, 4 and 1 adders on its three levels. Each level is registered. The mean
is the sum shifted right by 6. `mean_filter` is the window shifter followed by
the averaging filter. Its latency is 5 clocks from the pixel that completes the
window.

**Threshold and buffer (`local_threshold_filter`).** The comparison produces one
bit per plate pixel. The bits arrive in column-major plate order, so the pixel
at `(x,y)` has index `x*a + y`. Each bit is written into a 256x1 dual-port RAM
whose write address advances with every pixel and wraps from 255 to 0.
Because of the wrap, the buffer always holds the newest 256 binary pixels.
`wr_count` tells the adjustment module how many pixels have been written so far.

## Adjustment: levelling a tilted plate cheaply

### Measuring the tilt (`rotation_angle_calc`)

The tilt is read from the localiser's binary frame, not from the characters.
The block searches two plate columns, `x0+c` and `x0+b-c` with `c = floor(b/4)`.
In each it finds, from the top down, the first row holding a 1. The row numbers
counted from 1 are `d1` and `d2`. The tilt is `tan(theta) = (d2-d1)/(b-2c)`.
The block never computes the angle itself. It computes its reciprocal:

```
alpha = (b - 2c) / (d2 - d1)          fixed point, 4 fractional bits, rounded
Va    = |round((b/2) / alpha)|        rows cropped at top and at bottom
```

Every later formula divides by `alpha`. When `d1 = d2` the `flat` flag is set,
and every quotient becomes 0. In that case the plate passes through unrotated.
A column with no 1 gives `d = a`. `Va` is limited to `(a-1)/2`, so at least one
row is left. The search reads one row per clock and needs about `d1 + d2 + 2`
clocks.

### Mapping output pixels to source pixels (`coord_correction`)

The plate tilt is below 10 degrees, so `sin(theta)` is replaced by `tan(theta)`
and `cos(theta)` by 1. The rotation about the plate centre, combined with the
horizontal shear that removes the vertical slant, becomes:

```
y2 = y1 + (x1 - b/2) / alpha
x2 = x1 - (y1 - a/2) / alpha - ds,      ds = ((a - Va) - y2) / alpha
```

Every quotient is rounded to the nearest integer, halves away from zero, so this
is nearest-neighbour sampling. `ds` is the slant correction: `(a - 2Va - j) * tan(theta)`
for row `j = y2 - Va` of the cropped plate. It is largest at the top and 0 at the
bottom.

The hardware uses the formulas as an **inverse map**. Output pixel `(x1,y1)`
takes its value from binarised pixel `(x2,y2)`. The pipeline has six stages,
with one operation per stage and buffers `T1`..`T7` between them:

| stage | work |
|---|---|
| 1 | `T1 = y1 - a/2`, `T2 = x1 - b/2` |
| 2 | `T3 = T1/alpha`, `T4 = T2/alpha` |
| 3 | `T5 = x1 - T3`, `T7 = T4 + y1` |
| 4 | `T6 = (a - Va) - T7` |
| 5 | `ds = T6/alpha` |
| 6 | `x2 = T5 - ds`, `y2 = T7` |

The divisions are combinational dividers, one per quotient. In `anpr_pkg`,
`div_alpha` is the shared rounding divide.

### Cropping and the output scan (`adjustment`)

The rotation leaves empty wedges at the top and bottom of the plate. The output
is therefore the cropped plate: all `b` columns, and rows `Va .. a-1-Va`, which is
`a - 2Va` rows. The output is scanned column by column in the same order as the
binarisation.

### Fetching the pixel (`pixel_reader`)

A coordinate checker rejects any `(x2,y2)` outside the `a x b` plate, and that
output pixel becomes 0. Otherwise, the bit is read from the circular buffer at
`(x2*a + y2) mod 256` and held in register `P`. `P` is written into two
dual-port RAMs, 256x1 for vertical segmentation and 2048x1 for horizontal
segmentation. Each RAM's address advances by one per pixel and wraps. The
segmentation stage reads the RAMs through the `vs_*` and `hs_*` ports.

### Running both modules at once, and the buffer's reach

This is the subtle part of the design. The binary plate is never stored whole.
Only the newest 256 pixels exist, in column-major order. The adjustment scan
therefore trails the binarisation. It issues output pixel `(x1,y1)` only once
more than `x1*a + y1 + LAG` binary pixels have been written, or once the
binarisation is finished. `LAG` defaults to 128, half the buffer. While it
waits, the scan stalls, and `stall_cycles` counts those stalls. Because of this
rule, a source pixel up to `LAG` positions ahead of the scan position has
already been written. A source pixel up to about `256 - LAG - 8` positions
behind the scan position has not yet been overwritten.

For a source that lies further away, the read returns whatever the buffer
currently holds at that address. A source's distance from the scan position is
roughly its column offset times `a`, plus its row offset. So the buffer limits
the plate size and tilt that are reproduced exactly:

* an 18x99 plate is exact up to the full 10 degrees;
* a 60x300 plate is exact only up to about 1 degree with the default 256-entry
  buffer.

Raising `BUF_DEPTH` (a power of two) and `LAG` extends the reach. For example,
2048 and 1024 cover a 60x300 plate at 10 degrees; `tb_workload_large_plate`
runs the whole pipeline with these values on 60x300 plates at about +8 and
-10 degrees and a 40x200 plate at about 10 degrees, and every output pixel
matches. The cost is block RAM and a longer start-up delay (the tail after the
last binarisation read grows to under `LAG + 24` clocks).

## Timing

* Binarisation: one scan position per clock, `(a+7)*(b+7)` clocks per plate.
  The mean filter and threshold add 7 clocks of latency, plus `MEM_LAT`.
* Tilt measurement runs during the binarisation and finishes long before the
  scan needs it.
* Adjustment: one output pixel per clock when not stalled. It ends fewer than
  `LAG + 24` clocks after the last binarisation read.
* Measured from `start` to `done` (testbench `tb_np_preproc_top`): 2722 clocks
  for an 18x99 plate and 20704 clocks for a 60x300 plate. At 95.8 MHz that is
  28 us and 216 us.

## Interface of `np_preproc_top`

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset of all control state (RAM contents are not reset) |
| `start`, `box` | in | one-cycle pulse; `box` = `{x0, y0, x1, y1}` (10 bits each, `anpr_pkg::np_box_t`) |
| `gs_rd_en`, `gs_rd_addr`, `gs_rd_data` | out/out/in | greyscale frame memory, 19-bit address, 8-bit data returned `MEM_LAT` clocks after the request |
| `nb_rd_en`, `nb_rd_addr`, `nb_rd_data` | out/out/in | binary localiser frame memory, 1-bit data, one-clock latency |
| `bin_valid`, `bin_pix`, `bin_done` | out | binarised plate as it is written (column-major `a x b`) |
| `angle_done`, `angle`, `delta_d` | out | tilt result: `{flat, alpha, Va}` and `d2 - d1` |
| `out_valid`, `out_pix`, `out_count` | out | adjusted plate as it is written (column-major, `a - 2Va` rows per column) |
| `stall_cycles`, `done` | out | scan stalls of this plate; `done` after the last adjusted pixel |
| `vs_rd_addr`/`vs_rd_data`, `hs_rd_addr`/`hs_rd_data` | in/out | read ports of the 256x1 and 2048x1 segmentation RAMs (one-clock latency); pixel `n` of the plate is at `n mod 256` and `n mod 2048` |

Parameters are `MEM_LAT` (1), `MAX_H` (64), `BUF_DEPTH` (256), `LAG`
(`BUF_DEPTH/2`), `VS_DEPTH` (256) and `HS_DEPTH` (2048). A new `start` may be
given after `done`.

## Departures and own choices

The following points follow the published architecture:

* the 8x8 window;
* the threshold offset 6;
* the LineBuffer with 8-pixel words and the 8x8 matrix;
* the 21-adder tree;
* the 256x1 circular buffer;
* the tilt search with `c = b/4` and `alpha = (b-2c)/(d2-d1)`;
* the small-angle formulas;
* the `T1..T7` pipeline;
* the crop by `Va`;
* the coordinate checker;
* the 256x1 and 2048x1 output RAMs.

The following are choices made here:

* **Window at the plate edge.** The scan is widened by 3/4 pixels and clamped
  at the frame border. The published description only says that every pixel is
  a window centre. The centre of the even-sized window is taken 3 pixels after
  the window's start and 4 before its end.
* **Mean.** The sum is divided by 64 (a shift by 6), as the mean of 64 pixels
  requires. Some passages of the source describe an 8-bit shift instead.
* **Buffer address.** The read address of the binary buffer is
  `(x2*a + y2) mod 256`. The published formula reads as a division by 256. The
  modulo is the only reading that matches a write address that wraps at 256.
* **Address advance.** The threshold buffer's address advances per binarised
  pixel, not per clock, because the widened scan has idle cycles.
* **Slant term.** `ds` uses `(a - Va) - y2`. This merges the published slant
  formula `(a - 2Va - j) tan(theta)` with its datapath, which subtracts the
  rotated row from a register named `a`.
* **Arithmetic.** Fixed-point `alpha` with 4 fractional bits, round-to-nearest
  quotients, `floor` for `a/2` and `b/2`, the `flat` case, `d = a` for an empty
  column, and `Va <= (a-1)/2`.
* **Flow control.** `LAG`, the stall rule and the `start`/`done` handshakes are
  own choices. So are the memory latencies and the sequential output-RAM
  addressing.
* **Cycle count.** The published figure is "(b + 6) x C" clocks, with
  6297-16519 clocks for plates from 18x99 to 60x300. This design is
  one-pixel-per-clock and needs 2722 to 20704 clocks for the same two sizes.
  Its large-plate count is higher because of the window margin and the one
  memory read per clock.

The localiser, the character segmentation, the external frame memories and the
host PC are outside this RTL. The testbenches model the frame memories
behaviourally in `tb/frame_mem_model.sv`.

## Files

`rtl/`:

* `anpr_pkg.sv`: constants, types (`np_box_t`, `angle_t`) and `div_alpha`
* `np_preproc_top.sv`: top level
* `binarisation.sv`, `np_reader.sv`, `mean_filter.sv`, `window_shifter.sv`,
  `averaging_filter.sv`, `local_threshold_filter.sv`
* `adjustment.sv`, `rotation_angle_calc.sv`, `coord_correction.sv`,
  `pixel_reader.sv`
* `dp_ram.sv`: simple dual-port RAM with registered read, used for every
  on-chip buffer

`tb/`:

* `anpr_ref_pkg.sv`: scene generator and reference model. It computes each
  result straight from the formulas above, using real arithmetic for the
  quotients.
* `frame_mem_model.sv`: external frame memory model
* one self-checking testbench per module, named `tb_<module>.sv`
* `tb_np_preproc_top.sv`: the end-to-end test
* `tb_workload_large_plate.sv`: the large-plate, large-tilt test with an
  enlarged binary buffer

The end-to-end test runs at the default parameters on five scenes: 18x99 at
5.6 degrees, 60x300 in the frame corner, a level plate, a negative tilt in
the opposite corner, and 18x99 at about 9 degrees. It checks every binarised pixel and every adjusted pixel,
the tilt, the final segmentation-RAM contents and the clock count. It also
confirms that stalls, buffer wrap, zero fill, cropping, the level case, border
clamping and negative tilt all occur.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`.
With Verilator 5, from the repository root:

```
verilator --binary --timing -Irtl -Itb rtl/anpr_pkg.sv tb/anpr_ref_pkg.sv \
          tb/tb_np_preproc_top.sv --top-module tb_np_preproc_top
./obj_dir/Vtb_np_preproc_top
```

To run another testbench, replace the testbench file and the top-module name.
The include paths let Verilator find each module in the file of the same name.
The whole suite runs in seconds.
