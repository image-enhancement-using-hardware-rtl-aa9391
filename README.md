# Point-wise image enhancement for 8-bit gray-level images

Medical images such as MRI slices, ultrasound frames and bone scans often use
only part of the available gray-level range, or hide the structure of
interest among similar gray levels. This design applies seven classic
*point* operations in FPGA logic. Each one maps a pixel's gray level to a new
gray level and never looks at the pixel's neighbours. These operations need no
line buffers, no frame memory and no pipeline control. An image is flattened
into a stream of pixels on the host, passes through the logic one pixel per
clock, and is rebuilt into a picture afterwards.

Every transform is a small combinational data path: an adder, a comparator,
or a squarer followed by a constant multiply. The top module sends the same
input pixel to all seven data paths. Each result comes out on its own port,
so all enhanced versions of an image are produced in a single pass.

## The transforms

All pixels are 8-bit unsigned integers (0 = black, 255 = white). `x` is the
input gray level.

| Output | Module | Rule | Default constants |
|---|---|---|---|
| `bright_o` | `brightness` | `min(x + G, 255)` | G = 40 |
| `stretch1_o` | `contrast_stretch` | `clamp((x - 5) * GAIN + 2)` | GAIN = 2 (see below) |
| `stretch2_o` | `contrast_stretch` | `clamp((x - 160) * 3 + 192)` | |
| `neg_o` | `negative` | `255 - x` | |
| `seg_o`, `seg_obj_o` | `threshold_seg` | `x` if `x > 50`, else 0 | THRESH = 50 |
| `range_o`, `range_in_o` | `range_highlight` | `x` if `100 < x < 180`, else 1 | bounds 100, 180 |
| `par_cap_o` | `parabola` | `255 - 255 * (x/128 - 1)^2` | |
| `par_cup_o` | `parabola` | `255 * (x/128 - 1)^2` | |

`clamp` limits a value to 0..255.

**Brightness control** moves the whole histogram up by G. A sum above 255 is
held at 255 rather than wrapped, so bright areas turn white instead of black.

**Contrast stretching** subtracts a base gray level, multiplies by a gain and
adds an offset. The band of gray levels around the base is spread over a
wider output range. One parameterised module serves both settings:

* *Stretching 1* (base 5, offset 2) brightens and expands almost the whole
  range. Its gain is not known; this design uses 2. Set `S1_GAIN` on the top
  to change it.
* *Stretching 2* (base 160, gain 3, offset 192) is much more selective.
  Inputs from 96 to 181 map linearly onto the output range. Darker inputs
  clamp to black and brighter inputs clamp to white. On a brain image this
  leaves mainly the bright tissue visible.

Results outside 0..255 are clamped. The arithmetic is done in 32-bit signed
form, so neither the subtraction nor the product can overflow before the clamp.

**Negative** swaps dark and light, like a photographic negative. Since
`x <= 255`, the result never goes below zero. The circuit is the subtraction
`255 - x`, which in binary equals the bitwise inverse of `x`.

**Threshold segmentation** separates objects from the background with one
comparison per pixel. A pixel brighter than 50 counts as object and keeps its
gray level; all other pixels become 0. `seg_obj_o` gives the classification on
its own. Keeping the object's gray level (instead of writing pure white) is a
choice of this implementation.

**Range highlighting** keeps pixels strictly between a lower and an upper bound
and sets every other pixel to the constant 1, which is practically black. In
`range_highlight` the bounds are input ports, so one instance can serve any
band; the top drives them with the constants 100 and 180.

**Parabola transforms.** With `u = x/128 - 1`, `u` runs from -1 (black) through
0 (mid-gray, 128) to almost +1 (white). The "cup" curve `255*u^2` turns
mid-gray black and both extremes bright. The "cap" curve `255 - 255*u^2` does
the opposite.

## Arithmetic of the parabola

This is the only transform that needs care to compute exactly. Because
`u^2 = (x - 128)^2 / 16384`, both curves can be computed with integers only:

```
d    = x - 128                  9-bit signed, -128..127
sq   = d * d                    0..16384
prod = sq * 255                 0..4 177 920 (22 bits)
cup  = prod >> 14               floor(255 u^2)
cap  = (255*16384 - prod) >> 14 floor(255 - 255 u^2)
```

Each output is the floor of its exact real value. `cap` is not computed as
`255 - cup`, because that would round the other way whenever `255*u^2` has a
fractional part. At `x = 255` the curves give `cup = 251` and `cap = 3`, not
255 and 0, because 255 is one step short of 256.

## Timing and interface

The design contains no registers. Every output is a combinational function of
`pix_i` in the same cycle, so the throughput is one pixel per clock and the
latency is zero. This matches the original hardware, whose timing is reported
only as combinational input-to-output delays of a few nanoseconds. In a real
system, place registers on `pix_i` and on the outputs at the chip boundary.
The design has no clock or reset ports, because it holds no state.

The top's ports are plain signals: `pix_i` (8 bits) in; eight 8-bit results
and two 1-bit flags out. Frame boundaries and pixel order belong to the host.
Raster order is expected, but any order works, because no output depends on
any other pixel.

All the data paths together need 74 signal pins (8 in, 66 out). The board's
device has 232 user I/O pins.

## Files

`rtl/`:

* `enh_pkg.sv`: the pixel type `pixel_t`, `PIX_W` = 8, `PIX_MAX` = 255, and
  the clamp function.
* `brightness.sv`, `contrast_stretch.sv`, `negative.sv`, `threshold_seg.sv`,
  `range_highlight.sv`, `parabola.sv`: one transform each.
* `image_enhance_top.sv`: the seven data paths behind one input. The
  parameters `G`, `S1_*`, `S2_*`, `THRESH`, `RANGE_LO` and `RANGE_HI` set the
  constants.

`tb/`: one self-checking testbench per module, named `tb_<module>.sv`.

* The block testbenches apply all 256 gray levels, and `range_highlight`
  also gets random bounds. Each output is compared with a reference computed
  separately in the testbench. The parabola reference uses floating point.
* `tb_image_enhance_top.sv` builds a 256 x 256 test image: gradients, a
  bright disc, random texture and a full 0..255 ramp. It streams the image
  through the top at its default parameters, one pixel per clock, and
  rebuilds eight output images. It then checks all 655 360 output values and
  that the frame took exactly 65 536 cycles. It also counts how often each
  mechanism occurred, and fails if any count is zero. The mechanisms are
  brightness saturation, both clamps of both stretches, object and background
  pixels, pixels inside and outside the range, and both parabola curves
  reaching 255.

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself after a
fixed number of cycles if something hangs.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl rtl/enh_pkg.sv \
    rtl/brightness.sv rtl/contrast_stretch.sv rtl/negative.sv \
    rtl/threshold_seg.sv rtl/range_highlight.sv rtl/parabola.sv \
    rtl/image_enhance_top.sv tb/tb_image_enhance_top.sv \
    --top-module tb_image_enhance_top
./obj_dir/Vtb_image_enhance_top
```

A single block works the same way. List `enh_pkg.sv` first, then the module and
its testbench. Lint with `verilator --lint-only -Wall` on the same file list.
All simulations finish in well under a second.

## How closely this follows the original design

Taken from the original design: the seven algorithms and their formulas,
the constants 40, 5/2, 160/3/192, 255, 50, 100/180 and 1, the 8-bit unsigned
pixel, the adder and subtractor structures of brightness and negative, the
three-input compare-and-select of range highlighting, and the purely
combinational timing.

Choices made here, where the original does not settle the point:

* **Gain of stretching 1** is 2. The original leaves it open.
* **Out-of-range results** of brightness are saturated, as in the original.
  Stretching results are clamped too, which is a choice of this design. The
  original may have brought the wider raw results out of the FPGA.
* **Segmentation output**: object pixels keep their gray level, background
  becomes 0, and the comparison is strict (`> 50`).
* **Parabola rounding** is floor for both curves. Both curves are produced at
  once.
* **One shared input.** The original builds and measures each algorithm as a
  separate FPGA design. Here they sit side by side in one top. Each module
  still works on its own.

Not included: the host-side steps around the FPGA. These are resizing the
image, flattening it into a stream and buffering it into frames before the
FPGA, and converting and reshaping the results after it. Also not included is
the JTAG link that carries pixels between the host and the board during
co-simulation. The testbenches stand in for the host steps.
