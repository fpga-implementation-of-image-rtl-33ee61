# Reconfigurable image processor: median, Sobel and multiplier-free 8x8 DCT

This is a small image-processing engine in SystemVerilog. An 8-bit greyscale
frame is streamed into on-chip RAM. A controlling processor then picks one of
three operations and starts it:

* **Median**: 3x3 median filter, which removes salt-and-pepper (impulse)
  noise.
* **Sobel**: 3x3 Sobel edge detector.
* **DCT**: 8x8 two-dimensional DCT followed by the inverse DCT. It produces
  the compression-domain coefficients and the reconstructed image.

The part with the most design content is the DCT. It uses no multipliers:

* The 8-point transform is split into an even half and an odd half.
* The eight cosine constants are 8-bit canonical-signed-digit (CSD) numbers.
* Every constant multiplication is a few shifts and adds of the shared odd
  multiples 1X, 3X and 5X.

The architecture follows the paper "FPGA Implementation of Image Processing
Architecture for Various Dip Applications" (V. Balaji, R. Sakthi Kumar). The
paper describes the DCT datapath in detail. It describes the rest only at
block-diagram level. Everything the paper leaves open was chosen for this
implementation; the sections below say which parts those are.

## Data path

```
 in_valid/in_pix/in_sof            avs_* (Avalon-MM, from the control CPU)
        |                                   |
     preproc ---> onchip_ram          avalon_regs (mode, width, height, start, status)
   (input image     (frame store,           |
    controller)      256x256x8)             v
                        |  ------------> proc_ctrl  (read order, stall)
                        v                   |
                   proc_block  <------------+
      +---------------+--------------+-------------------------------+
      | window3x3 -> median3x3       | window3x3 -> sobel3x3         |
      | rows of 8 -> dct2d -> idct2d -> row serialiser, clamp 0..255 |
      | (each engine on its own clock_gate)                          |
      +-------------------------------+------------------------------+
                        |                          \__ coef_valid/coef_col
                   fifo_sync (512 x 8)
                        |
                    out_ctrl ---> out_valid/out_pix/out_last, out_ready
```

Every stage moves one pixel per clock. All logic runs on a single clock.
The engines that are not in use have their clock gated off.

## The DCT datapath

### Coefficients

The transform is the orthonormal 8-point DCT,
`Z_n = (k_n/2) * sum_m x_m cos((2m+1) n pi/16)` with `k_0 = 1/sqrt(2)`.
It needs seven distinct constants, `a..g = cos(k pi/16)/2` for k = 1..7. The
constant `d = cos(pi/4)/2` also serves as the DC weight. Each constant is
stored as an integer over 128 (7 fractional bits), using the CSD digit
strings of the source paper:

| name | value  | digits (`-` = -1) | integer | shift-add form used          |
|------|--------|-------------------|---------|------------------------------|
| a    | 0.4904 | 0100 000-         | 63      | 64X - X                      |
| b    | 0.4619 | 0100 -1011        | 59      | 64X - 8X + 3X                |
| c    | 0.4157 | 0011 0101         | 53      | (3X << 4) + 5X               |
| d    | 0.3536 | 0010 1101         | 45      | (5X << 3) + 5X               |
| e    | 0.2778 | 0010 0100         | 36      | (3X << 3) + (3X << 2)        |
| f    | 0.1913 | 0001 1000         | 24      | 3X << 3                      |
| g    | 0.0975 | 0000 1100         | 12      | 3X << 2                      |

`csd_precompute` forms `3X = X + (X << 1)` and `5X = X + (X << 2)` once per
input. It returns all seven products at full precision.

The paper gives the decompositions of c and g. The other five are this
implementation's choice, written in the same style.

### Even/odd split (`dct1d`)

A pre-processing stage made only of adders computes two sets of values:

* the sums `s_i = x_i + x_(7-i)`, which drive the even outputs Z0, Z2, Z4, Z6
  through a 4x4 matrix of d, b and f;
* the differences `d_i = x_i - x_(7-i)`, which drive the odd outputs Z1, Z3,
  Z5, Z7 through a 4x4 matrix of a, c, e and g.

This takes 32 constant products instead of 64. All of them come from eight
`csd_precompute` units. The sums are rounded once, as `(sum + 64) >>> 7`.

`dct1d` has two pipeline stages: butterfly, then products and sums. It
accepts one 8-sample vector per clock.

`idct1d` is the transpose. It computes the even part `e_m` from Z0, Z2, Z4, Z6
and the odd part `o_m` from Z1, Z3, Z5, Z7. Post-processing adders then give
`x_m = e_m + o_m` and `x_(7-m) = e_m - o_m`.

### Two dimensions (`dct2d`, `idct2d`, `pingpong_transpose`)

`dct2d` chains three stages:

1. A row transform.
2. A ping-pong transpose memory: 128 words, bank 0 at 0..63 and bank 1 at
   64..127, with word (r, c) at `bank*64 + r*8 + c`.
3. A column transform.

Rows are written into one bank. When the bank holds eight rows, it is read out
column by column in eight clocks while the next block fills the other bank.
The output is one coefficient column per clock: `out_col[k] = Z[k][c]`. The
last column of a block leaves 13 clocks after the block's last row went in.

`idct2d` is the same structure in reverse order: columns in, rows out. Its
transpose memory is read only when `out_ready` is high. In `proc_block` a row
is requested every 8 clocks. That is exactly the rate at which the row
serialiser sends 8 pixels to the FIFO, so reconstructed pixels leave at one
per clock.

### Precision

* Pixels enter zero-extended as 9-bit signed values. There is no level shift
  by 128.
* The intermediate values and the coefficients are 12-bit signed. This
  covers the full range: the DC term of a white block is 2016.

The 8-bit constants limit accuracy. In particular, `d = 45/128` is slightly
below `0.35355`. A DCT/IDCT round trip therefore has a DC gain of
`(45/128)^2 * 64 = 0.989`. A flat white block (255) comes back as 249. Random
blocks come back within about 6 levels of the original.

This is a property of the 8-bit constants, not of the arithmetic. The
testbenches check the hardware bit-exactly against a direct matrix product
that uses the same integers.

## Median and Sobel engines

`window3x3` turns a raster stream into 3x3 neighbourhoods. It uses two line
buffers of `MAX_W + 1` pixels and a 3x3 register window. The pixel at
(x, y) shifts the column {row y-2, row y-1, row y} into the window. The
window's centre is then (x-1, y-1).

For every pixel to become a centre, the controller scans (width+1) x
(height+1) positions. The extra column and row repeat the image's last column
and row. Exactly width*height windows come out, in raster order. Windows
centred on the image edge are flagged as border windows:

* `median3x3` ranks the nine pixels by counting smaller ones, with ties
  broken by position. It outputs the pixel of rank 4. Border pixels pass
  through unchanged.
* `sobel3x3` computes `|Gx| + |Gy|` with the standard kernels, saturated to
  255. Border pixels give 0.

The paper names a median filter on 3x3 blocks of 180x180 images and a Sobel
filter for edge detection. The following are this implementation's choices:

* the sliding-window form;
* the kernels and the magnitude formula;
* the border rules.

## Control, stalls and clock gating

### Registers

The Avalon-MM register map (`avalon_regs`) uses word addresses. Reads return
data one clock later, with `readdatavalid`.

| addr | name   | access | bits                                                   |
|------|--------|--------|--------------------------------------------------------|
| 0    | CTRL   | W      | bit 0 = start (ignored while busy); bits 2:1 = mode: 0 median, 1 Sobel, 2 DCT |
| 0    | CTRL   | R      | mode in bits 2:1                                       |
| 1    | WIDTH  | R/W    | image width, reset value 256                           |
| 2    | HEIGHT | R/W    | image height, reset value 256                          |
| 3    | STATUS | R      | bit 0 = busy, bit 1 = done, bit 2 = frame loaded       |

### Running a frame

1. Write WIDTH and HEIGHT.
2. Stream the frame in raster order. Mark its first pixel with `in_sof`. The
   input port has no back-pressure.
3. Wait for STATUS.loaded.
4. Write CTRL with the mode and bit 0 set.
5. Take width*height pixels from `out_*`. `out_last` marks the final one,
   and STATUS.done follows.

Output order:

* Median and Sobel: raster order.
* DCT: 8x8 block order. Blocks go left to right, then top to bottom; inside a
  block the order is raster.

Width and height must be at least 3. In DCT mode both must also be multiples
of 8.

Switching the mode between frames is how the module is reconfigured. The
frame stays in RAM, so the same image can be processed in every mode without
being reloaded.

### Stalls

`proc_ctrl` issues one RAM read per clock. It holds reads back while the
output FIFO has fewer than `MARGIN` (160) free entries. Every result already
in flight then still fits:

* The worst case is two 64-pixel DCT blocks plus pipeline registers.
* The FIFO holds 512 entries, so a stall starts when 353 or more entries are
  in use.

When `out_ready` stays low, the FIFO fills and the reads stop. Nothing is
ever dropped. Assertions check this: the FIFO has no-overflow and
no-underflow assertions, and both ping-pong memories have no-overflow
assertions.

### Clock gating

`clock_gate` is a latch-and-AND clock gate: the enable is latched while the
clock is low. `proc_block` has four of them:

* the window generator;
* the median engine;
* the Sobel engine;
* the whole DCT path.

Each is enabled only while a frame runs in a mode that uses it. `scan_en`
forces all of them on. On an FPGA or in an ASIC flow, replace `clock_gate`
with the vendor's clock-gating cell. The latch in it is intentional.

### Timing

With `out_ready` held high:

* A median or Sobel frame takes `(W+1)(H+1)` clocks plus 3.
* A DCT frame takes `W*H` clocks plus about 95, because the last block drains
  at the paced rate.

For example, 180x180 median takes 32,766 clocks and 256x256 DCT takes 65,630
clocks.

## Parameters

| module            | parameter    | default | meaning |
|-------------------|--------------|---------|---------|
| `image_proc_top`  | `MAX_W`, `MAX_H` | 256, 256 | largest frame (frame store `MAX_W*MAX_H` bytes, line buffers `MAX_W+1`) |
|                   | `FIFO_DEPTH` | 512 | output FIFO entries |
|                   | `MARGIN`     | 160 | free FIFO entries required to issue a read |
|                   | `COEF_W`     | 12  | DCT coefficient and intermediate width |
| `dct1d`/`idct1d`  | `IN_W`, `OUT_W` | 9/12, 12 | sample widths |

The 256x256 default is the largest image the paper processes. The paper's
filter experiments use 180x180 images, which also fit at the defaults.

A frame store of 256x256x8 = 524,288 bits is larger than the block RAM of
the small Cyclone III device (EP3C5) used for the paper's power figures. For
that device, set `MAX_W = MAX_H = 180`.

## What is and is not here

Implemented:

* every block of the processor diagram: the input image controller, the
  on-chip RAM, the processing module with its three engines, the FIFO, the
  clock gates, the output image controller and the Avalon control port;
* the paper's DCT structure (even/odd decomposition, CSD constants,
  shift-add precomputing units, row-column 2-D transform with ping-pong
  memory) and an inverse DCT.

Not included:

* The Nios II soft processor. Its register accesses come in on the `avs_*`
  port.
* The host-side steps: converting the picture, adding noise, resizing, and
  exchanging data through text files.
* FPGA partial reconfiguration. "Reconfiguration" here means switching modes
  between frames.
* The "mixed-grained binary compute units" the paper mentions without
  describing them.

Choices made here, not in the paper:

* word widths, rounding and pipeline registers;
* the IDCT structure;
* the window generator and the border rules;
* the read orders, the stall rule and the FIFO size;
* the register map and all handshakes;
* the DCT-mode output order (block order).

## Files and simulation

* `rtl/imgproc_pkg.sv` holds the shared types (`pixel_t`, `mode_e`), the
  constant indices and the register addresses.
* Every other file in `rtl/` holds one module, named after its file.
* Each module has a self-checking testbench `tb/tb_<module>.sv`. Each
  testbench prints `TB_RESULT checks=N failures=M`.
* `tb/tb_ref_pkg.sv` holds the reference models:
  * a direct 8x8 matrix DCT/IDCT whose entries come from `$cos`;
  * a sorting median;
  * a direct Sobel.
* `tb/tb_top_harness.sv` is the end-to-end bench body. It plays three roles:
  the Avalon master, the image source and the image sink. It runs all three
  modes with and without back-pressure. It compares every output pixel and
  every DCT coefficient with the reference models. It also requires each of
  these mechanisms to occur at least once:
  * a read stall;
  * back-pressure;
  * a mode switch;
  * a gated-off engine;
  * a ping-pong write during a read;
  * a border window;
  * a frame restart.
* `tb/tb_image_proc_top.sv` runs the harness on 32x24 frames.
* `tb/tb_image_proc_full.sv` runs it at full size, with the processor's
  default parameters: 180x180 for median and Sobel, 256x256 for the DCT,
  and a last Sobel frame at 256x256. It takes well under a minute.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/imgproc_pkg.sv tb/tb_ref_pkg.sv tb/tb_image_proc_full.sv \
    --top-module tb_image_proc_full
./obj_dir/Vtb_image_proc_full
```

Replace the testbench name to run any other bench. Lint a module with
`verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/imgproc_pkg.sv rtl/<module>.sv`.
