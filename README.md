# Streaming 3x3 image kernels and histograms for FPGAs

This is a set of SystemVerilog building blocks for image processing on an FPGA.
Pixels arrive as a raster-order stream, one per clock. A window of neighbouring
pixels is built on chip, so each pixel is read from outside only once. The
blocks are:

- **Line buffers** in dual-port RAM, plus a **3x3 window buffer** made of registers.
- Three kernels that plug in behind that window: **Sobel** edge detection,
  **Gaussian** smoothing, and binary **dilation/erosion**, chained here into a
  morphological **closing**.
- Two **histogram** units. Each counts one pixel per clock despite the
  read-modify-write dependency on its bin memory.
- A few small datapath examples: bit reversal by wiring, multiply-by-six by
  shift-and-add, two- and three-input multiplexers (the latter latch-free), two
  registers in series, and a streaming divide-by-two of every pixel.

The architecture follows the RTL designs described in the master's thesis *A
Comparative Study between RTL and HLS for Image Processing Applications with
FPGAs* (UC San Diego, 2016). The thesis gives the structure of each unit but
leaves open many details: stream control, borders, memory collisions and
clearing. Those details are this design's own choices, and they are listed in
"Where this design departs from, or adds to, the description" below.

```
               +--------------------------- image_proc_top ---------------------------+
 pix_in ------>| sobel_filter    = lw_buffer -> sobel_kernel     -> sobel_pix          |
 pix_valid --->| gaussian_filter = lw_buffer -> gaussian_kernel  -> gauss_pix          |
 pix_ready <---| pixel_halve     (pixel / 2 by wiring)            -> half_pix          |
               | histogram_rtl   (read-first memory + bypass)     -> hr_bin/hr_count   |
               | histogram_acc   (run accumulator)                -> ha_bin/ha_count   |
 bin_in ------>| morph_closing   = lw_buffer(1b) -> dilation -> lw_buffer(1b) -> erosion|
               | bit_reverse, mul6, mux2, mux3, reg_chain (own ports)                  |
               +-----------------------------------------------------------------------+
 lw_buffer = line_buffer (one dp_ram, three lines per word) -> window_buffer (3x3 regs)
```

## The window front end (`line_buffer`, `window_buffer`, `lw_buffer`)

This is the part that needs the most care. Every kernel output depends on how
the window lines up with the image.

**Line buffer.** Three image lines are kept in a single dual-port RAM of
`IMG_W` words. Each word holds one column's three pixels, concatenated as
`{line 2, line 1, line 0}`, where line 0 is the most recent. When a pixel arrives at column `x`:

1. The read counter addresses word `x`. The RAM read is synchronous, so the old word appears one clock later.
2. That old word is the line buffer's output. `out_col[k]` is the pixel of
   column `x` from `k+1` lines above.
3. In the same clock the word is written back to `x` with its slots moved up
   by one: `{line 1, line 0, new pixel}`. The oldest line drops out. The write
   counter is the read counter delayed by one pixel.

This is the single-RAM form of three chained line RAMs. It needs one block RAM
instead of three. A pause in the stream (`in_valid` low) freezes both counters.
The read of column `x+1` and the write-back of column `x` never address the
same word, as long as `IMG_W >= 2`.

**Window buffer.** Three shift registers of three pixels each. Row `r` is fed by
`out_col[r]`. Outputs are numbered `win[r*3+c]`, which gives `p0 p1 p2 / p3 p4 p5 / p6 p7 p8`.
Column 0 is the newest.

**Geometry.** Take the incoming pixel at column `x`, row `y`. After its shift, the window holds
image rows `y-1, y-2, y-3` (window rows 0, 1, 2) and columns `x, x-1, x-2`
(window columns 0, 1, 2). Its centre is image pixel **(x-1, y-2)**. The current
row is never inside the window: only line-buffer outputs feed it. The
window is therefore the image rotated by 180 degrees. The kernels here do not
care: the Gaussian and the cross are symmetric, and Sobel takes absolute
values.

**Borders.** Nothing is padded. `lw_buffer` counts `x` and `y` and raises
`win_inside` when `y >= 3` and `x >= 2`, i.e. when all nine pixels belong to
the current frame. Centres then cover rows `1..IMG_H-3` and columns
`1..IMG_W-2`. An output is still produced for every input pixel, so each
output stream stays aligned with its input one to one. Results whose window was
not inside carry `*_inside = 0`, and their value is meaningless. The
limits are parameters (`X_LO`, `Y_LO`), so that a second buffer in a chain can
widen the excluded border.

`rst` (synchronous, active high) clears the counters and the valid pipeline,
not the RAM. Resetting memory cells is deliberately avoided. A frame simply
starts after `rst`. Frames then follow each other without a gap, and the
counters wrap at `IMG_W` and `IMG_H`.

## Kernels

| unit | what it computes | pipeline | latency from input pixel |
|---|---|---|---|
| `sobel_kernel` | `min(|Gx|+|Gy|, 255)`, with `Gy=(p0-p6)+2(p1-p7)+(p2-p8)` and `Gx=(p2-p0)+2(p5-p3)+(p8-p6)` | 4 stages: gradients, abs, sum, saturate | 6 clocks (`sobel_filter`) |
| `gaussian_kernel` | `p0>>4 + p1>>3 + p2>>4 + p3>>3 + p4>>2 + p5>>3 + p6>>4 + p7>>3 + p8>>4` | 2 stages: row sums, total | 4 clocks (`gaussian_filter`) |
| `dilation_kernel` | OR of the cross `p1 p3 p4 p5 p7` | combinational | - |
| `erosion_kernel` | AND of the cross | combinational | - |
| `morph_closing` | erosion of the dilation | buffer, dilate, buffer, erode | 4 clocks |

**Sobel.** The sum of absolute values replaces the square root of squares.
Doubling is done by wiring. The gradients are `DW+3` bits signed, and any sum above
`2^DW-1` is clamped.

**Gaussian.** The mask `[1 2 1; 2 4 2; 1 2 1]/16` is applied as weights
1/16, 1/8 and 1/4. Each pixel is divided (truncated) before the additions, so
no multiplier is needed and every adder stays 8 bits wide. The largest possible
sum is 247. The price is accuracy: the result can be up to 8 below
`floor(sum(mask*pixel)/16)`, e.g. 247 instead of 255 on a white area.

**Closing.** Both buffers in the chain are 1-bit `lw_buffer`s. Each holds
3x320 bits of lines at the default width. The second buffer sees the dilation
results as a new stream, one pixel per input pixel, and advances on the first
buffer's window strobe, so pauses stay aligned. A closing result depends on
input pixels two rows and two columns further away than a single window does.
So the second buffer flags a result as inside only when `x >= 4` and `y >= 6`.
The result then belongs to image pixel **(x-2, y-4)**. Swapping the two
kernel instances gives an opening.

## Histograms

The naive form, `hist[pixel] <= hist[pixel] + 1`, either becomes 256
individual registers or needs two clocks per pixel. Both units here count one
pixel per clock in a 256-word memory, using the same two-stage pipeline:
stage 0 reads the memory, stage 1 acts on the word read and writes.

**`histogram_rtl`: read-first memory.** The memory is indexed by the pixel
while counting, and by a 0..255 counter while reading out. The word read goes
through a +1 adder back into the memory. It is read without an output
register, so it can be written back one clock later. Two equal pixels in a row
are the one hazard left: the second one's read happens in the same clock as the
first one's write. The memory is read-first, so that read returns the old count. A forwarding register
holding the last write (address and data) supplies the new count instead.

**`histogram_acc`: run accumulator.** An old-pixel register, a comparator and
an accumulator keep the count of the current run of equal pixels. The memory
is written only when the pixel value changes. The accumulator goes to the old
pixel's bin, and reloads with the new pixel's stored count plus one. With a
synchronous read, the pattern `a, b, a` reads `a` in the very clock that writes
`a`'s finished run. The same kind of forwarding register covers it. The run
still open at the end of a frame is not written out separately. During readout
the matching bin is taken from the accumulator.

**Protocol (both units).**

- **After `rst`:** a clearing sweep writes zeros for 256 clocks. During it
  `busy` is high and `in_ready` low.
- **Counting:** a pixel is counted when `in_valid && in_ready`, where
  `in_ready = !busy && !data_ready`. Counts are final one clock after the
  last pixel.
- **Readout:** raising `data_ready` steps the bin counter once per clock.
  `out_valid`, `out_bin` and `out_count` follow one clock after each step, and
  `out_last` marks bin 255. Each bin is cleared as it is read, so the next frame
  can start right after the readout.
- **Counter width:** bins count up to `2^CW-1` and then saturate. The default
  `CW = 17` covers the 76,800 pixels of a 320x240 frame.

## Top level (`image_proc_top`)

- **Gray-scale stream.** `pix_in`, `pix_valid` and `pix_ready` feed
  `sobel_filter`, `gaussian_filter`, `pixel_halve` and both histograms in
  parallel. A pixel
  moves when `pix_valid && pix_ready`. `pix_ready` is low only while the
  histograms clear (`hist_busy`) or read out (`hist_data_ready`). Hold the
  pixel until it is accepted.
- **Binary stream.** `bin_in` and `bin_valid` feed `morph_closing`.
- **Stand-alone units.** The bit reversal (`rev_*`), multiply-by-six (`m6_*`),
  two-input multiplexer (`mux2_*`), three-input multiplexer (`mux_*`) and
  register pair (`chain_*`) have their own ports and
  do not interact with the streams.

Parameters (defaults in `img_pkg`):

| parameter | default | meaning |
|---|---|---|
| `DW` | 8 | gray-scale pixel width |
| `IMG_W` | 320 | image width = line-buffer depth (set 640 for VGA lines) |
| `IMG_H` | 240 | image height |
| `CW` | 17 | histogram count width, `$clog2(IMG_W*IMG_H+1)` |

At the defaults the design holds six memories:

- two gray line buffers of 320x24 bits;
- two binary line buffers of 320x3 bits;
- two histogram memories of 256x17 bits.

## Small examples

- **`bit_reverse`.** Register A feeds register B with crossed wires, so B holds
  A reversed one clock later. There is no logic between them. Width 8.
- **`mul6`.** Computes `A*6 = (A<<2) + (A<<1)`: one adder, no multiplier. With
  4 bits, 1101 gives 1001110.
- **`mux2`.** The two-input multiplexer `y = (!sel & a) | (sel & b)`, one
  continuous assignment.
- **`pixel_halve`.** Divides each pixel of a stream by two. The division is
  only wiring: bit `i+1` of the input becomes bit `i` of the output, and the top
  bit is zero. The output is registered, one clock after the input, and keeps
  the input's pauses.
- **`mux3`.** A three-input select with a `default` arm, so it synthesises to
  logic and not a latch.
- **`reg_chain`.** Two registers in series, the hardware that non-blocking
  assignments describe.

## Where this design departs from, or adds to, the description

**Stream control**

- **Handshake.** The description names valid/ready-style stream signals but
  defines none. `in_valid` pauses, the top's `pix_ready`, and the shift enable
  on the window registers are this design's. The description suggests leaving
  control signals off the window registers.
- **Frame height.** The default 320x240 frame is inferred from the 320-word
  line buffers and the 76,800-pixel QVGA example. Other passages use 640-pixel
  lines, which `IMG_W = 640` gives.
- **Borders.** Edges are handled by flagging windows (`*_inside`), not by zero
  or replicate padding. The valid centres match the loop bounds of the
  reference kernels.

**Line buffer**

- **Line storage.** Three line RAMs are drawn in the description. The lines are
  kept in one wide RAM here, the optimisation it recommends.
- **Window rows.** As drawn, all three window rows come from the line buffer.
  The newest input pixel joins the window only one line later.
- **Counter timing.** The exact read/write counter timing is this design's.

**Kernels**

- **Sobel.** `Gx` is taken from the mask equation.
- **Closing chain.** The second buffer is clocked by the first buffer's window
  strobe, not by the frame valid line.

**Histograms**

- **Added logic.** The forwarding registers, the clearing sweep, clear-on-read
  and count saturation are this design's.
- **`histogram_acc` origin.** It renders in RTL an architecture that the
  description obtained from high-level synthesis.

**Not built**

- The Zynq processing system and the AXI4 / AXI4-Stream links that would carry
  the streams to and from a CPU.
- The PCIe framework used on another board.
- Vendor primitives (the block-RAM macro, DSP blocks). `dp_ram` is a generic
  inferred RAM with the read-first behaviour that the histogram relies on.

**Performance.** No throughput or resource figures are claimed here. The
designs accept one pixel per clock, which the testbenches check. Clock rate and
area depend on the FPGA flow.

## Simulating

Each testbench in `tb/` is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. The image testbenches compare every inside
output against reference models in `tb/tb_golden_pkg.sv`, which are written in
plain image coordinates. With Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb \
    rtl/img_pkg.sv tb/tb_golden_pkg.sv tb/tb_image_proc_top.sv \
    --top-module tb_image_proc_top -o sim
./obj_dir/sim
```

Replace `tb_image_proc_top` with any other testbench name.

- **`tb_image_proc_top`.** Runs the whole design on two 16x12 frames. It counts
  each mechanism and fails if one never occurs: clearing, stream pauses,
  back-pressure during readout, Sobel saturation, border outputs, equal
  neighbours, a-b-a patterns, readout, and pixels changed by the closing.
- **`tb_image_proc_full`.** The same test on one 320x240 frame with every
  parameter at its default. It takes a few seconds.
- **`tb_workload_vga_lines`.** Runs `sobel_filter` with 640-pixel lines on one
  640x480 frame and checks every inside result.
- **Unit testbenches.** Each unit has one, using small images and random pauses.
  Where a latency is fixed (line buffer 1, window front end 2, Sobel 4+2,
  Gaussian 2+2, closing 4, histogram readout 1 clock), the testbench checks it
  cycle by cycle.

Simulation uses two-state logic and random initial values. That is why
`dp_ram` contents are never assumed: windows over not-yet-written lines are
flagged as outside, and the histograms clear their memories after reset.

## Files

| file | contents |
|---|---|
| `rtl/img_pkg.sv` | shared widths and default image size |
| `rtl/dp_ram.sv` | simple dual-port RAM, synchronous read-first read port |
| `rtl/line_buffer.sv`, `rtl/window_buffer.sv`, `rtl/lw_buffer.sv` | window front end |
| `rtl/sobel_kernel.sv`, `rtl/gaussian_kernel.sv`, `rtl/dilation_kernel.sv`, `rtl/erosion_kernel.sv` | kernels |
| `rtl/sobel_filter.sv`, `rtl/gaussian_filter.sv`, `rtl/morph_closing.sv` | complete streaming filters |
| `rtl/histogram_rtl.sv`, `rtl/histogram_acc.sv` | histogram units |
| `rtl/bit_reverse.sv`, `rtl/mul6.sv`, `rtl/mux2.sv`, `rtl/mux3.sv`, `rtl/reg_chain.sv`, `rtl/pixel_halve.sv` | small examples |
| `rtl/image_proc_top.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_golden_pkg.sv`, the full-size test and the 640-pixel-line test |
