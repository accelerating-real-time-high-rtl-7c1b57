# NAFDU depth-upsampling accelerator in SystemVerilog

A time-of-flight depth sensor gives a low-resolution, noisy depth map. The colour camera next
to it gives a sharp, high-resolution image. This design upsamples the depth map to the camera's
resolution (2048×1536) and removes noise. It processes one pixel per clock, so a frame takes
10.5 ms at 300 MHz. That is fast enough for a 90 Hz head-mounted display.

The filter is the Noise-Aware Filter for Depth Upsampling (NAFDU). NAFDU is a joint bilateral
filter: each output depth is a weighted mean of the depths around it. A neighbour's weight says
how similar it is to the centre pixel. The problem is deciding which image to measure that
similarity in:

* **Colour similarity** (term *g*) keeps depth edges sharp where the colour image has an edge.
  But on a flat, painted surface it copies the colour texture into the depth ("texture
  copying").
* **Depth similarity** (term *h*) has no texture copying, but it is only as good as the noisy
  depth.

NAFDU blends the two terms per window. The blend factor is alpha, a sigmoid of how much the
depth varies inside the window:

* If the window is nearly flat in depth, alpha ≈ 0 and the depth term wins.
* If the window holds a real depth step, alpha ≈ 1 and the colour term wins.

The architecture follows the streaming FPGA accelerator described in *Accelerating Real-Time,
High-Resolution Depth Upsampling on FPGAs* (Langerman, Sabogal, Ramesh, George). That design was
built with high-level synthesis. This is an independent RTL version of it. Several details are
this implementation's own choices; they are listed under "What is fixed and what is chosen"
below.

## The filter as built

For the window Ω of KW×KW pixels around the centre p (KW = 13 by default):

```
Delta   = max(D_q) - min(D_q)                      over the in-image q in Ω
alpha   = round(256 / (1 + exp(-0.25 (Delta - 20))))          0 .. 256
g_q     = round(255 * exp(-(I_p - I_q)^2 / (2*10^2)))         0 .. 255  (colour)
h_q     = round(255 * exp(-(D_p - D_q)^2 / (2*10^2)))         0 .. 255  (depth)
w_q     = alpha*(g_q - h_q) + (h_q << 8)  = alpha*g_q + (256-alpha)*h_q
out_p   = (sum w_q*D_q + floor(sum w_q / 2)) div sum w_q      rounded, 8 bits
```

`I` is the 8-bit intensity and `D` the 8-bit depth. The depth input is already at full
resolution: it is the sensor's depth map resized to the camera size. That resize happens before
this accelerator and is not part of this design.

* **Single multiplier.** The form `alpha*(g-h) + (h<<8)` is the blend with one multiplier per
  window position, and alpha is a fraction with 8 fractional bits.
* **No distance term.** Unlike a textbook bilateral filter, the weight has no spatial
  (distance) term. A neighbour's position in the window does not affect its weight. The
  accelerator this follows feeds the blended range weight straight into the sums.
* **Normaliser never zero.** The centre pixel always has `g = h = 255`, so its weight is
  `255·256`. `sum w` is therefore never zero.
* **Lookup tables.** g, h and alpha are 256-entry tables. They are computed during elaboration
  from the formulas above (`nafdu_pkg::gauss_weight`, `nafdu_pkg::sigmoid_alpha`). No
  floating point reaches the hardware.

## Data path

```
             in_pix.intensity ─► kernel_buffer (KW-1 line_buffers + KW×KW window) ─► range_weight g ─┐
 in_valid/in_ready                                                                                   ├─► weight_blend ─┬─► mac_unit ─┐
             in_pix.depth ────► kernel_buffer (KW-1 line_buffers + KW×KW window) ─┬─► range_weight h ─┤                 │             ├─► divider ─► out_depth
                                                                                  ├─► alpha_unit ─────┘                 └─► acc_unit ─┘   out_valid/out_ready/out_last
                                                                                  └─► (depth window, delayed 2) ─► mac_unit
                  scan_ctrl: raster position, flush, border mask ─► range_weight, alpha_unit
```

| Stage | Unit | Latency (cycles) |
|---|---|---|
| 0 | window registers of both kernel buffers; `scan_ctrl` gives the window's mask and flags | – |
| 1 | `range_weight` ×2 (g, h), `alpha_unit` (min/max tree + table) | 1 |
| 2 | `weight_blend` | 1 |
| 3… | `mac_unit` (KW² multipliers + adder tree), `acc_unit` (adder tree) | 1 + ⌈log2 KW²⌉ = 9 |
| … | `divider` (restoring, one quotient bit per stage) | 9 |

From window to output the latency is 20 cycles for KW = 13. Every unit accepts a new window on
every cycle.

**Stalls.** All registers share one advance enable, `adv = !out_valid || out_ready`. If the
sink stops accepting, the whole pipeline freezes. `in_ready` drops at the same time, so nothing
is lost or duplicated. Valid and end-of-frame bits travel in a shift register beside the data.

## Windows, borders and the end of a frame

This part is the least obvious.

**How the window is built.** A line buffer is a row-long circular memory. Each push writes the
new pixel and returns the pixel written `IMG_W` pushes earlier, which is the pixel directly
above. Chaining KW−1 of them gives a column of KW vertically adjacent pixels on every push. The
window is a KW×KW register array that shifts that column in. After a push, `win[j][k]` holds the
pixel pushed `j·IMG_W + k` pushes earlier. So `j` counts rows upward and `k` counts columns
leftward from the newest pixel.

**Why windows lag the input.** A window is centred on the pixel pushed `R·IMG_W + R` pushes ago,
where `R = (KW−1)/2`. The bottom R rows of a frame can therefore only be filtered after more
pixels arrive. `scan_ctrl` runs each frame through
`NPOS = IMG_W·IMG_H + R·IMG_W + R` pushes:

* The first `IMG_W·IMG_H` pushes take pixels from the input.
* The remaining `R·IMG_W + R` pushes are *flush* pushes of zeros. `in_ready` is low meanwhile.
* The next frame may start right after the flush.

**Border masking.** Because the stream is linear, a window near the left or right edge wraps
into the neighbouring row. Near the top it sees the previous frame, and near the bottom it sees
flush zeros. `scan_ctrl` keeps the row and column of the window's centre and masks every
position whose neighbour is outside the image. A masked position gets `g = h = 0`, so its weight
is 0. It is also excluded from `Delta`. The filter therefore renormalises over the neighbours
that exist, and no padding or replication is needed.

The line buffers' storage depends on the image width and the kernel size, not the image height.
That is why the design scales to high resolutions.

## Number formats

All arithmetic is exact integer arithmetic. Nothing is truncated except the final rounded
division.

| Signal | Width (KW = 13) | Note |
|---|---|---|
| pixels | 8 | `nafdu_pkg::PIX_BITS` |
| g, h | 8 (`WGT_BITS`) | 255 at zero difference |
| alpha | 9 (`ALPHA_FRAC`+1) | 0…256 |
| w | 16 | ≤ 255·256 |
| MAC | 32 | 16 + 8 + ⌈log2 169⌉ |
| ACC | 24 | 16 + ⌈log2 169⌉ |
| quotient | 8 | a weighted mean of 8-bit depths |

## Throughput and size

At full rate one frame takes 3,158,022 cycles: 3,145,728 pixels plus 12,294 flush cycles.
That is 10.53 ms at 300 MHz, or 6.3 ms at 500 MHz. The real-time target is 11 ms per frame.
The kernel size changes the frame time only through the flush: R·IMG_W + R cycles, which is
0.07 % of a frame at KW = 3 and 0.4 % at KW = 13. The latency and the area grow with KW.

At the defaults, the larger parts are:

* 2 × 12 line buffers of 2048 × 8 bits (393 kbit).
* 169 multipliers of 16×8 bits and two 169-input adder trees.
* 338 small 256×8 ROMs for g and h. Every window position looks up its own weight in the same
  cycle.

## What is fixed and what is chosen

These follow the source architecture:

* 8-bit intensity and depth streams.
* Two n×n kernel buffers fed by line buffers.
* Gaussian range terms g (colour) and h (depth).
* A sigmoid alpha of the depth window's max−min.
* The blend `alpha(g−h) + (h<<8)`.
* MAC and ACC reductions with adder trees, then a division.
* One pixel per cycle, and a 13×13 kernel as the main configuration.

These are this design's own choices:

* The valid/ready stream interface with `out_last`.
* The flush and masking scheme at frame ends and borders.
* The stall policy.
* The widths of g, h and w.
* Round-to-nearest division.
* The table parameters: σ = 10 grey levels for g and h; τ = 20 and ε = 0.25 for alpha. These
  are parameters of `nafdu_top`.
* Reset: synchronous and active low, on control state only. Memories and data registers are
  not reset.

Not included:

* The DMA engine and host software that move frames between DDR and the accelerator.
  `in_*`/`out_*` are where a DMA or a camera stream would connect.
* The depth-map resize in front of the accelerator.
* A spatial weighting term. The source equations mention one, but the accelerator data path
  does not use it.
* Changing the kernel size at run time. KW is an elaboration parameter.

**Timing.** The min/max tree in `alpha_unit` is eight comparator levels plus a table lookup in
one cycle. It is the longest combinational path. If a target clock needs it, it is the first
place to add a register (and one more delay stage on g and h).

## Files

| File | Contents |
|---|---|
| `rtl/nafdu_pkg.sv` | pixel types, table-building functions |
| `rtl/nafdu_top.sv` | the accelerator |
| `rtl/scan_ctrl.sv` | raster position, flush, border mask |
| `rtl/line_buffer.sv`, `rtl/kernel_buffer.sv` | row delay, KW×KW window |
| `rtl/range_weight.sv` | g / h gaussian range terms |
| `rtl/alpha_unit.sv` | Delta and alpha |
| `rtl/weight_blend.sv` | alpha(g−h) + (h<<8) |
| `rtl/adder_tree.sv`, `rtl/mac_unit.sv`, `rtl/acc_unit.sv` | reductions |
| `rtl/divider.sv` | pipelined rounded division |
| `tb/tb_<unit>.sv` | self-checking test of each unit |
| `tb/tb_nafdu_top.sv` | end-to-end test, 24×16 image, 5×5 kernel, 4 frames |
| `tb/tb_nafdu_kernels.sv` | kernel widths 3, 5, 7 and 13 side by side on a 64×48 frame pair |
| `tb/tb_nafdu_full.sv` | one full 2048×1536 frame at the default configuration |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`. To build and run
one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/nafdu_pkg.sv tb/tb_nafdu_top.sv --top-module tb_nafdu_top -o sim
./obj_dir/sim
```

Replace `tb_nafdu_top` with any other testbench name.

**How they check.** The testbenches compute their expected values independently, from the
formulas above and with their own reference code:

* `tb_nafdu_top` compares every output pixel and the `out_last` flag. It also checks that two
  full-rate frames are exactly `NPOS` cycles apart. It requires that each mechanism occurs at
  least once: output stalls, input gaps, flushes, border windows, flat (alpha ≈ 0) and edge
  (alpha ≈ 1) blending, and back-to-back frames.
* `tb_nafdu_kernels` builds the accelerator at KW = 3, 5, 7 and 13 and checks every pixel
  and the frame period of each. Only the flush (R rows) makes the period depend on KW.
* `tb_nafdu_full` checks all 3,145,728 pixels of one 2048×1536 frame. It also checks the
  3,158,042-cycle span from the first input to the last output, which is the frame plus 20
  cycles of latency. It takes about 25 s after a 10 s build.

**Changing the configuration.** `KW` (odd), `IMG_W`, `IMG_H` and the table parameters are
parameters of `nafdu_top`. The internal widths follow from them.
