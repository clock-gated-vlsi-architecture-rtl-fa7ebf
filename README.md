# Clock-gated streaming Sobel edge detector

This is a small hardware edge detector for grey-level images. It takes the
image as a stream, one 8-bit pixel per clock in raster order. For every
interior pixel it gives two results: the Sobel edge strength, |Gx| + |Gy|
limited to 255, and a one-bit edge/non-edge flag from comparing that strength
with a programmable threshold. The whole datapath runs on a clock that a
flip-flop based clock gate stops whenever no pixel is arriving and no result
is still in the pipeline. That is where the power saving comes from: an idle
detector does not switch.

The RTL is synthesizable SystemVerilog (IEEE 1800-2017). It was written from a
published description of a clock-gated Sobel detector for FPGA. Where that
description is vague, choices were made here; the section "Where this RTL goes
beyond the description" lists them.

## Data path

```
                          sobel_edge_detection (core)
                        ┌────────────────────────────────────┐
pix_in ─► window_gen ──►│ sobel_kernel                       │──► threshold_unit ─► out_pixel
          2 line        │  Gx unit ┐                         │    >= threshold      out_edge
          buffers +     │  Gy unit ┴► |Gx|+|Gy|, ≤255 ► reg  │    output register   out_valid
          3x3 shift     │                                    │
          register      │ clock_gate f1: gclk = clk & FF(en) │
             ▲          └──────────────┬─────────────────────┘         ▲
             └──────────── gclk ───────┴───────────────────────────────┘
```

* **Window generation** (`window_gen`, `line_buffer`). Two one-row line buffers
  hold the previous two rows. Each new pixel therefore comes with the pixels
  one and two rows above it. That three-pixel column is shifted into a 3x3
  register array from the right. After pixel (r, c) is taken, the array holds
  the neighbourhood of pixel (r-1, c-1). Row and column counters mark the
  window valid only when r ≥ 2 and c ≥ 2. The one-pixel border of the image
  gets no result, so a W x H frame gives (W-2) x (H-2) results. The counters
  wrap at the frame size, so frames can follow each other without a gap.
* **Gradients** (`sobel_gradient`, one instance per direction). These use the
  classic masks. Gx = (tr + 2r + br) − (tl + 2l + bl) and
  Gy = (bl + 2b + br) − (tl + 2t + tr). The weight 2 is a shift, so no
  multiplier is needed. The centre pixel has weight 0. Each gradient is exact
  and signed, in −1020..1020 (11 bits).
* **Magnitude** (`gradient_magnitude`). The square root of Gx² + Gy² is
  replaced by |Gx| + |Gy|, which is 0..2040. This sum is then limited to 255,
  so that a strong edge gives a full-scale 8-bit pixel.
* **Kernel register** (`sobel_kernel`). This is the gradients plus the
  magnitude, feeding one output register. The path from the window pixels to
  that register is a single combinational stage, so the kernel adds one clock
  of latency.
* **Gated core** (`sobel_edge_detection`). The kernel and the clock gate `f1`
  together, with the nine window pixels on separate ports (`pixel_top_left`
  … `pixel_bottom_right`) and the result on `out_pixel`. This is the
  self-contained unit that the original design measured. In the streaming top
  it also exports the gated clock to the window generator and the threshold
  stage.
* **Threshold** (`threshold_unit`). `out_edge = (strength >= threshold)`. It is
  registered together with the 8-bit strength, so the outputs carry the binary
  edge map and the grey-level edge image side by side. `threshold` is an input
  and may change between frames.

A worked example is the neighbourhood (rows top to bottom) 88 98 0 / 88 98 0 /
0 0 0. It gives Gx = −264 and Gy = −284. Their sum of magnitudes, 548, is
limited to 255: a strong edge.

## Clock gating

This is the subtle part of the design.

**The gate** (`clock_gate`, instance `f1`). A D flip-flop registers the enable,
and an AND gate combines its output with the clock: `gclk = clk & en_q`. The
flip-flop is clocked on the **falling** edge of `clk`, so `en_q` can change
only while `clk` is low. While `clk` is low the AND output is 0 whatever
`en_q` does. Every gclk pulse is therefore a whole clk high phase, or nothing
at all. If the flip-flop sampled on the rising edge instead, `en_q` could rise
while `clk` is already high. That would give a late, shortened gclk pulse in
the same cycle, which is exactly the glitch a flip-flop gate is meant to
avoid. The enable has to be stable at the falling edge. An enable computed
from registers on `clk` or `gclk` after rising edge k gates rising edge k+1.

**The enable.** `en = pix_valid | win_valid | kern_valid`. The datapath clock
runs in three cases: a pixel is offered, a valid window is waiting for the
kernel, or a kernel result is waiting for the threshold stage. So the last
results of a burst drain out by themselves, two clock ticks after the last
pixel. After that gclk stops until the next pixel. The line buffers, the
window and all pipeline registers sit on gclk and keep their contents while it
is stopped. Because of this the stream may pause anywhere, even in the middle
of a row. An assertion in the top checks that the gate is never off while a
result is in flight.

**The output strobe.** Registers on gclk keep their last value while the clock
is stopped. A "valid" bit on gclk would therefore stay high through idle
cycles. One register on the free-running clock (`tick_q <= en_q`) records that
gclk ticked at the last edge. `out_valid = tick_q & threshold valid` is then a
one-cycle strobe per result on `clk`. `gate_on` (= `en_q`) is brought out, so
that the gated-on cycles can be counted.

For timing analysis, `gclk` is a derived clock of `clk`. The gclk-domain
registers sample the testbench or upstream data at the same rising edge as
`clk`. For an FPGA, the gate would normally be mapped to a clock-buffer
primitive with an enable. The RTL keeps the plain flip-flop and AND gate.

## Interface and timing (`sobel_edge_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | free-running clock |
| `rst` | in | 1 | asynchronous, active high; clears the pipeline and restarts the frame at row 0, column 0 |
| `pix_valid`, `pix_in` | in | 1, 8 | a pixel is taken at every rising edge where `pix_valid` is high; there is no back-pressure |
| `threshold` | in | 8 | edge threshold; change it only while no result is in flight if a frame must use one value |
| `out_pixel` | out | 8 | min(\|Gx\| + \|Gy\|, 255) of the window |
| `out_edge` | out | 1 | `out_pixel >= threshold` |
| `out_valid` | out | 1 | one-cycle strobe for a new result |
| `gate_on` | out | 1 | the registered gate enable: high in the cycles whose rising edge reaches the datapath |

Suppose the pixel that completes a window is taken at rising edge k. Its
result is loaded at edge k+2, and `out_valid` is high in the cycle after edge
k+2. Results come in raster order of their centre pixels. Throughput is one
pixel per clock.

Parameters: `IMG_WIDTH` and `IMG_HEIGHT`, both 256 by default. The 256 x 256
size matches the counters of the original design's test runs. Width sets
the depth of the two line buffers (2 x 256 x 8 bits of memory). The other
sizes are fixed in `sobel_pkg`: 8-bit pixels, 11-bit gradients and sums.

## Where this RTL goes beyond the description

* **Mask coefficients.** The original speaks of "modified" Sobel masks but
  gives no coefficients. The classic 1-2-1 masks are used. The published
  waveform example (the neighbourhood above, giving 255) agrees with them.
  Only two directions (horizontal, vertical) are built.
* **Clock edge of the gate flip-flop.** The original says the enable is
  sampled on the rising clock edge, and also that the gate is glitch-free.
  With an AND gate those two statements cannot both hold. Here the falling
  edge is used, to keep the gate glitch-free (see above).
* **Gate enable and what is gated.** The original only says that idle
  blocks are switched off. The enable shown above, and putting the line
  buffers, the window and both pipeline registers on the gated clock, are
  choices made here.
* **Window generation is inside the design.** The published evaluation used a
  core whose nine window pixels were top-level ports. That core is
  `sobel_edge_detection` here. This top instead takes a pixel
  stream and builds the windows with line buffers and shift registers, as the
  architecture description requires. Resource, power and delay numbers of the
  original (39 LUTs, 9 registers, 8 DSPs, 7.693 W estimated, 15.591 ns longest
  path) were measured on that nine-port core, on a Xilinx 7-series device.
  They do not apply to this top.
* **Both output forms.** The original describes both a binary edge map
  (threshold) and an 8-bit output pixel saturating at 255. Both are given.
  The threshold compares the limited 8-bit strength with `>=`.
* **Border, reset and flow control** are unspecified in the original. Here
  the border pixels get no result, reset is asynchronous and active high, and
  the input has a valid flag with no back-pressure.
* **Image/text conversion.** In the original flow the input image was turned
  into a text file of pixel values on a host, and the output was rebuilt from
  a text file. That is host software and not part of this RTL. The testbench
  generates its images itself.

## Verification

Each module has a self-checking testbench in `tb/`. Each one compares the
module with an independent integer model (`tb/sobel_ref_pkg.sv`, the textbook
convolution sum) and prints `TB_RESULT checks=N failures=M`.

* `tb_clock_gate`: one gclk edge per enabled cycle, exactly at the next rising
  clk edge; gclk is never high while clk is low; reset keeps the gate off.
* `tb_line_buffer`, `tb_window_gen`: delay of exactly one row; window contents
  and the valid flag over three small back-to-back frames with random idle
  cycles.
* `tb_sobel_edge_detection`: the core under a random gate enable. Outputs
  must hold in every gated-off cycle and load the right result in every
  enabled one. The number of gclk edges must equal the number of enabled
  cycles.
* `tb_sobel_gradient`, `tb_gradient_magnitude`, `tb_sobel_kernel`,
  `tb_threshold_unit`: extreme, random and low-contrast windows; the ±1020
  corners; values around the 255 limit and the threshold; one-clock latency.
* `tb_sobel_edge_top`: the whole detector at its default 256 x 256 size. It
  streams two synthetic frames (flat blocks with noise) with random gaps,
  pauses in mid-row and a threshold change between frames. It checks all
  2 x 254 x 254 results against the model, including the exact cycle of each.
  It also requires that each of these happened at least once: gated-off
  cycles, drain ticks, results limited to 255, edge and non-edge results, the
  threshold change and the frame wrap. Between the frames the input sleeps
  for 100 cycles, and the gate must stay off once the pipeline has drained.
  It runs in well under a second.

Simulation with Verilator 5 (two-state; uninitialised variables random):

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/sobel_pkg.sv tb/sobel_ref_pkg.sv tb/tb_sobel_edge_top.sv \
  --top-module tb_sobel_edge_top -o sim
./obj_dir/sim +verilator+rand+reset+2
```

Replace the testbench name to run another block. The other `rtl/` files are
found through `-Irtl`, by module name.

## Files

`rtl/sobel_pkg.sv` (types: `pixel_t`, `grad_t`, `window_t`), `clock_gate.sv`,
`line_buffer.sv`, `window_gen.sv`, `sobel_gradient.sv`,
`gradient_magnitude.sv`, `sobel_kernel.sv`, `sobel_edge_detection.sv`,
`threshold_unit.sv`,
`sobel_edge_top.sv` (top). `tb/` holds one testbench per module, named
`tb_<module>.sv`, and the reference package.
