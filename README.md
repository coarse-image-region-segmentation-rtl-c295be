# Resistive-fuse networks in digital logic: coarse image region segmentation

A resistive-fuse network is a grid of nodes, one per pixel. Each node is tied to
its input pixel value through a conductance and to its neighbours through
nonlinear resistors. Each resistor conducts like an ordinary resistor while the
voltage across it stays below a threshold δ, and opens ("blows") once the
voltage reaches δ. Left to settle, the network smooths noise and texture inside
regions, while the large steps between regions open their fuses and stay sharp.
The blown fuses then trace the region outlines.
Start the network with plain linear resistors and switch to fuses afterwards,
and it segments coarsely: a face comes out as one region, and eyes, brows and
mouth vanish.

This RTL does not build the analog circuit. It emulates it with clocked,
discrete-time arithmetic. Every clock step moves each pixel value `O_i` by the
current that Kirchhoff's law says flows into its node:

    O_i(t+1) = O_i(t) + v * [ sum_{j in N(i)} G(O_j - O_i) + sigma * (I_i - O_i) ]

`G` is the odd I-V curve of the nonlinear resistor. Repeating the step drives
the grid to its steady state. There are two implementations:

* **Pixel-serial** (`rf_serial_seg`, the main design). One processing circuit
  updates the whole image one pixel per clock, streaming it through a 3 x 3
  window. At the default 64 x 64 pixels and 90 passes, a frame takes about
  373 k cycles, which is 9.3 ms at 40 MHz. That is fast enough for video
  rate.
* **Pixel-parallel** (`rf_parallel_array`). There is one small pixel circuit
  per pixel, and all pixels update at once. A full run takes 180 clocks, but
  the area grows with the pixel count.

`rf_top` instantiates both side by side, sharing only clock and reset.

## Lookup tables instead of arithmetic

Neither implementation multiplies. Each term of the equation becomes a table
lookup addressed by the *magnitude* of a difference, and the sign is applied
afterwards. That is valid because `G` is odd.

* **LUT1** holds `v*sigma*x`, the pull towards the input pixel.
* **LUT2A, LUT2B, LUT2C** hold `v*G(x)` for three stages of annealing. A is a
  linear resistor, B is a fuse with a wide threshold, and C is a fuse with a
  narrow threshold.

`rf_lut` builds all of them from one formula in `rf_pkg::lut_entry`. The
formula is a line of slope `SLOPE_NUM / 2**SLOPE_SHIFT`, saturated to K output
bits, and forced to 0 for `x >= delta`. The table is a constant array
computed at elaboration, with an asynchronous read. It also outputs `blown`
(`x >= delta`), which is the edge information.

The published design gives the bit widths (N = 6-8, K = 5-6) but no values
for v, sigma, g or δ. The constants in `rf_pkg` are this design's own. They
were chosen so that the explicit update is stable (`v*(sum g + sigma) < 1`)
and so that a test scene segments as intended:

| constant | pixel-serial | pixel-parallel |
|---|---|---|
| pixel bits N | 7 (+3 fraction bits in O) | 8 |
| LUT output bits K | 6 | 5 |
| G slope (per neighbour) | 1/2 in 1/8-grey units (v·g = 1/16) | 1/8 (v·g = 1/8) |
| sigma slope | 1/2 in 1/8-grey units (v·σ = 1/16) | 1/8 |
| δ of LUT2A / B / C | 128 (never blows) / 16 / 8 grey levels | 256 / 64 / 32 |
| neighbours | 8 (3 x 3 window) | 4 (N, E, S, W) |
| iterations R per table | 30 | 30 |

### The bit shift (serial processor)

An update of `v*G(d)` with v·g = 1/16 is below one grey level for any
difference under 16. In plain N-bit integers it would round to zero, and the
network would never smooth gentle gradients. The serial processor therefore
keeps `O` with **M = 3 fraction bits**: the destination memory and the window
are N+M = 10 bits wide. The input `I` (7 bits) is shifted left by M before
subtraction. The LUTs are addressed by the integer part of |difference|, and
they return currents in units of 1/8 grey level. The extra precision is what
lets the image itself be stored one bit narrower (7 instead of 8 bits).

## The pixel-serial processor

```
 in_pixel ──┬──────────────► Smem (I, 7 b) ─────────────────────────┐ s
            └─ <<M ─► Dmem (O, 10 b) ──read──► window a..i ──► update unit ──► write back to Dmem
                         ▲                    (2 line FIFOs + 9 regs)  │
                         └────────────────────────────────────────────┘──► out_pixel / out_edge
```

* `rf_frame_mem` x 2 is the source memory Smem, which holds I, and the
  destination memory Dmem, which holds O. Loading a frame writes I to Smem
  and `I << M` to Dmem, so O starts at I.
* `rf_window3x3` holds pixels a-i. Two one-line FIFOs (`rf_line_fifo`, one
  image row each) and nine registers present the neighbourhood of the target
  pixel e:

  ```
  a b c
  d e f
  g h i
  ```

  e lags the pixel being read by one row plus one pixel (W + 1 shifts).
* `rf_serial_update` does the arithmetic. It forms the eight differences
  `a-d, f-i` minus e and `(s << M) - e` at the same time, looks each one up
  (eight LUT2 copies and one LUT1), applies the signs, sums, and clamps. It
  has two register stages.
* `rf_serial_ctrl` is the sequencer: load, then 3 x R raster passes, then a
  W+1-shift flush.

### Why in-place write-back is a correct Jacobi step

This is the point of the design most worth understanding. Every cycle, the
controller reads one pixel of Dmem in raster order. The updated centre pixel
is written back to the **same** memory, at its own address. That write lands
W + 1 + 4 cycles after the read of the pixel that completed its window. By
then, every neighbour that needs the *old* value of that pixel has already
copied it into the window registers or the line FIFOs. So within a pass,
every update sees only old values, and each pass is an exact synchronous
(Jacobi) step of the equation, the same as the parallel array computes. The
testbenches check this bit for bit against a reference model.

The passes also run **back to back, with no gap**. The next pass starts
reading address 0 right after the last read of the current pass. That is
safe because a pass (W·H cycles) is longer than the write-back lag
(W + 5 cycles), so each pixel is rewritten before the next pass reads it. At
the seam between passes, the window briefly mixes the bottom rows of one pass
with the top rows of the next. Those taps fall outside the image and are
masked anyway. Only after the very last pass does the controller flush the
window with W + 1 extra shifts.

Each centre pixel travels with a descriptor through the pipeline: address,
row, column, annealing phase and last-pass flag. The phase selects LUT2A/B/C
per pixel, so a pass boundary needs no pipeline drain. Row and column give
the **border mask**: neighbours outside the image contribute no current,
which is an open circuit at the edge of the grid.

### Timing of one frame

| stage | cycles (64 x 64, R = 30) |
|---|---|
| load, one pixel per cycle | 4096 |
| 3 x R passes, one pixel per cycle | 368 640 |
| flush + pipeline, last input to last output | + 69 (total 368 709) |
| **frame** | **372 805 = 9.3 ms at 40 MHz** |

The result comes out *during* the final pass, one pixel per clock in raster
order, with no back-pressure. `out_pixel` is O rounded to 7 bits. `out_edge`
is set where the fuse to the right neighbour (f) or the lower neighbour (h)
is blown under LUT2C. `out_last` flags the last pixel. `in_ready` is low from
the end of the load until the last write-back; the next frame can be sent
right after `out_last`.

### Interface (`rf_serial_seg`)

| port | dir | meaning |
|---|---|---|
| `in_valid`, `in_ready`, `in_pixel[N-1:0]` | in/out/in | input frame, raster order, handshake |
| `out_valid`, `out_pixel[N-1:0]`, `out_edge`, `out_last` | out | result stream in the final pass |
| `busy` | out | a frame is being processed |

`rst_n` is an asynchronous, active-low reset. It resets the control state
only; the memories and data registers are never read before they are
written.

## Annealing schedule

Both processors run the same schedule:

1. R iterations with LUT2A, the linear resistor. Texture, stripes and small
   features are smoothed away, together with noise.
2. R iterations with LUT2B, a wide fuse.
3. R iterations with LUT2C, a narrow fuse. Only region boundaries that are
   still steep after step 1 keep their blown fuses, and the input term
   sharpens them again.

On the end-to-end test scene, a striped window shade behind a bright face and
body with darker eyes and mouth, the edge output traces only the outline of
the face and body. No shade stripes or facial features appear.

## The pixel-parallel array

`rf_pixel_cell` is one pixel. It has:

* REG1, holding I;
* REG2, holding O, N = 8 bits;
* LUT1;
* one LUT2 (three tables) per neighbour.

An iteration takes two clock cycles:

* `step = 0`: `O += sign(I-O) * LUT1(|I-O|)`
* `step = 1`: `O += sum_j sign(O_j-O) * LUT2(|O_j-O|)` over the four
  neighbours. `clka`/`clkb`/`clkc` (one-hot) choose the table.

`rf_parallel_ctrl` produces `step`, `en` and the one-hot phase lines: R
iterations per table, 6R = 180 cycles per run, then a one-cycle `done`.
Afterwards the phase lines stay at C, so the `blown` flags read back against
the final table. `rf_parallel_array` wires W x H cells into a 4-neighbour
grid. Cells are loaded by address (`load`, `addr`, `load_data`, which sets
both I and O), and `rd_data`/`rd_edge` read back the cell at `addr`
combinationally. Loads are ignored while busy. The default array is 8 x 8.
This implementation trades area for speed, so the practical array size
depends on the target device.

## What follows the published design, and what is this design's choice

Taken from the published design:

* the update equation and its two-step form (input term, then neighbour
  term);
* REG1/REG2/LUT1/LUT2A-C per pixel;
* the schedule of three tables with R = 30 each;
* pixel-serial processing with source and destination memories, a 3 x 3
  window built from registers and one-line FIFOs, all nine differences at
  once, one pixel per clock;
* the M = 3 bit shift;
* 64 x 64 images and the < 20 ms frame budget at 40 MHz.

This design's own choices:

* all table constants (slopes, thresholds) and the exact fuse shape (ideal:
  linear, then zero);
* N = 7 for the serial processor (8 lowered by one thanks to M = 3) and K = 6;
* the gap-free in-place pass schedule, the two-stage update pipeline, the
  border masking and the clamping of O;
* the handshakes, the output during the final pass and the rounding;
* the edge flag (right and lower fuse under LUT2C);
* for the parallel array: the 4-neighbour grid, summing all four neighbour
  terms in one step, one system clock per step, the 8 x 8 size and the
  addressed load and read ports;
* LUT contents fixed at elaboration rather than loaded at run time.

Not included:

* combining the edge maps of R, G and B channels, and the dilation, erosion
  and skeletonization used to close contours. These are conventional
  post-processing steps with no hardware description.
* the PCI board and host interface. The top exposes the pixel streams as
  ports instead.

## Parameters

All parameters have defaults from `rf_pkg`. On `rf_serial_seg` and `rf_top`
they can be overridden:

* image size: `IMG_W`, `IMG_H` / `SER_W`, `SER_H`;
* iterations: `R`;
* bit widths: `N`, `M`, `K`;
* table constants: `G_NUM`, `G_SHIFT`, `S_NUM`, `S_SHIFT`, `DELTA_A..C`.

The array size of `rf_parallel_array` / `rf_top` is set by `W`, `H` /
`PW`, `PH`.

The image must have more than W + 5 pixels (an elaboration-time assertion
checks this). Memory grows as W·H·(2N+M) bits.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.
`tb_rf_model_pkg` holds independent bit-exact reference models of both
networks.

| testbench | what it checks |
|---|---|
| `tb_rf_lut` | every entry of every table, and the blown flag |
| `tb_rf_frame_mem`, `tb_rf_line_fifo`, `tb_rf_window3x3` | memory behaviour, one-row delay, window tap positions |
| `tb_rf_serial_update` | 3000 random windows against the equation; 2-cycle latency; edge flag |
| `tb_rf_serial_ctrl` | read/centre sequences, phases, back-pressure, run length |
| `tb_rf_serial_seg` | two 10 x 6 frames, bit-exact, with latency `3R·W·H + W + 5` |
| `tb_rf_pixel_cell`, `tb_rf_parallel_ctrl`, `tb_rf_parallel_array` | single steps, the exact 6R schedule, a 5 x 4 array, bit-exact |
| `tb_rf_top` | both processors at full default size (see below) |

`tb_rf_top` runs the 64 x 64 serial frame with R = 30 and the 8 x 8 parallel
run. It compares every output pixel and edge flag, and checks the frame time
against the 20 ms budget. It also requires that each mechanism actually
occurs:

* input back-pressure;
* passes in phases A, B and C;
* border-masked centres;
* blown fuses in both processors;
* parallel steps in all three phases.

It takes about a second once built.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/rf_pkg.sv tb/tb_rf_model_pkg.sv tb/tb_rf_top.sv --top-module tb_rf_top
./obj_dir/Vtb_rf_top
```

Replace `tb_rf_top` with any other testbench name. For lint:
`verilator --lint-only -Wall -y rtl rtl/rf_pkg.sv rtl/rf_top.sv`. The
remaining lint warnings are about unused package constants and bits, and
about `rst_n` appearing in both the asynchronous reset and the
`disable iff` of the handshake assertions.
