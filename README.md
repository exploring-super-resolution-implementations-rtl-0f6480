# Iterative back-projection super-resolution engine in single precision

This RTL builds one high-resolution frame out of several low-resolution video
frames of the same scene. Each low-resolution frame is offset from the others
by a small shift. Between them they sample the scene on a grid finer than any
one frame. The engine starts from a guessed high-resolution frame, the
*hypothesis* H. It then refines the guess a fixed number of times: each pass
predicts every low-resolution frame from H, measures the error against the
real frame, and spreads that error back onto H. This is the iterative
back-projection method of Irani and Peleg. The structure follows the all-FPGA
implementation described in "Exploring super-resolution implementations across
multiple platforms". That design has frame memories, a control block with a
cycle counter, and several identical floating point pixel calculation modules
working in parallel, all in IEEE-754 single precision.

At the default size, five 240x320 frames become one 480x640 frame, and four
pixel modules run in parallel. One iteration takes 921,667 clock cycles, which
is 8.9 ms at 103 MHz.

A second, much smaller piece of hardware sits next to the engine. It is a
floating point *custom-instruction unit* (multiply, add, subtract) that a soft
processor can use when the same algorithm runs as a program (`sr_fp_ci`).

## The update rule

Frame k has a shift vector (sy_k, sx_k), given in high-resolution pixels.
Low-resolution pixel (cy, cx) of frame k is modelled as the average of the
2x2 block of H with top-left corner (2·cy + sy_k, 2·cx + sx_k). One iteration
replaces every pixel H(y, x) by

    H'(y, x) = H(y, x) − G · Σ_k e_k(y, x)

    e_k(y, x) = ¼·(sum of the 2x2 block of frame k that contains (y, x)) − O_k(that block's pixel)

Here O_k is the real low-resolution frame and G = 1/K, where K is the number
of frames. The four steps are named after the hardware stages:

1. **Resize frame.** H is shifted and scaled down to one low-resolution pixel:
   two adds of pixel pairs, one add, and a multiply by 0.25.
2. **Compare with the low-resolution frame.** The frame's pixel is subtracted.
3. **Resize error.** Each error is copied to all four high-resolution pixels
   of its block. The errors of all frames are added (an adder tree) and
   multiplied by G.
4. **Adjust hypothesis.** The combined error is subtracted from H.

Some blocks would lie partly outside the high-resolution frame because of the
shift. Such a block, and so that frame's contribution to the pixels it
covers, is dropped: the error is +0.

Every pixel of an iteration is computed from the *previous* hypothesis (a
Jacobi-style update). The high-resolution frame is therefore double buffered.

The gain G is this design's choice. Without it the summed errors of five
frames would correct each pixel five times over, and the iteration diverges.
With G = 1/K, a single unshifted frame converges in one step. In the
testbenches the mismatch between H and the frames halves within two or three
iterations.

## Dataflow and timing: the 12-cycle slot

All scheduling hangs on a **slot** of 12 clock cycles. That is the slot
length of the original design, and it matches its measured run times of about
12 cycles per pixel per module per iteration. The controller (`sr_ctrl`)
counts cycles within the slot. Pixels are scanned in raster order, `NUM_PPU`
consecutive pixels per group, and one group is handled per slot:

| slot cycle | action |
|---|---|
| 0 … K−1 | for frame k = cycle: read the 2x2 window and the low-resolution pixel of every pixel in the group |
| K | read the current value H(y, x) of every pixel in the group |
| 1 … K+1 | the read data (one cycle later) is sorted into the operand registers |
| 11 | all pixel modules start on their pixel; the positions of the next group are latched |

Results come back from the modules together, 59 cycles later. They are then
written one per cycle through a single write port. This needs
`NUM_PPU ≤ 11` (and `NUM_FRAMES ≤ 10` for the fetch). A new iteration begins
only when every result of the previous one has been written. The run length
is therefore

    cycles ≈ n_iter · (12 · ceil(HR pixels / NUM_PPU) + ~67)

At the defaults this is 921,667 cycles per iteration. With nine modules (the
larger FPGA of the original work) it is about 409,700 cycles.

Frame alignment costs no logic beyond address arithmetic. The shift vectors
only move the read addresses, so the frames are never physically shifted.

## Memory organisation

* **High-resolution frame.** Two buffers, each split into **four banks by
  (row parity, column parity)**. A 2x2 window at any position, aligned or
  not, holds exactly one pixel of each bank. A whole window is therefore one
  read per bank in one cycle. The controller knows the window's corner
  parity, so it can reorder the four bank outputs into window order. An
  iteration reads buffer `rd_buf` and writes the other buffer. The two swap
  when the iteration ends.
* **Low-resolution frames.** One array holds all K frames, frame after frame.
* **Read ports.** Every memory has one read port per pixel module
  (`sr_frame_ram`, `NRD` ports, registered read). On an FPGA this means one
  block-RAM copy per reader, all sharing the write port.

Memory at the default size is 5·76,800 + 2·307,200 = 998,400 words of 32
bits, or 31.9 Mbit. That is far more than the block RAM of a budget FPGA. A
real build at full size would need external memory, or a smaller pixel
format, or both.

## The pixel calculation module (`sr_pixel_calc`)

There is one lane per frame. Each lane has three add units and one
multiplier (the resize step), plus one subtract unit (the compare step).
Behind the lanes come a pipelined adder tree, one multiplier by G and one
subtract unit. Side data (low-resolution pixel, centre pixel, lane-valid bit,
destination tag, valid bit) travels through delay lines (`sr_delay`) sized so
that it meets the arithmetic at the right cycle:

| step | latency (cycles) |
|---|---|
| resize frame: (w0+w1)+(w2+w3), ×0.25 | 7 + 7 + 5 = 19 |
| compare: − O_k | 7 |
| combine: adder tree over K frames, ((e0+e1)+e2)+(e3+e4) | 7·ceil(log2 K) = 21 |
| resize error: × G | 5 |
| adjust: H − E | 7 |
| **total** | **59** |

The module accepts a new pixel every cycle, although the controller gives it
only one per slot. In the original design every pipeline stage took 12
cycles. Here the stages are longer than that, because a 2x2 average with
7-cycle adders cannot fit in 12 cycles. Only the issue rate of one pixel per
12 cycles is kept.

## Floating point units

* `sr_fp_addsub`: add or subtract, chosen by one control bit; latency 7.
* `sr_fp_mul`: multiply; latency 5.

Both round to nearest with ties to even. Subnormal inputs and results are
flushed to signed zero. Overflow gives infinity, and invalid operations give
the quiet NaN `7FC00000`. The arithmetic lives in two package functions
(`sr_pkg::fp_add`, `sr_pkg::fp_mul`). Each unit registers its operands,
evaluates the function, and passes the result through latency−1 further
registers, which a synthesis tool with register retiming can spread through
the logic. The latencies are those of the original design. The original used
vendor library units; these units are written from scratch.

## Custom-instruction unit (`sr_fp_ci`)

This is a multi-cycle custom-instruction slave in the style of common soft
processors. `start` with `n` = 0, 1 or 2 requests multiply, add or subtract
on `dataa` and `datab`. `done` pulses with `result` 5 cycles later for a
multiply and 7 cycles later for an add or subtract. Requests are ignored
while `clk_en` is low. The processor, its program and its ALU multiplexer are
not part of this RTL. In the top level the unit's port is simply brought out.

## Using the engine

Top level: `sr_top`. It contains the engine (`sr_fpga_sr`) and the
custom-instruction unit, side by side.

1. **Load, while `busy` is low.** Write one pixel per cycle with `load_we`,
   `load_row` and `load_col`:
   * a low-resolution pixel: `load_hyp = 0` and `load_frame = k`;
   * a pixel of the initial hypothesis: `load_hyp = 1`.

   A reasonable initial hypothesis is the average of the frames enlarged by
   bicubic or bilinear interpolation. Computing it is left to the host.
2. **Start.** Pulse `start` for one cycle with `n_iter` and the signed
   `shift_y[k]` and `shift_x[k]` (4 bits, in high-resolution pixels). The
   shifts come from an image registration step outside this RTL. Frame 0 is
   usually the reference, with shift (0, 0).
3. **Wait.** `done` pulses once all iterations are written back. After that,
   `iter` equals `n_iter` and `cycle_count` holds the run length in cycles.
   `n_iter = 0` finishes at once.
4. **Read back.** Drive `rd_row` and `rd_col`; `rd_data` follows one cycle
   later.

Loads always go to the buffer that holds the current result. A second `start`
without reloading therefore continues refining the last result.

`rst_n` is asynchronous and active low. It clears the control state but not
the memories, and blocks all memory writes while it is held.

All values are IEEE-754 single precision bit patterns in one grey channel. A
colour image needs three runs, one per channel.

### Parameters (`sr_top` / `sr_fpga_sr`)

| parameter | default | meaning |
|---|---|---|
| `LR_H`, `LR_W` | 240, 320 | low-resolution frame size; the result is 2·LR_H x 2·LR_W |
| `NUM_FRAMES` | 5 | frames combined (at most 10) |
| `NUM_PPU` | 4 | pixel modules in parallel (the larger FPGA of the original work held 9; at most 11) |
| `SHIFT_W` | 4 | width of the signed shift inputs |
| `ITER_W` | 8 | width of `n_iter` |
| `DOWN_SCALE`, `BP_GAIN` (`sr_fpga_sr` only) | 0.25, 0.2 | constants of the resize steps |

## Verification

Every testbench checks itself and ends by printing
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_sr_fp_addsub`, `tb_sr_fp_mul` | 30,000 operations each (random values, cancellation, ties, zeros, overflow), bit-exact against double precision reference arithmetic rounded once to single precision, at the exact latency |
| `tb_sr_frame_ram` | multi-port reads against a shadow copy, with writes running at the same time |
| `tb_sr_pixel_calc` | random operations, bit-exact against the same sequence of single precision steps; the 59-cycle latency and the tag |
| `tb_sr_ctrl` | memories hold position codes, so every fetched operand shows where it came from; checks windows, LR pixels and lane-valid bits for shifted frames, the 12-cycle issue spacing, one write per pixel per iteration into the right bank and buffer, the buffer swap and done |
| `tb_sr_fp_ci` | all three operations, their latencies, requests ignored while `clk_en` is low |
| `tb_sr_top` | end to end on 4x5 frames with three modules (so the last group is partly empty): a 3-iteration run, a 0-iteration run, and a 2-iteration continuation with other shifts, each compared bit for bit with a reference model written as a scatter (each LR pixel's error spread over its block) rather than the RTL's gather; checks the run length and that the residual shrinks; also exercises the custom-instruction port |
| `tb_sr_top_full` | full default size with no parameter changes: 5 iterations over 480x640, all 307,200 pixels compared bit for bit; the run length (about 4.6 M cycles) must give 22.38 frames/s within 1% at 103.15 MHz; about a minute of simulation |
| `tb_sr_workload_p9` | the same full-size run with nine pixel modules, compared bit for bit; the run length must give 59.69 frames/s within 1% at 122.25 MHz |

The reference arithmetic is in `tb/tb_sr_ref_pkg.sv`. It uses the
simulator's double precision reals. For add, subtract and multiply of single
precision values, computing in double precision and rounding once gives the
correctly rounded single precision result.

To run a testbench with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/sr_pkg.sv tb/tb_sr_ref_pkg.sv tb/tb_sr_top.sv --top-module tb_sr_top
    ./obj_dir/Vtb_sr_top

Replace `tb_sr_top` with any testbench name. The RTL uses no vendor
primitives; the memories are plain arrays with registered reads.

## Where this design makes its own choices

The original description gives the stages, the operators in each stage, the
unit latencies, the 12-cycle stage time, the cycle counter, the shift vectors
used as memory offsets, the number of parallel modules and the frame sizes.
The following are this design's own:

* the exact forms of the shift-and-downscale step (2x2 box average, integer
  shifts in high-resolution pixels) and of the upscale step (replication);
* the gain 1/K on the combined error;
* dropping blocks that leave the frame;
* double buffering of the hypothesis;
* the four-bank memory layout and one read port per module;
* the raster scan and the fetch and write-back schedule within a slot;
* waiting for each iteration to drain before the next one starts;
* the stage lengths of the pixel module (longer than 12 cycles, fully
  pipelined);
* the rounding and subnormal behaviour of the floating point units;
* the load, start and read-back interface;
* the custom-instruction port and its operation encoding.

Not included:

* the image registration that produces the shift vectors (they are inputs);
* the computation of the initial hypothesis (it is loaded);
* the soft processor and its program for the hardware/software variant.
