# Mean-shift object tracking hardware

SystemVerilog RTL for two mean-shift object trackers, a hue colour-space
transformation and an add/subtract-cell array divider. They follow the
architectures of the thesis "VLSI Architectures for Mean-Shift Based Object
Tracking". Everything is synthesisable and parameterised. It is sized by
default for the 16 x 16 frames and kernels the thesis works with.

## What is here

| Module | Role |
|---|---|
| `ms_top` | Top level. It holds the four parts below side by side, each with its own prefixed ports (`a2_`, `a1_`, `hue_`, `div_`). |
| `ms2_system` | **Architecture II** tracker. It takes a target from frame 1, searches frame 2, and iterates until the mean-shift vector falls below a threshold or an iteration limit is reached. |
| `ms2_model` | Builds the target or candidate model: a kernel-weighted colour histogram over a window, normalised to 16-bit fractions. |
| `ms2_center` | Computes the weights sqrt(qu/pu), the new centre (weighted mean of the row and column positions) and the mean-shift length. |
| `ms2_index` | Colour index (R/16+1)*256 + (G/16+1)*16 + (B/16+1), in the range 273..4368. |
| `ms2_ram` | Write-enabled RAM with an asynchronous read. It is used as the index RAM, the target-model RAM and the candidate-model RAM. |
| `ms1_system` | **Architecture I** tracker for one mean-shift step. It chains the kernel, two density estimators, both kernel gradients, the similarity unit and the tracking unit. |
| `ms_kernel` | Epanechnikov kernel matrix for a given H, W and R, output in Q1.7. |
| `ms_density` | Kernel-weighted histogram over 4096 bins, normalised by the kernel sum (8-bit fractions). |
| `ms_similarity` | Weights sqrt(q/p) in Q4.4 and the similarity value f in Q8.8. |
| `ms_gradient` | Central-difference gradient along rows or columns, one-sided at the edges. |
| `ms_norm` | sqrt(gx² + gy²). |
| `ms_track` | Computes numx, numy and den. Two sequential dividers give dx and dy in Q16.16, and the position is updated. |
| `nr_divider` | Sequential non-restoring divider (one quotient bit per clock, start/busy/done). |
| `ms_hue` | Two-stage pipelined RGB-to-hue converter with Q4.4 inputs and a Q16.16 output. |
| `serial_divider` | Combinational array of nine 6-bit add/subtract cells. It gives the non-restoring quotient digits and remainder, with no correction stage. |
| `sd_addsub_cell`, `sd_full_adder` | The cell (six full adders plus XOR gates, select = carry in) and its full adder. |
| `ms_pkg` | Shared sizes, the window-bounds function and an integer square root. |

## Using the trackers

Both trackers take their image data through a load port before a run.
- Architecture II takes RGB pixels for two frames: `ld_frame` selects the frame, and `ld_row`/`ld_col` are 0-based.
- Architecture I takes 12-bit colour indices for the target and candidate matrices.
- Writes are ignored while a tracker is busy.
- A one-cycle `start` pulse begins a run. A one-cycle `done` pulse ends it, and the results stay valid until the next run.

### Architecture II

**Inputs**
- The centre (`center1` is the row, `center2` the column, both 1-based).
- The window half sizes `whs1`/`whs2`.
- The search enlargement `incre`.
- The frame size.
- The threshold `eps` in Q8.8. The thesis default of 0.1 is 26.
- `max_iter`.

**Outputs**
- The final integer centre `c1_out`/`c2_out`.
- The last unrounded new centre and mean-shift length (Q8.8).
- The number of iterations.
- `converged`, which tells a threshold stop from an iteration-limit stop.

**Timing and centre update**
- The target model costs 2 + 4369 + 2·Nt + 1 clocks.
- Each iteration costs (4369 + 2·Nc + 1) + (Nc + 38) + 2 clocks, where Nt and Nc are the pixel counts of the target and candidate windows.
- With a 7 x 7 target and `incre` = 2, one iteration takes about 9,200 clocks.
- Between iterations the centre moves to the nearest integer pixel. Because of this, a displaced object often leaves a residual mean-shift length of about half a pixel. Such a run then ends at `max_iter` rather than at the 0.1 threshold, with the centre within a pixel or two of the object.

### Architecture I

**Inputs:** H, W, R and a starting position.

**Outputs**
- f, numx, numy, den, dx and dy, with the two divider remainders.
- The position moved by the rounded shift.

A 16 x 16 step takes 5,439 clocks. Most of that is clearing the two 4096-bin density arrays.

### How an Architecture II iteration is scheduled

The tracker is a small state machine around three units that share the index, target and candidate RAMs.

1. **Target pass (`ms2_model`, once per run).** The unit first clears all 4369 bins of the target RAM, one per clock. It then walks the target window over frame 1. For each pixel it forms the colour index and the kernel weight `wmax − d`:
   - `d` is the squared distance to the centre;
   - `wmax` is the squared distance of the window corner plus one, so the corner pixels weigh 1.

   The weight is added into a local histogram. A second walk over the window divides each touched bin by the weight sum and writes the 16-bit fraction into the target RAM.
2. **Candidate pass (`ms2_model`, every iteration).** This is the same procedure on frame 2, with the window enlarged by `incre` on every side and clipped to the frame. It also writes each pixel's colour index into the index RAM, in scan order.
3. **Centre pass (`ms2_center`, every iteration).** The unit re-walks the candidate window.
   - For each pixel it reads the pixel's index and the two model values, and takes `wi = sqrt(qu/pu)`.
   - It accumulates Σwi, Σi·wi and Σj·wi.
   - Two sequential 32-bit dividers then give the new centre in Q8.8.
   - A square root of the squared displacement gives the mean-shift length.
4. **Decision.** The run ends if `ms < eps` or `max_iter` iterations have been made. Otherwise the centre moves to the rounded new centre and the candidate pass repeats.

Clearing the bins dominates the cost of small windows. It keeps the design free of any per-frame reset of the large RAMs.

### The cell-array divider

`serial_divider` is combinational. It is a chain of P + 1 = 9 add/subtract cells, each made of N = 6 full adders with XOR gates on the B input.
- The first cell's select bit is the XNOR of the operand sign bits.
- Every cell's carry out is one quotient digit and selects the operation of the next cell: 1 means subtract, 0 means add.
- Each next cell takes the previous partial remainder shifted left with a 0 appended.

Read as a signed 9-bit number, the digit vector is 2⁸·X/Y to within one unit, and 2⁸·X = Q·Y + R exactly whenever the final remainder is not negative. For −12/15 it gives Q = 100110011 and R = 3. As in the thesis, no correction stage is built, so the operands must satisfy |X| < Y.

The sequential `nr_divider` is a different circuit. It runs one quotient bit per clock with a correction step at the end, and the trackers use it for their divisions.

## Simulating

Every testbench is a plain top module. For example, to run the full design end to end at its default size:

```
verilator --binary --timing -Wno-fatal -y rtl rtl/ms_pkg.sv tb/tb_ms_top.sv --top-module tb_ms_top
./obj_dir/Vtb_ms_top
```

Substitute any other `tb/tb_<module>.sv` to test a single block. The package `rtl/ms_pkg.sv` must be listed first; verilator finds the other modules in `rtl/` through `-y`. `-Wno-fatal` is needed because verilator's width and unused-signal lint warnings stop the build otherwise. All testbenches finish within seconds.

## Design decisions not fixed by the thesis

- **Load ports.** Frames and index matrices come in through load ports. In the thesis they are supplied from a MATLAB host.
- **Sign of the kernel gradient.** Architecture I takes the gradient of the negated kernel. This makes (dx, dy) point toward the pixels with large weights. With the literal "gradient of the kernel", a moved object would push the position away from itself.
- **Gradient precision.** Inside Architecture I the gradients keep the kernel's Q1.7 precision. The 8-bit Q4.4 format of the stand-alone gradient example would round the kernel slopes to zero.
- **Hue maximum and minimum.** Hue uses each pixel's own maximum and minimum. The G-maximum branch adds 32 and the B-maximum branch adds 64; the architecture drawing labels the third adder 64.
- **Model names.** The target model is called qu and the candidate model pu, as in the Architecture II drawing. The thesis text swaps p and q in one place.
- **Edge cases.**
  - A zero candidate density gives weight 0.
  - A zero weight sum leaves the centre unchanged.
  - den = 0 in Architecture I gives no shift.
  - `max_iter` = 0 behaves like 1.
- **Clipping.** The search window is clipped to the frame. The kernel weight still uses the unclipped corner distance.
- **Dividers.** Divisions inside per-pixel loops are combinational. The centre and shift divisions use the sequential non-restoring divider.
- **Index RAM timing.** The Architecture II RAMs read asynchronously, so that each unit handles one pixel per clock.

## Verification

Every module has a self-checking testbench in `tb/` named `tb_<module>`. Each one prints a single line, `TB_RESULT checks=N failures=M`, and has a watchdog timer.
- **Block testbenches** compare against references written inside the testbench. The references are real-number formulas or integer models, and some blocks are checked exhaustively. They also check the latency stated in each module header.
- **Worked examples from the thesis** are checked:
  - the kernel table entries;
  - the norm example;
  - the similarity weights 1.0 and 1.2247 (Q4.4 00010011);
  - the hue value 32;
  - the index values 2458, 2730 and 2731;
  - the divider example −12/15 → Q = 100110011, R = 3.
- **`tb_ms2_system` and `tb_ms1_system`** follow every run with a bit-exact model of the whole tracker. Results and cycle counts must match exactly.
- **`tb_ms_top`** runs the complete design at its default size with no parameter overrides. It counts each mechanism, and any mechanism that never occurs is a failure. The mechanisms are:
  - a stop by threshold;
  - a stop at the iteration limit;
  - following a moved object;
  - a lost object;
  - an Architecture I shift, and an Architecture I run with den = 0;
  - the four hue branches;
  - the divider example.

## Not implemented

- The FPGA implementation and its utilisation table are vendor-tool results, not RTL.
- The MATLAB host side (video decoding and target selection) is not implemented.
- The background-weighted histogram variant described in the thesis's algorithm chapter is not implemented, and neither is its 52-frame video evaluation.
- The thesis's numeric results for the similarity and tracking examples (f, numx, den, dx) depend on inputs it does not give, so they are not reproduced.
