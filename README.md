# RANSAC fitness-scoring accelerator with double-buffered point storage

RANSAC estimates a geometric model from data that contains outliers. It draws
random minimal samples, builds a hypothesis from each, and keeps the one that
fits the data best. Here the model is the affine motion between two video
frames, estimated from matched feature points:

    x2 = H0*x1 + H1*y1 + H2
    y2 = H3*x1 + H4*y1 + H5

The system divides the work between software and hardware. A 32-bit soft
processor (a NiosII at 100 MHz in the reference system) runs the RANSAC loop:

1. Random sampling.
2. Building each hypothesis from three point pairs.
3. A cheap early-rejection test.
4. Keeping the best model.
5. Stopping when a fixed time budget within the frame period runs out.

Profiling the all-software version showed that one step takes about 87% of
the time: scoring each hypothesis against every point pair. That step is the
only one moved into hardware. This RTL is that hardware:

- a pipelined fitness-scoring unit that takes one point pair per clock;
- a controller that feeds the unit straight from on-chip memory, with no
  processor involvement;
- a double buffer, so the next frame's points can stream in while the
  current frame is processed.

A scoring run over N points takes exactly **N + 4 clock cycles**. For the
100-point frames the system targets, that is 1.04 µs at 100 MHz.

```
 matched points ──> buffer_switch_ctrl ──> point_buffer 0 ─┐
 (valid/ready stream)        │          └─> point_buffer 1 ─┤ read mux
                             │ bank, count                   │
 processor  <══ Avalon-MM ══> ransac_controller <────────────┘
                                   │ one point / cycle
                                   v
                             fitness_scoring ──> score
```

## The fitness score

For each point pair the unit computes the residual of the hypothesis and
charges an error:

    dx    = x2 - (x1*H0 + y1*H1 + H2)
    dy    = y2 - (x1*H3 + y1*H4 + H5)
    score = min(dx² + dy², thdist²)

An inlier therefore costs its squared distance from the predicted position,
and an outlier costs a fixed penalty, thdist². The fitness of a hypothesis is
the sum over all points. Lower is better, and a perfect fit scores 0. This
is the MLESAC-style score, not a plain inlier count.

### Number formats

| Quantity            | Format            | Bits | Signed |
|---------------------|-------------------|------|--------|
| x1, y1, x2, y2      | integer pixels    | 11   | no     |
| H0, H1, H3, H4      | Q4.12             | 16   | yes    |
| H2, H5              | Q11.5             | 16   | yes    |
| thdist², score      | Q9.12             | 21   | no     |

Every affine term is 16 bits wide, so the processor writes two terms per
32-bit bus transfer.

### Datapath (`fitness_scoring`)

| Stage     | Work done before the register                                   | Registered                 |
|-----------|-----------------------------------------------------------------|----------------------------|
| 1         | four 12×16 signed multiplies                                    | x1·H0, y1·H1, x1·H3, y1·H4 |
| 2         | add products, add H2/H5 (shifted by 7 to 12 fraction bits), subtract from x2/y2 (shifted by 12), absolute value, truncate to 6 fraction bits, clamp to 5 integer bits | \|dx\|, \|dy\| (11 bits)    |
| 3         | two 11×11 squarers                                              | dx², dy² (Q10.12)          |
| accumulate| dx² + dy², min with thdist², saturating add                      | score (Q9.12)              |

The pipeline registers are placed so that the multipliers and the squarers
each have a stage to themselves. The residual keeps 6 fraction bits so that
its square has the 12 fraction bits of the score.

Clamping the residual at 31.98 pixels is exact, not an approximation. Any
larger residual squares past 511.99, the largest score the format can hold.
So the min() already returns thdist² for such a point, and the clamp cannot
change the result.

The 9 integer bits of the score are a tight budget. A 3-pixel threshold
(thdist² = 9) allows at most 56 full outliers before the sum reaches its
limit. The accumulator **saturates** at 2²¹−1 instead of wrapping, so a bad
hypothesis can never wrap round and look like a good one. Once a sum
saturates, the unit can no longer rank hypotheses by it. Software should
pick thdist so that a good hypothesis stays well below the limit.

### Timing of a run

Here a run's cycles are counted from 0, starting with the first cycle the
controller is busy:

- cycle k (k < N): the controller puts buffer address k on the read bus;
- cycle k+1: the buffer returns point k, which enters stage 1;
- cycles k+2, k+3: point k is in stages 2 and 3;
- cycle k+4: point k is added to the accumulator.

After the last address the controller stays busy until the last point has
been added. It is busy for cycles 0 … N+3, which is N + 4 cycles, and the
score is valid from cycle N+4. Each extra point adds exactly one cycle.

## Double buffering (`buffer_switch_ctrl`, `point_buffer`)

Two identical memories each hold one frame of point pairs: DEPTH = 128 pairs
of 44 bits, one pair per word. The two buffers have these roles:

- the *filling* buffer receives the incoming stream at consecutive
  addresses from 0;
- the *processed* buffer is read by the processor and by scoring runs.

The last point of a frame is marked with `in_last`. In the next cycle the
controller swaps the two buffers' roles. At the same time the number of
points written becomes the processed buffer's point count, and the frame
counter increments.

Two cases are not left to software timing:

- **Frame ending during a run.** Software is expected to finish its RANSAC
  loop before the frame ends. As a safeguard, a swap requested while a run is
  in progress waits for the run to end. `in_ready` stays low meanwhile, which
  is at most DEPTH + 4 cycles. A run therefore always scores one consistent
  frame, and no point of the next frame is lost.
- **Frame longer than DEPTH.** Points beyond DEPTH are dropped, and the
  frame is flagged as overflowed in the status word.

Each buffer has one write port and one read port. The read port has one
cycle of latency. The read mux uses the bank selection that was in force
when the address was issued.

## Controller and processor interface (`ransac_controller`)

The controller has two states, IDLE and BUSY.

- **IDLE:** the processor owns the processed buffer. It can read point pairs
  and write the hypothesis registers.
- **BUSY:** the hardware owns the buffer. An address counter walks it one
  point per cycle. Every processor access, whether to a register or to the
  point window, is stalled with `avs_waitrequest` until the run ends.

Because of the stall, the processor can start a run and immediately read
SCORE. The read returns once the score is ready, so no polling is needed.

The port is a 32-bit Avalon-MM-style slave with word addresses,
AVS_W = log2(DEPTH) + 2 = 9 bits wide.

- **Writes** complete in one cycle when IDLE.
- **Reads** take one wait state when IDLE: `waitrequest` is high for the
  first cycle, and `readdata` is valid in the second cycle.

| Address          | Name    | Access | Contents |
|------------------|---------|--------|----------|
| 0                | CTRL    | W      | bit 0 = 1 starts a run (a write during a run waits for it to end) |
| 0                | STATUS  | R      | bit 0 busy, 1 done, 2 processed bank, 3 frame overflowed, 15:8 frame counter |
| 1                | H01     | R/W    | {H1, H0} |
| 2                | H23     | R/W    | {H3, H2} |
| 3                | H45     | R/W    | {H5, H4} |
| 4                | THDIST  | R/W    | thdist², Q9.12, bits 20:0 |
| 5                | COUNT   | R      | number of points in the processed buffer |
| 6                | SCORE   | R      | score of the last run, Q9.12 |
| {1, i, 0}        | point i | R      | {5'b0, y1, 5'b0, x1} |
| {1, i, 1}        | point i | R      | {5'b0, y2, 5'b0, x2} |

Starting a run does two more things:

- it clears the accumulator;
- it latches COUNT as the run length.

The hypothesis registers may only change while the controller is IDLE, and
the stall guarantees this.

A software iteration looks like this:

1. Read three sampled point pairs through the window.
2. Solve for H0…H5 and convert them to fixed point.
3. Apply the early-rejection test.
4. Write H01, H23, H45 (and THDIST once).
5. Write CTRL = 1.
6. Read SCORE.
7. Keep the hypothesis if its score is the best so far.

## Operating at 30 frames per second

In the target system a frame lasts 33.3 ms, which is 3,333,333 cycles at
100 MHz. Of that, 25 ms is reserved for RANSAC and the rest for other
processor work. The loop is bounded by time, not by an iteration count: a
new iteration starts only while the budget is not used up.

On the processor, the software steps take about 131 µs per iteration:

| Step                  | Time     |
|-----------------------|----------|
| sampling              | 40.6 µs  |
| hypothesis generation | 58.1 µs  |
| early rejection       | 31.7 µs  |
| best-model update     | 0.7 µs   |

Against that, a hardware fitness run over 100 points is 104 cycles, or
1.04 µs. Scoring in software took about 880 µs. With the accelerator, about
190 iterations fit into the 25 ms budget. Iterations stopped by the early
rejection test cost slightly less.

A frame's points stream into the other buffer throughout the period. The
swap at the end of the frame therefore never has to wait, as long as the
loop keeps to its budget. `tb_video_frames` runs exactly this schedule at
full size, for three frames.

## Parameters

| Parameter | Default | Meaning |
|-----------|---------|---------|
| DEPTH     | 128     | point pairs per buffer |
| ADDR_W, CNT_W, AVS_W | derived | address, count and bus-address widths |

The number formats are constants in `ransac_pkg`. DEPTH is this design's
choice: the largest frame in the reference measurements has 108 points. At
the default size the design synthesises to about 160 word-level cells, 390
flip-flops and 11,264 memory bits. That is small next to the Cyclone IV
EP4CE115 of the DE2-115 board the design was built for.

## Published design and this design's choices

These parts follow the published design:

- the split between software and hardware;
- double buffering, with a swap at the end of each frame's data;
- the idle/busy controller that stalls the processor;
- the address counter that feeds one point per cycle;
- the score formula and the number formats;
- the three pipeline stages and their placement;
- the N + 4 cycle run length;
- clearing the accumulator for each hypothesis.

These were left open and are chosen here:

- the buffer depth (128);
- that coordinates are unsigned and affine terms are two's complement;
- where the residual is truncated (6 fraction bits) and the exact clamp;
- saturation of the score;
- the format of thdist² (the score's own Q9.12);
- the bus protocol and register map, and the pairing of affine terms into
  words ({H1,H0}, {H3,H2}, {H5,H4});
- the point-read window;
- the stream's valid/ready/last handshake;
- holding a swap back while a run is in progress;
- dropping and flagging points past DEPTH;
- the frame counter;
- the active-low asynchronous reset, which resets all control state but not
  the buffer contents.

One more point: the published hardware timings (about 24 µs per fitness
evaluation, roughly flat with frame size) include the processor's own work:
register writes, start and read-back. The RTL's N + 4 cycles is only the
time the hardware itself is busy.

## Not included

The processor, the software RANSAC loop and the upstream feature detection
and matching are outside this RTL. Their connections are the top-level
ports. The end-to-end testbench models both of them.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

- `tb_fitness_scoring` checks the following against an integer reference
  model (`tb/ransac_ref_pkg.sv`):
  - the running sum, cycle by cycle, for random and hand-made hypotheses,
    with and without input gaps (this checks the 4-cycle latency exactly);
  - exact fits scoring 0;
  - the outlier penalty;
  - clamping of huge residuals;
  - saturation.
- `tb_point_buffer` checks writes, reads and the one-cycle read latency.
- `tb_buffer_switch_ctrl` checks:
  - writes go to the filling buffer;
  - the swap and count;
  - swaps held back by a run, with `in_ready` low meanwhile;
  - overflow;
  - the read mux.
- `tb_ransac_controller` uses stand-ins for the buffer and the pipeline. It
  checks:
  - register write and read-back, the status word and the point window;
  - runs of 0 to 16 points being busy for exactly N + 4 cycles;
  - points entering the pipeline in order;
  - one clear per run;
  - processor accesses stalled during a run.
- `tb_ransac_accel_top` runs the whole design at its default size. It
  streams frames with a known affine motion (inliers with ±1 pixel noise,
  plus outliers), and acts as the processor. It checks:
  - every score against the reference model, and every run at N + 4 cycles;
  - frame sizes 12, 24, … 108;
  - a frame ending during a run (the swap is held back, and the run still
    scores the old frame);
  - streaming while a run is in progress;
  - overflow and saturation;
  - a software RANSAC loop with early rejection that finds a model scoring
    within 2× of the true motion.

  It counts each of these mechanisms and fails if any never happened.
- `tb_video_frames` runs three frames of real-time operation at 30 fps and
  100 MHz. Software step costs are modelled as idle time. It checks:
  - every score;
  - the iteration count per frame (192 with the default seed);
  - that each loop ends before the next swap;
  - that the best model is within 2× of the true motion.

  It simulates 12.5 M cycles in about 15 s.

To run one testbench with Verilator 5, from the directory that holds `rtl/`
and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/ransac_pkg.sv tb/ransac_ref_pkg.sv tb/tb_ransac_accel_top.sv \
    --top-module tb_ransac_accel_top -o sim
./obj_dir/sim
```

To lint the RTL:

```
verilator --lint-only -Wall -y rtl rtl/ransac_pkg.sv rtl/ransac_accel_top.sv
```

The testbenches raise a few width and variable-lifetime lint warnings,
hence `-Wno-fatal`. Linting the RTL with `-Wall` reports only two kinds of
warning, and both are benign:

- unused package constants;
- `rst_n` used both as an asynchronous reset and in the assertions'
  `disable iff`.

## Files

| File | Contents |
|------|----------|
| `rtl/ransac_pkg.sv` | number formats, point and hypothesis structs, register map |
| `rtl/fitness_scoring.sv` | three-stage scoring pipeline and accumulator |
| `rtl/point_buffer.sv` | one frame buffer (block RAM) |
| `rtl/buffer_switch_ctrl.sv` | double-buffer steering and swap |
| `rtl/ransac_controller.sv` | processor interface, idle/busy FSM, address counter |
| `rtl/ransac_accel_top.sv` | top level |
| `tb/ransac_ref_pkg.sv` | integer reference model of the score |
| `tb/tb_*.sv` | testbenches |
