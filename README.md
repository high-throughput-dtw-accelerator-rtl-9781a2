# Minimum-area interleaved DTW accelerator

Dynamic Time Warping (DTW) measures how similar two time series are while
allowing one of them to be stretched or compressed in time. For a signal
X (samples x_0 .. x_{n-1}) and a pattern Y (y_0 .. y_{n-1}) it fills an n x n
matrix

    w(i,j) = min( w(i,j-1), w(i-1,j), w(i-1,j-1) ) + (x_i - y_j)^2
    w(0,0) = (x_0 - y_0)^2,     any element outside the matrix = +Inf

and the DTW distance is the corner element w(n-1,n-1). With a Sakoe-Chiba
band of radius R only the 2R+1 elements with |i - j| <= R are evaluated in each
row; everything outside the band counts as +Inf.

This RTL computes that distance with a single, small, deeply pipelined
datapath instead of a two-dimensional systolic array. Two ideas make it
efficient:

* **Only the sliding band is stored.** An element needs its left neighbour and
  two neighbours from the previous row, so a shift register a little longer
  than one band row holds everything that is still needed. That shift
  register is long and has one output, which is what LUT-based shift
  registers (SRL) in FPGAs implement cheaply.
* **Interleaving hides the recurrence.** Element w(i,j) cannot start before
  w(i,j-1) has left the pipeline. So the unit works on `PATTERNS` independent
  DTWs at once, typically one input signal against many stored patterns, and
  gives consecutive clock cycles to different DTWs. With at least as many
  DTWs as the recurrence loop has stages, one matrix element is computed
  every cycle.

All arithmetic is IEEE-754 single precision.

## Module hierarchy

```
dtw_accelerator            top: controller, read stage, Rx, calculation unit, memory
├── dtw_controller         iteration order: fill, row start, band elements, slots
├── rx_regfile             x_i of the current row, one entry per slot
├── calc_unit              pipelined evaluation of the recurrence
│   ├── distance_unit      (x - y)^2: register, fp32_add (subtract), fp32_mul
│   ├── minimum_unit       two compare/select pairs
│   └── fp32_add           min + distance
└── prev_result_memory     Last -> Band -> Output shift chain
dtw_pkg                    fp32_t, op_ctrl_t, op_kind_e, LOOP_LAT (default loop depth), DIST_LAT
```

The storage of the input signals and patterns is not part of the unit. The
top reaches it through two synchronous read ports (see *Interface*).

## How a run is sequenced

A run processes `size + 1` rows. Each row has `2R + 2` columns, and each column
has `SLOTS` consecutive clock cycles, one per interleaved DTW:

| row, column                | what every slot does                                          |
|----------------------------|---------------------------------------------------------------|
| row 0 (fill)               | pushes +Inf: clears the previous-result memory                |
| row i+1, column 0          | row start: reads x_i into Rx and pushes +Inf                  |
| row i+1, column 1+b        | band element b: matrix column j = i - R + b                   |
|   j inside 0..size-1       | reads y_j, computes w(i,j), pushes it                         |
|   j outside the matrix     | pushes +Inf (skipped; happens in the first and last R rows)   |
| slot >= PATTERNS           | dummy slot: reads nothing, pushes +Inf                        |

The row-start column is what moves the band one position along the
diagonal: row i covers columns i-R .. i+R, one to the right of row i-1. Its
+Inf also serves as the left neighbour of the first band element.

Every slot pushes exactly one value per cycle into the previous-result
memory, whether it computed something or not. That regularity is what lets a
plain shift register replace any addressing logic.

## The previous-result memory

This is the least obvious part of the design. Count pushes in units of
columns (one column = `SLOTS` cycles). For band element b of row i:

* w(i,j-1) is band element b-1 of the same row: **1 column** ago;
* w(i-1,j) is band element b+1 of the previous row. Between it and now lie
  2R-b-1 later elements of row i-1, the row-start column of row i and b
  elements of row i: **2R+1 columns** ago;
* w(i-1,j-1) is band element b of the previous row: **2R+2 columns** ago.

At the edges this still gives the right answer. For b = 0 the "left
neighbour" is the row start's +Inf. For b = 2R the "upper neighbour" is also
that row start's +Inf, because w(i-1,i+R) lies outside the band of row i-1.

The chain is cut into three parts, so all three operands are read in parallel
from the ends of the parts:

```
adder output -> Last (SLOTS-LOOP_STAGES) -> Band (2R*SLOTS) -> Output (SLOTS)
                    tap: w(i,j-1)          tap: w(i-1,j)      tap: w(i-1,j-1)
```

The adder's output register already delays the result by the loop latency,
so Last holds only the remaining `SLOTS - LOOP_STAGES` positions. When
`SLOTS == LOOP_STAGES`, Last is empty and the adder output feeds the minimum
unit directly (a bypass). Each DTW occupies 2R+2 positions: Band 2R, Last
1, Output 1. Slots of the same column sit next to each other.
At the defaults (R = 16, 32 slots) the chain holds 1088 words.

There is no reset on the chain. The fill row writes +Inf into every position
before the first matrix row. For the element w(0,0) the minimum is forced to
0.

## Interleaving, dummy slots and the initiation interval

`LOOP_STAGES` is the number of cycles from reading the three neighbours to
having the new element back at the Last tap. The default, and the minimum,
is 2: one cycle for the minimum and one for the add. Larger values add
register stages after the adder. They stand for the deeper pipeline that
floating-point operators need at a high clock rate. The distance computation
(3 stages) is outside the loop and runs ahead of it.

`SLOTS = max(PATTERNS, LOOP_STAGES)`:

* `PATTERNS >= LOOP_STAGES`: every cycle computes a useful element, which is
  an initiation interval of 1. Extra patterns add throughput per run but cost
  memory: Band, Last, Output and Rx all grow with SLOTS.
* `PATTERNS < LOOP_STAGES`: every column is padded with dummy slots. With
  `PATTERNS = 1` this is the basic, non-interleaved architecture, and its
  initiation interval equals the loop depth.

A build with many slots also runs fewer real DTWs. Load anything into the
unused slots and ignore their results; those are the dummy patterns.

## Arithmetic

* `fp32_add` and `fp32_mul` are combinational single-precision operators that
  round to nearest, ties to even. Subnormal inputs are read as zero and
  subnormal results are flushed to zero. Every NaN result is 0x7FC00000.
  Random signals rarely produce subnormals; if one does, the result can
  differ from a fully IEEE-compliant float computation.
* The minimum unit compares raw bit patterns as unsigned integers. This is
  valid because every value it sees is non-negative or +Inf. Do not reuse it
  for signed data.
* The result matches, bit for bit, a software DTW in which every subtraction,
  square and addition is rounded to single precision. Against a
  double-precision DTW the testbenches accept a relative error of at most
  1e-4.

Changing the number format means replacing `fp32_t`, the two operators and the
`FP_*` constants in `dtw_pkg`. The minimum unit works unchanged for any
unsigned or non-negative format that orders like an integer.

## Interface

`dtw_accelerator` parameters:

| parameter  | default | meaning                                                |
|------------|---------|--------------------------------------------------------|
| `PATTERNS` | 32      | DTWs computed per run (interleaved slots in use)       |
| `R`        | 16      | Sakoe-Chiba band radius, >= 1; 2R+1 elements per row   |
| `MAX_SIZE` | 5000    | largest signal length accepted by `size`               |
| `LOOP_STAGES` | 2    | depth of the recurrence loop (minimum + add), >= 2     |

Ports (`SLOT_W = clog2(SLOTS)`, `IDX_W = clog2(MAX_SIZE+1)`):

| port                              | dir | meaning                                                        |
|-----------------------------------|-----|----------------------------------------------------------------|
| `clk`, `rst_n`                    | in  | clock, active-low asynchronous reset                           |
| `start`, `size`                   | in  | start a run on signals of `size` samples (taken when not busy) |
| `busy`, `done`                    | out | run in progress; one-cycle pulse at the end                    |
| `x_rd_en/_slot/_idx`, `x_rd_data` | out/in | read sample `_idx` of input signal `_slot`; data due next cycle |
| `y_rd_en/_slot/_idx`, `y_rd_data` | out/in | same for pattern `_slot`                                    |
| `res_valid`, `res_slot`, `res_value` | out | DTW distance of slot `res_slot`, once per slot and run      |

Both read ports carry a slot number, so the same RTL can compare one input
signal with many patterns (give every slot the same X) or many signals with
one pattern (give every slot the same Y). The input signal is read only once
per row, at the row start, and kept in Rx. Pattern samples are read once per
computed element.

Timing: from the clock edge that takes `start`, `done` is high after

    (size + 1) * (2R + 2) * SLOTS + 5 + LOOP_STAGES cycles

The extra cycles are one for the memory read, DIST_LAT = 3, the loop depth
LOOP_STAGES (2 by default), and one for the status register. Results appear
during the last row, slot by slot.
For size 2500, R = 16 and 32 patterns that is 2,721,095 cycles for 32 DTWs.
The published HLS implementation of this architecture reports 2,721,061
cycles for the same case, so the iteration scheme matches to within its
fill-phase details.

## Evaluated configurations

The configurations of the published evaluation, run in `tb_dtw_workloads`
and `tb_dtw_full`. Cycles are from the start to `done`. "Published" is the
latency the original HLS implementation reports for the same configuration.

| size | R  | patterns | loop | slots | cycles here | published  |
|------|----|----------|------|-------|-------------|------------|
| 100  | 16 | 32       | 2    | 32    | 109,895     | 109,861    |
| 500  | 16 | 32       | 2    | 32    | 545,095     | 545,061    |
| 2500 | 16 | 32       | 2    | 32    | 2,721,095   | 2,721,061  |
| 5000 | 16 | 32       | 2    | 32    | 5,441,095   | 5,441,061  |
| 200  | 8  | 32       | 2    | 32    | 115,783     | (size 2500 only) |
| 200  | 32 | 32       | 2    | 32    | 424,519     | (size 2500 only) |
| 200  | 64 | 32       | 2    | 32    | 836,167     | (size 2500 only) |
| 200  | 16 | 4 / 8    | 14   | 14    | 95,695      | (size 2500 only) |
| 200  | 16 | 16       | 14   | 16    | 109,363     | (size 2500 only) |
| 200  | 16 | 24       | 14   | 24    | 164,035     | (size 2500 only) |

For every size the cycle count here is 34 cycles above the published one.
That constant comes from the fill and pipeline phases. With few patterns and a 14-stage loop, the
original paid 16 or more cycles per column for 4 and 8 patterns (initiation
interval 2 or worse). Here the dummy slots pad a column to exactly 14.

The default build (R = 16, 32 slots, sizes up to 5000) runs every size of the
evaluation, and every pattern count up to 32 with the unused slots as dummy
patterns. Other band radii need a build with that `R`. A full-matrix
comparison with a band of 1025 elements (R = 512) would need a Band of
2 * 512 * SLOTS words.

## Where this RTL departs from, or adds to, the architecture

* **Pipeline depth.** The original was produced by high-level synthesis at a
  3 ns target. Its non-interleaved version had an initiation interval of 14,
  so it needed 14 to 16 patterns to reach one element per cycle. Here the
  loop is 2 stages and the distance unit 3, with single-cycle combinational
  floating-point operators. At the same clock this is slower; on the other
  hand, 2 patterns already fill the pipeline. `LOOP_STAGES = 14` reproduces
  the original's loop depth, with plain registers after the adder that a
  retiming synthesis can move into it. The distance unit's depth is
  `DIST_LAT` in `dtw_pkg`. The memory and controller follow both
  automatically.
* **Memory size.** Each DTW keeps 2R+2 positions, not 2R+1, because the
  row-start push occupies one position per row.
* **Fill.** The memory is cleared by one full row of +Inf pushes. The length
  of the original's fill phase is not known.
* **Run-time size.** The signal length is an input up to `MAX_SIZE` rather
  than a synthesis constant. Signals and patterns have the same length.
* **Handshake, result port, reset.** These are this design's own choices.
* **Clock-target trade-off.** The original also lowers the clock target to
  shorten the pipeline when there are few patterns. That is a synthesis
  setting; here the equivalent is editing the stage counts.
* **Not included:** storage of the signals and patterns, replication into
  multi-core arrays, and fixed-point variants (e.g. 16-bit samples).

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench               | what it checks                                                            |
|-------------------------|---------------------------------------------------------------------------|
| `tb_fp32_add`           | 4000 random sums/differences against a double-precision reference rounded to fp32; ties, Inf, NaN, overflow |
| `tb_fp32_mul`           | 4000 random products bit-exact (a third constructed to hit exact ties); specials |
| `tb_distance_unit`      | streamed (x-y)^2, bit-exact, at the right latency                          |
| `tb_minimum_unit`       | three-way minimum with +Inf, zero and ties                                 |
| `tb_rx_regfile`         | write/read-back against a shadow copy                                      |
| `tb_prev_result_memory` | tap ages for R=2 with 5 slots, and for the bypass case (2 slots)           |
| `tb_calc_unit`          | random mix of compute/skip/idle/first operations, latency 5; same with a 4-stage loop |
| `tb_dtw_controller`     | every issued operation against a nested-loop model, 3 runs in 2 configurations |
| `tb_dtw_accelerator`    | end to end: 4 patterns with R=3 (sizes 20, 13, 2; one signal vs many patterns and many signals vs one pattern), the 1-pattern basic architecture, and 3 patterns on a 5-stage loop; exact results, run length, and a count of each mechanism (fill, row start, skipped elements, dummy slots, bypass, first element, start while busy) |
| `tb_dtw_workloads`      | the evaluated configurations (see below): sizes 100 and 500; R = 8, 32, 64; 4, 8, 16, 24 patterns with a 14-stage loop |
| `tb_dtw_full`           | all defaults: one signal of 5000 samples against 32 patterns, R=16, 5,441,095 cycles (about a minute in Verilator) |

The references in `tb/fp_ref_pkg.sv` and `tb/dtw_ref_pkg.sv` are written
independently of the RTL. They convert between `real` and fp32 bit patterns
by hand, and they evaluate the banded DTW with two rows of the matrix.

Running a testbench with Verilator (from the directory that holds `rtl/`
and `tb/`):

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/dtw_pkg.sv tb/fp_ref_pkg.sv tb/dtw_ref_pkg.sv rtl/*.sv tb/dtw_harness.sv \
    tb/tb_dtw_accelerator.sv --top-module tb_dtw_accelerator -o sim
./obj_dir/sim
```

Substitute any other testbench name. `tb/dtw_harness.sv` is needed only by
`tb_dtw_accelerator` and `tb_dtw_workloads`. The top carries two concurrent assertions on the read
requests, so keep `--assert`.

Lint notes: Verilator reports `SYNCASYNCNET` on `rst_n`, which is used both as
the asynchronous reset and in the assertions' `disable iff`, and the unused
bits of the result control word. Both are harmless.
