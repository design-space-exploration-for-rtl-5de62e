# A pipelined floating-point softmax unit

This is SystemVerilog for a softmax unit. Given N floating-point scores `X_1 .. X_N`, it returns the
probabilities `P_M = e^(X_M) / sum_L e^(X_L)`. It needs no divider and no storage for the
exponentials. The unit evaluates the equivalent log-domain form

    P_M = exp( (X_M - X_max) - ln( sum_L exp(X_L - X_max) ) )

in three passes over the inputs. Subtracting the maximum first keeps every exponential argument
at or below zero, so nothing overflows. Taking the logarithm of the sum turns the division into
a subtraction. The inputs are processed `PA` at a time, where PA is the parallelism. N can be
any multiple of PA up to the memory size, so one small datapath serves both short and very long
score vectors.

The architecture is the base architecture of *Design Space Exploration for Softmax
Implementations*, in the configuration that the paper draws and times as its example:
parallelism 4, float16 data, LUT-based EXP and LOG units, and inputs re-read from on-chip
memory. It is implemented here as RTL, with the paper's generator knobs turned into parameters;
float32 data is one parameter away.
Section "Where this differs from the paper's design" lists every departure.

## The three stages

```
              stage 1            stage 2                          stage 3
 input   +-----------+   +-----+   +-----+   +-------+   +-----+   +--------+   +--------+   +-----+
 memory->| max_block |   | sub |-->| exp |-->| adder |-->| log |   | presub |-->| logsub |-->| exp |--> P
 (PA     | (block 1) |   | (2) |   | (3) |   | tree  |   | (5) |   |  (6)   |   |  (6)   |   | (7) |
  per    +-----------+   +-----+   +-----+   |  (4)  |   +-----+   +--------+   +--------+   +-----+
  row)        |  X_max      ^                +-------+      | XLOG      ^            ^
              +-------------+-------------------------------|-----------+            |
                                                            +------------------------+
```

The input memory is read once per stage, one row of PA values per cycle. With the buffer option
it is read only once, in stage 1 (see "Storage").

* **Stage 1: maximum (block 1).** A comparator tree of `log2(PA)` levels reduces each row to its
  maximum. One more comparator keeps the running maximum across rows, so any N works. There is a
  pipeline register after every third comparator level.
* **Stage 2: sum of exponentials (blocks 2, 3, 4).** This stage starts only once `X_max` is
  final. PA subtractors form `X_L - X_max`. PA EXP units exponentiate the differences. An
  adder tree, with a register after every adder level, adds each row. An accumulator then adds
  the row sums.
* **Stage 3: normalised exponentials (blocks 5, 6, 7).** This stage starts only once the sum is
  final. The LOG unit turns the sum into `XLOG` in one cycle. The inputs are read a third time:
  the *presub* row recomputes `X_M - X_max`, the *logsub* row subtracts `XLOG`, and a second row
  of EXP units produces the probabilities.

Recomputing `X_M - X_max` in stage 3 is the central area trade of the architecture. Keeping the
stage-2 differences would need a FIFO as deep as N. Recomputing them costs PA subtractors and one
cycle of latency.

`softmax_ctrl` sequences the three stages. It issues the reads of each stage back to back and
tags each read with its stage and a last-row flag. It waits for `xmax_valid` (from block 1) and
`sum_valid` (from block 4) before starting the next stage. Every row carries a valid flag and a
last flag through the datapath. There is no back-pressure: each stage accepts one row per cycle.

## Timing

From the clock edge that takes `start` to the edge at which `done` is seen:

    cycles = 3*N/PA + log2(PA) + floor(log2(PA)/3) + 13

| stage | cycles | made of |
|---|---|---|
| 1 | N/PA reads | + 1 memory read, floor(log2(PA)/3) comparator-tree registers, 1 running-max register, 1 cycle to react to `xmax_valid` |
| 2 | N/PA reads | + 1 read, 1 subtractor, 2 EXP stages, log2(PA) adder levels, 1 accumulator, 1 cycle to react to `sum_valid` |
| 3 | N/PA reads | + 1 read, presub, logsub, 2 EXP stages, `done` register |

Measured examples: N=64 and PA=4 take 63 cycles; N=512 and PA=8 take 209; N=1024 and PA=4 take
783; N=4096 and PA=4 take 3087.

The paper's cycle counts follow `3*N/PA + 6 + log2(PA)`: 56 for N=64/PA=4 and 201 for
N=512/PA=8. This design is 7 + floor(log2(PA)/3) cycles longer, for two reasons. Each stage waits
for a registered "final" flag from the previous stage before its first read. And the memory read
is a pipeline stage of its own. The per-row throughput of one row per cycle per stage is the
same.

## Arithmetic

By default all data is IEEE binary16 (1 sign bit, 5 exponent bits with bias 15, 10 fraction
bits). With `PRECISION = FLOAT32` every unit, table and port switches to IEEE binary32 (8
exponent bits, bias 127, 23 fraction bits); below, float16 is described and the float32
differences are noted. The adders, subtractors and multiplier round to nearest-even. They flush subnormal inputs and results
to zero and send overflow to infinity.

### EXP unit (`exp_unit`, blocks 3 and 7)

This is a piecewise-linear approximation of `e^x` on [-8, 0], split into 64 intervals of width
1/8:

1. **Float to fixed.** The interval index is `n = floor(8*|x|)`, taken straight from the exponent
   and mantissa bits. It saturates at 63, so every `x < -8` uses the last interval.
2. **LUT.** The LUT has 64 entries, each holding two values for interval n, which spans
   `[-(n+1)/8, -n/8]`:
   * `a(n) = 8 * (e^(-n/8) - e^(-(n+1)/8))`, the slope of the chord across the interval;
   * `b(n) = e^(-(n+1)/8) + a(n) * (n+1)/8`, the value the line takes at x = 0.
3. **Multiply-add.** The result is `y = a(n)*x + b(n)`, using a multiplier and an adder of the data format. Far
   below -8 this line goes negative; such a result is returned as +0, since `e^-8` is about
   0.0003.

There is a register after the LUT read and another after the multiply-add, so the latency is 2
cycles at one input per cycle. Against exact `e^x`, the error is within 0.003 on [-8, 0]. The
chord makes `e^0 = 1.0` exact.

### LOG unit (`log_unit`, block 5)

This uses `ln(2^(E-bias) * 1.m) = ln(2)*(E-bias) + ln(1.m)`:

* A table addressed by the exponent E holds `ln(2)*(E-bias)`: 32 entries in float16 (bias
  15), 256 in float32 (bias 127).
* A 64-entry table, addressed by the top 6 fraction bits k, holds `ln(1 + (k+0.5)/64)`, the log
  at the centre of the bin.
* An adder sums the two, followed by one register.

The error is within 0.02 of `ln(x)` over the float16 range. Taking the centre of each bin halves
the worst-case error, but `ln(1.0)` comes out as 0.0078 rather than 0.

No table is stored as literal numbers. Each is a constant computed during elaboration from the
formulas above with `$exp` and `$ln` and rounded to the data format by `real_to_fp` in
`rtl/softmax_lut_pkg.sv`, so changing the format rebuilds every table. Synthesis sees only
constants.

### Accuracy of the whole unit

Against a double-precision softmax of the same inputs, the largest absolute error of a
probability was, in float16:

* between 2e-5 and 1.8e-3 in the input ranges [-0.1, 0.1], [-1, 1], [-10, 5], [5, 10], [-8, -4],
  [-8, 8] and [-30, 30] (N from 64 to 4096, PA from 1 to 32);
* 0.0073 for N = 1, where the only output should be exactly 1. This is the `ln(1.0)` offset of
  the LOG table.

In float32 the same PLF and LOG tables set the error: 3e-6 to 1.3e-4 for N = 1024, PA = 16 over
the same ranges. The format no longer limits it; the approximations do.

Two more effects come from the float16 format (in float32 both are negligible at these sizes):

* The sum of exponentials is accumulated in float16. For large N, its rounding makes the outputs
  sum to slightly less than 1: 0.985 for N = 1024 in [-8, 8], and 0.96 for N = 4096 in [-10, 5].
* The sum must stay below 65504, which holds for every N up to 65504, since each term is at most 1.

## Storage

`STORAGE_REG` selects how the inputs are reused:

* `0` (default): stages 2 and 3 re-read the single-port input memory. The area does not depend
  on N, but every input is read from memory three times.
* `1`: the rows read in stage 1 are also written into `input_buffer`, one register row per memory
  row. Stages 2 and 3 read that buffer, so the memory is read once. The buffer is as large as the
  memory (`MAX_INPUTS` values), which trades area for memory-read energy.

The buffer read is registered, so the cycle count is the same for both settings.

## Interface of `softmax_top`

| parameter | default | meaning |
|---|---|---|
| `PA` | 4 | lanes per row: the number of subtractors, EXP units etc. per block (power of 2, 1..32 tested) |
| `MAX_INPUTS` | 4096 | capacity of the input memory in values; `ROWS = MAX_INPUTS/PA` |
| `STORAGE_REG` | 0 | see "Storage" |
| `PRECISION` | `FLOAT16` | data format, `FLOAT16` or `FLOAT32` (`softmax_pkg::precision_e`); W = 16 or 32 below |

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (control state and valid flags only) |
| `host_we`, `host_addr`, `host_wdata` | in | 1, log2(ROWS), PA x W | write one memory row while `busy` is low; row r holds inputs r*PA .. r*PA+PA-1, lane i in bits [W*i+W-1:W*i] |
| `start`, `num_groups` | in | 1, log2(ROWS)+1 | begin a softmax over rows 0 .. num_groups-1 (N = num_groups*PA); ignored while busy or when num_groups is 0 |
| `busy` | out | 1 | an operation is running |
| `out_valid`, `out_group`, `out_prob` | out | 1, log2(ROWS), PA x W | one row of probabilities per cycle during stage 3, in row order, same lane layout as the inputs |
| `done` | out | 1 | one-cycle pulse after the last result row; `busy` falls with it |

A new `start` may be given in the cycle after `done`. The memory keeps its contents, so the same
inputs can be run again without reloading.

## Where this differs from the paper's design

* **Float16 and float32 only.** The paper's generator also offers int8 and int32 (and a
  fixed32 setting in its comparison). Their fixed-point formats and the fixed-point EXP and LOG
  units are described only in outline, so they are not built.
* **Only the LUT accuracy option.** The accurate EXP and LOG units in the paper are commercial
  library IP with undisclosed insides.
* **Latency.** This design takes 7 + floor(log2(PA)/3) cycles more per operation, as explained
  under "Timing". Stage 3 starts after the sum is final, never together with the log.
* **Things the paper leaves open, decided here:**
  * the chord slopes of the EXP table and the zero clamp below about -9;
  * the mid-bin values of the LOG mantissa table;
  * subnormal and rounding handling;
  * the valid/last handshakes and the reset;
  * the host write port and the result stream;
  * N may be any multiple of PA, not only a power of two.
* **Memory inside the top.** The on-chip input memory is written as a plain synchronous array
  (`input_mem`) inside the top, so the design can be simulated on its own. In a chip it would be
  an SRAM macro with the same one-cycle read.

## Files

| file | content |
|---|---|
| `rtl/softmax_pkg.sv` | precision enum and format widths, stage enum, float compare |
| `rtl/softmax_lut_pkg.sv` | real-to-float rounding used to build the EXP and LOG tables |
| `rtl/fp_addsub.sv`, `rtl/fp_mul.sv` | adder/subtractor and multiplier, any exponent/fraction width |
| `rtl/fp_reduce_tree.sv` | pipelined max/sum tree shared by blocks 1 and 4 |
| `rtl/max_block.sv` | block 1 |
| `rtl/sub_array.sv` | block 2, and each half of block 6 |
| `rtl/exp_unit.sv`, `rtl/exp_array.sv` | EXP unit; blocks 3 and 7 |
| `rtl/adder_tree.sv` | block 4 |
| `rtl/log_unit.sv` | block 5 |
| `rtl/presub_logsub.sv` | block 6 |
| `rtl/softmax_ctrl.sv` | control FSM |
| `rtl/input_mem.sv`, `rtl/input_buffer.sv` | input memory and optional register buffer |
| `rtl/softmax_top.sv` | the complete unit |

## Simulation

Every testbench in `tb/` checks itself and ends by printing
`TB_RESULT checks=<n> failures=<n>`. Each compares against values computed independently in
double precision (`tb/fp_ref_pkg.sv`), and each has a watchdog.

* `tb_softmax_top` runs five configurations side by side: PA=4 from memory, PA=8 and PA=32 with
  the buffer, PA=1, and PA=16 in float32. Each runs the input ranges above, a single-row operation, a back-to-back
  restart and an all-equal input. The test checks every probability (absolute error at most
  0.01), the cycle count and the row order. It also fails if any of these was never exercised: a
  multi-row operation, a single-row operation, an EXP argument below -8, the buffer, float32
  operation, a back-to-back start.
* `tb_softmax_full` uses the default parameters with N = 1024 and N = 4096.
* `tb_softmax_workloads` runs the configurations of the design-space study at their input
  counts: PA = 2 and 16 at N = 1024, PA = 4 with the buffer at N = 1024, and float32 at
  N = 4096 with PA = 1, 4 and 8 (12301, 3087 and 1553 cycles).
* The other testbenches check one block each. Most compare bit for bit against a reference that
  follows the block's definition.

To run one with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb \
    rtl/softmax_pkg.sv rtl/softmax_lut_pkg.sv tb/fp_ref_pkg.sv \
    tb/tb_softmax_top.sv --top-module tb_softmax_top
./obj_dir/Vtb_softmax_top
```

Replace the testbench name to run another one. To try another configuration, change the
parameters of a `softmax_check_harness` instance in `tb/tb_softmax_top.sv`.
