# Streaming double-precision SpMV engine with a hazard-free accumulator

This is synthesizable SystemVerilog for a sparse matrix-vector multiply engine,
y = A x, in IEEE 754 double precision. The matrix streams in from off-chip
memory. The vector x sits in on-chip block RAM.

Each row of y is a dot product. Its terms arrive one per cycle and must be added
to a running sum. A pipelined floating-point adder cannot do that directly: each
addition needs the result of the one before, which is still inside the pipeline.
This engine solves that with a custom accumulator, which has two parts:

* **A base-b number format.** Values are converted to a wide two's complement
  significand with a short exponent that counts b-bit digits (b = 64 by
  default). This makes the add stage mostly a wide integer add with a cheap
  exponent compare, so it can be pipelined over just three stages.
* **A reduction circuit.** It keeps three partial sums in flight. When a new
  row starts, it folds the old row's three partial sums into one, using one
  input buffer and one output buffer, while the new row keeps arriving at full
  rate. The price is a minimum of eight terms per row.

Five such lanes run side by side. Each lane computes whole rows, so the lanes
never need to talk to each other.

## Data format: how the host schedules the matrix

The matrix arrives as one 400-bit packet per cycle. A packet has five 80-bit
slots, and slot *i* always feeds lane *i*. A slot holds a 64-bit double value
and a 16-bit column index. Slot 0 occupies bits 399:320. Inside a slot, the
value sits in the upper 64 bits.

The host pre-processes the matrix, which is in CSR form, like this:

* Lane *i* starts on row *i*.
* All non-zeros of one row go into the same slot position of consecutive
  packets.
* A row ends with a **zero termination**: value 0.0, with the column field set
  to the row this lane works on next. It counts as one of the row's terms.
* A row with fewer than seven non-zeros is **padded** with (0.0, column 0) so
  that non-zeros, padding and termination together make eight slots. Row 0 is
  always the first row of lane 0, so no termination ever points to row 0. That
  is how the hardware tells a termination from padding.
* A lane with no rows left gets a termination that names row `16'hFFFF`, the
  idle row. After that it is fed padding. Results for the idle row are never
  reported.

```
 slot:    lane 0        lane 1        lane 2   ...
        v(0,0) c     v(1,0) c     v(2,0) c
        v(0,1) c     v(1,1) c     v(2,1) c
          ...          ...
        v(0,k) c     0.0   0      ...          <- padding (row 1 is short)
        0.0    5     0.0   6      ...          <- terminations: lane 0 -> row 5, lane 1 -> row 6
        v(5,0) c     v(6,0) c     ...
```

A cycle in which `pkt_valid` is low counts as padding for every lane. It only
adds 0.0 to the current rows, so the memory may deliver packets with gaps. Set
sizes can only grow, and a larger set is always allowed.

The padding costs bandwidth on matrices with few non-zeros per row. The
testbench host model (`spmv_sched` in `tb/tb_spmv_pkg.sv`) reports the
resulting slot utilisation. On random matrices the size of common test
matrices, it ranges from about 0.5 (four non-zeros per row) to 0.98 (sixty
per row).

## One lane

`dot_product_lane` is `row_tracker` -> `vector_bram` + value register ->
`fp64_mul` -> `fp_accumulator`:

* `row_tracker` tags each slot with the lane's current row. A zero termination
  moves the lane to the next row, and that change takes effect after the
  termination.
* `vector_bram` is this lane's copy of x: 2^16 x 64 bits, enough for any
  16-bit column index. The column indexes it with one cycle of read latency.
  The value waits one cycle in a register so it meets its x entry.
* `fp64_mul` is a two-stage double multiplier. It rounds to nearest even.
  Zero and subnormal inputs count as zero, and underflow flushes to zero.
* The row tag travels next to the data and becomes the accumulator's set
  number.

All five copies of x are written at once through one shared write port (`vec_we`,
`vec_addr`, `vec_wdata`).

## The accumulator (`fp_accumulator`)

```
 stage 1        2          3 .. 5 (alpha = 3)            buf   +1      +2     +3       +4
 in -> base  -> 2s     -> [mux]-> compare/denormalize/ -> out -> abs -> clz -> renorm -> pack -> out
       conv     compl       ^      add/carry-shift  --+   buf                         (data_valid)
                            +--------------------------+  (pipeline output fed back)
```

### Base-b format (`acc_condition`, `denorm_add`)

Let E be the 11-bit IEEE exponent and b = 2^LG_BASE:

* The **significand** is `{1, fraction} << E[LG_BASE-1:0]`, with a zero sign
  bit and a zero carry bit added on top. That makes 54+b bits (118 for b = 64).
  Negative values are then two's-complemented.
* The **exponent** is `E[10:LG_BASE]`, which is 11-LG_BASE bits (5 for b = 64).
* The **value** is `significand * 2^(b*exponent - 1075)`.

To add two numbers, `denorm_add` does four things:

1. It compares the two exponents.
2. It shifts the smaller operand right by b bits for each unit of exponent
   difference. Bits shifted out are dropped.
3. It adds the two significands.
4. If the sum spills into the carry bit (the top two bits differ), it shifts
   the sum right by b bits and increments the exponent.

The design writes this as one combinational step followed by three registers in
total (ALPHA = 3). Retiming in synthesis can then spread the logic over the
three stages.

The choice of base is a trade-off. A larger b gives a shorter exponent compare
but a wider adder:

| b    | exponent bits | significand / adder bits |
|------|---------------|--------------------------|
| 32   | 6             | 86                       |
| 64   | 5             | 118                      |
| 128  | 4             | 182                      |

Sums are not renormalized inside the loop. After heavy cancellation, small
terms lose low-order bits against the large exponent. The absolute error stays
within about 2^-52 of the largest partial sum for each addition. The tests
hold results to 2^-44 of the sum of the magnitudes of the terms.

### The reduction circuit (`reduction_ctrl` plus the muxes and buffers in `fp_accumulator`)

The pipeline operands come from two muxes:

* The first operand is either the incoming value or the output buffer (2 inputs).
* The second operand is either the pipeline output, the input buffer or zero
  (3 inputs).

The four routing configurations are:

| cfg | first operand | second operand  | side effect                          |
|-----|---------------|-----------------|--------------------------------------|
| A   | output buffer | pipeline output | incoming value -> input buffer       |
| B   | incoming      | pipeline output | (steady state)                       |
| C   | incoming      | input buffer    | pipeline output -> output buffer     |
| D   | incoming      | 0               | pipeline output -> output buffer     |

In steady state (B), the pipeline holds three partial sums of the current row,
P1, P2 and P3, and each new term is added to whichever of them is leaving. When
the next term belongs to a new row, the controller runs a fixed sequence. Cycle
0 is the first term n0 of the new row:

| cycle | cfg | what happens                                                    |
|-------|-----|------------------------------------------------------------------|
| 0     | D   | n0 + 0 enters; P1 leaves -> output buffer                        |
| 1     | A   | n1 -> input buffer; P1 + P2 enters                               |
| 2     | C   | n1 + n2 enters; P3 leaves -> output buffer                       |
| 3     | B   | n3 + n0 enters                                                   |
| 4     | A   | n4 -> input buffer; P3 + (P1+P2) enters                          |
| 5     | B   | n5 + (n1+n2) enters                                              |
| 6     | B   | n6 + (n0+n3) enters                                              |
| 7     | C   | n4 + n7 enters; P1+P2+P3 leaves -> output buffer (final_sum)     |
| 8     | B/D | steady state, or D if yet another row starts here                |

After cycle 7, the pipeline again holds three partial sums, all of the new row.
This is why a row must have at least eight terms.

The controller has nine states: steady B, then D, A, C, B, A, B, B, C. The only
input it looks at is "the next term is in a new set". It gets that input by
comparing the row tags of conditioning stages 1 and 2, one cycle ahead. A row
shorter than eight terms violates an assertion in `reduction_ctrl`.

### Back to IEEE 754 (`acc_normalize`)

The finished sum moves from the output buffer through four stages, one per step:

1. absolute value (the sign is kept);
2. leading-zero count;
3. shift so the leading 1 becomes the hidden bit, with biased exponent
   `b*exponent + (position of leading 1) - 52`;
4. packing into IEEE 754.

The fraction is truncated. A zero sum gives +0.0.

### Timing

* An accumulator accepts one term every cycle and never stalls.
* A row's sum appears on `out_valid` 14 cycles after the first term of the next
  row enters the accumulator.
* A lane adds 3 cycles in front of the accumulator (BRAM read and multiplier).
* After the last packet of a matrix, about 25 more cycles drain all results.
* Each lane reports its rows in the order it processed them, on its own output
  port (`y_valid[i]`, `y_row[i]`, `y_val[i]`). Nothing merges the five ports.

## Top level (`spmv_top`)

| port                                | dir | meaning                                                  |
|-------------------------------------|-----|----------------------------------------------------------|
| `clk`, `rst`                        | in  | clock; synchronous active-high reset                     |
| `start`                             | in  | put lane *i* back on row *i* before a new matrix         |
| `vec_we`, `vec_addr`, `vec_wdata`   | in  | write x[addr] into every lane's copy                     |
| `pkt_valid`, `pkt_data[N_LANES*80-1:0]` | in | one packet per cycle; low = padding cycle            |
| `y_valid[i]`, `y_row[i]`, `y_val[i]`| out | lane *i* finished row `y_row[i]` with value `y_val[i]`   |

To run a matrix:

1. Load x.
2. Pulse `start`.
3. Stream the packets.
4. Keep clocking until the results have drained.

Each lane performs one multiply and one add per cycle. At 170 MHz that is a
peak of 1.7 GFLOPS. On the workload tests, the useful rate is this peak times
the slot utilisation.

Parameters:

* `N_LANES` (default 5) sets the number of lanes. The packet grows by 80 bits
  per lane. Lanes are independent, so a board with more memory bandwidth only
  needs a larger `N_LANES`.
* `LG_BASE` (default 6) sets the accumulator base.

The reduction controller is written for ALPHA = 3 only.

## What follows the source design and what is this implementation's own

These parts follow the source design:

* the lane organisation;
* the 400-bit, five-slot packet with 16-bit columns;
* zero termination and padding;
* the base conversion and de-normalize/add steps;
* the four configurations and the 9-state sequence;
* the stage order of the conversion back to IEEE 754;
* ALPHA = 3 and the minimum set size of 8.

These are this implementation's own choices:

* b = 64 (the source design selected bases 32 to 128);
* the multiplier, which the source design only names;
* the bit placement of slots;
* truncation in the adder and the normalizer;
* the treatment of zero and subnormal inputs;
* the idle row `16'hFFFF` and empty cycles counted as padding;
* row tags for identifying results;
* the shared vector write port;
* the output buffer placed in front of the normalizer;
* all reset values.

These are not handled: NaN and infinity inputs, and sums within 2^64 of the
double range limit, where the base-b exponent would wrap.

These are not included:

* off-chip memory and its controller: the packet stream is a port;
* the host-side scheduler: a behavioural model of it is in the testbench package;
* any write-back of y.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. Reference values are computed independently:

* with the simulator's `real` arithmetic: exact products for the multiplier,
  real sums with a tolerance for the accumulator;
* or from the configuration sequence written out in the testbench.

The testbenches that cover more than one block:

* `tb_fp_accumulator` checks sums, tags and the 14-cycle latency over 300
  back-to-back sets. Some sets have exactly eight terms.
* `tb_acc_bases` builds the accumulator for b = 32 and b = 128 and repeats
  those checks on both.
* `tb_spmv_top` runs two random matrices with gaps in the packet stream, at
  default parameters. It counts and requires each mechanism at least once:
  terminations, padding, idle lanes, empty cycles, all four configurations,
  adder carry shifts, negative results and results from every lane.
* `tb_spmv_workload` runs nine random matrices with the sizes of common
  test-matrix collections, from 8,192 to 17,281 rows and up to about a million
  non-zeros. It checks every row of y and that one packet is consumed every
  cycle.
* `tb_spmv_scaled` widens the engine to 15, 20, 25 and 30 lanes (`N_LANES`)
  and runs the same matrix sizes through it, with the same checks. It uses the
  helper `tb_scaled_unit`. At these sizes the slot utilisation stays within
  0.002 of the five-lane figures.

To simulate with Verilator, for example the top-level test:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/spmv_pkg.sv tb/tb_spmv_pkg.sv tb/tb_spmv_top.sv --top-module tb_spmv_top -o sim
./obj_dir/sim
```

Replace `tb_spmv_top` with any other testbench name. Each testbench simulates
in a few seconds.

## Files

| file                     | content                                                  |
|--------------------------|----------------------------------------------------------|
| `rtl/spmv_pkg.sv`        | shared constants, slot struct, configuration enum        |
| `rtl/spmv_top.sv`        | N_LANES lanes fed from one packet                        |
| `rtl/dot_product_lane.sv`| one lane                                                 |
| `rtl/row_tracker.sv`     | current row, termination decode                          |
| `rtl/vector_bram.sv`     | x copy                                                   |
| `rtl/fp64_mul.sv`        | double multiplier                                        |
| `rtl/fp_accumulator.sv`  | accumulator with reduction buffers and muxes             |
| `rtl/acc_condition.sv`   | base conversion, two's complement                        |
| `rtl/denorm_add.sv`      | compare, de-normalize, add, carry shift                  |
| `rtl/reduction_ctrl.sv`  | 9-state reduction controller                             |
| `rtl/acc_normalize.sv`   | abs, leading zeros, renormalize, pack                    |
| `tb/tb_spmv_pkg.sv`      | testbench helpers and the host scheduler model           |
| `tb/tb_*.sv`             | one testbench per module, plus `tb_acc_bases`, `tb_spmv_workload`, `tb_spmv_scaled` and its helper `tb_scaled_unit` |
