# Ray-triangle intersection on a shared floating-point array

A ray-triangle intersection test needs 54 floating-point operations. Built as a fully unrolled
pipeline, it needs one arithmetic unit per operation. Deeply pipelined floating-point units are
large on an FPGA, so this design uses only **5 adders, 6 multipliers and 4 comparators** and
reuses them under a **static schedule**. The units have pipelines 10 to 17 cycles deep, and
**strip mining** hides that latency. Every schedule stage applies one operation to a whole strip
of independent items, one item per cycle. A stage's results are then ready when the next stage
starts on the same items. **Two strips are interleaved**, so the adders are busy 80% of the time
and the multipliers 72%.

Because the units are shared, an intermediate value usually waits several stages before the
operation that needs it can run. Keeping it until then is the job of the *intermediate
buffering*. This design uses **chaining**: behind every unit is a chain of one-stage
delay memories, and every element of the chain is tapped back to the operand multiplexers. The
chains need no control logic and no write multiplexers. The schedule alone decides which tap an
operand reads.

## The computation

The test is Möller–Trumbore with the division removed. Every item holds 17 single-precision
words:

| words | meaning |
|---|---|
| T0, T1, T2 (3 each) | triangle corners |
| P0 (3) | ray origin |
| PD (3) | ray direction |
| Told, Dold | best hit so far, as a fraction: distance = Told/Dold |

The kernel computes:

```
S0 = T1-T0      S1 = T2-T0      S2 = P0-T0            9 subtractions
C0 = PD x S1    C1 = S2 x S0                          12 products, 6 subtractions
U  = S2.C0      V  = PD.C1                             (u*det, v*det)
D  = S0.C0      T  = S1.C1                             (det, t*det)   12 products, 8 additions
U+V,  M0 = T*Dold,  M1 = Told*D                        1 addition, 2 products
U<0,  V<0,  D<U+V,  M0<M1                              4 comparisons
```

That is 24 additions, 26 multiplications and 4 comparisons. The item is a hit that improves on
the old one when `!(U<0) & !(V<0) & !(U+V>D) & (M0<M1)`. In that case the kernel outputs the new
pair (T, D); otherwise it passes on (Told, Dold). Hence the kernel's "two outputs plus four bits"
are T, D and the four compare bits. Because no division is done, the test assumes **D > 0**, i.e.
triangles that face the ray; the testbenches orient them that way. A hit behind the origin
(t < 0) is not rejected. To find the closest triangle, start a ray with a huge Told and Dold = 1
and feed each result back as the next item's (Told, Dold). The testbench of the top level does
exactly this.

## The schedule

Time is counted in **stages** of `STRIP` clock cycles. In each stage, a unit performs one
operation (for example "S0.x = T1.x − T0.x") for the STRIP items of a strip, in item order.
Every unit output is delayed to **exactly one stage**: the unit pipeline plus `STRIP − LAT`
padding registers. So item *i*'s result arrives when the next stage processes item *i*.

One iteration (one strip) is a 13-stage program: stages 0–11, plus an output stage 12. Two
iteration slots, **A** and **B**, share the array with a period of 12 stages. Slot B starts 2
stages after slot A. Slot B uses different adders only where the two slots would otherwise
collide. Period rows (A/B = current strips, A'/B' = strips of the previous period):

| row | adders | multipliers | comparators / output |
|---|---|---|---|
| 0 | A: S0.xyz, S1.xy on A0–A4 | B': M0, M1 on M0, M1 | output stage of A' |
| 1 | A: S1.z, S2.xyz on A0–A3 | – | B': 4 compares |
| 2 | B: as row 0 | A: the 6 products of C0 | output stage of B' |
| 3 | B: as row 1 | A: the 6 products of C1 | – |
| 4 | A: C0 differences on A0–A2 | B: products of C0 | – |
| 5 | A: C1 differences on A0–A2 | B: products of C1 | – |
| 6 | B: C0 differences on A2–A4 | A: products of U (M0–M2), V (M3–M5) | – |
| 7 | A: first additions of U, V on A0, A1; B: C1 differences on A2–A4 | A: products of D, T | – |
| 8 | A: U, V complete; first additions of D, T (A0–A3) | B: products of U, V | – |
| 9 | A: D, T, U+V (A0–A2); B: first additions of U, V on A3, A4 | B: products of D, T | – |
| 10 | B: U, V complete; first additions of D, T (A0–A3) | A: M0, M1 on M0, M1 | – |
| 11 | B: D, T, U+V (A0–A2) | – | A: 4 compares |

Per period, the adders do 48 of 60 possible stage-operations and the multipliers 52 of 72. With a
single iteration per period, the figures would be 40% and 36%.

### Chains and taps, the part to understand before changing anything

Tap 0 of a unit's chain is the unit's stage-aligned output. Tap *j* is the same stream *j* stages
later. A value made in stage *p* is read in stage *k* from tap **k − p − 1** of the unit that made
it. Unit output is shared by whichever slot used that unit in stage *p*. Within one iteration the
tap depends only on the stage distance, so slot B reads the same taps as slot A, but from its own
units. For example, S0.x is made on A0 in stage 0. It is read in stage 3 (tap 2) for C1, and in
stage 7 (tap 6) for D.

All chain elements share the item counter `idx`. Each element is a STRIP-word memory that, every
cycle, reads `mem[idx]` and writes the new word in its place (`strip_delay`). The number of
elements behind a unit is computed from the schedule at elaboration time (`rti_pkg::chain_depth`):
7 taps for each adder, 2 for each multiplier and 1 for each comparator. That makes 36 delay
memories and 15 alignment pipelines in total.

The schedule is written once, as a function of iteration stage and unit (`rti_pkg::kernel_op`).
From it come a per-unit constant ROM indexed by row, and the chain depths. To change the schedule,
edit `kernel_op`. Keep two things intact:

- **No unit may be used by both slots in the same row.** `rti_pkg::sched_conflict()` checks this,
  and `tb_rti_datapath` calls it.
- **Every tap has to match the stage distance.**

### Input buffers, slots and the output stage

An iteration reads its input words at several stages: T0–T2 and P0 in stages 0–1, PD in stages 2
and 6, and Told/Dold in stage 10 and the output stage. Every strip in flight therefore keeps its
own buffer. `input_bank` has 4 buffers of STRIP items, filled in round-robin order from a
valid/ready stream. A buffer is closed by the STRIP-th item, or early by `in_last`, which makes a
short strip. `rti_control` starts slot A at the beginning of a period and slot B two stages later.
Each start takes the next full buffer in order. If none is ready, the slot runs empty (its items
are invalid), so the array never stalls and earlier strips always drain. Four operand-routing
*tags* (A, B, A', B') tell each operation whose input words it reads. A' finishes at the end of
row 0 of the next period and B' at the end of row 2, and their buffers are then released. A buffer
is taken again only four slot starts later. That is at least 24 stages on, while a strip lives 13
stages, so the host has at least 11 stages to refill a buffer.

`result_select` is the output stage. It reads the four compare bits (chain tap 0 of C0–C3) and the
new T and D (tap 2 of A1 and A0), combines them with Told/Dold from the strip's buffer, and
registers the result.

## Interface and timing (`rti_top`)

| port | dir | width | |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `in_valid`, `in_ready` | in/out | 1 | item handshake; an item is taken when both are high |
| `in_words` | in | 17 × 32 | T0, T1, T2, P0, PD (x, y, z), Told, Dold |
| `in_last` | in | 1 | closes a short strip |
| `out_valid` | out | 1 | a result is present, no backpressure |
| `out_hit` | out | 1 | inside the triangle and closer than the previous hit |
| `out_flags` | out | 4 | {M0<M1, D<U+V, V<0, U<0} |
| `out_t`, `out_d` | out | 32 each | closer hit (new or previous), distance = T/D |
| `unit_busy` | out | 15 | units starting a real item this cycle (A0–A4, M0–M5, C0–C3) |
| `slot_bubble` | out | 1 | an iteration slot started without a strip |

- **Throughput:** 2·STRIP items per 12·STRIP cycles, i.e. one item every 6 cycles. That is
  9 floating-point operations per cycle.
- **Latency:** 12·STRIP + 1 cycles from an item's first stage to its result. A complete strip may
  wait up to one period in its buffer for a slot.
- **Output order:** results leave in input order, STRIP per output stage, one per cycle.

## Parameters

| parameter | default | notes |
|---|---|---|
| `STRIP` | 16 | items per strip. Must be ≥ every unit latency. Not fixed by the source. |
| `ADD_LAT`, `MUL_LAT`, `CMP_LAT` | 12, 10, 10 | unit pipeline depths. The units are specified as 10–17 stage pipelines; the exact values are this design's choice. |
| `N_ADD`, `N_MUL`, `N_CMP`, `PERIOD`, `N_BANKS` | 5, 6, 4, 12, 4 | constants in `rti_pkg`. The schedule is written for these unit counts. |

## Floating-point units

`fp_add`, `fp_mul` and `fp_cmp` work on IEEE-754 single precision. Each is one combinational
step followed by `LAT` registers, to be retimed by synthesis. They accept one operation per cycle.
Their behaviour:

- rounding to nearest even;
- subnormal inputs and results flushed to signed zero;
- overflow gives infinity;
- NaN operands, inf − inf and inf × 0 give the quiet NaN `7FC00000`.

The comparator computes a < b. It returns 0 for NaN and treats ±0 as equal. Its result travels in
bit 0 of a 32-bit word through the same chains as the arithmetic results. The source specifies
the units only by their pipeline depth and clock rate, so these format and rounding choices are
this design's own.

## What follows the source and what does not

Follows the source:

- the operation counts;
- the 5/6/4 unit array with input selection, intermediate buffering and control;
- the two-iteration schedule, row by row and unit by unit;
- strip mining;
- chaining with one-stage delay memories and no buffer multiplexers.

This design's own choices:

- **Vector naming and one schedule label.** The vector names S0/S1/S2 follow the order of the
  first subtractions. The first cross product is taken as PD × S1 (D × (T2−T0)), the classic
  Möller–Trumbore P vector. With any other operand, the dot product that yields U would be
  identically zero.
- **Delays.** The source counts fifteen delay operations in the kernel's graph. Here a value
  that has to wait is read from a later tap of its producer's chain, so a delay is never an
  operation of its own and occupies no unit.
- **Interface and housekeeping:** the input stream, the four strip buffers, short strips, empty
  slots instead of stalls, the form of the output stage, and the reset.
- **Sizes:** the strip length and the exact unit latencies.
- **Chain layout.** Chain lengths are derived from the schedule, giving 36 delay memories. The
  source's chaining variant is quoted at 81 memories, and its exact unit-to-chain layout is not
  known.
- **Operand multiplexers.** They are written generically over all sources and driven by a
  constant ROM. Synthesis prunes each to the sources it actually uses. With the unit assignment
  of the schedule table above, an adder or multiplier port sees 3 to 7 distinct sources (A0 and
  A1 port a: 7), and a comparator port sees 1. This is more than the 3–6 sources the source
  reports after balancing operations across units. That re-balancing is not reproduced.

Not built:

- the *buffer-reuse* and *hybrid* buffering variants;
- the fully unrolled 62-stage pipeline;
- the schedule-generation tools;
- the host.

## Files

| file | content |
|---|---|
| `rtl/rti_pkg.sv` | types, constants, the schedule (`kernel_op`, `sched`), chain depths |
| `rtl/rti_top.sv` | top level |
| `rtl/rti_datapath.sv` | unit array, schedule ROMs, input selection, alignment, chains |
| `rtl/rti_control.sv` | stage/item counters, slot starts, buffer release |
| `rtl/input_bank.sv` | strip buffers and input stream |
| `rtl/result_select.sv` | output stage |
| `rtl/operand_select.sv` | operand multiplexer |
| `rtl/chain_buffer.sv`, `rtl/strip_delay.sv` | chained delay memories |
| `rtl/pipe_delay.sv` | register pipeline used for unit depth and alignment |
| `rtl/fp_add.sv`, `rtl/fp_mul.sv`, `rtl/fp_cmp.sv` | floating-point units |
| `tb/fp_ref_pkg.sv` | reference arithmetic (double precision rounded to single) and reference kernel |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/rti_pkg.sv tb/fp_ref_pkg.sv \
          tb/tb_rti_top.sv --top-module tb_rti_top -o sim
./obj_dir/sim
```

The same works for `tb_rti_datapath`, `tb_rti_control`, `tb_input_bank`, `tb_result_select`,
`tb_operand_select`, `tb_chain_buffer`, `tb_strip_delay`, `tb_fp_add`, `tb_fp_mul` and
`tb_fp_cmp`. What each testbench checks:

- **`tb_rti_top`** runs the default configuration. It streams 165 independent items, covering a
  stalled input stream, a short strip and empty slots, and checks every result bit for bit
  against the reference kernel. It also checks the steady rate of 2·STRIP results per 12·STRIP
  cycles. Then it runs a closest-hit search: 2 × 16 rays against 4 triangles each, with results
  fed back.
- **`tb_rti_datapath`** checks every output-stage value, and the 48/52/8 operation counts per
  period, with unequal small unit latencies.
- **The unit testbenches** compare several thousand operations bit for bit and check the latency.

The reference arithmetic evaluates each single-precision operation in double precision and then
rounds to single. That is exact for these operations, so the comparisons are bit for bit.
