# Squared-distance accelerator for Kohonen self-organizing map training

Training a Kohonen self-organizing map (SOM) is dominated by the winner
search. For every training pattern, the distance from the pattern to every
neuron's weight vector is computed, and the closest neuron wins. In a software
profile of the learning loop, that per-neuron distance-and-compare step
(`CompareDistance`) takes about two thirds of the run time. It is also a
small, regular computation: subtract the two vectors element by element,
square the differences, and add the squares.

This RTL moves that step into hardware. The main idea is that the unit is a
**pipelined datapath built from a few identical general-purpose ALUs**. The
designer picks a *restart time* R (the number of cycles between two new
inputs) and an ALU count. A fixed modulo schedule then reuses each ALU for
several operations of the same computation, and lets several computations
overlap in flight. Fewer ALUs give a cheaper but slower unit; more ALUs give a
faster one. The default build takes a new 9-element vector pair every
**5 cycles on 13 ALUs**.

The rest of SOM training stays in host software: the loop over patterns, the
neighbourhood, and the weight update `w(t+1) = w(t) + Alpha(t,dx,dy)*(x - w(t))`.
The host streams (weight, pattern) pairs into the unit and reads back the
distances and the "new minimum" flags.

## Block structure

```
                 som_compare_distance (top)
  weight[9] ──┐  ┌──────────────────────────────┐   ┌─────────────┐
  pattern[9] ─┼─►│ compute_distance             │──►│ min_compare │──► is_smaller
  in_valid  ──┘  │  phase counter (mod R)       │   │  mindist    │──► mindist
  in_ready  ◄────│  input regs, result regs     │   └─────────────┘
                 │  NUM_ALU x som_alu           │──► distance (registered)
                 └──────────────────────────────┘──► res_valid
```

| File | Contents |
|---|---|
| `rtl/som_pkg.sv` | ALU operation enum. Operation durations. Functions that describe the distance graph for any vector length `DIM`. |
| `rtl/som_alu.sv` | One general ALU: add, sub, cmp (1 cycle); mul, div (2 cycles). |
| `rtl/compute_distance.sv` | Elaboration-time scheduler, phase counter, operand routing, result registers, valid tracking. |
| `rtl/min_compare.sv` | Running minimum with a strict `<` compare and a clear input. |
| `rtl/som_compare_distance.sv` | Top: the distance unit feeding the compare stage. |

## The operation graph

The distance is written as a graph of elementary operations. For `DIM` = 9
there are 26 of them:

* `sub_i = a_i - b_i`, for i = 1..9
* `mul_i = sub_i * sub_i`, for i = 1..9
* an addition tree:
  * `add1 = mul1+mul2`, `add2 = mul3+mul4`, `add3 = mul5+mul6`, `add4 = mul7+mul8`
  * `add5 = add1+add2`, `add6 = add3+add4`, `add7 = add5+add6`
  * `out = add7 + mul9`

The tree rule is applied level by level. At each level, adjacent pairs are
added. An odd element left over at the end of a level is carried to the end
of the next level. `som_pkg::eo_src` applies the same rule to any `DIM` up to
64. Operations are numbered with the subtractions first, then the squarings,
then the additions, and the result last.

Operation durations are fixed:

| op | add | sub | mul | div | cmp |
|---|---|---|---|---|---|
| cycles | 1 | 1 | 2 | 2 | 1 |

All ALUs are identical, and every ALU can execute every operation. That is
why a single shared pool can replace separate adders and multipliers.

## How the shared-ALU pipeline works

This is the part that needs the most care when changing the design.

**Scheduling happens at elaboration.** The function `make_schedule` in
`compute_distance` is evaluated as a constant. It takes the operations in
graph order. For each one it picks the earliest start cycle at which both
operands are ready, together with the first ALU that is free in every phase
the operation occupies. A phase is the cycle number modulo `RESTART`, so a
2-cycle mul takes two consecutive phases on one ALU. Subtractions read the
input registers, and those hold a pair for only one restart period, so every
subtraction must start within cycles 0..R-1. Elaboration stops with an error
if no schedule can be found, or if `RESTART` < 2.

The resulting schedule is stored in the localparam `SCHED`, as a start cycle
and an ALU per operation. `LATENCY` is the start cycle of `out` plus one.

**One schedule, replayed every period.** A free-running counter `ph` counts
0..R-1. In each phase, every ALU starts the operation (if any) whose start
cycle is congruent to that phase. Operations of different items that share a
phase never share an ALU, so items that are several periods apart run on the
same hardware without conflict. The datapath runs even when no item is
present. A shift register `vd` of accepted-item flags tells which output is
real.

**Result storage.** Every operation owns a result register. It is loaded in
the operation's last cycle, at a fixed phase, so it is overwritten one restart
period later by the next item. Sometimes a consumer starts more than R cycles
after its producer finishes. In that case the producer keeps extra copies,
forming a shift chain `g_res[e].q[0..DEPTH-1]` that advances at the
producer's write phase. The consumer is wired, at elaboration, to the copy
that holds its own item at its start cycle:

* copy `d` is valid in cycles `fin+1+d*R .. fin+(d+1)*R`
* see `copy_of` and `depth_of` for the exact calculation

An ALU reads its operands only in an operation's first cycle. The 2-cycle ops
latch what they need internally.

**Default schedule** (R = 5, 13 ALUs, LATENCY = 7):

| cycle | ALUs 0-8 | ALU 9 |
|---|---|---|
| 0 | sub1..sub9 | |
| 1-2 | mul1..mul9 | |
| 3 | add1..add4 on ALUs 0-3 | |
| 4 | add5, add6 on ALUs 0-1 | |
| 5 | | add7 |
| 6 | | out |

At the default sizes, ALUs 10-12 are never scheduled. Their `start` is
constant 0, so synthesis removes them. The count of 13 is kept because it is
the reference figure for R = 5 under a more conservative storage model: one in
which an ALU holds its own result until the consumer has read it. Because this
design keeps results in separate registers, fewer ALUs suffice.

Other configurations, all exercised by `tb/compute_distance_tb.sv`:

| RESTART | NUM_ALU | LATENCY here | reference latency |
|---|---|---|---|
| 3 | 25 | 7 | 10 |
| 5 | 13 | 7 | 13 |
| 8 | 8 | 8 | 28 |
| 11 | 6 | 9 | 82 |
| 21 | 3 | 14 | 46 |

The reference latencies and ALU counts come from a published pipeline
synthesis study of the same graph. This scheduler is simpler, and under its
register model it gives lower latencies. The trade-off is more result
registers than an ALU-holds-result design would need.

## ALU details (`som_alu`)

* **add, sub, cmp:** results are combinational in the issue cycle. `cmp`
  returns 1 when `a < b` as signed numbers, otherwise 0.
* **mul:** gives the low `W` bits of `a*b`. Cycle 1 computes `a*b[H-1:0]` and
  registers it. Cycle 2 adds `(a*b[W-1:H]) << H`, where `H = ceil(W/2)`.
  A single W x H multiplier is therefore used twice.
* **div:** unsigned restoring division. The upper `W-H` quotient bits come in
  cycle 1 and the rest in cycle 2. A zero divisor gives an all-ones quotient.
* **`busy`:** marks the second cycle of a 2-cycle op. An assertion flags a
  `start` in that cycle.

The distance graph uses only add, sub and mul. div and cmp exist because the
ALUs are meant to be general, and they are covered by the ALU testbench.

## Interface and timing of the top (`som_compare_distance`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `in_valid` / `in_ready` | in / out | 1 | pair taken at the clock edge where both are high; `in_ready` is high one cycle in every R |
| `weight[DIM]`, `pattern[DIM]` | in | 16 signed each | neuron weight vector and training pattern |
| `clear_min` | in | 1 | start a new winner search (minimum := all ones) |
| `res_valid` | out | 1 | one result is presented |
| `distance` | out | 36 | exact sum of squared differences |
| `is_smaller` | out | 1 | this distance is strictly below the previous minimum |
| `mindist` | out | 36 | smallest distance since `clear_min` |

Timing:

* **Latency:** a pair accepted at clock edge *k* gives `res_valid` in the
  cycle that starts at edge *k + LATENCY + 1*. The result is sampled at edge
  *k + LATENCY + 2*, which is 9 cycles after acceptance at the defaults:
  1 for the input register, 7 for the distance, and 1 for the compare stage.
* **Order:** results come out in input order.
* **Rate:** one result every R cycles at full rate. There is no output
  back-pressure.
* **Widths:** `distance` is `2*DATA_W + clog2(DIM)` bits. The ALUs are one bit
  wider than that, so differences remain signed.

Using the top for one winner search:

1. Pulse `clear_min` at some point after the previous scan's last
   `res_valid` and before the new scan's first result arrives at the compare
   stage.
2. Send every neuron's weight vector together with the pattern.
3. The winning neuron is the last one whose result came back with
   `is_smaller` set. Because the compare is strict, the first of several equal
   distances wins.

Vectors shorter than `DIM` can be padded with zeros in both inputs.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `DIM` | 9 | vector length (typical SOM input dimension); up to 64 |
| `DATA_W` | 16 | element width, signed |
| `RESTART` | 5 | cycles between inputs, ≥ 2 |
| `NUM_ALU` | 13 | size of the ALU pool |

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M`. For example, with
Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/som_pkg.sv rtl/som_alu.sv \
  rtl/compute_distance.sv rtl/min_compare.sv rtl/som_compare_distance.sv \
  tb/som_compare_distance_tb.sv --top-module som_compare_distance_tb
./obj_dir/Vsom_compare_distance_tb
```

| Testbench | What it covers |
|---|---|
| `tb/som_alu_tb.sv` | Random and corner operands for all five ops, checked against plain SystemVerilog arithmetic, including back-to-back issue after 2-cycle ops. |
| `tb/min_compare_tb.sv` | Random streams with idle cycles, ties, and clears (some in the same cycle as a distance). |
| `tb/compute_distance_tb.sv` | Five configurations side by side, each driven by `tb/compute_distance_cfg.sv`. Checks exact distances with extreme signed values, latency against `LATENCY` and against the reference bound, and exactly R cycles between results in back-to-back streaming. |
| `tb/som_compare_distance_tb.sv` | Default parameters. Winner search over a 10 x 10 map for 4 patterns. One pattern equals a neuron, giving distance 0. One scan has idle restart periods. Checks every distance, flag and minimum, the winner, latency and rate. Counts pipeline overlap, back-to-back issue, bubbles, new/kept minimum and clears; each must occur. |
| `tb/som_workload_tb.sv` | Winner searches at the edges of the usual SOM sizes, each run by `tb/som_scan_run.sv`: vector length 4 on a 4 x 4 map; the default build on a 32 x 32 map; vector length 64 on a 32 x 32 map, built with R = 16 on 20 ALUs (latency 28). Its build takes a few minutes, because of the 64-element schedule. |

## Where this design makes its own choices

* **Schedule and latency:** the scheduler, the per-operation result registers
  with per-period copies, and therefore the latencies are this design's own.
  The ALU counts and restart times follow the reference configurations.
* **Interface:** the handshake (input accepted in one phase per period, no
  output stall), the `clear_min` input and the all-ones initial minimum are
  not taken from any specification.
* **Arithmetic:** the data widths, signed two's-complement inputs, and the way
  mul and div are split over two cycles are implementation choices.
* **Compare stage:** `min_compare` is a plain comparator. It does not schedule
  a `cmp` on the shared ALUs.

Not implemented:

* **Weight update:** hardware for the weight update (`ModifyWeights`, `Alpha`)
  and for the neighbourhood selection is not part of this design. Only its
  direction is known: a unit that updates one neuron's weights.
* **Host link:** the link to the host is left as the plain valid/ready port
  above.
