# Asynchronous domino pipeline with a constructed critical data path (APCDP)

A latch-free asynchronous pipeline, one domino gate per stage, that needs only
**one bit of completion detection per stage** regardless of the data width.
In each stage one gate, the one with the most inputs, is rebuilt as a
*synchronizing* dual-rail gate whose delay does not depend on the data and
which cannot fire before all its inputs are valid. Chained from stage to
stage, these gates form a critical data path that is guaranteed to be the
slowest path of the pipeline. A single static NOR on that dual-rail pair tells
the previous stage when to precharge and when to evaluate again (the PS0
protocol). Every other signal, the noncritical data, can then be carried on
cheap single-rail domino gates, because the critical path acts as a built-in
matching delay for them.

This repository holds a SystemVerilog model of that scheme, applied to a
gate-level pipelined 8x8 unsigned array multiplier, plus a small fork/join
structure. It is a behavioural *timing* model at the gate level: it simulates
the handshakes, the spacer/data waves and the timing constraints on a
unit-delay time base. It is not a netlist of domino transistors.

## The time base: one tick per gate delay

The real circuit has no clock. Here every gate output is a flip-flop clocked
by `clk`, and one clock edge stands for one gate delay (a "tick"). This keeps
the asynchronous handshake loops free of combinational loops, makes the model
synthesizable as an emulation, and gives every delay an integer value:

| element | delay (ticks) | why |
|---|---|---|
| SLG with N inputs | N | stack height; taller stacks are slower |
| SLGL with N data inputs | N + 1 | the enable adds one transistor to the stack |
| single-rail noncritical gates | 1 after the previous critical output | see "noncritical gates" below |
| encoding converter | 1 | |
| NOR detector + drive buffer | 1 + 1 (`NOR_DLY`, `BUF_DLY`) | |
| C-element | 1 | |
| precharge | 1 | |

All absolute timing results below are in ticks. They are not nanoseconds.

## Dual-rail code and the gates

A dual-rail pair `(t, f)` (type `apcdp_pkg::dr_t`) carries `(0,0)` spacer,
`(1,0)` data 1 and `(0,1)` data 0. `(1,1)` is never produced. Each data word is
separated from the next by a spacer.

**`slg`: synchronizing logic gate.** Its pull-down network has one series path
per input pattern. For N inputs, each path has N transistors, one rail of each
input. Patterns with f = 1 discharge the true rail and the others discharge
the false rail. The gate is configured by a truth table parameter `TT`. With
`N=2, TT=4'b1000` it is the synchronizing AND gate:
`out_t = a_t·b_t`, `out_f = a_t·b_f + a_f·(b_t + b_f)`. A conventional
dual-rail AND (`out_f = a_f + b_f`) can fire on a single false input. This gate
cannot fire until both inputs are valid, and exactly one path of the same height
conducts for every input pattern. Once evaluated, the output holds until
precharge even if the inputs return to spacer. This hold is the implicit latch
that replaces pipeline registers.

**`slgl`: SLG with latch function.** An SLG with an extra dual-rail enable pair
in series with every path. While the enable is a spacer the gate is opaque.
Only the enable's validity matters, not its value. It links the critical path
through a stage whose widest gate is not fed by the previous stage's widest
gate. The previous critical output becomes the enable.

**`enc_conv`: single-rail to dual-rail converter.** It outputs data 0 while
precharged and while its input is 0, and data 1 once the input rises. A
single-rail signal has no spacer, so during precharge the converter shows a
stale data 0. The SLGL that consumes it is therefore enabled by the critical
path, and the converter must settle before that enable arrives. `apcdp_stage`
checks this constraint with an assertion.

**`nor_cd`: the completion detector.** `done = NOR(t, f)` of the stage's
critical pair, delayed by the NOR and the drive buffer chain. `done = 1`
means the stage is precharged or still evaluating, so the previous stage may
evaluate. `done = 0` means the stage has evaluated, so the previous stage
must precharge.

**`c_element`.** A Muller C-element, used by the fork.

## A stage and the handshake

`apcdp_stage` contains the following:

* **Noncritical single-rail gates** for the whole data token (`tok_t`: a, b,
  carry-save sum and carry vectors, finished product bits). They are
  precharged to 0 and rise at most once per evaluation.
* **One critical gate**, an SLG or SLGL, which is the stage's widest gate.
* **Encoding converters** for the operands of the *next* stage's critical
  gate.

Stage *n* takes its precharge/evaluate control from the done signal of stage
*n+1*. This is the PS0 protocol:

1. Stage *n* evaluates.
2. Stage *n+1* evaluates, and its detector makes stage *n* precharge.
3. Stage *n+2* evaluates, and stage *n+1* precharges.
4. Stage *n+1*'s done rises and stage *n* may evaluate again.

The cycle per stage is therefore `3·t_eval + 2·t_CD + t_prech`.

**Noncritical gates.** They evaluate when the previous stage's critical
output turns valid. For stage 0, they evaluate when the source's dual-rail
operands are valid. This models the design's central timing assumption: no
noncritical bit is slower than the detected critical bit. Two assertions in
each stage check the assumption at the moment the critical output becomes
valid:

* the noncritical gates have already evaluated;
* the converters already show the new operands.

This modelling choice also lets the noncritical logic compute sum bits (XOR).
A real single-rail domino gate can only compute non-inverting functions. The
model does not say which gate-level form the noncritical adders take. Treat
the noncritical logic as a specification of function and timing, not of
gates.

## The 8x8 multiplier (`apcdp_mult8x8`)

There are 16 stages, each one gate deep, with no latches between them:

| stage | work | critical gate | critical result |
|---|---|---|---|
| 0 | partial-product row a & b0 | SLG AND on the source's dual-rail a0, b0 (delay 2) | p[0] |
| 1..7 | one carry-save full-adder row adding a & b_k | SLGL: s1 ^ c0 ^ (a0 & b_k), enabled by the previous critical output (delay 5) | p[k] |
| 8 | vector-merge bit 0: sum s1 ^ c0 | SLGL AND, carry c1 (delay 3) | carry |
| 9..15 | vector-merge bits 1..7, ripple carry | SLG majority, linked directly to the previous carry (delay 3) | carry |

After row 7 the remaining value is `(s >> 1) + c`, added by the ripple
stages. The product bits travel down the pipeline on single-rail buffers. The
source must supply, alongside `in_a`/`in_b`, dual-rail copies of a0 and b0 for
stage 0's SLG. The SLG/SLGL choice follows the construction rule: use an SLG
where the previous widest gate feeds this one (the ripple carry). Use an SLGL
where it does not (the carry-save rows, whose widest gates are not chained).

**Measured behaviour at default parameters:**

* **Forward latency:** 2 + 7·5 + 3 + 7·3 = **61 ticks**, the sum of the
  critical delays.
* **Token period:** **20 ticks**, from `3·5 + 2·2 + 1` for the slowest stage
  triple (the SLGL rows).
* **Hold margin of a stage's inputs (eq. 2):** once a stage's critical output
  is valid, its input stays valid for **3 more ticks**, which is NOR + drive
  buffer + precharge. The gate's own evaluation time comes on top of that.

The end-to-end tests check all three numbers exactly, for every stage and
every token.

**Environment protocol.** The source presents a token while `in_pc_n = 1` and
returns to zeros/spacer once `in_pc_n = 0`. `out_p` is valid while `out_crit`
is valid. The final carry is always data 0. The sink answers on `out_pc_n` as
the next stage's detector would. There is one constraint on the sink: it must
not raise `out_pc_n` again before stage 14 has precharged. This is the PS0
delay assumption (the predecessor precharges no slower than the successor
evaluates). An ideal sink that answers in zero time breaks it and re-captures
the old token.

## Switching activity under the evaluated data patterns

The saving comes from the noncritical logic. A single-rail domino gate whose
result is 0 never discharges, so it costs nothing for that token. A dual-rail
gate always discharges one of its rails. The model has no energy figures,
but it can count the events that cost energy. `tb_apcdp_workload` counts
rising gate outputs per token: single-rail gates, both critical rails, and
converter true rails. Everything is precharged between tokens, so the count
depends only on the operands:

| operands | single-rail rises | all rises |
|---|---|---|
| ff*00 | 128 | 151 |
| ff*0f | 352 | 388 |
| ff*ff | 496 | 547 |

The critical path always contributes exactly 16 rises per token, one rail per
stage, whatever the data. A token stream costs exactly the sum of its
tokens. With N busy injection cycles followed by M empty ones, the activity
per tick is therefore proportional to the workload N/(N+M). The test
injects at 22 ticks per cycle, 90% of the peak rate, alternating ff*ff or
ff*0f with ff*00. It checks that no token ever waits for the pipeline.

## Fork and join (`apcdp_fork_join`)

A four-stage diamond: A forks to B and C, which join at D.

* **Fork:** a C-element merges the done signals of B and C into A's control.
  A therefore precharges only after both branches have taken the token, and
  evaluates again only after both have precharged.
* **Join:** D's done signal drives the controls of both B and C. D's
  critical gate is an SLG that takes both branches' critical outputs, so D
  cannot evaluate before both have arrived.

Precharge reaches A through NOR, drive buffer and C-element. A therefore
drops its output 4 ticks after the later branch turns valid. Precharge
reaches B and C through NOR and buffer only, 3 ticks after D turns valid.
The testbench checks both delays for every token.

C's critical gate is deliberately slower (`C_DELAY = 3`), so the C-element
really has to wait. The stage functions are arbitrary but checkable:
`out_w = ~w ^ ror(w,1)` and `out_crit = u ^ v`.

## Top level

`apcdp_top` places the multiplier (`mul_*` ports) and the fork/join
structure (`fj_*` ports) side by side. They share only `clk` and `rst_n`.
Reset is asynchronous and active low. It precharges everything and sets
every done signal to 1, giving an empty pipeline in which every stage
evaluates.

## How far to trust it, and where it departs

* **Source of the behaviour.** The gate behaviour follows the described
  circuits:
  * SLG pull-down structure, SLGL enable, converter truth table;
  * NOR detection of the critical pair only;
  * PS0 ordering;
  * the C-element fork and the shared-acknowledge join.
* **The multiplier's internal organisation is this design's own.** The
  design is described only as an 8x8 array multiplier, gate-level
  pipelined, one domino gate per stage. The organisation here is a
  carry-save array with ripple merge, 16 stages, and one synchronizing gate
  per stage (16 in total). The reference implementation reports 56
  synchronizing gates, so its stage split differs.
* **Timing is in unit gate delays.** None of these are modelled: energy,
  transistor count, FET width, the 65-nm delays, keepers, and noise. The
  throughput and latency in ns, the power and energy savings, and the
  comparisons with the bundled-data and synchronous baselines have no
  counterpart here. The rise counts above are event counts, not joules:
  they do not weigh gates by size or load.
* **Noncritical logic is bundled to the critical path by construction** (see
  above). The model therefore cannot show a failure caused by a noncritical
  bit that is slower than the critical one. It only asserts that, with the
  chosen delays, the critical bit is the last to settle.
* **Delay values are choices.** If you change `DELAY`, `NOR_DLY`, `BUF_DLY`
  or the converter timing, the stage assertions tell you when a timing
  constraint is broken.

## Simulating

Every testbench is self-checking. It prints
`TB_RESULT checks=N failures=M` and ends with `$finish`. Build one with
Verilator 5 from the repository root. `rtl/` is searched for the modules
that the testbench uses:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl \
    rtl/apcdp_pkg.sv tb/tb_apcdp_top.sv --top-module tb_apcdp_top
./obj_dir/Vtb_apcdp_top
```

| testbench | what it checks |
|---|---|
| `tb_apcdp_top` | Whole design at defaults. Multiplier: latency 61, period 20, hold margin 3, about 140 products including ff*00, ff*ff, ff*0f, with random source gaps and sink delays. Fork/join: 200 tokens. Every mechanism must occur. |
| `tb_apcdp_workload` | The multiplier under the patterns ff*00, ff*0f and ff*ff and workloads 10/10 down to 2/10: activity per token and per tick, no source stalls, products. |
| `tb_apcdp_mult8x8` | The multiplier alone, with about 240 products, plus the same timing checks. |
| `tb_apcdp_stage` | Stage 1 (SLGL, carry-save row) and stage 9 (linked SLG, ripple bit) in isolation, including the critical delays 5 and 3. |
| `tb_apcdp_fork_join` | The diamond: order, values, fork waits, join synchronisation, latency 7, precharge delivery 4 and 3 ticks. |
| `tb_slg`, `tb_slgl` | Input synchronisation, data-independent delay, hold, precharge, and opaque SLGL. |
| `tb_enc_conv`, `tb_nor_cd`, `tb_c_element` | Truth tables and delays. |

## Files

* `rtl/apcdp_pkg.sv`: dual-rail type, token type, and the stage functions of
  the multiplier (critical truth tables, converter operands, noncritical
  logic).
* `rtl/slg.sv`, `rtl/slgl.sv`, `rtl/enc_conv.sv`, `rtl/nor_cd.sv`,
  `rtl/c_element.sv`: the gate-level building blocks.
* `rtl/apcdp_stage.sv`, `rtl/apcdp_mult8x8.sv`, `rtl/apcdp_fork_join.sv`,
  `rtl/apcdp_top.sv`: the structures.
* `tb/`: one testbench per module, plus `tb_apcdp_workload` for the data patterns and workloads.
