# Self-timed iteration rings

Many arithmetic functions are a fixed kernel applied over and over:
y1 = F(y0), y2 = F(y1), … up to yk. Unrolling that into k copies of F
costs area. A clocked loop around one copy needs a clock period long
enough for the worst-case kernel delay. This design takes a third route.
A few copies of F sit in a closed ring and run without any clock. Each
stage works out the next element of the sequence from its predecessor's
result, as soon as its neighbours allow. The result travels around the
ring as a wave: a crest of valid values followed by a trough of reset
values. So the ring runs at the speed of its real gate and wire delays,
not at a worst-case period.

The repository contains SystemVerilog for that idea at several levels:

- a C-element ring oscillator, the simplest such wave;
- iteration rings with five different stage circuits, from fully
  delay-independent to timing-optimised;
- a loop with two parallel data paths, joined by split and join operators;
- two loops that exchange values through I/O elements;
- for comparison, the unrolled (purely combinational) chain.

All of these sit side by side in `st_top`.

## Values on the wires: dual rail with a reset state

Each bit travels on two rails, `t` and `f` (type `st_pkg::dr_t`):

| t | f | meaning |
|---|---|---------|
| 0 | 0 | reset (no value yet) |
| 1 | 0 | valid 1 |
| 0 | 1 | valid 0 |
| 1 | 1 | never allowed |

A word is *valid* when every pair has one rail high. It is *reset* when
every rail is low. In between, it is neither. `dr_completion` computes both
tests: an AND tree and a NOR tree over `t | f` of each pair.

Because of this encoding, the receiver can see from the data alone when a
value is complete. No separate "done" wire is needed, so there is no delay
on a done wire to match against the data. Every rail makes exactly one
rising and one falling transition per value, which keeps the circuits
hazard-free: reset → valid → reset.

## The stage rule

Let stage *j* have input `in` (its predecessor's output), output `out` and
successor `succ`. It may act only when:

- `in` is valid and `succ` is reset: it computes `out := F(in)`; or
- `in` is reset and `succ` is valid: it computes `out := F(reset) = reset`.

Otherwise it holds its output. In a ring of N ≥ 3 stages, started with one
valid value and all other stages reset, this rule gives the following:

- The valid stages always form one contiguous run, so the crest never
  catches up with the trough.
- Stage *j*'s *m*-th value is F^(j + m·N)(y0).

The ring oscillator (`ring_osc`) is the same rule with one-bit values. Each
stage is a Muller C-element (`c_element`) whose inputs are the
predecessor's output and the inverted successor output. Two edges chase each
other around the ring for ever.

## Five stage circuits

`iter_ring` builds a ring from one of five stage circuits, chosen by
`STYLE`. They trade delay-independence for fewer transistors and more
overlap between neighbouring stages.

**`ST_DIRECT` — `direct_stage`.** Completion detectors compute
valid/reset for the input and the successor. The precondition above enables
a transparent latch after a purely combinational F. The kernel is built
from self-timed dual-rail NAND gates (`dr_nand2`):

- the false output rail is a C-element of the two true input rails;
- the true output rail is an OR of the false input rails.

This circuit is correct for any gate and wire delays.

**`ST_CMOS` — `cmos_stage`.** The latch is merged into the NAND. Each
output rail is a dynamic node:

- its pull-down evaluates the NAND;
- its pull-up precharges it to reset;
- both are gated by `st`.

`st` is a one-bit memory (`dr_status`: a C-element of valid(succ) and
not reset(succ)). It remembers whether the successor was last seen valid or
reset, so one signal replaces the two successor tests. The tests on the
input are implicit in the transistor stacks: a node cannot be precharged
while an input that discharges it is still high. This circuit is also
delay-independent.

**`ST_SLOW` — `cmos_stage` with `SLOW_RESET = 1`.** This is the first
step away from delay-independence. One pair of every word, the *slow pair*
(`SLOW_BIT`), is known to be the last to become valid and the last to
become reset. Two tests then shrink:

- The status of the successor is simply whether its slow pair is valid,
  `succ.slow.t | succ.slow.f`. This is one gate instead of a completion
  tree and a memory.
- A node no longer confirms that every input rail feeding it has reset. It
  precharges once the input's slow pair is reset.

Evaluation is still gated by the status, as in `ST_CMOS`.

**`ST_OPT` — `opt_stage` with `EARLY_RELEASE = 0`.** This stage relies on
two timing facts:

1. Resetting, including its wire travel, is always faster than evaluating.
2. One pair of every word, the *slow pair* (`SLOW_BIT`), is the last to
   become valid and the last to become reset.

Given those, the stage resets exactly when the successor's slow pair is
valid: `r = succ.slow.t | succ.slow.f`. One NOR gate replaces the
completion tree and the status memory. Evaluation is no longer gated.

**`ST_CONC` — `opt_stage` with `EARLY_RELEASE = 1`.** With the
`ST_OPT` rule, a stage cannot evaluate until its successor has fully reset.
In a three-stage ring that leaves no concurrency at all. This form releases
the reset sooner, using a dynamic node:

- it sets `r` when the successor's slow pair becomes valid;
- it clears `r` as soon as the successor's own `r` rises, that is, as soon
  as the successor *starts* resetting.

Reset control wires (`r_o` / `r_i`) therefore run backwards around the
ring. A stage can then evaluate its next value while its successor is still
resetting. This gives overlap in a ring of only three stages.

The invariants of the last three circuits hold only while their timing
facts hold. Nothing in the logic enforces them. When the facts are broken, a
dynamic node sees its pull-up and pull-down conduct at the same time. Each
`opt_stage` raises `fight` in that case and keeps its old value, so a
testbench can count the violations.

## Beyond one ring

**Parallel paths (`par_loop`).** Stage `p` feeds two paths: `a → c` and
`b → b2 → d`.

- The split operator (`dr_split`) reports to `p`:
  - "successor valid" only when both `a` and `b` are valid;
  - "successor reset" only when both are reset.
- The join is pure wiring. Stage `q` takes `c` as its first operand and
  `d` as its second, and computes NAND(c, d) bit by bit. `q`'s status is
  returned to both `c` and `d`.
- `q → q2 → p` closes the loop.

The two paths run at their own pace. The faster one waits at the join.

**Communicating loops (`io_loops`, `io_element`).** Two six-stage loops
each have an I/O element in place of their sixth stage. The top bit of the
value reaching the element (`MODE_BIT`) picks the operation:

- **copy** (bit = 0): `y := x`. The loop iterates on its own.
- **exchange** (bit = 1): the element offers `x` to the other loop on
  `tx`. It waits until the other loop's value is valid on `rx`, then
  passes that value on as `y`.

The element returns `y` to reset once:

1. `x` is reset;
2. the successor holds the new value;
3. after an exchange, `rx` is reset again.

No arbiter is needed. Each element just waits for a valid value, so
metastability cannot arise. Both loops must ask for an exchange in the same
revolution; if only one does, that loop waits.

**Unrolled chain (`comb_chain`).** This is K copies of F in a row, with
neither latches nor handshake. The dual-rail encoding makes it self-timed
as a block: `y_valid` rises when the result is complete, and `y_rst` rises
when the chain has returned to reset. Because a NAND is decided by a single
0 input, the output can become complete before every input bit has arrived.

## The kernel

The stage circuits are independent of F. This design uses a bitwise
two-input NAND, as small as a kernel can be while still mixing bits. The
ring wires the operands as `a = in` and `b[i] = in[i+1]`, with the top bit
using itself:

```
F(y)[i]   = ~(y[i] & y[i+1])    for i < W-1
F(y)[W-1] = ~y[W-1]
```

The top bit therefore alternates on every step, so exchanges and copies
both occur in the I/O loops. A real application would replace `dr_nand2`
in the stages with its own dual-rail kernel, for example a divider's
quotient-digit step.

## Start-up

Every circuit has an asynchronous, active-low `rst_n`. While it is low:

- stage 0 of each ring (and `p` in `par_loop`) is loaded with the valid
  word `*_ld_val`;
- every other stage is reset;
- every status memory and `r` node takes the value its inputs imply.

The oscillator starts with stage 0 high and the others low. When `rst_n`
rises, everything runs by itself.

## Wires are ports

In this design, all the delay is in the interconnect, and correctness of
the timed stages depends on it. For that reason, no stage-to-stage wire is
inside a module. Stage *j* drives its output on `y_o[j]`:

- its successor reads it on `y_fwd_i[j]`;
- its predecessor reads it on `y_bwd_i[j]`.

The same scheme applies to `r_o`/`r_i` and `tx_o`/`rx_i`. For a plain
netlist, tie each receiver to its driver (and `io_rx_i[0]` to
`io_tx_o[1]` and vice versa). A testbench inserts a delay model instead.
The RTL itself is zero-delay: C-elements and dynamic nodes are written as
`always_latch` blocks, and every transition is ordered only by the
handshakes and by the wires outside.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `st_top`, rings | `W` | 8 | data bits per word |
| `st_top`, `iter_ring`, `ring_osc` | `N` | 5 | stages per ring (the `ST_CONC` ring in `st_top` has 3) |
| `iter_ring` | `STYLE` | `ST_DIRECT` | stage circuit |
| `iter_ring` | `SLOW_BIT` | `W-1` | slow pair for `ST_SLOW` / `ST_OPT` / `ST_CONC` |
| `cmos_stage` | `SLOW_RESET`, `SLOW_BIT` | 0, `W-1` | precharge on the input's slow pair only |
| `opt_stage` | `EARLY_RELEASE` | 0 | early reset release |
| `io_element` | `MODE_BIT` | `W-1` | bit selecting copy / exchange |
| `comb_chain` | `K` | 5 (N in `st_top`) | kernel copies |

## Simulating

Verilator 5 with `--timing` runs every testbench. The package `st_pkg.sv`
must come first on the command line, followed by the reference package:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/st_pkg.sv tb/st_ref_pkg.sv tb/tb_st_top.sv --top-module tb_st_top
./obj_dir/Vtb_st_top +verilator+rand+reset+2
```

Any other `tb/tb_*.sv` with no ports is run the same way. Each testbench
ends with the line `TB_RESULT checks=<n> failures=<n>`. Each has a watchdog
that counts a failure if the circuit deadlocks.

Delays come from `tb_wire`. It gives every bit a fixed, pseudo-random rise
delay and fall delay, drawn from a range and a seed. Two delay regimes are
used:

- **Delay-independent circuits** (oscillator, `ST_DIRECT` and `ST_CMOS`
  rings, parallel paths, I/O loops, chain): every wire 1–40 time units, rise
  and fall drawn independently.
- **Timed rings** (`ST_SLOW`, `ST_OPT`, `ST_CONC`): forward data wires rise in 27–28,
  with the slow pair at 29, and fall in 1–4 (slow pair 5). Backward data
  wires and `r` wires take 1–3. These ranges satisfy both timing facts. With
  a wide spread of rise delays, the timed rings do report fights, as
  expected.

Checks made by the testbenches:

- Each ring's values are checked against a reference model
  (`tb_ring_check`, `tb_par_check`, `tb_io_check`).
- The oscillator must have exactly two edges travelling.
- No pair may ever have both rails high.

`tb_st_top` runs `st_top` at its default parameters with all circuits
together. It counts every mechanism and fails if any count is zero:

- oscillation;
- evaluations in every ring;
- overlap of an evaluation and a reset in every ring, including the
  three-stage one;
- early reset releases;
- waits at the join and at the split;
- copies and exchanges;
- chain evaluations.

It also fails if any `fight` is raised.

## Departures and limits

- **Kernel.** The kernel is chosen here. The technique leaves F open and
  uses a NAND only as an example.
- **Reset.** The asynchronous reset and load are additions; without them a
  ring would not have a defined start.
- **Slow input wire.** Replacing each reset-confirming stack by a single
  device on "the slowest input wire" needs a choice here, because the slow
  pair has two rails and either may be the high one. `ST_SLOW` precharges
  when both rails of the input's slow pair are low.
- **Slow-pair stage.** The transistor-level drawing of this stage labels the
  false-rail stack with one true and one false input. This design
  implements the NAND of the written description instead (false rail on
  A-true and B-true), matching the other stage circuits.
- **Partial evaluation in `ST_CMOS`, `ST_SLOW`, `ST_OPT` and `ST_CONC`.** Each bit of
  these stages reacts to its own input rails, not to a word-wide valid test.
  A stage can therefore start on bits of the next value while other bits of
  its input are still arriving. The ring checker accepts this in those
  rings, while still checking that a stage never completes a value while its
  successor still holds a complete one. `ST_DIRECT` is held to the strict
  rule that the successor is reset.
- **Timing assumptions.** `ST_SLOW`, `ST_OPT` and `ST_CONC` are correct only under
  the delay relations above. They were verified with the delay ranges
  listed, not for arbitrary delays.
- **Analog parts.** Input buffering with hysteresis, which the CMOS circuits
  would need to make slow transitions clean, is analog and is not modelled.
- **I/O elements.** These need the two loops to agree on when to exchange,
  which the kernel guarantees here because both loops see the mode bit
  alternate.
- **Synthesis.** The RTL synthesizes to latches and gates. A real
  implementation would map C-elements and dynamic nodes to custom cells.
  The generic latch netlist does not keep the hazard-freedom that the
  transistor circuits have.
