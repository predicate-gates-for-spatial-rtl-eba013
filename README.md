# Predicate gates for spatial logic

A *predicate expression* here is a pair (T, a). T is a topological chart: which of two
field patterns a signal has, for example the differential or the common mode of a coupled
line pair. T plays the role of the predicate. a is the signal's amplitude, and plays the role
of the predicate variable. Each of the two takes one of two values: T0/T1 and a0/a1. The gates
in this repository apply the basic logic operations (NOT, OR, AND) to such expressions. The
idea is that each operation turns predicates into predicates, so a small set of these gates
is enough to build logic for predicate expressions.

For ordinary single-ended logic, each expression is carried on two wires: T (0 for T0,
1 for T1) and a (0 for a0, 1 for a1). All the gates are defined on that two-wire form. The RTL
is purely combinational. There is no clock and no reset, and every output follows its inputs
after a few gate delays.

## The expression type

`rtl/pred_pkg.sv` defines `pred_t`, a packed struct `{t, a}` with T in the upper bit. A 2-bit
literal therefore reads as "Ta": `2'b10` is (T1, a0), `2'b01` is (T0, a1). The package also
defines `unot_sel_e`, the 2-bit select of the universal NOT (see below).

## The three inversions

A pair of bits can be negated in three useful ways, so there are three NOT gates:

| gate | module | T out | a out | what it inverts |
|------|--------|-------|-------|-----------------|
| ANOT | `pred_anot` | T | not a | the amplitude only |
| TNOT | `pred_tnot` | not T | a | the topological chart only (a follower and an inverter) |
| BNOT | `pred_bnot` | not T | not a | both |

Together these three cover every way a NOT can map one expression onto another: for each
input, the three outputs are the three other values of the pair.

## Universal NOT and its select code

`pred_unot` feeds the input to an ANOT, a TNOT and a BNOT in parallel. A multiplexer driven by
the 2-bit select S picks which result reaches the output:

| S  | operation | note |
|----|-----------|------|
| 00 | ANOT | this design's choice |
| 01 | TNOT | this design's choice |
| 10 | BNOT | fixed by the gate's definition and its hardware test |
| 11 | BNOT | spare code; this design's choice |

Only S = 10 → BNOT is fixed by the gate's definition. The codes for ANOT and TNOT follow the
order in which the three gates are introduced. The meaning of code 11 is not defined, so here
it selects BNOT as well: the multiplexer treats S[1] = 1 as BNOT. If you need a different
encoding, change the enum values in `pred_pkg.sv` and the case in `pred_unot.sv`, then update
`expected()` in `tb/tb_pred_unot.sv` and `not_ref()` in `tb/tb_predicate_gates.sv`.

## OR and AND

`pred_or` and `pred_and` each combine two expressions wire by wire, using two ordinary 2-input
gates:

- OR: Tj = Ti1 | Ti2, aj = ai1 | ai2. The result has chart T1 if either input does, and
  amplitude a1 if either input does.
- AND: Tj = Ti1 & Ti2, aj = ai1 & ai2. The result has chart T1 only if both inputs do, and
  amplitude a1 only if both do.

The charts never mix with the amplitudes. Each gate is two independent 1-bit gates that
always act together on one (T, a) pair.

## The gate set (top)

`predicate_gates` is the top. It holds one universal NOT, one predicate OR and one predicate
AND side by side. Each has its own ports, and the gates are not connected to each other:

| port | dir | type | meaning |
|------|-----|------|---------|
| `not_x` | in | `pred_t` | UNOT input (Ti, ai) |
| `not_s` | in | `unot_sel_e` | UNOT select S |
| `not_y` | out | `pred_t` | UNOT output (Tj, aj) |
| `or_x1`, `or_x2` | in | `pred_t` | OR inputs |
| `or_y` | out | `pred_t` | OR output |
| `and_x1`, `and_x2` | in | `pred_t` | AND inputs |
| `and_y` | out | `pred_t` | AND output |

This gate set is meant as the basis of larger predicate logic, such as a predicate logic
processor. Only the gates are defined, so nothing above them is included here. This design
also leaves out the physical side: the coupled-line mode signals and their conversion to two
single-ended wires. The RTL starts from the two-wire form. The design has no parameters.
After coarse synthesis the whole set is about a dozen word-level cells, with no flip-flops.

## Testbenches

Every testbench in `tb/` checks itself. It compares the outputs with truth tables written into
the testbench as constants, not derived from the RTL. At the end it prints
`TB_RESULT checks=N failures=M`. A watchdog stops the run with a failure if the sequence hangs.

| testbench | covers |
|-----------|--------|
| `tb_pred_anot`, `tb_pred_tnot`, `tb_pred_bnot` | all four inputs of each NOT gate |
| `tb_pred_unot` | S swept from 00 to 11 with all four inputs for each S, then 64 random pairs, then the point Ti = ai = 1, S = 10 → (0, 0) |
| `tb_pred_or`, `tb_pred_and` | all 16 rows in table order, then 64 rows in random order |
| `tb_predicate_gates` | the whole set |

`tb_predicate_gates` first applies three board-level test points together:

- OR with Ti1 = 0, ai1 = 0, Ti2 = 1, ai2 = 0 gives (1, 0).
- AND with all inputs 1 gives (1, 1).
- UNOT with (1, 1) and S = 10 gives (0, 0).

It then runs 2000 random steps, with each gate driven by its own random stream. It counts how
often each of the four select codes and each of the 16 OR and 16 AND rows occurred. A case
that never occurred counts as a failure.

The gates have no latency to measure beyond propagation delay. The testbenches change inputs
on one clock edge and sample outputs on the next.

Run any testbench with plain Verilator, for example:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    --top-module tb_predicate_gates rtl/pred_pkg.sv tb/tb_predicate_gates.sv
./obj_dir/Vtb_predicate_gates
```

To lint one module: `verilator --lint-only -Wall -y rtl +libext+.sv rtl/pred_pkg.sv rtl/pred_unot.sv`.

## How far to trust it

The truth tables of all six gates, and the structure of each gate, follow the gates'
definitions exactly. That includes TNOT being a follower plus an inverter, and UNOT being
three gates plus a multiplexer. The testbenches check every row of every table. Only the UNOT
select codes other than 10 are a free choice, as described above. Packing the pair into a
struct and putting the three gates side by side in one top are packaging choices. They do not
change the logic.
