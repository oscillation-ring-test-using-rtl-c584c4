# Oscillation ring test of a synchronous state machine with modified state register cells

A ring oscillator is a closed loop with an odd number of inversions: it
oscillates on its own, and the frequency it settles at says how fast the
logic in the loop is. A stuck node stops the oscillation; a slow gate or path
changes its frequency. This design applies the same idea to a clocked state
machine. Its state register is built from *modified state register* (MSR)
cells. In test mode the cells rewrite the machine's next state so that, with
the primary input held at a fixed value, the machine bounces between two
states whose outputs differ. The primary output then toggles on every clock
edge. A tester only has to hold the input, clock the machine at speed and
watch one output pin. No test vectors have to be shifted in and out between
the tester and the chip during the at-speed part of the test.

The RTL implements the worked example: a six-state Mealy machine with one
input `x` and one output `z`, its MSR state register, and the logic that makes
the test-mode machine follow a modified transition table.

## The example machine

State codes are A=000, B=001, C=010, D=011, E=100 and F=111. Entries are
shown as next state / z.

| present | x=0, functional | x=1, functional | x=0, test mode | x=1, test mode |
|---|---|---|---|---|
| A 000 | C / 1 | F / 0 | **D** / 1 | F / 0 |
| B 001 | D / 1 | E / 0 | D / 1 | **F** / 0 |
| C 010 | F / 1 | D / 1 | F / 1 | **E** / 1 |
| D 011 | C / 0 | A / 1 | **A** / 0 | **C** / 1 |
| E 100 | E / 0 | B / 0 | E / 0 | B / 0 |
| F 111 | A / 1 | B / 1 | A / 1 | B / 1 |

Bold entries are the ones test mode changes. The output column is the same in
both modes. Only the state transitions are modified, so `fsm_comb_logic`
serves both modes unchanged.

If the input is held, the functional machine has no two-state loop whose
outputs differ. In the table, B and E alternate for x=1, but both give z=0,
so the state bits toggle while `z` stays at 0. The test-mode table creates
two such loops:

* **x = 0: A ↔ D.** z alternates 1, 0. B, C and F lead into this loop. E
  loops on itself with z=0, so a start in E does not oscillate.
* **x = 1: B ↔ F.** z alternates 0, 1. Every other state leads into this loop
  (A→F, C→E→B, D→C→E→B, E→B).

On either loop, `z` is a square wave at half the clock frequency.

The two unused codes, 101 and 110, go to A with z=0. That choice is this
design's own.

## MSR cells and their operations

Each state bit is held by an `msr_cell`. In normal mode the cell is a D
flip-flop. In test mode it stores one of four functions of its next-state
input `d`:

| operation | stored value |
|---|---|
| BYPASS | `d` |
| INV | `~d` |
| HOLD0 | 0 |
| HOLD1 | 1 |

A fifth code, FAIL, marks two requirements on a bit that conflict. On FAIL
the cell keeps its present value and raises a sticky `fail` flag, which only
reset clears. The cell also has a scan input, `scan_en` and `scan_in`, used to
load a start state. Scan takes priority over test mode, and test mode takes
priority over normal loading. `msr_register` chains three cells into a scan
path. Codes are shifted in MSB first, and the old code leaves on `scan_out`,
also MSB first.

### Which operation a cell applies (`msr_control`)

For every present state and input value, `msr_control` gives each bit the
operation that turns the functional next-state bit into the test-mode one:

* BYPASS where the two bits agree;
* HOLD1 where the test mode wants 1 and the functional logic gives 0;
* HOLD0 where the test mode wants 0 and the functional logic gives 1.

Logically it is a fixed 16-entry table of three 3-bit codes, indexed by
`{state, x}`. It is computed from the two transition tables in
`osc_ring_pkg`. In silicon this table would be worked out when the test is
planned.

### The operational table (`msr_op_lookup`)

The method describes each bit's transition by a class:

| class | present bit → next bit |
|---|---|
| LOW | 0 → 0 |
| RISING | 0 → 1 |
| FALLING | 1 → 0 |
| HIGH | 1 → 1 |

A 4×4 table maps (class in normal mode, class in test mode) to an operation:

| normal \ test | LOW | HIGH | RISING | FALLING |
|---|---|---|---|---|
| LOW | BYPASS | INV | HOLD0 | FAIL |
| HIGH | INV | BYPASS | FAIL | HOLD1 |
| RISING | HOLD0 | FAIL | INV | BYPASS |
| FALLING | FAIL | HOLD1 | BYPASS | INV |

`msr_op_lookup` implements both the classifier and this table exactly as
shown. This is the part of the design that most needs care.

**Read with the same present bit for both operands, which is the only case a
running machine produces, the table does not give the wanted next bit in four
of the eight reachable cases:**

| normal, test | table gives | what would be correct |
|---|---|---|
| LOW, RISING | HOLD0 | 1 is needed |
| RISING, RISING | INV | 1 is needed |
| HIGH, FALLING | HOLD1 | 0 is needed |
| FALLING, FALLING | INV | 0 is needed |

Because of this, the cells are **not** driven from the table. `msr_control`
uses the rule above instead. That rule agrees with the table's correct HOLD
entries: (RISING, LOW) gives HOLD0, and (FALLING, HIGH) gives HOLD1. The
table is still built. The top level uses it as a monitor: for each bit,
`normal_class`, `taken_class` and `table_op` report the table entry for the
transition the register is about to make. To make the cells execute the
table literally, drive `ops` in `osc_ring_top` from an `msr_op_lookup` fed
with the test-mode next state, instead of from `msr_control`. The machine
will then no longer follow the test-mode table above.

## Top level: `osc_ring_top`

```
 x ──►┌────────────────┐──► z
      │ fsm_comb_logic │
  ┌──►└────────────────┘──┐ ns (functional next state)
  │                       ▼
  │  state   ┌──────────────────┐◄── ops ── msr_control(state, x)
  └──────────│ msr_register     │◄── test_mode, scan_en/scan_in, rst_n
             │ (3 x msr_cell)   │──► scan_out, msr_fail
             └──────────────────┘
  3 x msr_op_lookup(state, ns, next taken) ──► normal_class, taken_class, table_op
```

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock; one state transition per rising edge |
| `rst_n` | in | 1 | asynchronous, active-low reset to A |
| `test_mode` | in | 1 | 0: functional table; 1: test-mode table |
| `x` | in | 1 | primary input |
| `scan_en`, `scan_in` | in | 1 | shift a start state in, MSB first, 3 clocks |
| `scan_out` | out | 1 | state MSB while shifting |
| `z` | out | 1 | primary output (Mealy, combinational from state and x) |
| `state` | out | 3 | present state |
| `msr_fail` | out | 1 | sticky: some cell received FAIL |
| `normal_class`, `taken_class` | out | 3 × 2 | per-bit transition classes (monitor) |
| `table_op` | out | 3 × 3 | per-bit operational-table entry (monitor) |

A test sequence runs in five steps:

1. Reset, or scan in a start state with `scan_en` high for three clocks.
2. Set `x`.
3. Raise `test_mode`.
4. Clock at the speed under test and observe `z`.
5. Lower `test_mode` to return to functional operation. This takes effect at
   the next edge.

The design has no parameters. The state width, `STATE_W = 3`, is a package
constant. `msr_register` takes a width `W` and a reset state.

## What follows the method and what is this design's own

The method fixes these parts:

* the example machine's functional and test-mode tables (including outputs);
* the set of MSR operations (BYPASS, INV, HOLD0, HOLD1, FAIL);
* the transition classes and the 4×4 operational table;
* the structure: combinational logic with the MSR register in its feedback
  path, `x` in and `z` out.

This design chose the following:

* the scan path and its order, and the reset and its value;
* what FAIL does in a cell;
* the handling of the unused state codes;
* how operations are selected (`msr_control`'s rule instead of the
  operational table, see above);
* the monitor outputs;
* all encodings.

There is no on-chip oscillation counter or frequency checker. The oscillation
is meant to be measured off-chip on `z`.

The design has the following limits:

* It is the six-state example only. The method was evaluated on MCNC benchmark
  machines (bbse, dk14, s1488 and others), whose tables are not available
  here, so they cannot be built. Building one means replacing the tables in
  `osc_ring_pkg` and widening `STATE_W`.
* Delay faults can only be judged by timing `z` on real silicon or in a timed
  gate-level simulation. RTL simulation shows only that the oscillation
  exists and has a period of two clocks.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_fsm_comb_logic` | all 8 codes × 2 inputs against the functional table |
| `tb_msr_op_lookup` | all 8 bit combinations, plus all 16 class pairs, against the typed-in operational table |
| `tb_msr_control` | for all 16 `{state, x}`: applying the operations to the functional next state gives the test-mode next state, and each operation follows the rule |
| `tb_msr_cell` | 2000 random cycles against a reference model, with every operation, mode, scan and reset exercised |
| `tb_msr_register` | reset value, scan in and out, normal load, per-bit test operations, FAIL in one cell and the sticky flag |
| `tb_osc_ring_top` | end-to-end run at full size (see below) |
| `tb_stuck_at_coverage` | the oscillation test used as a fault test (see below) |

`tb_osc_ring_top` runs these steps:

1. reset;
2. 300 functional cycles with random `x`;
3. for each of the six states and both input values: scan the state in, enter
   test mode and check every transition against the test-mode table. Once the
   machine is on the A/D or B/F loop, `z` must change on every one of 16
   clocks; when it stays on E, `z` must not change;
4. back to functional mode after each run.

The testbench also counts each mechanism and fails if any of them never
occurs: reset, scan load, both mode switches, A/D and B/F oscillation, the
functional B/E loop, and the BYPASS, HOLD0 and HOLD1 operations.

`tb_stuck_at_coverage` uses the method the way a tester would. It runs two
oscillation tests: start in A with x=0, and start in B with x=1. It forces
single stuck-at faults onto 14 nets: the three functional next-state lines,
the three state lines and `z`, each stuck at 0 and at 1. A fault counts as
detected when `z` fails to toggle on every clock. For each fault, the
testbench predicts detection from its own copy of the tables and checks that
prediction against the design. The two tests detect 12 of the 14 faults.
Delay faults cannot be shown at RTL.

## Simulating

With Verilator 5, for example the top-level test:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/osc_ring_pkg.sv \
    tb/tb_osc_ring_top.sv --top-module tb_osc_ring_top -o sim
./obj_dir/sim
```

Use the same command with another `tb_*` name for the block tests. The package
has to come first on the command line. The design is two-state clean: reset
or scan defines all state, so the result does not depend on initial values.
