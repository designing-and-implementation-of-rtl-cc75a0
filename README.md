# 1-bit reversible comparator and Feynman gate for quantum-dot cellular automata

Quantum-dot cellular automata (QCA) compute without transistors. A cell holds
one bit as the position of two electrons: polarization P = +1 is logic 1 and
P = -1 is logic 0. Neighbouring cells push each other into the same state, so
a line of cells is a wire. Three lines meeting at a cell form a **majority
gate**, and that is the only logic gate the technology has. A four-phase
clock moves data through the layout.

This RTL describes two small reversible circuits built that way:

* a **Feynman gate** (controlled NOT): P = A, Q = A xor B. Its inputs can always
  be recovered from its outputs, so it loses no information;
* a **1-bit reversible comparator** built around one Feynman gate. It gives
  L = (A < B), E = (A = B) and G = (A > B).

Both circuits produce their result half a QCA clock cycle after their inputs.
The RTL models the logic of each gate exactly, and it models QCA clocking as
one register per clock zone, so that this half-cycle delay can be simulated.
It describes function and timing only. It does not model the physical layout
(cell positions, cell counts, area) or the analog behaviour of the cells.

## From majority gates to a comparator

Everything is built from `majority_gate`. Its output is 1 when more than half
of its inputs are 1. The 3-input gate computes Maj(A,B,C) = AB + AC + BC, and
`N` can be set to any odd width.

| module | how it is built | function |
|---|---|---|
| `qca_and` | majority gate with one input fixed to 0 (P = -1) | a & b |
| `qca_or` | majority gate with one input fixed to 1 (P = +1) | a \| b |
| `qca_xor` | `qca_and`(~a, b) and `qca_and`(a, ~b), joined by `qca_or` | a ^ b |
| `feynman_gate` | P is a wire from A; Q is a `qca_xor` | p = a, q = a ^ b |
| `reversible_comparator` | one `feynman_gate`, two `qca_and`, one inverter | l, e, g |

The comparator makes use of the fact that the Feynman output Q = A xor B is 1
exactly when the operands differ:

```
E = ~Q        = A xnor B      (A = B)
G = Q & P     = A & ~B        (A > B)
L = Q & B     = ~A & B        (A < B)
```

Exactly one of L, E and G is 1 for every input pair:

| A | B | L | E | G |
|---|---|---|---|---|
| 0 | 0 | 0 | 1 | 0 |
| 0 | 1 | 1 | 0 | 0 |
| 1 | 0 | 0 | 0 | 1 |
| 1 | 1 | 0 | 1 | 0 |

`reversible_comparator` also brings out the Feynman lines P and Q. These are
the extra "garbage" outputs a reversible circuit keeps. The result is the
packed struct `qca_pkg::cmp_result_t` `{l, e, g}`.

The circuit is specified by its equations only, so how L and G are formed from
the Feynman outputs is this design's own choice. The specification does not
agree with itself on the names of the two inequality outputs. Its comparator
definitions (L = A < B, G = A > B, and the conventional comparator truth table)
conflict with a pair of product equations that swap them (L = AB', G = A'B).
This RTL follows the definitions, so L means "less than". If your convention
is the other one, swap `res.l` and `res.g`.

## QCA clocking and the half-cycle delay

A QCA layout is divided into clock zones. Each zone goes through four phases in
turn:

| phase | cells |
|---|---|
| Switch | barriers rise; the cells take the value driven into them |
| Hold | barriers high; the cells keep their value and drive the next zone |
| Release | barriers fall; the cells lose their value |
| Relax | barriers low; the cells stay unpolarized |

Zone k runs one phase behind zone k-1. So zone k+1 is in Switch exactly while
zone k is in Hold, and data moves forward one zone per phase.

The model (`qca_clock`, `qca_zone`):

* one tick of `clk` is one phase, so a QCA clock cycle is four ticks;
* `qca_clock` is a 2-bit counter. Zone k's phase is (counter - k) mod 4. After
  reset, zone 0 is in Switch;
* `qca_zone` is a register that loads `d` at the end of its Switch tick. Its
  `polarized` output is high during its Hold tick, when `q` may be used. A
  two-state simulator has no "unpolarized" value, so `q` keeps its value
  through Release and Relax, and `polarized` is low then.

`qca_comparator_top` lays each circuit over three zones:

```
inputs -> [zone 0: input cells] -> gate logic -> [zone 1] -> [zone 2: output cells] -> outputs
```

The inputs are sampled at the end of zone 0's Switch tick, once every four
ticks. The output cells hold the result two ticks later, which is half a QCA
clock cycle, and `fg_valid` / `cmp_valid` is high for that one tick:

```
tick        0       1       2       3       4 ...
zone 0      Switch  Hold    Release Relax   Switch
zone 1      Relax   Switch  Hold    Release Relax
zone 2      Release Relax   Switch  Hold    Release
*_valid     0       0       0       1       0
```

The inputs present at the end of tick 0 are taken by zone 0. Zone 1 takes the
gate result at the end of tick 1, and zone 2 takes it at the end of tick 2. The
outputs then show that result during tick 3, with `*_valid` high.

The split into zones 0, 1 and 2 is this design's own. It was chosen to give
the specified half-cycle delay; the real layouts' zone assignment is not part
of the specification. Concurrent assertions in the top check two rules: a zone
only switches while the zone before it is holding, and the comparator's flags
are one-hot whenever they are valid.

## Top-level interface (`qca_comparator_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | one tick per clock phase |
| `rst_n` | in | 1 | asynchronous, active low; clears every zone, zone 0 restarts in Switch |
| `fg_a`, `fg_b` | in | 1 | Feynman gate inputs |
| `fg_p`, `fg_q` | out | 1 | P = A, Q = A xor B |
| `fg_valid` | out | 1 | Feynman output cells in Hold |
| `cmp_a`, `cmp_b` | in | 1 | comparator operands |
| `cmp_res` | out | `cmp_result_t` | `{l, e, g}` |
| `cmp_valid` | out | 1 | comparator output cells in Hold |
| `zone_phase` | out | 4 x `qca_phase_e` | current phase of each zone |

The two circuits are independent and share only the clock. The top has no
parameters.

## Files

`rtl/`: `qca_pkg` (phase enum, result struct, fixed-cell constants),
`majority_gate`, `qca_and`, `qca_or`, `qca_xor`, `feynman_gate`,
`reversible_comparator`, `qca_clock`, `qca_zone`, `qca_comparator_top`.

`tb/`: one self-checking testbench per module, named `<module>_tb`. Each one
prints `TB_RESULT checks=N failures=M` and has a watchdog.

* The gate testbenches cover every input pattern. `feynman_gate_tb` also checks
  reversibility: the outputs are a permutation of the inputs, and a second gate
  gives the inputs back.
* `qca_clock_tb` and `qca_zone_tb` check the phase sequence and when a zone
  loads its value.
* `qca_comparator_top_tb` runs 200 random operand pairs through the top, with
  the inputs changing on every tick. It checks each result against a reference
  model, checks that each result arrives exactly two ticks after its sample and
  once per four ticks, and resets the design in mid-run. It counts each clock
  phase, each Feynman input row and each comparator outcome, and fails if any
  of them never occurred.

## Simulating

With Verilator 5, from the project root:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/qca_pkg.sv tb/qca_comparator_top_tb.sv --top-module qca_comparator_top_tb
./obj_dir/Vqca_comparator_top_tb
```

To run any other testbench, replace the testbench file and the top-module name.
To lint a module: `verilator --lint-only -Wall -Irtl -y rtl rtl/qca_pkg.sv rtl/<module>.sv`.
The remaining lint warnings are unused package constants, the unconnected
Feynman lines of the comparator inside the top, and `rst_n` being used both as
an asynchronous reset and in the assertions' `disable iff`.

## What is not modelled

* **Cells and wires as devices.** Polarization computed from dot charges, and
  90-degree and 45-degree wires, are physical structures. In the RTL each one is
  a signal bit.
* **Layout figures.** The reported figures are 40 cells and 0.04 um² for the
  Feynman gate and 69 cells and 0.07 um² for the comparator, with 18 nm x 18 nm
  cells. The physical simulator's settings (bistable approximation) have no
  counterpart here either.
* **Inverters** are written as `~`. In a layout they are cells placed at an
  offset to the line.
