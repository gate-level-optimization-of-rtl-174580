# Polymorphic Multiplier/Sorter and Majority/Parity circuits

A polymorphic circuit computes two different logic functions without any
select input. Some of its gates change function with the operating
environment. Here the only such gate is a NAND/NOR gate that works as NAND at
one supply voltage and as NOR at another. Every other gate is ordinary and
does the same thing in both environments. When the whole circuit is in
**mode 1** it computes f1; in **mode 2** it computes f2. The design problem is
to find a gate network that is right in both modes and shares as many gates as
possible between f1 and f2.

This RTL builds two benchmark polymorphic circuits, each in two ways:

| benchmark | mode 1 | mode 2 | default size |
|---|---|---|---|
| Multiplier/Sorter | AW x BW-bit unsigned product | the AW+BW input bits, sorted | 4x4-bit / 8-bit |
| Majority/Parity | majority of N bits | parity of N bits | 3-bit |

The two constructions are:

* **Polymorphic multiplexing.** f1 and f2 are built separately, and each
  output goes through a polymorphic multiplexer (`pmux`).
* **Polymorphic binary decision diagram (BDD).** This is a tree of ordinary
  multiplexers. Its leaves are tiny polymorphic circuits of the lowest input
  only. The mode enters near the inputs, not at the outputs.

Both constructions follow the method of Z. Gajda and L. Sekanina, *Gate-Level
Optimization of Polymorphic Circuits Using Cartesian Genetic Programming*. In
that work these constructions are also the starting point for an evolutionary
gate-count optimization (Cartesian Genetic Programming, CGP). The optimized
netlists were never published and are not reproduced here (see
"Departures" below).

## Modelling the mode

The mode is an environmental condition, not a signal. For simulation it is
carried as a one-bit input `mode` of type `poly_pkg::poly_mode_e`:
`MODE1 = 0`, `MODE2 = 1`. A module may use it in only two ways: by passing it
on, or through `nand_nor_gate`. No ordinary gate in this RTL reads it. So the
circuits have the same structure as a netlist of real polymorphic gates. To
map the design onto real NAND/NOR gates, tie `mode` to the supply-voltage
condition and replace `nand_nor_gate` with the physical cell.

`nand_nor_gate`: `y = ~(a & b)` in mode 1, `y = ~(a | b)` in mode 2.

## The polymorphic multiplexer

`pmux` passes `a` in mode 1 and `b` in mode 2. It uses five gates:

```
  a --NOT--+
           NAND/NOR(.,1) ----+
                             OR --- y
  b -------NAND/NOR(.,0)--NOT+
```

* In mode 1 (NAND), the upper gate gives `NAND(~a,1) = a`. The lower branch
  gives `~NAND(b,0) = 0`.
* In mode 2 (NOR), the upper gate gives `NOR(~a,1) = 0`. The lower branch
  gives `~NOR(b,0) = b`.

At any time one branch is 0, so the OR gate passes the other one.

## Construction 1: polymorphic multiplexing

`mult_sorter_pmux` and `maj_par_pmux` put the two functions side by side.
There is one `pmux` per output:

* Multiplier/Sorter: `multiplier` + `bit_sorter` + AW+BW pmuxes.
* Majority/Parity: `majority` + `parity` + one pmux.

For the 4x4/8b Multiplier/Sorter this comes to 16 NAND/NOR gates in 8 pmuxes.

The two halves share no gates. A synthesis tool can share logic between them
only if it understands the polymorphic gate, and standard tools do not.

## Construction 2: the polymorphic BDD (`bdd_poly`)

This is the less obvious part of the design.

**Tree.** For an N-input output bit, `bdd_poly` builds a complete binary tree
of 2-input multiplexers (`mux2`) with N-1 levels:

* The root tests `x[N-1]`.
* The level just above the leaves tests `x[1]`.
* The then-branch (`d1`) is taken when the tested input is 1.

After inputs N-1..1 are fixed, a leaf is left with a function of `x[0]`
alone, and that function may differ between the modes.

**Terminal codes.** In each mode, a function of one bit is one of four:
constant 0, constant 1, identity (`id`) or negation (`neg`). A leaf is
therefore one of 16 polymorphic terminals. Each terminal is named by a 4-bit
code:

```
s = 8*s21 + 4*s20 + 2*s11 + s10
    s1x = output in mode 1 when x[0] = x
    s2x = output in mode 2 when x[0] = x
```

`poly_pkg::terminal_code` computes the code of every leaf at elaboration from
the benchmark function. No truth tables are stored.

**Worked example: 3-bit Majority/Parity.**

| x2 x1 | mode 1 (majority), x0=0/1 | mode 2 (parity), x0=0/1 | code | terminal |
|---|---|---|---|---|
| 00 | 0 / 0 | 0 / 1 | 8 | 0/id |
| 01 | 0 / 1 | 1 / 0 | 6 | id/neg |
| 10 | 0 / 1 | 1 / 0 | 6 | id/neg |
| 11 | 1 / 1 | 0 / 1 | 11 | 1/id |

The circuit is three multiplexers: two on x1 and one on x2. They sit over
three terminals, and both x1 multiplexers share the id/neg terminal.

**Terminal circuits (`bdd_terminal`).** Three terminals have known compact
forms, and these are used:

* `0/id` (8): `NAND/NOR(x0, 0)` followed by an inverter. This gives 0 in
  mode 1 and x0 in mode 2.
* `id/neg` (6): `p = NAND/NOR(x0, ~x0)` is 1 in mode 1 and 0 in mode 2.
  Then `y = p XOR ~x0`.
* `1/id` (11): `NAND/NOR(~x0, 0)`.

The other thirteen are this design's own:

* Where both modes want the same function (codes 0, 5, 10, 15), the terminal
  is a constant, a wire or an inverter.
* Otherwise, the mode-1 and mode-2 values of x0 are joined by a `pmux`.

**Reduction.** The diagram is reduced in two ways at elaboration:

* **Identical terminals are shared.** `bdd_poly` instantiates one terminal
  per code, and every leaf with that code is wired to it. Unused terminals
  are removed by synthesis.
* **Redundant nodes are dropped.** A node whose two halves carry the same
  sequence of leaf codes computes the same function on both branches, so it
  becomes a wire to one branch. `poly_pkg::halves_equal` finds these nodes.
  In the 4x4/8b Multiplier/Sorter, 419 of its 1016 tree nodes are removed
  this way.

A third reduction would share identical sub-trees at the same level. It is
not written out in the RTL. Synthesis does it anyway when it merges
multiplexers with equal inputs.

**Node numbering.** Nodes are numbered as a heap. Node 1 is the root. Node i
has else-child 2i and then-child 2i+1. Leaf j is node 2^(N-1)+j, where
j = x[N-1:1].

`mult_sorter_bdd` uses one `bdd_poly` per output bit. The top's Majority/Parity
BDD is a single `bdd_poly`.

## Conventions chosen here

* Multiplier/Sorter input: operand A = `x[AW-1:0]`, operand B =
  `x[AW+BW-1:AW]`. The output has AW+BW bits, so the number of outputs equals
  the number of inputs, as the benchmark needs.
* Sorter output: ascending from bit 0, so all ones are at the most
  significant end. `y[k] = 1` exactly when at least N-k inputs are 1.
* Sorter structure: an odd-even transposition network (N stages; each
  compare-exchange is one AND and one OR). It is simple but not gate-minimal.
* Multiplier structure: written as `a * b` and left to synthesis.
* Majority: 1 when more than N/2 inputs are 1. The evaluated sizes are all
  odd.

## Top level (`polymorphic_top`)

Parameters: `MS_AW = 4`, `MS_BW = 4`, `MP_N = 3`.

| port | dir | width | meaning |
|---|---|---|---|
| `mode` | in | 1 | environment mode (`MODE1`/`MODE2`) |
| `ms_x` | in | MS_AW+MS_BW | Multiplier/Sorter inputs |
| `ms_mux_o` | out | MS_AW+MS_BW | Multiplier/Sorter output, multiplexing construction |
| `ms_bdd_o` | out | MS_AW+MS_BW | Multiplier/Sorter output, BDD construction |
| `mp_x` | in | MP_N | Majority/Parity inputs |
| `mp_mux_o` | out | 1 | Majority/Parity output, multiplexing construction |
| `mp_bdd_o` | out | 1 | Majority/Parity output, BDD construction |

Everything is combinational: no clock and no reset. Each output is settled
one propagation delay after an input or the mode changes. For each benchmark,
the two constructions give identical outputs.

The published evaluation sizes are:

* Multiplier/Sorter: 2x2/4b, 3x2/5b, 3x3/6b, 4x3/7b and 4x4/8b.
* Majority/Parity: 7, 9, 11 and 13 bits.

Each size is obtained with the parameters, for example `MS_AW=4, MS_BW=3` or
`MP_N=13`. The constant functions of `poly_pkg` allow up to 16 inputs.

## Files

| file | content |
|---|---|
| `rtl/poly_pkg.sv` | mode and benchmark types, benchmark functions, terminal code |
| `rtl/nand_nor_gate.sv` | polymorphic NAND/NOR gate |
| `rtl/pmux.sv` | polymorphic multiplexer |
| `rtl/mux2.sv` | BDD node |
| `rtl/multiplier.sv`, `rtl/bit_sorter.sv` | Multiplier/Sorter functions |
| `rtl/majority.sv`, `rtl/parity.sv` | Majority/Parity functions |
| `rtl/mult_sorter_pmux.sv`, `rtl/maj_par_pmux.sv` | multiplexing construction |
| `rtl/bdd_terminal.sv`, `rtl/bdd_poly.sv`, `rtl/mult_sorter_bdd.sv` | BDD construction |
| `rtl/polymorphic_top.sv` | top level |
| `tb/tb_<module>.sv` | self-checking testbench per module |
| `tb/tb_polymorphic_top.sv` | end-to-end test at default sizes |
| `tb/tb_workloads.sv` | all evaluated sizes, exhaustively |

## Simulating

Every testbench is self-checking. Each one prints
`TB_RESULT checks=N failures=M` and stops. For example:

```
verilator --binary --timing --assert -Irtl rtl/poly_pkg.sv \
    tb/tb_polymorphic_top.sv --top-module tb_polymorphic_top
./obj_dir/Vtb_polymorphic_top
```

Put the package first on the command line. Verilator finds the other modules
through `-Irtl`.

What the testbenches check:

* **Unit level.** Every testbench is exhaustive over its inputs in both modes.
  The references are computed independently: integer products, `$countones`
  for sorting and majority, and the reduction XOR for parity.
* **`tb_polymorphic_top`.** This is the end-to-end test at the default
  sizes. It applies all 256 Multiplier/Sorter vectors and all 8
  Majority/Parity vectors in mode 1, switches to mode 2 and repeats, then
  switches back and forth during a random pass. It also counts how often each
  mechanism was exercised, and fails if one never was:
  * mode switches in both directions;
  * pmuxes choosing between differing values;
  * each of the terminals 0/id, id/neg and 1/id;
  * pmux-built terminals;
  * ordinary terminals.
* **`tb_workloads`.** This checks every evaluated size exhaustively, up to
  the 13-input Majority/Parity (8192 vectors per mode). It runs in well
  under a minute.

## Departures and limits

* **No optimized netlists.** The published flow goes further than this RTL.
  It synthesizes with BDD, Espresso or ABC and then reduces the gate count
  with CGP; for example, 205 gates for the 4x4/8b Multiplier/Sorter. Those
  netlists were not published, so they are not here. The CGP optimizer is a
  software search, not hardware. The Espresso and ABC starting circuits, and
  the per-output modules from incremental evolution, are reported only as gate
  counts.
* **Gate counts do not match the published tables.** The function of every
  circuit here is exact. The gate counts differ, because:
  * the multiplier and sorter are not the best-known minimal designs;
  * identical BDD sub-trees are shared only by synthesis.
* **The thirteen extra BDD terminals are this design's own.** Only three of
  the sixteen have published circuits. The rest use ordinary gates or a pmux.
* **Operand placement and sorter output order are conventions chosen here.**
  The source does not fix them.
* **The mode is a logic input.** On silicon it would be the supply voltage
  of the NAND/NOR gates. Nothing in this RTL models the analog behaviour of
  that gate: thresholds, or what happens between the two voltages.
