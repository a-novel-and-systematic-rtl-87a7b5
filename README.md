# Reversible gates from majority voters, with a dual-field adder

In quantum-dot cellular automata (QCA), the basic logic element is the three-input
majority voter, M(A,B,C) = AB + BC + AC. It loses information: three bits go in and
one comes out. This library makes it reversible. Three majority voters share the same
inputs, and two of them see one input complemented:

```
X = M(A, B, C)      Y = M(~A, B, C)      Z = M(A, ~B, C)
```

The map (A,B,C) -> (X,Y,Z) is a permutation of the eight 3-bit codes:

| ABC | 000 | 001 | 010 | 011 | 100 | 101 | 110 | 111 |
|-----|-----|-----|-----|-----|-----|-----|-----|-----|
| XYZ | 000 | 011 | 010 | 110 | 001 | 101 | 100 | 111 |

Tie A to a constant and the gate becomes a two-input gate. With A = 0, X is B AND C
and Y is B OR C. With A = 1 the two swap places. Z is never useful. So each
*reversible majority gate* (RMG) used as an AND or an OR costs one fixed input (an
ancilla) and gives two unused outputs (garbage).

All the usual reversible gates (CNOT, Toffoli, Fredkin, SWAP, Peres) are then built
from these AND and OR gates and from QCA inverters. The library's example application
is a one-bit dual-field adder. That adder is the cell of unified GF(p)/GF(2^m)
arithmetic units for public-key cryptography.

The RTL is a cycle-accurate logical model of these QCA circuits, not a cell layout.

## Timing model: one cycle = one QCA clock sequence

A QCA circuit is clocked by four zones, each 90 degrees behind the one before it. A
value moves through one RMG in one full sequence of the four zones. In this RTL:

* one clock cycle of `clk` stands for one QCA clock sequence;
* every RMG registers its outputs, so it has a latency of 1 cycle;
* a wire that crosses whole clock sequences in the layout is a shift register,
  `qca_delay`;
* every gate is fully pipelined and accepts a new input vector on every cycle.

The layouts' total latencies are longer than the number of RMG levels in each gate.
The rest of the time is spent in clocked wiring. The model adds that extra delay as
balancing stages on the outputs. Each gate's total latency therefore matches its
layout, but the registers are not placed where the layout's wire delays are.

| gate               | function                                   | RMG levels | latency | RMGs = ancillae | garbage |
|--------------------|--------------------------------------------|-----------:|--------:|----------------:|--------:|
| `rev_majority_gate1` | X, Y, Z above                            | 1 | 1  | 1  | –  |
| `rev_and2` / `rev_or2` | B AND C / B OR C                       | 1 | 1  | 1  | 2  |
| `cnot_gate`        | P=A, Q=A^B                                 | 2 | 3  | 3  | 6  |
| `ccnot_gate`       | P=A, Q=B, R=AB^C                           | 3 | 5  | 4  | 8  |
| `fredkin_gate`     | P=A; Q,R = B,C, swapped when A=1           | 2 | 5  | 6  | 12 |
| `swap_gate`        | P=B, Q=A                                   | 6 | 9  | 9  | 18 |
| `peres_gate`       | P=A, Q=A^B, R=AB^C                         | 3 | 5  | 7  | 14 |
| `dual_field_adder` | SUM=A^B^C, COUT=FSEL·maj(A,B,C)            | 7 | 11 | 15 | 30 |

The latency, ancilla and garbage columns are the published figures for the QCA
layouts. The RTL is built so that its structure gives the same numbers. The constants
are in `qca_rev_pkg`. Each composite gate has `LATENCY`, `N_GARBAGE` and `N_ANCILLA`
parameters that default to them. An elaboration-time assertion rejects garbage or
ancilla counts that do not match the structure.

## How the gates are composed

* **XOR** (`rev_xor2`, a helper): (A AND ~B) OR (~A AND B). It uses two reversible ANDs
  on complemented inputs and one reversible OR, with a latency of 2.
* **CNOT**: the XOR stage, one balancing cycle, and A carried on a 3-cycle wire.
* **CCNOT**: a reversible AND forms AB. C waits one cycle. The XOR stage then forms
  AB^C, and two balancing cycles follow.
* **Fredkin**: four reversible ANDs form ~A·B, A·C, ~A·C and A·B. Two ORs combine them
  into Q and R. Three balancing cycles follow.
* **SWAP**: three CNOTs in cascade. Each one's control is the previous one's target:
  (A,B) -> (A, A^B) -> (A^B, B) -> (B, A).
* **Peres**: a CNOT and a CCNOT side by side on the same inputs. The CNOT's Q output
  waits 2 cycles to line up with the CCNOT's R output.

Garbage outputs are carried along clocked wires, so they appear in the same cycle as
the useful outputs. Each module's header comment gives the bit order of its `garbage`
bus.

## The dual-field adder

```
 A ─┐          A^B ─┐
 B ─┤ Peres 1       │ Peres 2  ──> SUM  (A^B^C)                ──[1 cycle]──> SUM
 0 ─┘   AB  ────────┤
       C ──[5 cycles]┘          ──> carry ((A^B)C ^ AB) ─┐
       FSEL ──────────[10 cycles]────────────────────────┴ reversible AND ──> COUT
```

* Peres 1 takes (A, B, 0) and produces A^B and AB.
* Peres 2 takes (A^B, C, AB). It produces the sum A^B^C and the carry
  (A^B)C ^ AB, which is the majority of A, B and C.
* The carry is ANDed with the field select, FSEL, in one more RMG:
  * FSEL = 1 gives normal addition with carry, for GF(p).
  * FSEL = 0 forces COUT to 0. SUM is then the modulo-2 sum used in GF(2^m).
* The latency is 5 + 5 + 1 = 11 cycles, with 15 RMGs and 30 garbage bits.

The constant 0 on Peres 1 is a constant at the level of the reversible circuit. It is
not counted among the 15 ancillae, which are the fixed inputs of the RMGs. The
structure above is the standard two-Peres full adder. It matches the published
latency, ancilla count and garbage count.

The adder is a single bit cell. A multi-bit dual-field adder or multiplier built from
it is not part of this library.

## Top level

`reversible_qca_top` places three independent circuits side by side. They share only
`clk` and `rst_n`:

* the dual-field adder (`dfa_*` ports), which contains the Peres, CNOT, CCNOT, AND/OR
  and RMG levels;
* a Fredkin gate (`fred_*` ports);
* a SWAP gate (`swap_*` ports).

Each circuit brings out its garbage bus.

## Where this model departs from, or adds to, the QCA circuits

* **Reset.** `rst_n` is an active-low asynchronous reset that clears every pipeline
  register. QCA cells have nothing like it. The reset exists so that simulation starts
  from known values.
* **Placement of delay.** Only the total latency of each gate is known. The balancing
  stages sit on the outputs.
* **Constant for AND/OR.** Both `rev_and2` and `rev_or2` tie A to 0, and take X and Y
  respectively. Tying A to 1 and exchanging the outputs would give the same logic.
  The polarization values of the fixed cells in the layouts are not modelled.
* **Fredkin polarity.** The gate swaps when A = 1, the usual convention for a positive
  control.
* **SWAP cascade order.** The standard three-CNOT sequence given above.
* **Not modelled:** the analog four-phase clock and the cells themselves. The clock
  includes the Bennett clocking that is proposed against power-analysis attacks. The
  table's cell counts and areas are also not modelled; they are properties of the
  layout.
* **Gates not built:** reversible majority gates 2 and 3 are variants with other
  inputs complemented. They are not built, because gate 1 is the one every circuit
  here uses.

## Simulating

Every testbench in `tb/` checks its own results. It prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. Each gate's
testbench does the following:

* streams every input combination, then random vectors, one per cycle;
* compares every output with a reference computed in the testbench from the inputs
  applied exactly `LATENCY` cycles earlier;
* measures the latency once more from a single vector;
* checks the garbage width.

Some testbenches check more:

* The RMG testbench uses the truth table above as its reference and checks that the
  mapping is one-to-one.
* The AND/OR testbenches also check the garbage values.
* The top-level testbench runs all three circuits at once at default parameters. It
  counts that each mode occurred: a carry in GF(p) mode, a carry suppressed in
  GF(2^m) mode, a Fredkin swap and pass-through, and a SWAP of differing bits.

With plain Verilator, for example:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/qca_rev_pkg.sv \
          tb/tb_reversible_qca_top.sv --top-module tb_reversible_qca_top -o sim
./obj_dir/sim
```

Replace the testbench name to run any other one. Every run takes well under a second.

## Files

* `rtl/qca_rev_pkg.sv`: latencies, ancilla and garbage counts, the AND/OR constant.
* `rtl/majority_gate.sv`, `rtl/qca_not.sv`: the combinational QCA primitives.
* `rtl/qca_delay.sv`: a clocked QCA wire (shift register, depth 0 is a plain wire).
* `rtl/rev_majority_gate1.sv`, `rtl/rev_and2.sv`, `rtl/rev_or2.sv`, `rtl/rev_xor2.sv`:
  the reversible majority gate and the two-input gates made from it.
* `rtl/cnot_gate.sv`, `rtl/ccnot_gate.sv`, `rtl/fredkin_gate.sv`, `rtl/swap_gate.sv`,
  `rtl/peres_gate.sv`: the reversible gates.
* `rtl/dual_field_adder.sv`: the adder cell.
* `rtl/reversible_qca_top.sv`: the top level.
* `tb/tb_<module>.sv`: one testbench per module. `rev_xor2` and `qca_delay` are
  exercised through the gates that use them.
