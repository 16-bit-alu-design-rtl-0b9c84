# A 16-bit ALU built from reversible gates

An ordinary gate such as AND or OR throws information away: from its output
you cannot tell what its inputs were. By Landauer's principle each erased bit
costs at least kT·ln 2 of energy. A *reversible* gate has as many outputs as
inputs and maps them one-to-one, so nothing is erased and the inputs can
always be recovered from the outputs. This design is a 16-bit ALU with eight
arithmetic and four logic operations, written entirely as a netlist of such
gates: NOT, Feynman (CNOT), Toffoli, Fredkin and the Double Peres Gate (DPG).
The DPG is built from two Peres gates.

A reversible netlist differs from an ordinary one in three ways, and these
shape the whole design:

* **No fan-out.** A wire may feed only one gate input. A signal that two
  gates need is first copied by a Feynman gate whose second input is 0.
* **Constant inputs.** Gates are often used with one input tied to 0 or 1,
  for example a Toffoli gate with C = 0 to compute AND.
* **Garbage outputs.** Outputs that are needed only to keep the gate
  one-to-one are left unused.

Designs are compared by gate count, *quantum cost* (the number of elementary
V, V+ and CNOT operations a gate needs), constant inputs and garbage outputs.

## Operations

The ALU is purely combinational. `s` picks arithmetic (0) or logic (1).
`s0`, `s1` and `cin` then pick the operation:

| s | s0 | s1 | cin | f          | cout (arithmetic only)    |
|---|----|----|-----|------------|---------------------------|
| 0 | 0  | 0  | 0   | A + B      | carry                     |
| 0 | 0  | 0  | 1   | A + B + 1  | carry                     |
| 0 | 0  | 1  | 0   | A + ~B     | carry                     |
| 0 | 0  | 1  | 1   | A − B      | 1 = no borrow (A ≥ B)     |
| 0 | 1  | 0  | 0   | A          | 0                         |
| 0 | 1  | 0  | 1   | A + 1      | 1 when A = all ones       |
| 0 | 1  | 1  | 0   | A − 1      | 1 = no borrow (A ≠ 0)     |
| 0 | 1  | 1  | 1   | A          | 1                         |
| 1 | 0  | 0  | x   | A xor B    | (not defined)             |
| 1 | 0  | 1  | x   | A and B    | (not defined)             |
| 1 | 1  | 0  | x   | A or B     | (not defined)             |
| 1 | 1  | 1  | x   | not A      | (not defined)             |

All eight arithmetic rows are one adder, `A + Y + cin`, where the second
operand Y depends on (s0, s1):

| s0 s1 | Y         |
|-------|-----------|
| 0 0   | B         |
| 0 1   | ~B        |
| 1 0   | 0         |
| 1 1   | all ones  |

So Y = s0 ? s1 : (B xor s1), replicated on every bit.

## The gate library

Each gate is written from its Boolean input/output mapping.

| module         | size | mapping                                                     | quantum cost |
|----------------|------|-------------------------------------------------------------|--------------|
| `not_gate`     | 1×1  | P = ~A                                                      | 0            |
| `feynman_gate` | 2×2  | P = A, Q = A ⊕ B (B=0: copy A; B=1: ~A)                     | 1            |
| `toffoli_gate` | 3×3  | P = A, Q = B, R = AB ⊕ C                                    | 5            |
| `peres_gate`   | 3×3  | P = A, Q = A ⊕ B, R = AB ⊕ C                                | 4            |
| `fredkin_gate` | 3×3  | P = A, Q = A ? C : B, R = A ? B : C (controlled swap)       | 5            |
| `dpg_gate`     | 4×4  | P = A, Q = A ⊕ B, R = A ⊕ B ⊕ C, S = (A ⊕ B)C ⊕ AB ⊕ D       | 6            |

Three properties are used over and over:

* The Fredkin gate is a 2:1 multiplexer at its Q output, and it passes its
  select through unchanged at P.
* The DPG with D = 0 is a full adder: R is the sum and S the carry.
* The Feynman gate with B = 0 is the legal way to fan a signal out.

`dpg_gate` is two `peres_gate` instances. The first takes (A, B, D) and gives
A ⊕ B and AB ⊕ D. The second takes (A ⊕ B, C, AB ⊕ D) and gives
A ⊕ B ⊕ C and (A ⊕ B)C ⊕ AB ⊕ D.

The quantum costs are stored as constants in `rev_alu_pkg`. Note that the
cost usually quoted for the DPG (6) is less than that of two Peres gates (8).
The smaller figure assumes a dedicated V/V+ realisation.

## One bit slice

`rev_alu_slice` computes one bit of the result. It is built from three
parts.

```
        a ──FG(·,0)──┬─ a_ar ─┐                       ┌─ s_o
        b ──FG(·,0)──┼─ b_ar ─┤ rev_arith_cell ─ sum ─┤
       s1 ──FG(·,0)──┼─ s1_ar ┤  (FG, Fredkin, DPG)   │
       s0 ───────────┼────────┤ ── cout               │ Fredkin(s) ── f
      cin ───────────┼────────┘ ── s0 (passed on)     │
                     ├─ a_lg ─┐                       │
                     ├─ b_lg ─┤ rev_logic_cell ─ lg ──┘
                     └─ s1_lg ┤  (Toffoli, FG×3, NOT, Fredkin×3)
               s0 (from arith)┘ ── s0_o, s1_o (passed on)
```

**Arithmetic cell (`rev_arith_cell`).** Y is formed as follows:

1. A Feynman gate on (s1, B) gives B ⊕ s1.
2. A Fredkin gate controlled by s0 chooses between B ⊕ s1 and s1.

A DPG with D = 0 then adds A, Y and the incoming carry. This takes three
gates, quantum cost 12 and one constant input. It leaves three garbage
outputs:

* the unselected Fredkin input;
* the DPG's copy of A;
* the DPG's A ⊕ Y.

**Logic cell (`rev_logic_cell`).** It computes all four functions at once,
using each signal only once:

* A Toffoli gate on (A, B, 0) gives AB.
* A Feynman gate gives A ⊕ B, and a second Feynman gate with a 0 input
  copies it.
* A third Feynman gate on (AB, A ⊕ B) gives A + B, because
  A + B = AB ⊕ A ⊕ B.
* The NOT gate, fed by the A copy that the Feynman gate passes through,
  gives ~A.

Three Fredkin gates then form a 4:1 multiplexer:

* The first picks XOR or AND on s1.
* The second picks OR or NOT on s1.
* The third picks between those two on s0.

**Output choice.** A last Fredkin gate, controlled by `s`, picks the sum or
the logic result.

**Fan-out and select threading.** A, B and s1 are each needed by both cells,
so Feynman copies are made at the slice input. The select lines need no
copies across slices. Each one leaves the slice through the pass-through
output of the last gate it controls (`s_o`, `s0_o`, `s1_o`). `rev_alu16`
feeds these outputs to the next slice, exactly like the carry. As a result,
no wire in the 16-bit array drives more than one gate input.

**Per-slice budget.** The counts are also in `rev_alu_pkg`:

| item               | per slice                                      | 16 bits |
|--------------------|------------------------------------------------|---------|
| gates              | 15 (7 Feynman, 5 Fredkin, 1 Toffoli, 1 DPG, 1 NOT) | 240 |
| quantum cost       | 43                                             | 688     |
| constant inputs    | 6                                              | 96      |
| garbage outputs    | 7                                              | 112, plus the 3 select lines leaving the last slice |

## The 16-bit ALU (`rev_alu16`)

`rev_alu16` places `WIDTH` (default 16) slices in a ripple-carry chain.
Slice 0 gets `cin`, and `cout` is the carry out of the top slice.

Its ports are `a[15:0]`, `b[15:0]`, `s`, `s0`, `s1`, `cin`, `f[15:0]` and
`cout`, 53 pins in all. The garbage outputs stay inside the module.

The critical path is the carry through 16 DPG full adders. The select lines
also ripple through the slices. Since there are no registers, that only
adds combinational delay.

`cout` is simply the adder's carry. In logic mode the adder still runs, so
`cout` then shows the carry of A + Y + cin, which has no meaning in the
table.

## What this RTL is, and is not

* **It is a gate-level model of a reversible netlist, not a low-power
  implementation.** A standard synthesis tool sees ordinary Boolean logic.
  It removes the garbage outputs and the pass-through wires and
  re-optimises the rest. Reversibility is a property of the netlist as
  written, not of the synthesised circuit.
* **V and V+ gates are not modelled.** Toffoli, Fredkin and DPG are often
  drawn as networks of controlled-V and controlled-V+ (square root of NOT)
  gates. These produce non-Boolean states and cannot be expressed as
  two-valued logic. The gates here are written from their Boolean mappings,
  and the quantum costs appear only as constants.
* **Choices made by this design.** The operations, the gate types and the
  DPG-as-full-adder idea are the source design's. The following are
  choices made here:
  * the gate arrangement inside the arithmetic cell, the logic cell and the
    slice;
  * the use of a NOT gate for "not";
  * applying "not" to operand A;
  * threading the select lines through the slices;
  * the meaning of `cout`.

  The source design lists only Toffoli, Fredkin, Feynman and DPG gates for
  the ALU. A Feynman gate with B = 1 could replace the NOT gate, at quantum
  cost 1 instead of 0.
* **Power is not reproduced.** The source reports the logic power of a
  reversible and an ordinary 16-bit ALU on a Virtex-6 FPGA (1.10 mW against
  1.83 mW). That comparison depends on vendor tools and on the ordinary
  ALU, which is not part of this RTL.

## Files

| file | contents |
|------|----------|
| `rtl/rev_alu_pkg.sv` | quantum costs and per-slice gate budget |
| `rtl/not_gate.sv`, `feynman_gate.sv`, `toffoli_gate.sv`, `peres_gate.sv`, `fredkin_gate.sv`, `dpg_gate.sv` | gate library |
| `rtl/rev_arith_cell.sv`, `rtl/rev_logic_cell.sv`, `rtl/rev_alu_slice.sv` | one bit slice |
| `rtl/rev_alu16.sv` | top level, parameter `WIDTH` |
| `tb/alu_ref_pkg.sv` | reference model of the operation table, written row by row |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and has a time-out.
What each one checks:

* **Gate testbenches.** They try every input combination and check:
  * the mapping;
  * that it is one-to-one;
  * that it is its own inverse, for Feynman, Toffoli and Fredkin;
  * that the number of ones is kept, for Fredkin;
  * the full-adder use of the DPG and the half-adder use of Peres.
* **Cell and slice testbenches.** They are exhaustive, with 32, 16 and 64
  input combinations. They also check that the cells and the slice as a
  whole are reversible: with the constant inputs fixed, no two input
  patterns produce the same pattern on all outputs, garbage included. The
  garbage outputs are exactly what keeps the inputs recoverable.
* **`tb_rev_alu16`.** It runs the full 16-bit ALU at its default width:
  * every select code with corner operands (0, 1, all ones, 0x7FFF, 0x8000,
    0xA5A5);
  * the named cases: ripple through all bits, A − A, a borrow, 0 − 1 and
    all ones + 1;
  * 2000 random operations.

  It counts how often each table row ran, carries of 1 and 0, full-width
  carry ripples and borrows. A case that never happens counts as a failure.

Each testbench was also run against a copy of its module with one
deliberate error, and every such copy failed.

To run one, with Verilator 5:

```
verilator --binary --timing -Irtl -Itb rtl/rev_alu_pkg.sv tb/alu_ref_pkg.sv \
    tb/tb_rev_alu16.sv --top-module tb_rev_alu16
./obj_dir/Vtb_rev_alu16
```

The gate testbenches need no packages, for example
`verilator --binary --timing -Irtl -Itb tb/tb_dpg_gate.sv`.

To build a wider or narrower ALU, change `WIDTH`. The reference model in
`alu_ref_pkg` takes the width as an argument and supports up to 63 bits,
but `tb_rev_alu16` fixes its local `W` at 16.
