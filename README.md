# A reversible arithmetic logic unit

A reversible circuit maps its n input lines one-to-one onto n output lines, so no information
is erased while it computes. Reversible circuits are cascades of small reversible gates (CNOT,
Toffoli, Peres, Fredkin). They allow no fan-out and no feedback. Every extra input has to be a
constant *ancilla* line, and every output nobody needs is a *garbage* line that still has to be
carried to the edge of the circuit. This makes an ordinary ALU awkward to build: an add, an AND
and an OR each throw information away, and the control signals that a CMOS ALU fans out to
every bit cannot be fanned out.

This RTL describes a reversible ALU that solves both problems with a small number of lines.

- **Computing everything at once.** A 7-line *function generator* computes AND, OR, SUM (with
  carry) and XOR of the same operand bits in parallel. It reuses the intermediate terms of one
  reversible full adder. A reversible *selector* then moves one of the four onto the Result line.
- **Controls travel along the chain.** Every control line leaves each bit cell as a copy of
  itself, and the next cell takes that copy as its input. An N-bit ALU is a ripple cascade of
  identical cells and has no fan-out.
- **Extra operations from the constant lines.** Inverting Y (control AS) turns ADD into SUB,
  XOR into XNOR, AND into X&~Y and OR into X|~Y. A control line Cpn that starts the AND
  accumulator at 1 instead of 0 gives NAND and NOR.

The RTL models each reversible gate as its Boolean mapping. The gates are wired exactly as the
circuits are drawn, one line per signal. Each module therefore shows the reversible netlist and
its logic function. It does not show a quantum or adiabatic implementation. Synthesised to
standard cells, it becomes ordinary irreversible logic with the same truth table. All blocks
are combinational: there is no clock, reset or pipeline anywhere.

## Gate library

| module        | mapping (inputs A, B, C → outputs X, Y, Z) | quantum cost |
|---------------|--------------------------------------------|--------------|
| `rev_cnot`    | X = A, Y = A ⊕ B                           | 1 |
| `rev_toffoli` | X = A, Y = B, Z = C ⊕ AB                   | 5 |
| `rev_peres`   | X = A, Y = A ⊕ B, Z = AB ⊕ C (half adder when C = 0) | 4 |
| `rev_fredkin` | X = A, Y = A ? C : B, Z = A ? B : C (controlled swap, a 2:1 mux that keeps the other input) | 5 |

Quantum cost counts elementary NOT / CNOT / controlled-V operations. It is the usual cost
measure for reversible circuits, and the figures in this document are sums of the numbers in
the table.

## The reversible controlled adder/subtractor (`rcas`, `rcas_addsub`)

`rcas` is one bit on 5 lines (A/S, X, Y, Cin, 0):

1. CNOT(A/S → Y): the Y line becomes Y' = Y ⊕ A/S.
2. Peres(X, Y', 0): the lines become X, X ⊕ Y' and X·Y'.
3. Peres(X ⊕ Y', Cin, X·Y'): the lines become X ⊕ Y' (garbage), S/D = X ⊕ Y' ⊕ Cin and
   Cout = X·Y' ⊕ Cin·(X ⊕ Y').

A/S leaves the cell unchanged and becomes the next cell's control. The cell has 3 gates and
quantum cost 9.

`rcas_addsub` chains N cells, with N = 16 by default. Cell 0 needs a carry-in of 1 for
subtraction (X − Y = X + ~Y + 1). One CNOT from A/S onto a constant-0 line supplies it, so
add and subtract need only the one control. Signed overflow is C(N−1) ⊕ C(N). One CNOT copies
the carry into the top cell onto a fresh 0 line, and a second CNOT XORs the final carry into
it. Totals: 3N+1 gates (+2 for overflow), 2N+1 garbage outputs, N+1 ancillas (+1), and quantum
cost 9N+1 (+2). At N = 16 that is 51 gates and cost 147. `cout_o` is the unsigned carry; for a
subtraction it is 1 when there is no borrow.

## The 1-bit RALU cell

### Function generator (`ralu_funcgen`)

The 7 lines are AS, X, Y, Cin, 0, Cpn and 0. The first three gates are the RCAS cell. Three
CNOTs reuse its intermediate values:

| line out | value (Y' = Y ⊕ AS) | gate that finishes it |
|----------|---------------------|-----------------------|
| `and_o`  | X·Y' ⊕ Cpn          | CNOT(carry line → Cpn line), taken after the first Peres, while the carry line still holds X·Y' |
| `xor_o`  | X ⊕ Y'              | CNOT(Y line → second 0 line), taken after the first Peres |
| `sum_o`, `cout_o` | full adder of X, Y', Cin | second Peres |
| `or_o`   | X ⊕ Y' ⊕ X·Y' ⊕ Cpn = (X ∨ Y') ⊕ Cpn | CNOT(AND line → Y line), the last gate |

The generator has 6 gates and quantum cost 12. OR is obtained as XOR ⊕ AND, so no second
Toffoli is needed.

### Two selectors

Both selectors use {Ctl2, Ctl1} = 00 for AND, 01 for OR, 10 for SUM and 11 for XOR.

- **`ralu_mux4`: Davio multiplexer, design I.** It has 6 lines, 6 gates (3 CNOT + 3 Toffoli),
  no ancilla and quantum cost 18. It computes M12 = F1 ⊕ Ctl1(F1 ⊕ F2) and M34 the same way,
  then Result = M12 ⊕ Ctl2(M12 ⊕ M34). The garbage lines hold F1⊕F2, M12⊕M34 and F3⊕F4.
- **`ralu_fredsel`: Fredkin selector, design II.** Two Fredkin gates controlled by Ctl1 pick
  within each pair, and a third, controlled by Ctl2, picks the pair. It has 3 gates and quantum
  cost 15. Each Fredkin keeps the input it did not pick, so all four functions remain readable.
  `gao` holds the unselected member of AND/OR, `gsx` the unselected member of SUM/XOR, and `gr`
  the unselected pair result.

### Cells

| cell            | selector     | gates                          | quantum cost | lines |
|-----------------|--------------|--------------------------------|--------------|-------|
| `ralu_bit_mux`  | Davio 4:1    | 12 (2 Peres, 3 Toffoli, 7 CNOT) | 30           | 9     |
| `ralu_bit_fred` | Fredkin      | 9 (2 Peres, 4 CNOT, 3 Fredkin)  | 27           | 9     |

The nine input lines are AS, X, Y, Cin, 0 (carry), Cpn, 0 (XOR), Ctl1 and Ctl2. The two 0
lines must be 0 for the functions to be right. The cell is a bijection for any values on them,
and the testbenches check that.

### Operation table (`ralu_pkg::ralu_op_e`, control word {Cpn, AS, Ctl2, Ctl1})

| code | operation | code | operation |
|------|-----------|------|-----------|
| 0000 | X AND Y   | 1000 | X NAND Y  |
| 0001 | X OR Y    | 1001 | X NOR Y   |
| 0010 | X + Y + Cin | 0100 | X AND ~Y |
| 0011 | X XOR Y   | 0101 | X OR ~Y (Y → X) |
| 0110 | X − Y (Cin = 1) | 1100 | ~X OR Y (X → Y) |
| 0111 | X XNOR Y  |      |           |

The five unnamed codes still produce well-defined outputs. For example, 1101 gives NOT(X OR ~Y)
and 1110 gives the difference while inverting the unselected AND/OR lines. They are simply not
part of the operation set. SUB needs carry-in 1 on the LSB cell. With carry-in 0 the same code
gives X − Y − 1.

## N-bit ALU (`ralu_nbit`, `ralu_ovf_slt`)

`ralu_nbit` is a ripple cascade of N cells, with N = 32 by default. Cell i gets X[i], Y[i],
the carry out of cell i−1 and the AS/Ctl1/Ctl2 copies passed on by cell i−1. With
`FREDKIN_SEL = 1` (the default) it uses the Fredkin cell: 9N gates and quantum cost 27N, which
is 288 gates and cost 864 at 32 bits. With `FREDKIN_SEL = 0` it uses the Davio cell: 12N gates
and cost 30N. For that cell the ports `gao/gsx/gr` carry the cell's G1/G2/G3 garbage lines.

The cascade uses 5N+4 lines. Each cell brings in X, Y and three 0/Cpn lines, and the chain adds
Cin, AS, Ctl1 and Ctl2 once. Cpn is the one control without a copy line: it is consumed as the
AND accumulator. Each cell therefore gets its own Cpn line, and `cpn_i` drives all of them.

`ralu_ovf_slt` builds the lower N−1 cells as a `ralu_nbit` and the top cell separately, so that
the carry into the top cell is available. Four CNOTs on two extra 0 lines then add:

- `ovf_o = C(N−1) ⊕ C(N)`: two's-complement overflow of ADD or SUB.
- `slt_o = Result[N−1] ⊕ ovf_o`: 1 when X < Y as signed numbers. This flag is only meaningful
  while SUB is selected (code 0110, Cin = 1), when Result is the difference. Under any other
  operation it is still computed, from whatever Result holds.

The two flags add quantum cost 4.

## Reduced ALU with modular arithmetic (`ralu_vs_bit`, `ralu_vs_nbit`)

This variant keeps only the adder path, for comparison with ALUs that do modular arithmetic,
XOR and no-op. One cell has 8 lines and 6 gates, with quantum cost 20 (640 for 32 bits):

1. RCAS(A/S, X, Y, Ccarry, 0).
2. Toffoli(Cnop, X → Y line). The Y line becomes Y ⊕ A/S ⊕ X·~Cnop, so Cnop = 1 cancels X.
3. CNOT(Csns → S/D line). This inverts the sum, which turns X + ~Y into Y − X.
4. Fredkin(Cres; Y line, S/D line). Result is S/D when Cres = 1 and the Y line otherwise.

Control word {Cres, Csns, Cnop, AS, Ccarry} (`ralu_pkg::vs_op_e`):

| code  | result | code  | result |
|-------|--------|-------|--------|
| 10000 | Y + X  | 00100 | Y (NOP) |
| 11010 | Y − X  | 00110 | ~Y |
| 10011 | X − Y  | 00010 | Y ⊕ ~X |
| 00000 | Y ⊕ X  | 10001 | Y + X + 1 |
| 10010 | X − Y − 1 | | |

`ralu_vs_nbit` chains the cells (carry to Ccarry, control copies to the next cell). Its
default N is 32. Arithmetic is modulo 2^N, and `cout_o` is still brought out.

## Top level (`ralu_top`)

`ralu_top` places four independent circuits side by side. They share no signal, and each
brings out every output line, garbage included:

| prefix    | circuit | default size |
|-----------|---------|--------------|
| `f_`      | `ralu_ovf_slt`, Fredkin cells | `RALU_N = 32` |
| `m_`      | `ralu_ovf_slt`, Davio cells | `RALU_N = 32` |
| `addsub_` | `rcas_addsub` | `ADDSUB_N = 16` |
| `vs_`     | `ralu_vs_nbit` | `VS_N = 32` |

The control inputs are the packed structs `ralu_ctrl_t` and `vs_ctrl_t` from `ralu_pkg`.
Because Cpn and Ccarry have no copy line, the `cpn` and `ccarry` fields of the `*_ctrl_o`
outputs just repeat the inputs.

## Where this RTL makes its own choices

- **Cpn is a port.** The published 1-bit cell drawings tie the Cpn line to 0, but the
  operation table uses Cpn to select NAND and NOR. Here it is an input of every cell, driven by
  one `cpn_i` on the N-bit ALU.
- **Davio multiplexer gate order.** The order of the six gates is derived from its Boolean
  expression, with the stated gate count, line count and cost: CNOT(F1→F2),
  Toffoli(Ctl1,F2→F1), CNOT(F3→F4), Toffoli(Ctl1,F4→F3), CNOT(F1→F3), Toffoli(Ctl2,F3→F1).
  The garbage values on g1..g3 depend on that order. The Result does not.
- **Function-generator CNOTs.** The placement of the three inner CNOTs is one that gives the
  specified line values and the cost of 12. Any equivalent placement gives the same outputs.
- **V-shape-comparable cell.** The Toffoli's second control is X. That is the only choice that
  gives both NOP = Y and XOR = Y ⊕ X in the table above.
- **Overflow detector always present.** `rcas_addsub` always includes it. The version without
  it is the same circuit minus two CNOTs.
- **Extent of checking.** The 4-bit ALU with overflow and SLT is checked against random signed
  operands, not against a fixed published waveform.
- **No timing.** Nothing is said about timing. All blocks are combinational ripple chains, so
  the delay grows linearly with N.

## Simulating

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<m>` and stops; a watchdog ends a run that hangs. The 1-bit
blocks are tested exhaustively over all input vectors, ancillas included, and must also map
distinct inputs to distinct outputs, which checks reversibility. The N-bit blocks run every
operation on corner and random operands against word-level arithmetic. Each also runs a 4-bit
instance through every input setting and requires distinct outputs, so the cascades stay
one-to-one. `tb_ralu_nbit` also replays the sixteen operand/result pairs of a 4-bit reference
simulation, with the garbage lines of its first two vectors. `tb_ralu_top` drives
the whole top at its default sizes and fails if an operation, a carry out, an overflow or
slt = 1 never occurred.

With Verilator 5 (the package first, the other modules found by `-y`):

```
verilator --binary --timing --assert -Irtl -y rtl rtl/ralu_pkg.sv tb/tb_ralu_top.sv \
          --top-module tb_ralu_top -Mdir obj_top -o sim
./obj_top/sim
```

Replace `tb_ralu_top` with any other `tb_*` to test one block. Each run takes well under a
second.
