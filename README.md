# One-bit magnitude comparators built from reversible gates

A reversible gate maps its n inputs one-to-one onto n outputs, so no
information is thrown away and the inputs can always be reconstructed from
the outputs. Because such gates erase nothing, they are the building block of
low-power reversible computing and of quantum circuits. The catch is the
bookkeeping. Reversible designs are judged by four numbers:

- **gates**: the number of reversible gates;
- **garbage outputs**: lines that exist only to keep the mapping one-to-one;
- **constant inputs**: ancilla lines tied to 0 or 1;
- **quantum cost**: the number of elementary one- and two-qubit operations.

This RTL implements four one-bit comparators built this way. Each takes
operands A and B and produces the usual three results:

| result | function      |
|--------|---------------|
| A > B  | `A & ~B`      |
| A = B  | `~(A ^ B)`    |
| A < B  | `~A & B`      |

Every variant finishes with a **BVF gate**. This 4x4 gate holds two
controlled-NOTs side by side: (A, B, C, D) maps to (A, A^B, C, C^D). The BVF
gate forms two of the three results from terms built upstream. It uses the
identity

    A<B = A ^ B ^ AB'        (and symmetrically A>B = A ^ B ^ A'B)

so one product term and the XOR of the operands give the other product term
with a single controlled-NOT. One gate then makes the product term, and the
variants differ only in which gate that is:

| variant (top-level port suffix) | gates                    | garbage | constants | quantum cost |
|---------------------------------|--------------------------|---------|-----------|--------------|
| `_tr`       (`cmp1_tr_bvf`)      | Feynman, TR, BVF         | 1       | 2         | 7 = 1+4+2    |
| `_peres`    (`cmp1_peres_bvf`)   | double Feynman, Peres, BVF | 2     | 2         | 8 = 2+4+2    |
| `_toffoli`  (`cmp1_toffoli_bvf`) | double Feynman, Toffoli, BVF | 2   | 2         | 9 = 2+5+2    |
| `_fredkin`  (`cmp1_fredkin_bvf`) | double Feynman, Fredkin, BVF | 3   | 2         | 9 = 2+5+2    |

The TR variant is the cheapest on every count. The four variants are
alternative answers to one problem. `rev_comparator_top` puts them side by
side on shared operands, so that they can be compared and cross-checked.

## The gate library

Each gate is one module with inputs `a b c [d]` and outputs `p q r [s]`. The
quantum costs are in `rev_pkg` (`QC_*`). They are bookkeeping only: the RTL
models each gate's classical truth table, not its realisation in quantum
operations.

| module                | map (A,B,C[,D]) -> (P,Q,R[,S])   | QC |
|-----------------------|----------------------------------|----|
| `feynman_gate`        | A, A^B                            | 1  |
| `double_feynman_gate` | A, A^B, A^C                       | 2  |
| `toffoli_gate`        | A, B, AB^C                        | 5  |
| `fredkin_gate`        | A, A'B^AC, A'C^AB (swap B,C if A) | 5  |
| `peres_gate`          | A, A^B, AB^C                      | 4  |
| `tr_gate`             | A, A^B, AB'^C                     | 4  |
| `bvf_gate`            | A, A^B, C, C^D                    | 2  |

With a constant 1 on a target line, a Feynman or double Feynman gate produces
a complemented copy of its control. With a 0 on the target, the Toffoli,
Peres and TR gates produce an AND term, and the Fredkin gate produces A'B on
Q and AB on R.

## The four gate networks

This section matters most for anyone reading or changing the RTL. The three
results are the same in all four variants. What differs is which line
carries what between the gates. In each network below, the A=B result comes
out as `x ^ y` of two lines that differ by one complemented operand. The BVF
gate's second pair turns one product term into the other.

**TR variant** (`cmp1_tr_bvf`). This is the only network with exactly as many
outputs as inputs plus constants, so it needs no fan-out.

    Feynman(B, 1)          -> B, B'
    TR(A, B, 0)            -> A, A^B, AB'            AB' = A>B
    BVF(A, B', AB', A^B)   -> A (G1), A^B', AB', AB'^A^B
                           =  G1, A=B, A>B, A<B

**Toffoli variant** (`cmp1_toffoli_bvf`). Operand A drives both the double
Feynman gate and the Toffoli gate.

    DFG(B, A, 1)           -> B (G1), A^B, B'
    Toffoli(A, A^B, 0)     -> A, A^B, A(A^B) = AB'
    BVF(A, B', AB', A^B)   -> A (G2), A=B, A>B, A<B

**Peres variant** (`cmp1_peres_bvf`). The Peres gate's middle line already
carries A^B' = (A=B). The BVF gate passes it through on P and uses Q for
garbage.

    DFG(B, A, 1)            -> B (G1), A^B, B'
    Peres(A, B', 0)         -> A, A^B', AB'
    BVF(A^B', A, AB', A^B)  -> A=B, B' (G2), A>B, A<B

**Fredkin variant** (`cmp1_fredkin_bvf`). With a 0 on its third line, the
controlled swap gives A'B directly, and the BVF gate derives A>B from it.
Operand B drives three gates.

    DFG(A, B, 1)            -> A, A^B, A'
    Fredkin(A, B, 0)        -> A (G1), A'B, AB (G2)
    BVF(A', B, A'B, A^B)    -> A' (G3), A=B, A<B, A>B

Every variant has the port list `a, b, res, garbage`. Here `res` is a
`rev_pkg::cmp_t` packed struct `{gt, eq, lt}` (bit 2 is gt), and
`garbage[i-1]` is garbage line Gi. The constant inputs are tied inside each
module and are not ports. Each module also declares `NUM_GATES`,
`NUM_GARBAGE`, `NUM_CONST_INPUTS` and `QUANTUM_COST` as localparams. The
quantum cost is summed from the `rev_pkg` gate costs, so it follows any change
of gate.

## Where this RTL departs from the source analysis

- **Equality polarity.** The analysis defines equality as XNOR. Some of its
  circuit drawings label that output "A xor B" without the bar. The networks
  above produce XNOR, and the RTL follows the equation.
- **Fan-out.** The analysis states that reversible circuits must not use
  fan-out. Yet three of its networks have more outputs (garbage plus three
  results) than inputs plus constants, so an operand must branch. The RTL
  branches them as plain wires (A in the Toffoli and Peres variants, B in the
  Fredkin variant). The garbage and constant counts are those published.
- **Inner wiring.** For the Toffoli, Fredkin and TR variants, the published
  material fixes the gates, the constants, the order of the final outputs and
  the garbage lines. Where the route of an inner line was not determined, it
  was chosen to give the stated outputs. For the Peres variant only the gate
  list and the counts are published. Its wiring is this design's own,
  chosen to meet them.
- **Constant inputs.** Each variant uses one constant 1 and one constant 0,
  which matches the published count of two.
- **Not included.** The conventional comparators that the proposed ones are
  measured against are not included. They are built from Feynman, Peres,
  Toffoli, Fredkin and TR gates plus the BJN gate, with quantum costs 10, 16,
  23 and 12. The gate-level irreversible comparator (NOT, AND, XNOR) is not
  included either. Its three equations serve as the reference model in every
  testbench.
- **Timing.** None is specified. All modules are combinational, with no
  clock and no reset.

## Verification

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each one ends
by printing `TB_RESULT checks=N failures=M`:

- **Gate tests:** all input patterns are checked against the gate equations,
  and the outputs are checked to be all distinct (reversibility). The BVF test
  also checks that the gate is its own inverse.
- **Comparator tests:** all four (A, B) pairs are checked against the
  irreversible equations. They also check that exactly one result is set,
  that each garbage line has its expected value, and that the four
  localparams equal the published figures.
- **Top test** (`tb_rev_comparator_top`): it runs all pairs and then 200
  random ones. It checks every variant against the reference and against the
  others. It counts how often each variant reported A>B, A=B and A<B, and
  fails if any outcome never occurred.

All testbenches pass. Each one also fails when one equation or wire of its
module is deliberately broken.

Running one with plain Verilator (from the directory that holds `rtl/` and
`tb/`):

    verilator --binary --timing --assert -Irtl rtl/rev_pkg.sv \
        tb/tb_rev_comparator_top.sv --top-module tb_rev_comparator_top \
        -Mdir obj -o sim
    ./obj/sim

Swap in any other `tb_<module>` to test a single gate or comparator.

## Changing the design

- To try another product-term gate, add a module with the same `a b c / p q r`
  port style and a `QC_*` constant in `rev_pkg`. Then write a new
  `cmp1_<gate>_bvf` that reuses the pattern above: one line carries the
  product term, one carries A^B, and the BVF gate's first pair forms the
  equality.
- A multi-bit comparator is not part of this design. The one-bit `cmp_t`
  results are the usual inputs to a cascaded or tree comparator.
