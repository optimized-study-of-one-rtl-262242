// tr_gate: 3x3 reversible TR gate.
//
// Maps (A, B, C) to (P, Q, R) = (A, A ^ B, (A & ~B) ^ C). With C = 0 it
// gives A ^ B and A & ~B (the "A greater than B" term of a comparator) from
// one gate. It is a bijection on the eight input patterns.
// The map and the quantum cost are the published definition of the gate;
// only its classical truth table is modelled, not its quantum realisation.
// Purely combinational, no clock. Quantum cost 4 (rev_pkg::QC_TR).
module tr_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  always_comb begin
    p = a;
    q = a ^ b;
    r = (a & ~b) ^ c;
  end
endmodule
