// peres_gate: 3x3 reversible Peres gate.
//
// Maps (A, B, C) to (P, Q, R) = (A, A ^ B, (A & B) ^ C), a Toffoli gate
// followed by a Feynman gate on the first two lines. With C = 0 it yields
// both A ^ B and A & B. Unlike the Toffoli and Feynman gates it is not its
// own inverse, but it is a bijection.
// The map and the quantum cost are the published definition of the gate;
// only its classical truth table is modelled, not its quantum realisation.
// Purely combinational, no clock. Quantum cost 4 (rev_pkg::QC_PERES).
module peres_gate (
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
    r = (a & b) ^ c;
  end
endmodule
