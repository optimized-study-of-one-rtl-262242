// double_feynman_gate: 3x3 reversible double Feynman gate (F2G, also DFG).
//
// Maps (A, B, C) to (P, Q, R) = (A, A ^ B, A ^ C): one control line A
// steering two controlled-NOTs. It is its own inverse. In the comparators it
// produces A ^ B and a complemented copy of one operand (C = 1) in one gate.
// The map and the quantum cost are the published definition of the gate;
// only its classical truth table is modelled, not its quantum realisation.
// Purely combinational, no clock. Quantum cost 2 (rev_pkg::QC_DOUBLE_FEYNMAN).
module double_feynman_gate (
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
    r = a ^ c;
  end
endmodule
