// toffoli_gate: 3x3 reversible Toffoli (controlled-controlled-NOT) gate.
//
// Maps (A, B, C) to (P, Q, R) = (A, B, (A & B) ^ C): the target C is
// inverted when both controls are 1. With C = 0 the R output is the AND of
// A and B. It is its own inverse.
// The map and the quantum cost are the published definition of the gate;
// only its classical truth table is modelled, not its quantum realisation.
// Purely combinational, no clock. Quantum cost 5 (rev_pkg::QC_TOFFOLI).
module toffoli_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  always_comb begin
    p = a;
    q = b;
    r = (a & b) ^ c;
  end
endmodule
