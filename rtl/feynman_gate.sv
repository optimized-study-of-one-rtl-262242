// feynman_gate: 2x2 reversible Feynman (controlled-NOT) gate.
//
// Maps (A, B) to (P, Q) = (A, A ^ B). A is the control line and passes
// unchanged; B is inverted when A is 1. The map is its own inverse, so the
// inputs can always be recovered from the outputs. The comparators use it
// to make a copy of a signal (B = 0) or its complement (B = 1).
// The map and the quantum cost are the published definition of the gate;
// only its classical truth table is modelled, not its quantum realisation.
// Purely combinational, no clock. Quantum cost 1 (rev_pkg::QC_FEYNMAN).
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  always_comb begin
    p = a;
    q = a ^ b;
  end
endmodule
