// fredkin_gate: 3x3 reversible Fredkin (controlled-swap) gate.
//
// Maps (A, B, C) to (P, Q, R) = (A, A'B ^ AC, A'C ^ AB): when the control A
// is 0 the lines B and C pass straight through, when A is 1 they are
// swapped. The gate is conservative (it keeps the number of ones) and is its
// own inverse. With C = 0, Q is A'B and R is AB.
// The map and the quantum cost are the published definition of the gate;
// only its classical truth table is modelled, not its quantum realisation.
// Purely combinational, no clock. Quantum cost 5 (rev_pkg::QC_FREDKIN).
module fredkin_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  always_comb begin
    p = a;
    q = (~a & b) ^ (a & c);
    r = (~a & c) ^ (a & b);
  end
endmodule
