// bvf_gate: 4x4 reversible BVF gate.
//
// Maps (A, B, C, D) to (P, Q, R, S) = (A, A ^ B, C, C ^ D): two independent
// controlled-NOTs, A onto B and C onto D, in one gate. It is its own
// inverse. It is the final stage of every comparator in this design, where it
// turns the terms produced upstream into the A=B and A<B results.
// The map and the quantum cost are the published definition of the gate;
// only its classical truth table is modelled, not its quantum realisation.
// Purely combinational, no clock. Quantum cost 2 (rev_pkg::QC_BVF).
module bvf_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  always_comb begin
    p = a;
    q = a ^ b;
    r = c;
    s = c ^ d;
  end
endmodule
