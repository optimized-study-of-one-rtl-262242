// cmp1_tr_bvf: one-bit magnitude comparator from a Feynman, a TR and a BVF gate.
//
// The cheapest of the four reversible comparators: 3 gates, 1 garbage output,
// 2 constant inputs, quantum cost 1 + 4 + 2 = 7. It needs no fan-out:
//   Feynman(B, 1)        -> (B, B')
//   TR(A, B, 0)          -> (A, A^B, AB')          AB' is the A>B result
//   BVF(A, B', AB', A^B) -> (A, A XNOR B, AB', A'B)
// BVF's first line gives the equality A ^ B' and its second pair recovers
// A<B as AB' ^ A ^ B = A'B, the identity the A<B output is built on.
// The gates, constants, garbage count and outputs follow the published circuit;
// how the lines between the gates are routed was chosen here so that the
// printed outputs appear.
// Interface: operands a, b; res = {gt, eq, lt}; garbage[0] = G1 (a copy of A).
// Timing: purely combinational, no clock or reset.
module cmp1_tr_bvf
  import rev_pkg::*;
(
  input  logic       a,
  input  logic       b,
  output cmp_t       res,
  output logic [0:0] garbage
);
  localparam int unsigned NUM_GATES        = 3;
  localparam int unsigned NUM_GARBAGE      = 1;
  localparam int unsigned NUM_CONST_INPUTS = 2;
  localparam int unsigned QUANTUM_COST     = QC_FEYNMAN + QC_TR + QC_BVF;

  logic fg_p, fg_q;          // B, B'
  logic tr_p, tr_q, tr_r;    // A, A^B, AB'

  feynman_gate u_fg (.a(b), .b(1'b1), .p(fg_p), .q(fg_q));
  tr_gate      u_tr (.a(a), .b(fg_p), .c(1'b0), .p(tr_p), .q(tr_q), .r(tr_r));
  bvf_gate     u_bvf (
    .a(tr_p), .b(fg_q), .c(tr_r), .d(tr_q),
    .p(garbage[0]), .q(res.eq), .r(res.gt), .s(res.lt)
  );
endmodule
