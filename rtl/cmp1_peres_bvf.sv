// cmp1_peres_bvf: one-bit magnitude comparator from a double Feynman, a Peres
// and a BVF gate.
//
// 3 gates, 2 garbage outputs, 2 constant inputs, quantum cost 2 + 4 + 2 = 8.
//   DFG(B, A, 1)             -> (B, A^B, B')            B is garbage G1
//   Peres(A, B', 0)          -> (A, A XNOR B, AB')      AB' is A>B
//   BVF(XNOR, A, AB', A^B)   -> (A XNOR B, B', AB', A'B)   B' is garbage G2
// The Peres gate's second line already carries the equality A ^ B'; BVF
// passes it through and forms A<B as AB' ^ A ^ B = A'B. Operand A feeds both
// the DFG and the Peres gate (one fan-out branch), as in the Toffoli variant.
// Only the gate list and the counts above are published for this variant;
// the wiring between the gates is this design's own, chosen to meet them.
// Interface: operands a, b; res = {gt, eq, lt}; garbage[0] = G1, garbage[1] = G2.
// Timing: purely combinational, no clock or reset.
module cmp1_peres_bvf
  import rev_pkg::*;
(
  input  logic       a,
  input  logic       b,
  output cmp_t       res,
  output logic [1:0] garbage
);
  localparam int unsigned NUM_GATES        = 3;
  localparam int unsigned NUM_GARBAGE      = 2;
  localparam int unsigned NUM_CONST_INPUTS = 2;
  localparam int unsigned QUANTUM_COST     = QC_DOUBLE_FEYNMAN + QC_PERES + QC_BVF;

  logic dfg_q, dfg_r;        // A^B, B'
  logic pg_p, pg_q, pg_r;    // A, A XNOR B, AB'

  double_feynman_gate u_dfg (.a(b), .b(a), .c(1'b1), .p(garbage[0]), .q(dfg_q), .r(dfg_r));
  peres_gate          u_pg  (.a(a), .b(dfg_r), .c(1'b0), .p(pg_p), .q(pg_q), .r(pg_r));
  bvf_gate            u_bvf (
    .a(pg_q), .b(pg_p), .c(pg_r), .d(dfg_q),
    .p(res.eq), .q(garbage[1]), .r(res.gt), .s(res.lt)
  );
endmodule
