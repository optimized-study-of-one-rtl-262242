// cmp1_fredkin_bvf: one-bit magnitude comparator from a double Feynman, a
// Fredkin and a BVF gate.
//
// 3 gates, 3 garbage outputs, 2 constant inputs, quantum cost 2 + 5 + 2 = 9.
//   DFG(A, B, 1)            -> (A, A^B, A')
//   Fredkin(A, B, 0)        -> (A, A'B, AB)          A is G1, AB is G2
//   BVF(A', B, A'B, A^B)    -> (A', A XNOR B, A'B, AB')   A' is G3
// With its third line at 0 the controlled swap yields A'B (A<B) directly;
// BVF forms the equality as A' ^ B and A>B as A'B ^ A ^ B = AB'. Operand B
// feeds the DFG, the Fredkin gate and the BVF gate (two fan-out branches);
// the published drawing shows two wires routed over the top to those gates.
// The gates, constants, garbage count and output order follow the published
// circuit; the routing of the inner lines was chosen here to produce the
// printed outputs. The DFG's first output (A) is the Fredkin control.
// Interface: operands a, b; res = {gt, eq, lt}; garbage[i-1] = Gi.
// Timing: purely combinational, no clock or reset.
module cmp1_fredkin_bvf
  import rev_pkg::*;
(
  input  logic       a,
  input  logic       b,
  output cmp_t       res,
  output logic [2:0] garbage
);
  localparam int unsigned NUM_GATES        = 3;
  localparam int unsigned NUM_GARBAGE      = 3;
  localparam int unsigned NUM_CONST_INPUTS = 2;
  localparam int unsigned QUANTUM_COST     = QC_DOUBLE_FEYNMAN + QC_FREDKIN + QC_BVF;

  logic dfg_p, dfg_q, dfg_r; // A, A^B, A'
  logic fr_q;                // A'B

  double_feynman_gate u_dfg (.a(a), .b(b), .c(1'b1), .p(dfg_p), .q(dfg_q), .r(dfg_r));
  fredkin_gate        u_fr  (.a(dfg_p), .b(b), .c(1'b0), .p(garbage[0]), .q(fr_q), .r(garbage[1]));
  bvf_gate            u_bvf (
    .a(dfg_r), .b(b), .c(fr_q), .d(dfg_q),
    .p(garbage[2]), .q(res.eq), .r(res.lt), .s(res.gt)
  );
endmodule
