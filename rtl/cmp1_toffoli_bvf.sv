// cmp1_toffoli_bvf: one-bit magnitude comparator from a double Feynman, a
// Toffoli and a BVF gate.
//
// 3 gates, 2 garbage outputs, 2 constant inputs, quantum cost 2 + 5 + 2 = 9.
//   DFG(B, A, 1)            -> (B, A^B, B')       B is garbage G1
//   Toffoli(A, A^B, 0)      -> (A, A^B, AB')      A(A^B) = AB' is A>B
//   BVF(A, B', AB', A^B)    -> (A, A XNOR B, AB', A'B)   A is garbage G2
// Operand A is used twice (by the DFG and by the Toffoli gate), so this
// circuit has one fan-out branch; the published drawing has it too, as a wire
// from the inputs over the DFG to the Toffoli gate.
// The gates, constants, garbage count and output order follow the published
// circuit; the routing of the inner lines was chosen here to produce the
// printed outputs.
// Interface: operands a, b; res = {gt, eq, lt}; garbage[0] = G1, garbage[1] = G2.
// Timing: purely combinational, no clock or reset.
module cmp1_toffoli_bvf
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
  localparam int unsigned QUANTUM_COST     = QC_DOUBLE_FEYNMAN + QC_TOFFOLI + QC_BVF;

  logic dfg_q, dfg_r;        // A^B, B'
  logic tg_p, tg_q, tg_r;    // A, A^B, AB'

  double_feynman_gate u_dfg (.a(b), .b(a), .c(1'b1), .p(garbage[0]), .q(dfg_q), .r(dfg_r));
  toffoli_gate        u_tg  (.a(a), .b(dfg_q), .c(1'b0), .p(tg_p), .q(tg_q), .r(tg_r));
  bvf_gate            u_bvf (
    .a(tg_p), .b(dfg_r), .c(tg_r), .d(tg_q),
    .p(garbage[1]), .q(res.eq), .r(res.gt), .s(res.lt)
  );
endmodule
