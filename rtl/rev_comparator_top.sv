// rev_comparator_top: the four reversible one-bit comparators side by side.
//
// Each variant ends in a BVF gate and differs in the gate that forms the
// A>B or A<B product term: Peres, Toffoli, Fredkin or TR. All four take the
// same operands a and b and bring out their own {gt, eq, lt} result and
// garbage lines, so that they can be compared with one another. Their costs:
//   variant   gates  garbage  constants  quantum cost
//   Peres       3       2         2            8
//   Toffoli     3       2         2            9
//   Fredkin     3       3         2            9
//   TR          3       1         2            7
// The four variants and their figures follow the published analysis; placing
// them together in one top is this design's own arrangement.
// Timing: purely combinational, no clock or reset.
module rev_comparator_top
  import rev_pkg::*;
(
  input  logic       a,
  input  logic       b,
  output cmp_t       res_peres,
  output cmp_t       res_toffoli,
  output cmp_t       res_fredkin,
  output cmp_t       res_tr,
  output logic [1:0] garbage_peres,
  output logic [1:0] garbage_toffoli,
  output logic [2:0] garbage_fredkin,
  output logic [0:0] garbage_tr
);
  cmp1_peres_bvf   u_peres   (.a(a), .b(b), .res(res_peres),   .garbage(garbage_peres));
  cmp1_toffoli_bvf u_toffoli (.a(a), .b(b), .res(res_toffoli), .garbage(garbage_toffoli));
  cmp1_fredkin_bvf u_fredkin (.a(a), .b(b), .res(res_fredkin), .garbage(garbage_fredkin));
  cmp1_tr_bvf      u_tr      (.a(a), .b(b), .res(res_tr),      .garbage(garbage_tr));
endmodule
