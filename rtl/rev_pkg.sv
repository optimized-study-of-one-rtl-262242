// rev_pkg: types and constants shared by the reversible-gate comparators.
//
// cmp_t bundles the three results of a one-bit magnitude comparator
// (A>B, A=B, A<B). The QC_* constants are the quantum costs of the
// reversible gates as the source analysis states them; they are bookkeeping
// only and change no logic. Each comparator derives its own total cost from
// these constants so that a test can hold it against the published figure.
package rev_pkg;

  typedef struct packed {
    logic gt;  // A > B, equals A & ~B
    logic eq;  // A = B, equals ~(A ^ B)
    logic lt;  // A < B, equals ~A & B
  } cmp_t;

  // Quantum cost of each reversible gate.
  localparam int unsigned QC_FEYNMAN        = 1;
  localparam int unsigned QC_DOUBLE_FEYNMAN = 2;
  localparam int unsigned QC_TOFFOLI        = 5;
  localparam int unsigned QC_FREDKIN        = 5;
  localparam int unsigned QC_PERES          = 4;
  localparam int unsigned QC_TR             = 4;
  localparam int unsigned QC_BVF            = 2;

endpackage
