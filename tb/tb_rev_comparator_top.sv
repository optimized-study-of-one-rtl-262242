// tb_rev_comparator_top: end-to-end test of the four comparators side by side.
//
// Drives the shared operands with every (A, B) pair and then with 200
// pseudo-random pairs. For each pair it checks every variant's {gt, eq, lt}
// against the irreversible comparator (gt = AB', eq = XNOR, lt = A'B)
// evaluated here, that the four variants agree with one another, and that
// each garbage bus has the published width. It counts how often each variant
// reported each of the three outcomes and fails if any outcome never
// occurred. The top has no parameters, so this runs the design at its only
// size. A watchdog on a free-running testbench clock ends a stalled run.
module tb_rev_comparator_top;
  import rev_pkg::*;

  localparam int NVAR = 4;
  localparam int NRANDOM = 200;

  logic clk = 1'b0;
  logic a, b;
  cmp_t res_peres, res_toffoli, res_fredkin, res_tr;
  logic [1:0] garbage_peres, garbage_toffoli;
  logic [2:0] garbage_fredkin;
  logic [0:0] garbage_tr;
  int   checks = 0;
  int   failures = 0;
  int   n_gt [NVAR];
  int   n_eq [NVAR];
  int   n_lt [NVAR];
  string name [NVAR] = '{"Peres", "Toffoli", "Fredkin", "TR"};

  rev_comparator_top dut (
    .a(a), .b(b),
    .res_peres(res_peres), .res_toffoli(res_toffoli),
    .res_fredkin(res_fredkin), .res_tr(res_tr),
    .garbage_peres(garbage_peres), .garbage_toffoli(garbage_toffoli),
    .garbage_fredkin(garbage_fredkin), .garbage_tr(garbage_tr)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NRANDOM + 100) @(posedge clk);
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL a=%b b=%b: %s", a, b, what);
    end
  endtask

  task automatic apply(input logic va, input logic vb);
    cmp_t ref_res;
    cmp_t got [NVAR];
    a = va;
    b = vb;
    @(posedge clk);
    ref_res.gt = va & !vb;
    ref_res.eq = va == vb;
    ref_res.lt = !va & vb;
    got = '{res_peres, res_toffoli, res_fredkin, res_tr};
    for (int i = 0; i < NVAR; i++) begin
      check(got[i] == ref_res, $sformatf("%s variant gave %b expected %b", name[i], got[i], ref_res));
      check(got[i] == got[0], $sformatf("%s variant disagrees with Peres variant", name[i]));
      n_gt[i] += int'(got[i].gt);
      n_eq[i] += int'(got[i].eq);
      n_lt[i] += int'(got[i].lt);
    end
  endtask

  initial begin : stimulus
    for (int i = 0; i < NVAR; i++) begin
      n_gt[i] = 0;
      n_eq[i] = 0;
      n_lt[i] = 0;
    end
    // Garbage bus widths are the published garbage counts.
    check($bits(garbage_peres) == 2, "Peres garbage width");
    check($bits(garbage_toffoli) == 2, "Toffoli garbage width");
    check($bits(garbage_fredkin) == 3, "Fredkin garbage width");
    check($bits(garbage_tr) == 1, "TR garbage width");
    for (int v = 0; v < 4; v++) apply(v[1], v[0]);
    for (int n = 0; n < NRANDOM; n++) apply(1'($urandom), 1'($urandom));
    for (int i = 0; i < NVAR; i++) begin
      $display("%-8s A>B %0d times, A=B %0d times, A<B %0d times", name[i], n_gt[i], n_eq[i], n_lt[i]);
      check(n_gt[i] > 0, $sformatf("%s variant never reported A>B", name[i]));
      check(n_eq[i] > 0, $sformatf("%s variant never reported A=B", name[i]));
      check(n_lt[i] > 0, $sformatf("%s variant never reported A<B", name[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
