// tb_cmp1_fredkin_bvf: exhaustive self-checking test of the double Feynman + Fredkin + BVF reversible comparator.
//
// Drives all four (A, B) pairs and compares {gt, eq, lt} with the ordinary
// irreversible comparator (gt = AB', eq = XNOR(A, B), lt = A'B) evaluated in
// the testbench. It also checks that exactly one result is set, that the
// garbage lines carry the values the gate network leaves on them, and that
// the module's gate count, garbage count, constant-input count and quantum
// cost equal the published figures (3 garbage, quantum cost 9).
// A watchdog on a free-running testbench clock ends a stalled run.
module tb_cmp1_fredkin_bvf;
  import rev_pkg::*;

  logic clk = 1'b0;
  logic a, b;
  cmp_t res;
  logic [3-1:0] garbage, exp_garbage;
  int   checks = 0;
  int   failures = 0;

  cmp1_fredkin_bvf dut (.a(a), .b(b), .res(res), .garbage(garbage));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
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

  initial begin : stimulus
    cmp_t ref_res;
    check(dut.NUM_GATES == 3, "gate count");
    check(dut.NUM_GARBAGE == 3 && $bits(garbage) == 3, "garbage count");
    check(dut.NUM_CONST_INPUTS == 2, "constant-input count");
    check(dut.QUANTUM_COST == 9, "quantum cost");
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      @(posedge clk);
      ref_res.gt = a & !b;
      ref_res.eq = a == b;
      ref_res.lt = !a & b;
      exp_garbage = {!a, a & b, a};
      check(res == ref_res, $sformatf("res gt/eq/lt=%b expected %b", res, ref_res));
      check($onehot(res), "results not one-hot");
      check(garbage == exp_garbage, $sformatf("garbage=%b expected %b", garbage, exp_garbage));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
