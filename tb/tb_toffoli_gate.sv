// tb_toffoli_gate: exhaustive self-checking test of toffoli_gate (P=A, Q=B, R=AB^C).
//
// Applies all eight input patterns, compares P, Q and R with the gate's
// defining equations evaluated here in the testbench, and checks that the
// eight output patterns are all different, i.e. that the gate is reversible.
// A watchdog on a free-running testbench clock ends the run if it stalls.
module tb_toffoli_gate;
  logic clk = 1'b0;
  logic a, b, c, p, q, r;
  int   checks = 0;
  int   failures = 0;
  bit   seen [8];

  toffoli_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    logic ep, eq, er;
    foreach (seen[i]) seen[i] = 1'b0;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      @(posedge clk);
      ep = a;
      eq = b;
      er = (a & b) ^ c;
      checks++;
      if ({p, q, r} !== {ep, eq, er}) begin
        failures++;
        $display("FAIL abc=%b%b%b: pqr=%b%b%b expected %b%b%b", a, b, c, p, q, r, ep, eq, er);
      end
      checks++;
      if (seen[{p, q, r}]) begin
        failures++;
        $display("FAIL abc=%b%b%b: output %b%b%b already produced, not reversible", a, b, c, p, q, r);
      end
      seen[{p, q, r}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
