// tb_feynman_gate: exhaustive self-checking test of feynman_gate (P=A, Q=A^B).
//
// Applies all four input patterns, compares P and Q with the controlled-NOT
// equations evaluated here, and checks that the four output patterns are all
// different (the gate is reversible). A watchdog ends a stalled run.
module tb_feynman_gate;
  logic clk = 1'b0;
  logic a, b, p, q;
  int   checks = 0;
  int   failures = 0;
  bit   seen [4];

  feynman_gate dut (.a(a), .b(b), .p(p), .q(q));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    foreach (seen[i]) seen[i] = 1'b0;
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      @(posedge clk);
      checks++;
      if ({p, q} !== {a, a != b}) begin
        failures++;
        $display("FAIL ab=%b%b: pq=%b%b", a, b, p, q);
      end
      checks++;
      if (seen[{p, q}]) begin
        failures++;
        $display("FAIL ab=%b%b: output %b%b repeated, not reversible", a, b, p, q);
      end
      seen[{p, q}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
