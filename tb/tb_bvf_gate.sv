// tb_bvf_gate: exhaustive self-checking test of bvf_gate
// (P=A, Q=A^B, R=C, S=C^D).
//
// Applies all sixteen input patterns, compares the outputs with the gate's
// equations evaluated here, checks that the map is a bijection, and applies
// the gate twice in a row to confirm that it is its own inverse.
// A watchdog ends a stalled run.
module tb_bvf_gate;
  logic clk = 1'b0;
  logic a, b, c, d, p, q, r, s;
  int   checks = 0;
  int   failures = 0;
  bit   seen [16];
  logic [3:0] first [16];

  bvf_gate dut (.a(a), .b(b), .c(c), .d(d), .p(p), .q(q), .r(r), .s(s));

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
    for (int v = 0; v < 16; v++) begin
      {a, b, c, d} = 4'(v);
      @(posedge clk);
      first[v] = {p, q, r, s};
      checks++;
      if ({p, q, r, s} !== {a, a != b, c, c != d}) begin
        failures++;
        $display("FAIL abcd=%b%b%b%b: pqrs=%b%b%b%b", a, b, c, d, p, q, r, s);
      end
      checks++;
      if (seen[{p, q, r, s}]) begin
        failures++;
        $display("FAIL abcd=%b%b%b%b: output repeated, not reversible", a, b, c, d);
      end
      seen[{p, q, r, s}] = 1'b1;
    end
    // Self-inverse: feeding an output pattern back in returns the input.
    for (int v = 0; v < 16; v++) begin
      {a, b, c, d} = first[v];
      @(posedge clk);
      checks++;
      if ({p, q, r, s} !== 4'(v)) begin
        failures++;
        $display("FAIL inverse of %b gave %b%b%b%b", 4'(v), p, q, r, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
