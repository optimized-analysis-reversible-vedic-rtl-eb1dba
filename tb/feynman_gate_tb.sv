// feynman_gate_tb: exhaustive self-check of the Feynman gate.
// Applies all 4 input vectors, checks P = A and Q = A xor B (Q written as
// "A differs from B"), and checks that the gate is reversible: the 4 output
// vectors are all different. Also checks the fan-out use (B = 0 copies A) and
// the inverter use (B = 1 complements A). Watchdog ends the run after 10 us.
module feynman_gate_tb;
  int unsigned checks = 0, failures = 0;
  logic a, b, p, q;
  bit seen [4];

  feynman_gate dut (.a(a), .b(b), .p(p), .q(q));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: a=%0b b=%0b -> p=%0b q=%0b", what, a, b, p, q);
    end
  endtask

  initial begin
    foreach (seen[i]) seen[i] = 1'b0;
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      check(p == a, "P");
      check(q == (a != b), "Q");
      if (b == 1'b0) check(q == a, "fan-out copy");
      else           check(q == !a, "inverter");
      check(!seen[{p, q}], "reversible (outputs distinct)");
      seen[{p, q}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10us;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
