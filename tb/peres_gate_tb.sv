// peres_gate_tb: exhaustive self-check of the Peres gate.
// For all 8 input vectors: P = A, Q = A xor B and R = AB xor C, with the
// expected values taken from integer arithmetic (A + B mod 2, A * B mod 2).
// With C = 0 the pair {R, Q} must equal A + B (half adder). The 8 output
// vectors must all differ (reversibility). Watchdog ends the run after 10 us.
module peres_gate_tb;
  int unsigned checks = 0, failures = 0;
  logic a, b, c, p, q, r;
  bit seen [8];

  peres_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: a=%0b b=%0b c=%0b -> p=%0b q=%0b r=%0b", what, a, b, c, p, q, r);
    end
  endtask

  initial begin
    foreach (seen[i]) seen[i] = 1'b0;
    for (int v = 0; v < 8; v++) begin
      int ia, ib, ic;
      {a, b, c} = 3'(v);
      ia = int'(a); ib = int'(b); ic = int'(c);
      #1;
      check(int'(p) == ia, "P");
      check(int'(q) == (ia + ib) % 2, "Q");
      check(int'(r) == (ia * ib + ic) % 2, "R");
      if (c == 1'b0) check(int'({r, q}) == ia + ib, "half adder");
      check(!seen[{p, q, r}], "reversible (outputs distinct)");
      seen[{p, q, r}] = 1'b1;
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
