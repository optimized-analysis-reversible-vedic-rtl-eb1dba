// hng_gate_tb: exhaustive self-check of the HNG gate.
// For all 16 input vectors: P = A, Q = B, R = (A + B + C) mod 2 and
// S = majority(A, B, C) xor D, computed from integer sums. With D = 0 the
// pair {S, R} must equal A + B + C (full adder). The 16 output vectors must
// all differ (reversibility). Watchdog ends the run after 10 us.
module hng_gate_tb;
  int unsigned checks = 0, failures = 0;
  logic a, b, c, d, p, q, r, s;
  bit seen [16];

  hng_gate dut (.a(a), .b(b), .c(c), .d(d), .p(p), .q(q), .r(r), .s(s));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: abcd=%0b%0b%0b%0b -> pqrs=%0b%0b%0b%0b", what, a, b, c, d, p, q, r, s);
    end
  endtask

  initial begin
    foreach (seen[i]) seen[i] = 1'b0;
    for (int v = 0; v < 16; v++) begin
      int sum;
      {a, b, c, d} = 4'(v);
      sum = int'(a) + int'(b) + int'(c);
      #1;
      check(p == a && q == b, "P, Q pass-through");
      check(int'(r) == sum % 2, "R");
      check(int'(s) == (((sum >= 2) ? 1 : 0) + int'(d)) % 2, "S");
      if (!d) check(int'({s, r}) == sum, "full adder");
      check(!seen[{p, q, r, s}], "reversible (outputs distinct)");
      seen[{p, q, r, s}] = 1'b1;
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
