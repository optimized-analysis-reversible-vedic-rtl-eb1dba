// bvppg_gate_tb: exhaustive self-check of the BVPPG gate.
// For all 32 input vectors: P = A, Q = B, S = D, R = (A*B + C) mod 2 and
// T = (A*D + E) mod 2 from integer arithmetic. With C = E = 0 the gate must
// produce the two partial products A*B and A*D. The 32 output vectors must all
// differ (reversibility). Watchdog ends the run after 10 us.
module bvppg_gate_tb;
  int unsigned checks = 0, failures = 0;
  logic a, b, c, d, e, p, q, r, s, t;
  bit seen [32];

  bvppg_gate dut (.a(a), .b(b), .c(c), .d(d), .e(e), .p(p), .q(q), .r(r), .s(s), .t(t));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: abcde=%0b%0b%0b%0b%0b -> pqrst=%0b%0b%0b%0b%0b",
               what, a, b, c, d, e, p, q, r, s, t);
    end
  endtask

  initial begin
    foreach (seen[i]) seen[i] = 1'b0;
    for (int v = 0; v < 32; v++) begin
      {a, b, c, d, e} = 5'(v);
      #1;
      check(p == a && q == b && s == d, "pass-through outputs");
      check(int'(r) == (int'(a) * int'(b) + int'(c)) % 2, "R");
      check(int'(t) == (int'(a) * int'(d) + int'(e)) % 2, "T");
      if (!c && !e) check(int'(r) == int'(a) * int'(b) && int'(t) == int'(a) * int'(d),
                          "partial products");
      check(!seen[{p, q, r, s, t}], "reversible (outputs distinct)");
      seen[{p, q, r, s, t}] = 1'b1;
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
