// nft_gate_tb: exhaustive self-check of the NFT gate.
// For all 8 input vectors the outputs are compared with a truth table worked
// out case by case (C = 0: Q = R = A; C = 1: Q = not B, R = B), P = A xor B,
// and the 8 output vectors must all differ (reversibility). With A = 0 the
// gate must give P = B, Q = (not B) and C, R = B and C, the use made of it in
// the 2x2 multiplier. Watchdog ends the run after 10 us.
module nft_gate_tb;
  int unsigned checks = 0, failures = 0;
  logic a, b, c, p, q, r;
  bit seen [8];

  nft_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

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
      logic eq, er;
      {a, b, c} = 3'(v);
      if (c) begin eq = !b; er = b; end
      else   begin eq = a;  er = a; end
      #1;
      check(p == (a != b), "P");
      check(q == eq, "Q");
      check(r == er, "R");
      if (!a) check(p == b && q == (!b && c) && r == (b && c), "A=0 use");
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
