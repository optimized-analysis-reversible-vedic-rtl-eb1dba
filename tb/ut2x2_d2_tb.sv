// ut2x2_d2_tb: self-check of the 2x2 reversible multiplier, design 2
// (BVPPG, two Peres gates, an NFT gate and a Feynman gate).
// Part 1 replays the four operand pairs of the published 2x2 simulation
// (01*10, 11*10, 00*01, 11*11, giving 0010, 0110, 0000, 1001). Part 2 runs all
// 16 operand pairs against integer multiplication, checks the garbage outputs
// against the values the gate equations give, and checks that the complete
// output (product and garbage) differs for every input, as a reversible circuit
// must. Part 3 checks the gate, constant, garbage and quantum-cost counts the
// package's cost model gives for this design (5, 5, 4, 24). Watchdog ends the run after 10 us.
module ut2x2_d2_tb;
  import rev_pkg::*;
  int unsigned checks = 0, failures = 0;
  logic [1:0] a, b;
  logic [3:0] q;
  logic [4-1:0] garb;
  logic i1;
  bit seen [int];

  ut2x2_d2 dut (.a(a), .b(b), .q(q), .garbage(garb), .i1_unused(i1));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: a=%b b=%b -> q=%b", what, a, b, q);
    end
  endtask

  initial begin
    static logic [1:0] va [4] = '{2'b01, 2'b11, 2'b00, 2'b11};
    static logic [1:0] vb [4] = '{2'b10, 2'b10, 2'b01, 2'b11};
    static logic [3:0] vq [4] = '{4'b0010, 4'b0110, 4'b0000, 4'b1001};
    rev_cost_t c;
    for (int i = 0; i < 4; i++) begin
      a = va[i]; b = vb[i];
      #1;
      check(q == vq[i], "published vector");
    end
    for (int v = 0; v < 16; v++) begin
      {a, b} = 4'(v);
      #1;
      check(int'(q) == int'(a) * int'(b), "product");
      check(garb == {a[0] & b[1], a[1] ^ b[1], a[1], a[1] ^ b[0]} && i1 == a[0], "garbage outputs");
      check(!seen.exists(int'({q, garb, i1})), "outputs distinct");
      seen[int'({q, garb, i1})] = 1'b1;
    end
    c = ut2_cost(UT2_DESIGN2);
    check(c.ng == 5 && c.ci == 5, "gate and constant count");
    check(c.go == 4 && c.qc == 24, "garbage count and quantum cost");
    check(trlic(c) == 38, "TRLIC");
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
