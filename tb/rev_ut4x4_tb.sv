// rev_ut4x4_tb: self-check of the 4x4 reversible multiplier with both 2x2
// cores (DESIGN 1 and DESIGN 2 are two instances).
// Part 1 replays the nine operand pairs of the published 4x4 simulation
// (2*4, 3*2, 12*6, 13*7, 13*8, 15*11, 15*1, 12*13, 6*11). Part 2 runs all 256
// operand pairs against integer multiplication and checks that the complete
// output (product and garbage) differs for every input, as it must for a
// reversible circuit whose constant inputs are fixed. Part 3 checks the cost
// model against the published totals: design 1 has 33 gates, 33 constants,
// 43 garbage outputs, quantum cost 164; design 2 has 33, 33, 39, 168; both
// have TRLIC 273. Watchdog ends the run after 100 us.
module rev_ut4x4_tb;
  import rev_pkg::*;
  int unsigned checks = 0, failures = 0;
  logic [3:0] a, b;
  logic [7:0] q1, q2;
  logic [42:0] g1, g2;
  bit seen1 [logic [50:0]];
  bit seen2 [logic [50:0]];

  rev_ut4x4 #(.DESIGN(UT2_DESIGN1)) dut1 (.a(a), .b(b), .q(q1), .garbage(g1));
  rev_ut4x4 #(.DESIGN(UT2_DESIGN2)) dut2 (.a(a), .b(b), .q(q2), .garbage(g2));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: a=%0d b=%0d -> d1 %0d, d2 %0d", what, a, b, q1, q2);
    end
  endtask

  static logic [3:0] va [9] = '{4'b0010, 4'b0011, 4'b1100, 4'b1101, 4'b1101,
                                4'b1111, 4'b1111, 4'b1100, 4'b0110};
  static logic [3:0] vb [9] = '{4'b0100, 4'b0010, 4'b0110, 4'b0111, 4'b1000,
                                4'b1011, 4'b0001, 4'b1101, 4'b1011};
  static logic [7:0] vq [9] = '{8'b00001000, 8'b00000110, 8'b01001000, 8'b01011011,
                                8'b01101000, 8'b10100101, 8'b00001111, 8'b10011100,
                                8'b01000010};

  initial begin
    rev_cost_t c;
    for (int i = 0; i < 9; i++) begin
      a = va[i]; b = vb[i];
      #1;
      check(q1 == vq[i] && q2 == vq[i], "published vector");
    end
    for (int v = 0; v < 256; v++) begin
      {a, b} = 8'(v);
      #1;
      check(int'(q1) == int'(a) * int'(b), "design 1 product");
      check(int'(q2) == int'(a) * int'(b), "design 2 product");
      check(!seen1.exists({q1, g1}) && !seen2.exists({q2, g2}), "outputs distinct");
      seen1[{q1, g1}] = 1'b1;
      seen2[{q2, g2}] = 1'b1;
    end
    c = ut4_cost(UT2_DESIGN1);
    check(c.ng == 33 && c.ci == 33 && c.go == 43 && c.qc == 164, "design 1 cost");
    check(trlic(c) == 273, "design 1 TRLIC");
    c = ut4_cost(UT2_DESIGN2);
    check(c.ng == 33 && c.ci == 33 && c.go == 39 && c.qc == 168, "design 2 cost");
    check(trlic(c) == 273, "design 2 TRLIC");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100us;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
