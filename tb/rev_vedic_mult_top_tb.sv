// rev_vedic_mult_top_tb: end-to-end test of the design at its default size.
// Drives all 256 operand pairs, in random order, into both 4x4 multipliers
// and compares each product with integer multiplication and with the other
// design. It also counts how often the mechanisms the structure relies on are
// exercised, and fails if one never was:
//   - a 2x2 core producing a set top bit (3*3 = 9 in some cross product),
//     where the core's carry a0 a1 b0 b1 is set and the Feynman gate
//     (design 1) or the NFT gate (design 2) must clear bit 2 and set bit 3;
//   - a carry rippling into the top product bit (product >= 128);
//   - a product with bit 6 set, which only the last adder's sum reaches.
// The garbage outputs of each design must make every output vector distinct.
// Watchdog ends the run after 100 us.
module rev_vedic_mult_top_tb;
  int unsigned checks = 0, failures = 0;
  int unsigned n_top_bit = 0, n_bit7 = 0, n_bit6 = 0;
  logic [3:0] a, b;
  logic [7:0] prod_d1, prod_d2;
  logic [42:0] garbage_d1, garbage_d2;
  bit seen1 [logic [50:0]];
  bit seen2 [logic [50:0]];
  int order [256];

  rev_vedic_mult_top dut (
    .a(a), .b(b), .prod_d1(prod_d1), .prod_d2(prod_d2),
    .garbage_d1(garbage_d1), .garbage_d2(garbage_d2)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: a=%0d b=%0d -> d1 %0d, d2 %0d", what, a, b, prod_d1, prod_d2);
    end
  endtask

  function automatic bit any_cross_is_9(input logic [3:0] x, input logic [3:0] y);
    return (x[1:0] == 2'b11 || x[3:2] == 2'b11) && (y[1:0] == 2'b11 || y[3:2] == 2'b11);
  endfunction

  initial begin
    // shuffle the 256 operand pairs
    for (int i = 0; i < 256; i++) order[i] = i;
    for (int i = 255; i > 0; i--) begin
      automatic int j = int'($urandom_range(i, 0));
      automatic int t = order[i];
      order[i] = order[j];
      order[j] = t;
    end
    for (int i = 0; i < 256; i++) begin
      int expect_p;
      {a, b} = 8'(order[i]);
      expect_p = int'(a) * int'(b);
      #1;
      check(int'(prod_d1) == expect_p, "design 1 product");
      check(int'(prod_d2) == expect_p, "design 2 product");
      check(prod_d1 == prod_d2, "designs agree");
      check(!seen1.exists({prod_d1, garbage_d1}) && !seen2.exists({prod_d2, garbage_d2}),
            "outputs distinct");
      seen1[{prod_d1, garbage_d1}] = 1'b1;
      seen2[{prod_d2, garbage_d2}] = 1'b1;
      if (any_cross_is_9(a, b)) n_top_bit++;
      if (expect_p >= 128) n_bit7++;
      if (expect_p[6]) n_bit6++;
    end
    check(n_top_bit > 0, "2x2 top bit exercised");
    check(n_bit7 > 0, "carry into product bit 7 exercised");
    check(n_bit6 > 0, "product bit 6 exercised");
    $display("2x2 top bit %0d, bit 7 %0d, bit 6 %0d", n_top_bit, n_bit7, n_bit6);
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
