// rev_rca_tb: exhaustive self-check of the reversible ripple carry adder at
// both widths the multiplier uses, 4 bits (256 operand pairs) and 5 bits
// (1024 pairs). Each sum is compared with integer addition; the garbage outputs
// must be the copies of the operand bits that the gates pass on (x0 from the
// Peres half adder, then x_i, y_i from each HNG). A carry out of the top bit
// must occur. The cost model must give 4 gates, 4 constants, 7 garbage,
// quantum cost 22 at 4 bits and 5, 5, 9, 28 at 5 bits. Watchdog ends the run
// after 100 us.
module rev_rca_tb;
  import rev_pkg::*;
  int unsigned checks = 0, failures = 0, carries4 = 0, carries5 = 0;

  logic [3:0] x4, y4;
  logic [4:0] s4;
  logic [6:0] g4;
  logic [4:0] x5, y5;
  logic [5:0] s5;
  logic [8:0] g5;

  rev_rca #(.WIDTH(4)) dut4 (.x(x4), .y(y4), .s(s4), .garbage(g4));
  rev_rca #(.WIDTH(5)) dut5 (.x(x5), .y(y5), .s(s5), .garbage(g5));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: x4=%0d y4=%0d s4=%0d  x5=%0d y5=%0d s5=%0d", what, x4, y4, s4, x5, y5, s5);
    end
  endtask

  // garbage layout: bit 0 = x[0], bit 2i-1 = x[i], bit 2i = y[i]
  function automatic logic [8:0] exp_garbage(input logic [4:0] x, input logic [4:0] y,
                                             input int w);
    logic [8:0] g = '0;
    g[0] = x[0];
    for (int i = 1; i < w; i++) begin
      g[2*i-1] = x[i];
      g[2*i]   = y[i];
    end
    return g;
  endfunction

  initial begin
    rev_cost_t c;
    x5 = '0; y5 = '0;
    for (int v = 0; v < 256; v++) begin
      {x4, y4} = 8'(v);
      #1;
      check(int'(s4) == int'(x4) + int'(y4), "4-bit sum");
      check(g4 == exp_garbage({1'b0, x4}, {1'b0, y4}, 4)[6:0], "4-bit garbage");
      if (s4[4]) carries4++;
    end
    for (int v = 0; v < 1024; v++) begin
      {x5, y5} = 10'(v);
      #1;
      check(int'(s5) == int'(x5) + int'(y5), "5-bit sum");
      check(g5 == exp_garbage(x5, y5, 5), "5-bit garbage");
      if (s5[5]) carries5++;
    end
    check(carries4 > 0 && carries5 > 0, "carry out exercised");
    c = rca_cost(4);
    check(c.ng == 4 && c.ci == 4 && c.go == 7 && c.qc == 22, "4-bit cost");
    c = rca_cost(5);
    check(c.ng == 5 && c.ci == 5 && c.go == 9 && c.qc == 28, "5-bit cost");
    $display("carry outs: 4-bit %0d, 5-bit %0d", carries4, carries5);
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
