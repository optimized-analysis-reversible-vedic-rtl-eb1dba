// rev_ut4x4: 4x4 reversible Urdhva Tiryakbhayam multiplier.
//
// q = a * b for 4-bit operands. Following the vertical-and-crosswise method,
// the operands are split into 2-bit halves and four 2x2 reversible multipliers
// form the four cross products at once:
//   p0 = a[1:0]*b[1:0] (weight 1)   p1 = a[3:2]*b[1:0] (weight 4)
//   p2 = a[1:0]*b[3:2] (weight 4)   p3 = a[3:2]*b[3:2] (weight 16)
// The low two bits of p0 are the low two product bits. The rest is summed by
// three reversible ripple carry adders (rev_rca: Peres half adder at bit 0,
// HNG full adders above), two of 4 bits and one of 5 bits:
//   adder A (4 bit): sb = p1 + {00, p0[3:2]}           (5-bit result)
//   adder C (5 bit): sc = sb + {0, p2}                  (6-bit result)
//   adder B (4 bit): sh = p3 + {0, sc[4:2]}             (5-bit result)
//   q = {sh[3:0], sc[1:0], p0[1:0]}
// The four 2x2 multipliers, the three adders and their widths, and adder A's
// operands are the published structure. The published block diagram instead
// feeds p3 and p2 into one 4-bit adder and sums the two 4-bit adders' results
// in the 5-bit adder; that tree adds p3 at the weight of p2 and does not form
// the product, so here the 5-bit adder adds p2 to adder A's result and the
// second 4-bit adder adds p3 at its true weight. The gate, constant, garbage
// and quantum-cost totals are unchanged by this.
// The sums sc <= 20 and sh <= 14 never use their top bits, so those carry
// outputs stay unconnected.
//
// DESIGN selects the 2x2 core: design 1 (BVPPG, three Peres, Feynman) or
// design 2 (BVPPG, two Peres, NFT, Feynman); both were proposed, design 1 is
// the default. Published totals: design 1 has 33 gates, 33 constants, 43
// garbage outputs, quantum cost 164 (TRLIC 273); design 2 has 33, 33, 39, 168
// (TRLIC 273); rev_pkg::ut4_cost reproduces these from the structure.
// `garbage` carries every garbage output: 4 x 5 from the 2x2
// cores (for design 2 that is 4 garbage bits plus the unused a0 copy of each
// core), then 7, 7 and 9 from adders A, B and C.
// Purely combinational, no clock.
module rev_ut4x4
  import rev_pkg::*;
#(
  parameter ut2_design_e DESIGN = UT2_DESIGN1
) (
  input  logic [3:0]  a,
  input  logic [3:0]  b,
  output logic [7:0]  q,
  output logic [42:0] garbage
);

  logic [3:0] p [4];          // the four 2x2 cross products p0..p3
  logic [4:0] sb;             // adder A: p1 + p0[3:2]
  logic [5:0] sc;             // adder C: sb + p2
  logic [4:0] sh;             // adder B: p3 + sc[4:2]

  // operand halves of each 2x2 multiplier, in the order p0..p3
  logic [1:0] op_a [4];
  logic [1:0] op_b [4];
  always_comb begin
    op_a[0] = a[1:0];  op_b[0] = b[1:0];
    op_a[1] = a[3:2];  op_b[1] = b[1:0];
    op_a[2] = a[1:0];  op_b[2] = b[3:2];
    op_a[3] = a[3:2];  op_b[3] = b[3:2];
  end

  for (genvar k = 0; k < 4; k++) begin : g_ut2
    if (DESIGN == UT2_DESIGN1) begin : g_d1
      ut2x2_d1 u_mul (
        .a(op_a[k]), .b(op_b[k]), .q(p[k]), .garbage(garbage[5*k +: 5])
      );
    end else begin : g_d2
      ut2x2_d2 u_mul (
        .a(op_a[k]), .b(op_b[k]), .q(p[k]),
        .garbage(garbage[5*k +: 4]), .i1_unused(garbage[5*k + 4])
      );
    end
  end

  rev_rca #(.WIDTH(4)) u_rca_a (
    .x(p[1]), .y({2'b00, p[0][3:2]}), .s(sb), .garbage(garbage[20 +: 7])
  );

  rev_rca #(.WIDTH(5)) u_rca_c (
    .x(sb), .y({1'b0, p[2]}), .s(sc), .garbage(garbage[34 +: 9])
  );

  rev_rca #(.WIDTH(4)) u_rca_b (
    .x(p[3]), .y({1'b0, sc[4:2]}), .s(sh), .garbage(garbage[27 +: 7])
  );

  assign q = {sh[3:0], sc[1:0], p[0][1:0]};
endmodule
