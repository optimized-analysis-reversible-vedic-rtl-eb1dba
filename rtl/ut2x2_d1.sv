// ut2x2_d1: 2x2 reversible Urdhva Tiryakbhayam multiplier, design 1.
//
// q = a * b for 2-bit operands, built from reversible gates only, with every
// fan-out made inside the circuit (a reversible net may drive only one gate
// input). Five gates:
//   BVPPG (a0, b0, 0, b1, 0): q0 = a0 b0, partial product a0 b1, and copies of
//                              b0 (I1) and b1 (I2) for reuse
//   Peres (a1, I1, 0)       : partial product a1 b0, copy of a1 (I3)
//   Peres (a0b1, a1b0, 0)   : q1 = a0b1 xor a1b0, carry a0 a1 b0 b1
//   Peres (I3, I2, 0)       : partial product a1 b1
//   Feynman (carry, a1b1)   : q3 = carry, q2 = a1b1 xor carry
// Cost: 5 gates, 5 constant inputs, 5 garbage outputs, quantum cost 23.
// The gate list and its wiring follow the published design 1 exactly; the
// garbage outputs are brought out on `garbage` so that nothing is dropped.
// Purely combinational, no clock: q is valid three gate levels after a, b.
module ut2x2_d1
(
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] q,
  output logic [4:0] garbage
);

  logic i1, i2, i3;       // in-circuit fan-out copies of b0, b1, a1
  logic pp_a0b1, pp_a1b0, pp_a1b1;
  logic carry;            // a0 a1 b0 b1, the carry out of bit 1

  bvppg_gate u_bvppg (
    .a(a[0]), .b(b[0]), .c(1'b0), .d(b[1]), .e(1'b0),
    .p(garbage[0]), .q(i1), .r(q[0]), .s(i2), .t(pp_a0b1)
  );

  peres_gate u_pg_a1b0 (
    .a(a[1]), .b(i1), .c(1'b0),
    .p(i3), .q(garbage[1]), .r(pp_a1b0)
  );

  peres_gate u_pg_mid (
    .a(pp_a0b1), .b(pp_a1b0), .c(1'b0),
    .p(garbage[2]), .q(q[1]), .r(carry)
  );

  peres_gate u_pg_a1b1 (
    .a(i3), .b(i2), .c(1'b0),
    .p(garbage[3]), .q(garbage[4]), .r(pp_a1b1)
  );

  feynman_gate u_fg (
    .a(carry), .b(pp_a1b1),
    .p(q[3]), .q(q[2])
  );
endmodule
