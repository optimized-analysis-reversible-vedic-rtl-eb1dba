// ut2x2_d2: 2x2 reversible Urdhva Tiryakbhayam multiplier, design 2.
//
// q = a * b for 2-bit operands, with in-circuit fan-out like design 1, but the
// two top product bits come from one NFT gate instead of a Peres-Feynman pair:
//   BVPPG (a0, b0, 0, b1, 0): a0 b0, partial product a0 b1, copies a0 (I1),
//                              b0 (I2), b1 (I3)
//   Peres (a1, I2, 0)       : partial product a1 b0, copy of a1 (I4)
//   Peres (I4, I3, 0)       : partial product a1 b1
//   NFT   (0, a0b0, a1b1)   : q0 = a0b0, q2 = not(a0b0) and a1b1,
//                              q3 = a0b0 and a1b1
//   Feynman (a0b1, a1b0)    : q1 = a0b1 xor a1b0
// Cost: 5 gates, 5 constant inputs, 4 garbage outputs, quantum cost 24.
// Gates and wiring follow the published design 2. The copy I1 of a0 is not
// used by any later gate; it is counted as a fan-out output rather than as
// garbage (giving the published garbage count of 4) and is brought out on its
// own port `i1_unused` so that the circuit drops no output. Purely
// combinational, no clock: q is valid three gate levels after a, b.
module ut2x2_d2
(
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] q,
  output logic [3:0] garbage,
  output logic       i1_unused
);

  logic i2, i3, i4;       // in-circuit fan-out copies of b0, b1, a1
  logic pp_a0b0, pp_a0b1, pp_a1b0, pp_a1b1;

  bvppg_gate u_bvppg (
    .a(a[0]), .b(b[0]), .c(1'b0), .d(b[1]), .e(1'b0),
    .p(i1_unused), .q(i2), .r(pp_a0b0), .s(i3), .t(pp_a0b1)
  );

  peres_gate u_pg_a1b0 (
    .a(a[1]), .b(i2), .c(1'b0),
    .p(i4), .q(garbage[0]), .r(pp_a1b0)
  );

  peres_gate u_pg_a1b1 (
    .a(i4), .b(i3), .c(1'b0),
    .p(garbage[1]), .q(garbage[2]), .r(pp_a1b1)
  );

  nft_gate u_nft (
    .a(1'b0), .b(pp_a0b0), .c(pp_a1b1),
    .p(q[0]), .q(q[2]), .r(q[3])
  );

  feynman_gate u_fg (
    .a(pp_a0b1), .b(pp_a1b0),
    .p(garbage[3]), .q(q[1])
  );
endmodule
