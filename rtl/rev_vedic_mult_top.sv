// rev_vedic_mult_top: the two proposed 4x4 reversible Vedic multipliers side by side.
//
// Both instances multiply the same 4-bit operands a and b. prod_d1 comes from
// the multiplier built on 2x2 core design 1, prod_d2 from the one built on
// design 2; the two must always agree, and they differ only in gate-level cost
// (quantum cost 164 against 168, garbage outputs 43 against 39). The garbage
// outputs of each are brought out so that no reversible output is dropped.
// Putting both variants in one top, sharing the operands, is this design's own
// choice; it lets one test bench compare them. Purely combinational, no clock.
module rev_vedic_mult_top
  import rev_pkg::*;
(
  input  logic [3:0]  a,
  input  logic [3:0]  b,
  output logic [7:0]  prod_d1,
  output logic [7:0]  prod_d2,
  output logic [42:0] garbage_d1,
  output logic [42:0] garbage_d2
);
  rev_ut4x4 #(.DESIGN(UT2_DESIGN1)) u_mult_d1 (
    .a(a), .b(b), .q(prod_d1), .garbage(garbage_d1)
  );

  rev_ut4x4 #(.DESIGN(UT2_DESIGN2)) u_mult_d2 (
    .a(a), .b(b), .q(prod_d2), .garbage(garbage_d2)
  );
endmodule
