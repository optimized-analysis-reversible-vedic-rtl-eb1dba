// rev_rca: reversible ripple carry adder, WIDTH bits, with a half-adder first stage.
//
// s = x + y, with s one bit wider than the operands (the top bit is the carry
// out). The carry into bit 0 of a ripple carry adder is always zero, so bit 0
// is a Peres gate used as a half adder (sum on Q, carry on R) rather than a
// full HNG gate; every higher bit is an HNG gate used as a full adder with its
// constant input D tied to 0. Compared with an all-HNG adder this saves a
// quantum cost of 2 and one garbage output, at the same gate and constant
// count. The published design shows this adder at WIDTH 4 (used twice in the
// 4x4 multiplier) and WIDTH 5 (used once); the structure is the same for any
// WIDTH >= 2. Cost: WIDTH gates, WIDTH constants, 2*WIDTH-1 garbage outputs,
// quantum cost 4 + 6*(WIDTH-1). The garbage outputs (the copies of the operand
// bits) are brought out on `garbage`. Purely combinational, no clock: the
// carry ripples through WIDTH gates.
module rev_rca
#(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0]   x,
  input  logic [WIDTH-1:0]   y,
  output logic [WIDTH:0]     s,
  output logic [2*WIDTH-2:0] garbage
);

  logic [WIDTH:1] carry;  // carry[i] is the carry into bit i; bit 0 has none

  peres_gate u_half (
    .a(x[0]), .b(y[0]), .c(1'b0),
    .p(garbage[0]), .q(s[0]), .r(carry[1])
  );

  for (genvar i = 1; i < WIDTH; i++) begin : g_full
    hng_gate u_full (
      .a(x[i]), .b(y[i]), .c(carry[i]), .d(1'b0),
      .p(garbage[2*i-1]), .q(garbage[2*i]), .r(s[i]), .s(carry[i+1])
    );
  end

  assign s[WIDTH] = carry[WIDTH];
endmodule
