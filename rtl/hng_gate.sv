// hng_gate: the 4x4 reversible HNG gate.
//
// P = A, Q = B, R = A xor B xor C, S = ((A xor B) and C) xor (A and B) xor D.
// With D tied to 0 it is a reversible full adder: A and B are the addend bits,
// C the carry in, R the sum and S the carry out; P and Q are garbage.
// Quantum cost 6. Purely combinational, no clock.
module hng_gate
(
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);

  always_comb begin
    p = a;
    q = b;
    r = a ^ b ^ c;
    s = ((a ^ b) & c) ^ (a & b) ^ d;
  end
endmodule
