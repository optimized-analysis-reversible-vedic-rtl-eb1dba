// bvppg_gate: the 5x5 reversible BVPPG gate.
//
// P = A, Q = B, R = (A and B) xor C, S = D, T = (A and D) xor E. With C and E
// tied to 0 it forms two partial products sharing the operand A (A*B on R and
// A*D on T) while handing B and D on unchanged for reuse, which is how the
// multipliers get their fan-out without a separate copy gate.
// Quantum cost 10. Purely combinational, no clock.
module bvppg_gate
(
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  input  logic e,
  output logic p,
  output logic q,
  output logic r,
  output logic s,
  output logic t
);

  always_comb begin
    p = a;
    q = b;
    r = (a & b) ^ c;
    s = d;
    t = (a & d) ^ e;
  end
endmodule
