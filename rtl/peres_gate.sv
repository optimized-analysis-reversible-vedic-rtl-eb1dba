// peres_gate: the 3x3 reversible Peres gate.
//
// P = A, Q = A xor B, R = (A and B) xor C. With C tied to 0 it is a reversible
// half adder: Q is the sum and R the carry; it also yields a plain AND (partial
// product) on R. Quantum cost 4. Purely combinational, no clock.
module peres_gate
(
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);

  always_comb begin
    p = a;
    q = a ^ b;
    r = (a & b) ^ c;
  end
endmodule
