// feynman_gate: the 2x2 reversible Feynman (controlled-NOT) gate.
//
// P = A, Q = A xor B. With B tied to 0 it copies A (fan-out); with B tied to 1
// it inverts A. Quantum cost 1. The gate equations are the standard ones for
// this gate. Purely combinational, no clock; output settles one gate delay
// after the inputs.
module feynman_gate
(
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  // one gate, no constant input fixed inside, no garbage counted here

  always_comb begin
    p = a;
    q = a ^ b;
  end
endmodule
