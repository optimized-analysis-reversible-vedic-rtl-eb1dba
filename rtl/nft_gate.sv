// nft_gate: the 3x3 reversible New Fault Tolerant (NFT) gate.
//
// P = A xor B, Q = (not B and C) xor (A and not C), R = (B and C) xor (A and not C).
// With A tied to 0 it passes B on P, forms (not B) and C on Q and B and C on R;
// the 2x2 multiplier of design 2 uses exactly this to make the two top product
// bits. Quantum cost 5. Purely combinational, no clock.
module nft_gate
(
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);

  always_comb begin
    p = a ^ b;
    q = (~b & c) ^ (a & ~c);
    r = (b & c) ^ (a & ~c);
  end
endmodule
