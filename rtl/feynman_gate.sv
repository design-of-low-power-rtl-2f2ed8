// feynman_gate: 2x2 reversible Feynman (controlled-NOT) gate.
//
// Outputs P = A and Q = A xor B; the mapping (A,B) -> (P,Q) is a permutation
// of the four input patterns, so no information is lost. Quantum cost 1.
// With B tied to 0 it copies A; in the multipliers it XORs two carries that
// can never both be 1 (see vedic_4x4). Purely combinational, no clock.
// The gate equations are the published ones.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  assign p = a;
  assign q = a ^ b;
endmodule
