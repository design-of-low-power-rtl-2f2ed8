// hng_gate: 4x4 reversible HNG gate.
//
// Outputs P = A, Q = B, R = A xor B xor C and S = ((A xor B) and C) xor
// (A and B) xor D. With D tied to 0, A and B the operand bits and C the carry
// in, R is the full-adder sum and S the carry out, so one gate is one full
// adder with P and Q as its two garbage outputs. Quantum cost 6. Purely
// combinational. The gate equations are the published ones.
module hng_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  assign p = a;
  assign q = b;
  assign r = a ^ b ^ c;
  assign s = ((a ^ b) & c) ^ (a & b) ^ d;
endmodule
