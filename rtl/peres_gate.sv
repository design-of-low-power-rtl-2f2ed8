// peres_gate: 3x3 reversible Peres gate.
//
// Outputs P = A, Q = A xor B and R = (A and B) xor C. With C tied to 0 the
// gate is a half adder: Q is the sum and R the carry. Quantum cost 4.
// Purely combinational. The gate equations are the published ones.
module peres_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = a ^ b;
  assign r = (a & b) ^ c;
endmodule
