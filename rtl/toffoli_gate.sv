// toffoli_gate: 3x3 reversible Toffoli (controlled-controlled-NOT) gate.
//
// Outputs P = A, Q = B and R = (A and B) xor C. With C tied to 0 the R output
// is the AND of A and B while A and B pass on unchanged for later gates, which
// is how the 2x2 multiplier forms its partial products without fan-out.
// Quantum cost 5. Purely combinational. The gate equations are the published
// ones.
module toffoli_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = b;
  assign r = (a & b) ^ c;
endmodule
