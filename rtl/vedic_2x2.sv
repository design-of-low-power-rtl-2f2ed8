// vedic_2x2: 2x2 unsigned Urdhva Tiryakbhyam multiplier of reversible gates.
//
// s = a * b with a = a1a0, b = b1b0 and s = s3s2s1s0:
//   s0 = a0b0, s1 = a1b0 xor a0b1 (carry c1), s2 = c1 xor a1b1 (carry c2),
//   s3 = c2.
// Four Toffoli gates with C = 0 form the partial products and pass their
// operands on to the next gate, so no signal fans out:
//   TG1(a0, b0, 0) -> s0;        TG2(a1, b0 from TG1, 0) -> a1b0
//   TG3(b1, a0 from TG1, 0) -> a0b1;  TG4(a1 from TG2, b1 from TG3, 0) -> a1b1
// Two Peres gates with C = 0 are half adders:
//   PG1(a1b0, a0b1, 0) -> s1, c1;  PG2(c1, a1b1, 0) -> s2, s3
// Six constant inputs, six garbage outputs, quantum cost 28. garbage carries
// {PG2.P, PG1.P, TG4.Q, TG4.P, TG3.Q, TG2.Q} from bit 5 down to bit 0.
// Purely combinational. The gate netlist follows the published 2x2 design;
// the garbage bit order is this design's own choice.
module vedic_2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] s,
  output logic [rev_pkg::G_2X2-1:0] garbage
);
  // Operand copies passed along the Toffoli chain.
  logic a0_t1, b0_t1, a1_t2, b0_t2, b1_t3, a0_t3;
  // Partial products.
  logic p_a1b0, p_a0b1, p_a1b1;
  logic c1;

  toffoli_gate u_tg1 (.a(a[0]),  .b(b[0]),  .c(1'b0), .p(a0_t1), .q(b0_t1), .r(s[0]));
  toffoli_gate u_tg2 (.a(a[1]),  .b(b0_t1), .c(1'b0), .p(a1_t2), .q(b0_t2), .r(p_a1b0));
  toffoli_gate u_tg3 (.a(b[1]),  .b(a0_t1), .c(1'b0), .p(b1_t3), .q(a0_t3), .r(p_a0b1));
  toffoli_gate u_tg4 (.a(a1_t2), .b(b1_t3), .c(1'b0), .p(garbage[2]), .q(garbage[3]), .r(p_a1b1));

  peres_gate u_pg1 (.a(p_a1b0), .b(p_a0b1), .c(1'b0), .p(garbage[4]), .q(s[1]), .r(c1));
  peres_gate u_pg2 (.a(c1),     .b(p_a1b1), .c(1'b0), .p(garbage[5]), .q(s[2]), .r(s[3]));

  assign garbage[0] = b0_t2;
  assign garbage[1] = a0_t3;
endmodule
