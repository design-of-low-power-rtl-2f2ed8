// vedic_4x4: 4x4 unsigned Urdhva Tiryakbhyam multiplier of reversible gates.
//
// f = a * b. Each operand is split into 2-bit halves and four 2x2 Vedic
// multipliers form the vertical and crosswise products
//   m0 = a[1:0]*b[1:0], m1 = a[3:2]*b[1:0], m2 = a[1:0]*b[3:2],
//   m3 = a[3:2]*b[3:2].
// Three 4-bit HNG ripple carry adders then combine them:
//   RCA1: m1 + m2                        -> sum1, carry ca1
//   RCA2: sum1 + {00, m0[3:2]}           -> sum2, carry ca2
//   RCA3: m3 + {0, ca1 xor ca2, sum2[3:2]} -> f[7:4]
//   f[3:2] = sum2[1:0], f[1:0] = m0[1:0].
// ca1 and ca2 both have weight 2^6 but can never both be 1 (if ca1 is set,
// sum1 <= 2 and sum1 + m0[3:2] <= 5 cannot carry), so a Feynman gate merges
// them into one bit with its XOR output. All adder carry-ins are constant 0.
// garbage: [23:0] the four 2x2 multipliers (m0 lowest, 6 bits each),
// [47:24] the three adders (RCA1 lowest, 8 bits each), [48] the Feynman
// gate's P output, [49] RCA3's carry out (always 0).
// Purely combinational; the critical path is a 2x2 multiplier followed by the
// three adders in series.
// The four multipliers, the three 4-bit adders and which product feeds which
// adder follow the published block diagram. Merging ca1 and ca2 with a
// Feynman gate (the diagram shows only one carry entering RCA3) and the
// garbage bit order are this design's own choices.
module vedic_4x4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] f,
  output logic [rev_pkg::G_4X4-1:0] garbage
);
  localparam int unsigned GS = rev_pkg::G_2X2;   // garbage per 2x2 multiplier
  localparam int unsigned GR = rev_pkg::rca_garbage(4);
  localparam int unsigned GA = 4 * GS;           // first adder garbage bit

  logic [3:0] m0, m1, m2, m3;
  logic [3:0] sum1, sum2, hi_b;
  logic       ca1, ca2, ca_merged;

  vedic_2x2 u_m0 (.a(a[1:0]), .b(b[1:0]), .s(m0), .garbage(garbage[0*GS +: GS]));
  vedic_2x2 u_m1 (.a(a[3:2]), .b(b[1:0]), .s(m1), .garbage(garbage[1*GS +: GS]));
  vedic_2x2 u_m2 (.a(a[1:0]), .b(b[3:2]), .s(m2), .garbage(garbage[2*GS +: GS]));
  vedic_2x2 u_m3 (.a(a[3:2]), .b(b[3:2]), .s(m3), .garbage(garbage[3*GS +: GS]));

  rev_rca #(.WIDTH(4)) u_rca1 (
    .a(m1), .b(m2), .cin(1'b0),
    .sum(sum1), .cout(ca1), .garbage(garbage[GA + 0*GR +: GR])
  );

  rev_rca #(.WIDTH(4)) u_rca2 (
    .a(sum1), .b({2'b00, m0[3:2]}), .cin(1'b0),
    .sum(sum2), .cout(ca2), .garbage(garbage[GA + 1*GR +: GR])
  );

  feynman_gate u_fg (.a(ca1), .b(ca2), .p(garbage[GA + 3*GR]), .q(ca_merged));

  assign hi_b = {1'b0, ca_merged, sum2[3:2]};

  rev_rca #(.WIDTH(4)) u_rca3 (
    .a(m3), .b(hi_b), .cin(1'b0),
    .sum(f[7:4]), .cout(garbage[GA + 3*GR + 1]), .garbage(garbage[GA + 2*GR +: GR])
  );

  assign f[3:2] = sum2[1:0];
  assign f[1:0] = m0[1:0];
endmodule
