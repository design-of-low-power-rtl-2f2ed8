// vedic_8x8: 8x8 unsigned Urdhva Tiryakbhyam multiplier of reversible gates.
//
// This is the top of the design: s = a * b, a 16-bit product of two unsigned
// bytes, computed by a purely combinational network of reversible gates.
// Each operand is split into nibbles and four 4x4 Vedic multipliers form the
// vertical and crosswise products
//   m0 = a[3:0]*b[3:0], m1 = a[7:4]*b[3:0], m2 = a[3:0]*b[7:4],
//   m3 = a[7:4]*b[7:4].
// Three 8-bit HNG ripple carry adders combine them:
//   RCA1: m1 + m2                                -> sum1, carry ca1
//   RCA2: sum1 + {0000, m0[7:4]}                 -> sum2, carry ca2
//   RCA3: m3 + {000, ca1 xor ca2, sum2[7:4]}     -> s[15:8], carry ca3
//   s[7:4] = sum2[3:0], s[3:0] = m0[3:0].
// ca1 and ca2 have the same weight (2^12) and are never both 1 (if ca1 is
// set, sum1 <= 450-256 = 194 and sum1 + m0[7:4] <= 209 cannot carry), so a
// Feynman gate merges them exactly with its XOR output. ca3 is always 0.
// garbage: [199:0] the four 4x4 multipliers (m0 lowest, 50 bits each),
// [247:200] the three adders (RCA1 lowest, 16 bits each), [248] the Feynman
// gate's P output, [249] ca3.
// Interface: a, b in; s, garbage out; no clock, no reset. The result settles
// after a 2x2 multiplier, three 4-bit adders and three 8-bit adders.
// The four 4x4 multipliers, the three 8-bit adders and the routing of the
// products and carries follow the published block diagram. Adding ca2 to
// RCA3 through the Feynman gate (the diagram leaves ca2 unconnected, which
// would lose a carry for some operands, e.g. 8Fh * 9Fh) and the garbage bit
// order are this design's own choices.
module vedic_8x8 (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] s,
  output logic [rev_pkg::G_8X8-1:0] garbage
);
  localparam int unsigned GS = rev_pkg::G_4X4;   // garbage per 4x4 multiplier
  localparam int unsigned GR = rev_pkg::rca_garbage(8);
  localparam int unsigned GA = 4 * GS;           // first adder garbage bit

  logic [7:0] m0, m1, m2, m3;
  logic [7:0] sum1, sum2, hi_b;
  logic       ca1, ca2, ca_merged;

  vedic_4x4 u_m0 (.a(a[3:0]), .b(b[3:0]), .f(m0), .garbage(garbage[0*GS +: GS]));
  vedic_4x4 u_m1 (.a(a[7:4]), .b(b[3:0]), .f(m1), .garbage(garbage[1*GS +: GS]));
  vedic_4x4 u_m2 (.a(a[3:0]), .b(b[7:4]), .f(m2), .garbage(garbage[2*GS +: GS]));
  vedic_4x4 u_m3 (.a(a[7:4]), .b(b[7:4]), .f(m3), .garbage(garbage[3*GS +: GS]));

  rev_rca #(.WIDTH(8)) u_rca1 (
    .a(m1), .b(m2), .cin(1'b0),
    .sum(sum1), .cout(ca1), .garbage(garbage[GA + 0*GR +: GR])
  );

  rev_rca #(.WIDTH(8)) u_rca2 (
    .a(sum1), .b({4'b0000, m0[7:4]}), .cin(1'b0),
    .sum(sum2), .cout(ca2), .garbage(garbage[GA + 1*GR +: GR])
  );

  feynman_gate u_fg (.a(ca1), .b(ca2), .p(garbage[GA + 3*GR]), .q(ca_merged));

  assign hi_b = {3'b000, ca_merged, sum2[7:4]};

  rev_rca #(.WIDTH(8)) u_rca3 (
    .a(m3), .b(hi_b), .cin(1'b0),
    .sum(s[15:8]), .cout(garbage[GA + 3*GR + 1]), .garbage(garbage[GA + 2*GR +: GR])
  );

  assign s[7:4] = sum2[3:0];
  assign s[3:0] = m0[3:0];
endmodule
