// rev_rca: WIDTH-bit reversible ripple carry adder built from HNG gates.
//
// Bit i is one HNG gate with A = a[i], B = b[i], C = the carry from bit i-1
// (cin for bit 0) and D tied to 0; its R output is sum[i] and its S output
// the carry into bit i+1. The carry out of the top bit is cout. The P and Q
// outputs of every gate (copies of a[i] and b[i]) are the 2*WIDTH garbage
// outputs, brought out as garbage[2*i] = P and garbage[2*i+1] = Q.
// Interface: a, b, cin in; sum, cout, garbage out. Purely combinational: the
// result settles after WIDTH gate delays of carry ripple.
// The structure (one HNG per bit, D = 0, carry rippling from LSB to MSB, eight
// bits by default) is the published one; the garbage bit order is this
// design's own choice.
module rev_rca #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0]   a,
  input  logic [WIDTH-1:0]   b,
  input  logic               cin,
  output logic [WIDTH-1:0]   sum,
  output logic               cout,
  output logic [2*WIDTH-1:0] garbage
);
  logic [WIDTH:0] carry;

  assign carry[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    hng_gate u_hng (
      .a (a[i]),
      .b (b[i]),
      .c (carry[i]),
      .d (1'b0),
      .p (garbage[2*i]),
      .q (garbage[2*i+1]),
      .r (sum[i]),
      .s (carry[i+1])
    );
  end

  assign cout = carry[WIDTH];
endmodule
