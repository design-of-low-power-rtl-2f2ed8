// rev_pkg: constants shared by the reversible Vedic multiplier.
//
// Holds the quantum cost of each primitive reversible gate (Feynman 1,
// Toffoli 5, Peres 4, HNG 6, as published for these gates) and the number of
// garbage outputs each composite block produces. A garbage output is a gate
// output that the circuit does not use; every block brings its garbage out on
// a `garbage` port so that the complete reversible netlist stays visible and
// no gate output is left dangling. The garbage counts follow from the gate
// netlists in this RTL (see each module's header):
//   2x2 multiplier : 6 (TG2.Q, TG3.Q, TG4.P, TG4.Q, PG1.P, PG2.P)
//   W-bit adder    : 2*W (the P and Q copies of each HNG gate)
//   4x4 / 8x8      : four sub-multipliers, three adders, the P output of the
//                    carry-merging Feynman gate and the final adder's carry out.
package rev_pkg;

  // Quantum cost of each primitive gate.
  localparam int unsigned QC_FG  = 1;
  localparam int unsigned QC_TG  = 5;
  localparam int unsigned QC_PG  = 4;
  localparam int unsigned QC_HNG = 6;

  // Garbage outputs of a WIDTH-bit HNG ripple carry adder.
  function automatic int unsigned rca_garbage(int unsigned width);
    return 2 * width;
  endfunction

  // Garbage outputs of an N x N multiplier built from four N/2 x N/2 ones,
  // given the garbage count of the half-size multiplier.
  function automatic int unsigned mul_garbage(int unsigned n, int unsigned g_half);
    return 4 * g_half + 3 * rca_garbage(n) + 2;
  endfunction

  localparam int unsigned G_2X2 = 6;
  localparam int unsigned G_4X4 = mul_garbage(4, G_2X2);   // 50
  localparam int unsigned G_8X8 = mul_garbage(8, G_4X4);   // 250

  // Quantum cost of the blocks as built here.
  localparam int unsigned QC_2X2 = 4 * QC_TG + 2 * QC_PG;             // 28
  localparam int unsigned QC_RCA4 = 4 * QC_HNG;                       // 24
  localparam int unsigned QC_RCA8 = 8 * QC_HNG;                       // 48
  localparam int unsigned QC_4X4 = 4 * QC_2X2 + 3 * QC_RCA4 + QC_FG;  // 185
  localparam int unsigned QC_8X8 = 4 * QC_4X4 + 3 * QC_RCA8 + QC_FG;  // 885

endpackage
