// lzc8: 8-bit leading-zero counter.
//
// Counts the zeros that stand above the most significant one of the 8-bit
// operand a (a[7] = A7 is the most significant bit) and flags whether the
// operand holds any one at all. This is the normalisation-shift counter of a
// floating-point unit.
//
// How it works: the operand is first reduced to seven small group terms G0..G6
// over neighbouring bit pairs, then four second-level terms H0..H3 are formed
// from them. H0, H1 and H2 are the count bits directly; H3 says that the lower
// nibble is all zero, and V is the NAND of H0 and H3. The path from any input
// to any output is at most three or four gates deep, with no ripple through the
// bit positions.
//
//   G0 = A7 | A6            G1 = ~A7 & (A6 | ~A5)     G2 = A5 | A4
//   G3 = A6 | A4            G4 = A3 | A2              G5 = ~A3 & (A2 | ~A1)
//   G6 = A1 | A0
//   H0 = ~(G0 | G2)         H1 = ~G0 & (G2 | ~G4)
//   H2 = G1 & (G3 | G5)     H3 = ~(G4 | G6)
//   V  = ~(H0 & H3)         X0 = H0, X1 = H1, X2 = H2
//
// The grouping of terms, their names and the output assignment (X0 = H0,
// X1 = H1, X2 = H2, V from H0 and H3) follow the published gate equations; the
// inversions inside the G and H terms are this design's reading of those
// equations, chosen so that the outputs form a leading-zero count. X0 carries
// weight 4, X1 weight 2, X2 weight 1, so z = {X0, X1, X2}.
//
// Interface: a[7:0] in; v = 1 when a != 0; z[2:0] = number of leading zeros.
// For a == 0 the equations give v = 0 and z = 7.
// Timing: purely combinational, no clock and no state.
module lzc8 (
  input  logic [7:0] a,
  output logic       v,
  output logic [2:0] z
);

  // First-level group terms over neighbouring bits.
  logic g0, g1, g2, g3, g4, g5, g6;
  // Second-level terms: three count bits and the lower-nibble-zero term.
  logic h0, h1, h2, h3;

  always_comb begin
    g0 = a[7] | a[6];
    g1 = ~a[7] & (a[6] | ~a[5]);
    g2 = a[5] | a[4];
    g3 = a[6] | a[4];
    g4 = a[3] | a[2];
    g5 = ~a[3] & (a[2] | ~a[1]);
    g6 = a[1] | a[0];

    h0 = ~(g0 | g2);
    h1 = ~g0 & (g2 | ~g4);
    h2 = g1 & (g3 | g5);
    h3 = ~(g4 | g6);

    v  = ~(h0 & h3);
    z  = {h0, h1, h2};
  end

endmodule
