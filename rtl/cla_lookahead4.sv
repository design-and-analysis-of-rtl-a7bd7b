// cla_lookahead4: the 4-bit carry lookahead unit.
//
// From four generate/propagate pairs (G_i = A_i.B_i, P_i = A_i xor B_i) and
// the carry in C0 it forms every carry in two levels of logic, with the
// classic equations
//   C1 = G0 + P0.C0
//   C2 = G1 + P1.G0 + P1.P0.C0
//   C3 = G2 + P2.G1 + P2.P1.G0 + P2.P1.P0.C0
//   C4 = G3 + P3.G2 + P3.P2.G1 + P3.P2.P1.G0 + P3.P2.P1.P0.C0
// and also the group generate and group propagate of the four positions, so
// that the same unit can look ahead over groups of groups (see cla_tree).
//
// Interface: g, p (bit 0 least significant), c0. Outputs c[i] is the carry
// into position i (c[0] = c0), c4 the carry out, gg/pg the group terms.
// Purely combinational. The equations are the published ones; the group
// outputs are this design's addition for building wide adders.
module cla_lookahead4 (
  input  logic [3:0] g,
  input  logic [3:0] p,
  input  logic       c0,
  output logic [3:0] c,
  output logic       c4,
  output logic       gg,
  output logic       pg
);

  always_comb begin
    c[0] = c0;
    c[1] = g[0] | (p[0] & c0);
    c[2] = g[1] | (p[1] & g[0]) | (p[1] & p[0] & c0);
    c[3] = g[2] | (p[2] & g[1]) | (p[2] & p[1] & g[0]) | (p[2] & p[1] & p[0] & c0);
    gg   = g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1]) | (p[3] & p[2] & p[1] & g[0]);
    pg   = &p;
    c4   = gg | (pg & c0);
  end

endmodule
