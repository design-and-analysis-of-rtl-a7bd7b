// vedic_mul8: 8x8-bit unsigned Vedic multiplier.
//
// Both operands are split into 4-bit halves, and four 4x4 multipliers
// form all four partial products at once:
//   q0 = a[3:0]*b[3:0], q1 = a[7:4]*b[3:0],
//   q2 = a[3:0]*b[7:4], q3 = a[7:4]*b[7:4].
// vedic_combine adds them with three carry lookahead adders: q[3:0] is
// q0[3:0], and q[15:4] is ({q3, 4 zeros} + q2) + (q1 + q0[7:4]).
//
// Interface: a, b (8 bits) in; q (16 bits) out. Combinational.
// The four-way split and the adder arrangement follow the published
// 8x8 block diagram; the adders are carry lookahead adders, which is
// the adder the design selects.
module vedic_mul8 (
  input  logic [7:0] a,
  input  logic [7:0] b,
  output logic [15:0] q
);

  logic [7:0] q0, q1, q2, q3;

  vedic_mul4 u_ll (.a(a[3:0]), .b(b[3:0]), .q(q0));
  vedic_mul4 u_hl (.a(a[7:4]), .b(b[3:0]), .q(q1));
  vedic_mul4 u_lh (.a(a[3:0]), .b(b[7:4]), .q(q2));
  vedic_mul4 u_hh (.a(a[7:4]), .b(b[7:4]), .q(q3));

  vedic_combine #(.H(4)) u_combine (
    .q0 (q0), .q1 (q1), .q2 (q2), .q3 (q3), .q (q)
  );

endmodule
