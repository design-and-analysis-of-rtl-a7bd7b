// vedic_mul4: 4x4-bit unsigned Vedic multiplier.
//
// Both operands are split into 2-bit halves, and four 2x2 multipliers
// form all four partial products at once:
//   q0 = a[1:0]*b[1:0], q1 = a[3:2]*b[1:0],
//   q2 = a[1:0]*b[3:2], q3 = a[3:2]*b[3:2].
// vedic_combine adds them with three carry lookahead adders: q[1:0] is
// q0[1:0], and q[7:2] is ({q3, 2 zeros} + q2) + (q1 + q0[3:2]).
//
// Interface: a, b (4 bits) in; q (8 bits) out. Combinational.
// The four-way split and the adder arrangement follow the published
// 4x4 block diagram; the adders are carry lookahead adders, which is
// the adder the design selects.
module vedic_mul4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] q
);

  logic [3:0] q0, q1, q2, q3;

  vedic_mul2 u_ll (.a(a[1:0]), .b(b[1:0]), .q(q0));
  vedic_mul2 u_hl (.a(a[3:2]), .b(b[1:0]), .q(q1));
  vedic_mul2 u_lh (.a(a[1:0]), .b(b[3:2]), .q(q2));
  vedic_mul2 u_hh (.a(a[3:2]), .b(b[3:2]), .q(q3));

  vedic_combine #(.H(2)) u_combine (
    .q0 (q0), .q1 (q1), .q2 (q2), .q3 (q3), .q (q)
  );

endmodule
