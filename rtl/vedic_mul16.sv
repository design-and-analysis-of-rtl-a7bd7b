// vedic_mul16: 16x16-bit unsigned Vedic multiplier.
//
// Both operands are split into 8-bit halves, and four 8x8 multipliers
// form all four partial products at once:
//   q0 = a[7:0]*b[7:0], q1 = a[15:8]*b[7:0],
//   q2 = a[7:0]*b[15:8], q3 = a[15:8]*b[15:8].
// vedic_combine adds them with three carry lookahead adders: q[7:0] is
// q0[7:0], and q[31:8] is ({q3, 8 zeros} + q2) + (q1 + q0[15:8]).
//
// Interface: a, b (16 bits) in; q (32 bits) out. Combinational.
// The four-way split and the adder arrangement follow the published
// 16x16 block diagram; the adders are carry lookahead adders, which is
// the adder the design selects.
module vedic_mul16 (
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [31:0] q
);

  logic [15:0] q0, q1, q2, q3;

  vedic_mul8 u_ll (.a(a[7:0]), .b(b[7:0]), .q(q0));
  vedic_mul8 u_hl (.a(a[15:8]), .b(b[7:0]), .q(q1));
  vedic_mul8 u_lh (.a(a[7:0]), .b(b[15:8]), .q(q2));
  vedic_mul8 u_hh (.a(a[15:8]), .b(b[15:8]), .q(q3));

  vedic_combine #(.H(8)) u_combine (
    .q0 (q0), .q1 (q1), .q2 (q2), .q3 (q3), .q (q)
  );

endmodule
