// vedic_mul32: 32x32-bit unsigned Vedic multiplier.
//
// Both operands are split into 16-bit halves, and four 16x16 multipliers
// form all four partial products at once:
//   q0 = a[15:0]*b[15:0], q1 = a[31:16]*b[15:0],
//   q2 = a[15:0]*b[31:16], q3 = a[31:16]*b[31:16].
// vedic_combine adds them with three carry lookahead adders: q[15:0] is
// q0[15:0], and q[63:16] is ({q3, 16 zeros} + q2) + (q1 + q0[31:16]).
//
// Interface: a, b (32 bits) in; q (64 bits) out. Combinational.
// The four-way split and the adder arrangement follow the published
// 32x32 block diagram; the adders are carry lookahead adders, which is
// the adder the design selects.
module vedic_mul32 (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [63:0] q
);

  logic [31:0] q0, q1, q2, q3;

  vedic_mul16 u_ll (.a(a[15:0]), .b(b[15:0]), .q(q0));
  vedic_mul16 u_hl (.a(a[31:16]), .b(b[15:0]), .q(q1));
  vedic_mul16 u_lh (.a(a[15:0]), .b(b[31:16]), .q(q2));
  vedic_mul16 u_hh (.a(a[31:16]), .b(b[31:16]), .q(q3));

  vedic_combine #(.H(16)) u_combine (
    .q0 (q0), .q1 (q1), .q2 (q2), .q3 (q3), .q (q)
  );

endmodule
