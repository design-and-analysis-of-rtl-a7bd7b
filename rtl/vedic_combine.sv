// vedic_combine: the three-adder stage that joins four half-size products
// into one full product, shared by every level of the Vedic multiplier.
//
// An N x N product (N = 2H) with operands split into high and low halves
// is built from four H x H products, each 2H bits wide:
//   q0 = a_lo*b_lo, q1 = a_hi*b_lo, q2 = a_lo*b_hi, q3 = a_hi*b_hi.
// The low H bits of the result are q0's low H bits, unchanged. Two adders
// work in parallel: the left one adds {q3, H zeros} to q2 (3H bits), the
// right one adds q1 to the high half of q0 (2H bits). A third adder sums
// the two into result bits [4H-1:H]. All three are carry lookahead adders.
// None of them can carry out (each sum fits its width), so their carry
// outputs are left open.
//
// Interface: q0..q3 (2H bits each) in; q (4H bits) out. Combinational.
// The split, the adder inputs and the output slices follow the published
// block diagrams of the 4x4 to 32x32 stages; putting the common stage in
// one parameterised module is this design's choice.
module vedic_combine #(
  parameter int unsigned H = 2
) (
  input  logic [2*H-1:0] q0,
  input  logic [2*H-1:0] q1,
  input  logic [2*H-1:0] q2,
  input  logic [2*H-1:0] q3,
  output logic [4*H-1:0] q
);

  logic [3*H-1:0] sum_left;   // q3 * 2^H + q2
  logic [2*H-1:0] sum_right;  // q1 + q0 / 2^H
  logic [3*H-1:0] sum_top;    // product / 2^H

  cla_adder #(.WIDTH(3*H)) u_add_left (
    .a    ({q3, {H{1'b0}}}),
    .b    ({{H{1'b0}}, q2}),
    .cin  (1'b0),
    .sum  (sum_left),
    .cout ()
  );

  cla_adder #(.WIDTH(2*H)) u_add_right (
    .a    (q1),
    .b    ({{H{1'b0}}, q0[2*H-1:H]}),
    .cin  (1'b0),
    .sum  (sum_right),
    .cout ()
  );

  cla_adder #(.WIDTH(3*H)) u_add_top (
    .a    (sum_left),
    .b    ({{H{1'b0}}, sum_right}),
    .cin  (1'b0),
    .sum  (sum_top),
    .cout ()
  );

  assign q = {sum_top, q0[H-1:0]};

endmodule
