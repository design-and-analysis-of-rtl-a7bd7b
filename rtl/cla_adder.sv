// cla_adder: WIDTH-bit carry lookahead adder.
//
// Every position forms its generate G_i = A_i.B_i and propagate
// P_i = A_i xor B_i; cla_tree computes all carries from them by 4-bit
// lookahead (in levels of four for wide words), and each sum bit is
// S_i = P_i xor C_i. The carry out is G + P.Cin over the whole word.
//
// Interface: a, b, cin in; sum, cout out. Combinational, no clock.
// The carry lookahead adder is the adder the design uses for both the
// multiplier's partial products and the accumulation; WIDTH defaults to the
// 64 bits of the accumulation adder. The tree arrangement above four bits is
// this design's choice.
module cla_adder #(
  parameter int unsigned WIDTH = 64
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  logic [WIDTH-1:0] g, p, c;
  logic             gg, pg;

  assign g = a & b;
  assign p = a ^ b;

  cla_tree #(.N(WIDTH)) u_tree (
    .g (g), .p (p), .cin (cin), .c (c), .gg (gg), .pg (pg)
  );

  assign sum  = p ^ c;
  assign cout = gg | (pg & cin);

endmodule
