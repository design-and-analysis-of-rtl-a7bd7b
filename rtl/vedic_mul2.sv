// vedic_mul2: 2x2-bit multiplier by Urdhva Tiryakbhyam ("vertically and
// crosswise"), the leaf of the Vedic multiplier tree.
//
// Step 1, vertical: q0 is the product of the two least significant bits.
// Step 2, crosswise: the two cross products a1.b0 and a0.b1 are added by a
// half adder; the sum is q1, the carry goes to step 3.
// Step 3, vertical: the product of the two most significant bits is added to
// that carry by a second half adder, giving q2 and, as its carry, q3.
// A one-bit product is an AND, as in the published gate-level 2x2 block.
//
// Interface: a, b (2 bits, unsigned) in; q (4 bits) out. Combinational.
// Follows the published block exactly; nothing is added.
module vedic_mul2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] q
);

  logic v_lo, x_hl, x_lh, v_hi;  // vertical and crosswise one-bit products
  logic c_cross;                 // carry of the crosswise sum

  always_comb begin
    v_lo    = a[0] & b[0];
    x_hl    = a[1] & b[0];
    x_lh    = a[0] & b[1];
    v_hi    = a[1] & b[1];
    // half adder on the cross products
    q[1]    = x_hl ^ x_lh;
    c_cross = x_hl & x_lh;
    // half adder on the high vertical product and the carry
    q[2]    = v_hi ^ c_cross;
    q[3]    = v_hi & c_cross;
    q[0]    = v_lo;
  end

endmodule
