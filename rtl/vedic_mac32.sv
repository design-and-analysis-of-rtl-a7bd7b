// vedic_mac32: 32x32-bit multiply-accumulate unit built on a Vedic
// (Urdhva Tiryakbhyam) multiplier and a carry lookahead adder.
//
// Every clock cycle the unit multiplies operand_1 by operand_2 (unsigned)
// in the combinational 32x32 Vedic multiplier, adds the 64-bit product to
// the accumulator in a 64-bit carry lookahead adder, and stores the sum in
// the 64-bit accumulator. result is the accumulator; carry is the carry out
// of the most recent accumulation, i.e. it reports that the 64-bit sum
// wrapped. The accumulator then holds the sum modulo 2^64.
//
// Interface: clk; reset_low (active low, synchronous) clears accumulator
// and carry; operand_1, operand_2 (32 bits); result (64 bits); carry.
// Timing: operands presented before a rising edge are multiplied and added
// at that edge; result and carry show the new value right after it, one
// product per cycle. The critical path is multiplier plus adder.
//
// The structure (multiplier, 64-bit carry lookahead adder, 64-bit
// accumulator fed back to the adder), the pin names and widths follow the
// published unit. The clock, the synchronous reset, accumulating on every
// cycle and the adder's carry in of zero are this design's choices.
module vedic_mac32
  import vedic_mac_pkg::*;
(
  input  logic     clk,
  input  logic     reset_low,
  input  operand_t operand_1,
  input  operand_t operand_2,
  output acc_t     result,
  output logic     carry
);

  acc_t product;
  acc_t sum;
  logic sum_carry;

  vedic_mul32 u_mul (
    .a (operand_1),
    .b (operand_2),
    .q (product)
  );

  cla_adder #(.WIDTH(ACC_W)) u_add (
    .a    (product),
    .b    (result),
    .cin  (1'b0),
    .sum  (sum),
    .cout (sum_carry)
  );

  mac_accumulator #(.WIDTH(ACC_W)) u_acc (
    .clk       (clk),
    .reset_low (reset_low),
    .sum       (sum),
    .sum_carry (sum_carry),
    .acc       (result),
    .carry     (carry)
  );

endmodule
