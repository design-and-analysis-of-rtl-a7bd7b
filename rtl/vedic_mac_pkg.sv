// vedic_mac_pkg: widths shared by the multiply-accumulate unit and its parts.
//
// The unit multiplies two 32-bit unsigned operands into a 64-bit product and
// accumulates products in a 64-bit register; both widths are the published
// ones. Nothing here is configurable per instance: the Vedic multiplier is a
// fixed tree of 2x2, 4x4, 8x8, 16x16 and 32x32 stages.
package vedic_mac_pkg;

  localparam int unsigned OPERAND_W = 32;             // operand_1, operand_2
  localparam int unsigned PRODUCT_W = 2 * OPERAND_W;  // multiplier output
  localparam int unsigned ACC_W     = PRODUCT_W;      // accumulator and Result

  typedef logic [OPERAND_W-1:0] operand_t;
  typedef logic [ACC_W-1:0]     acc_t;

endpackage
