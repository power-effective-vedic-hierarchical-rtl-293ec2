// Shared widths of the 16x16 hierarchical multiplier.
//
// The multiplier splits each 16-bit operand into two 8-bit halves, forms
// the four half products with 8x8 Vedic multipliers and recombines them
// into a 32-bit product. These constants tie the widths of the top level
// together. The operand width of 16 bits and the half width of 8 bits are
// the sizes of the published design; nothing here is configurable beyond
// that, because the recombination network (CSA, carry select adder and
// BEC/MUX stages) is drawn for exactly these widths.
package mult_pkg;

  // Width of each operand.
  localparam int unsigned OP_W   = 16;
  // Width of an operand half, the size of one Vedic base multiplier.
  localparam int unsigned HALF_W = OP_W / 2;
  // Width of the full product.
  localparam int unsigned PROD_W = 2 * OP_W;

endpackage
