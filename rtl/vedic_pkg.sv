// Shared widths and types of the 4x4 Urdhva Tiryagbhyam ("vertically and
// crosswise") multiplier. The operand and product widths are the ones the
// design is drawn for: two 4-bit unsigned operands and an 8-bit product.
// The adder tree in vedic_mul4x4_mux is hand-placed for exactly these widths,
// so they are constants rather than parameters of the multiplier.
package vedic_pkg;

  localparam int unsigned OPERAND_W = 4;
  localparam int unsigned PRODUCT_W = 2 * OPERAND_W;

  typedef logic [OPERAND_W-1:0] operand_t;
  typedef logic [PRODUCT_W-1:0] product_t;

  // Partial-product matrix: pp[i][j] = A[i] & B[j], weight 2**(i+j).
  typedef logic [OPERAND_W-1:0][OPERAND_W-1:0] pp_matrix_t;

endpackage
