// Shared sizes and types of the 4x4 Dadda multipliers.
// The operands are 4-bit unsigned numbers and the product is 8 bits wide,
// written p1 (least significant) to p8 in the structural diagrams; here
// product bit k holds p(k+1). The multipliers are drawn for exactly this
// size, so these constants are fixed rather than free parameters.
package dadda_pkg;
  localparam int unsigned N  = 4;      // operand width
  localparam int unsigned PW = 2 * N;  // product width

  typedef logic [N-1:0]  operand_t;
  typedef logic [PW-1:0] product_t;

  // Partial product a_i & b_j, indexed pp[j][i] (row j = multiplier bit b_j,
  // column i = multiplicand bit a_i), weight i + j.
  typedef logic [N-1:0][N-1:0] pp_array_t;
endpackage
