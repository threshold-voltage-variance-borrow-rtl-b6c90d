// Top level: the two 4x4 Dadda multipliers side by side.
// Both take the same operands a and b. p_rca is the product from the
// multiplier whose full-adder rows ripple their carries (dadda4x4_rca);
// p_csa the product from the one whose rows save their carries and end in a
// ripple-carry adder (dadda4x4_csa). Both are a * b for every input, so
// p_match is 1 whenever both are working; it is this design's own addition,
// for comparing the two in simulation or on a board.
// Purely combinational: no clock, no reset, no handshake.
module dadda4x4_top
  import dadda_pkg::*;
(
  input  operand_t a,
  input  operand_t b,
  output product_t p_rca,
  output product_t p_csa,
  output logic     p_match
);
  dadda4x4_rca u_rca (.a(a), .b(b), .p(p_rca));
  dadda4x4_csa u_csa (.a(a), .b(b), .p(p_csa));

  assign p_match = (p_rca == p_csa);
endmodule
