// Partial-product generator of the 4x4 multipliers.
// Sixteen two-input ANDs form every product a_i & b_j of the two operands,
// returned as the array pp[j][i], of weight i + j. The net names the
// ripple-carry multiplier gives these products (m0..m14, p1) are listed in
// that module. Purely combinational.
module pp_gen4x4
  import dadda_pkg::*;
(
  input  operand_t  a,
  input  operand_t  b,
  output pp_array_t pp
);
  always_comb begin
    for (int j = 0; j < N; j++)
      for (int i = 0; i < N; i++)
        pp[j][i] = a[i] & b[j];
  end
endmodule
