// 4x4 unsigned Dadda multiplier with carry-save rows and a ripple-carry
// final adder.
//
// Two rows of full adders reduce the sixteen partial products a_i & b_j to
// two numbers without propagating any carry: each adder's carry is kept
// ("saved") and handed to the next row one weight up.
//   row 1 (fa1..fa5):  adds the products of weights 1..5   -> s1..s5, d1..d5
//   row 2 (fa6..fa10): s2 + d1, s3 + d2 + a3b0, s4 + d3, s5 + d4,
//                      a3b3 + d5                            -> s6..s10, d6..d10
// Then a 5-bit ripple-carry adder adds {d10, s10, s9, s8, s7} and
// {0, d9, d8, d7, d6} to give p4..p8; p1 = a0b0, p2 = s1 and p3 = s6 come
// straight out.
// The cell count, the nets s*, d* and which products enter which adder
// follow the structural diagram of this multiplier. The diagram's product
// labels only make sense with the index of b mirrored (every adder then adds
// bits of one weight), and that is how they are read here. Adding d10 in the
// top bit of the final adder, rather than taking it straight to p8, is this
// design's own choice: it also takes in the carry out of the p7 adder, which
// the diagram leaves unconnected. Adders drawn with two inputs get a
// constant 0 on the third.
//
// Interface: p = a * b, with p[k] holding product bit p(k+1).
// Purely combinational: no clock, no reset.
module dadda4x4_csa
  import dadda_pkg::*;
(
  input  operand_t a,
  input  operand_t b,
  output product_t p
);
  pp_array_t pp;

  pp_gen4x4 u_pp (.a(a), .b(b), .pp(pp));

  // product a_i & b_j
  function automatic logic ab(input logic [1:0] i, input logic [1:0] j);
    return pp[j][i];
  endfunction

  logic s1, s2, s3, s4, s5, s6, s7, s8, s9, s10;
  logic d1, d2, d3, d4, d5, d6, d7, d8, d9, d10;

  // row 1: carry-save, one adder per weight 1..5
  full_adder fa1  (.a(ab(0,1)), .b(ab(1,0)), .cin(1'b0),    .sum(s1),  .cout(d1));
  full_adder fa2  (.a(ab(0,2)), .b(ab(1,1)), .cin(ab(2,0)), .sum(s2),  .cout(d2));
  full_adder fa3  (.a(ab(0,3)), .b(ab(1,2)), .cin(ab(2,1)), .sum(s3),  .cout(d3));
  full_adder fa4  (.a(ab(1,3)), .b(ab(2,2)), .cin(ab(3,1)), .sum(s4),  .cout(d4));
  full_adder fa5  (.a(ab(2,3)), .b(ab(3,2)), .cin(1'b0),    .sum(s5),  .cout(d5));
  // row 2: carry-save, weights 2..6
  full_adder fa6  (.a(s2),      .b(d1),      .cin(1'b0),    .sum(s6),  .cout(d6));
  full_adder fa7  (.a(s3),      .b(d2),      .cin(ab(3,0)), .sum(s7),  .cout(d7));
  full_adder fa8  (.a(s4),      .b(d3),      .cin(1'b0),    .sum(s8),  .cout(d8));
  full_adder fa9  (.a(s5),      .b(d4),      .cin(1'b0),    .sum(s9),  .cout(d9));
  full_adder fa10 (.a(ab(3,3)), .b(d5),      .cin(1'b0),    .sum(s10), .cout(d10));

  // final stage: ripple-carry adder over weights 3..7
  logic [4:0] hi;
  logic       cout;

  ripple_carry_adder #(.WIDTH(5)) u_rca (
    .x   ({d10, s10, s9, s8, s7}),
    .y   ({1'b0, d9, d8, d7, d6}),
    .cin (1'b0),
    .s   (hi),
    .cout(cout)
  );

  assign p = {hi, s6, s1, ab(0,0)};

  // a * b <= 225 fits in 8 bits, so the final adder never carries out
  always_comb assert (cout == 1'b0);
endmodule
