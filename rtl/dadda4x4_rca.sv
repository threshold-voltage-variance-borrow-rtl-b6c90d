// 4x4 unsigned Dadda multiplier with ripple-carry rows.
//
// The sixteen partial products a_i & b_j come from pp_gen4x4 and take the
// names of the AND-array diagram, columns a3..a0, rows b0..b3 top to bottom:
//   row b0: m2  m1  m0  p1      row b2: m4  m9  m12 m11
//   row b1: m3  m8  m7  m6      row b3: m5  m10 m13 m14
// The diagram does not print the b index of its rows; the order above is the
// only one under which every full adder below adds bits of one weight.
// p1 = a0 & b0 is the least significant product bit. They are summed by three
// rows of full adders. In each row a full adder's carry goes to the next
// adder of the same row, one weight up, so each row behaves as a ripple-carry
// adder, and its sums drop to the row below:
//   row 1 (fa1..fa6):   m0..m5  + m6..m10         -> p2, s2..s6, carries d1..d6
//   row 2 (fa7..fa11):  s2..s6  + m11, m12, m13   -> p3, s8, s9, s10, p7
//   row 3 (fa12..fa14): s8..s10 + m14             -> p4, p5, p6
// The adder numbering, the net names m*, s*, d* and the place of every input
// follow the structural diagram of this multiplier. Two things are this
// design's own, because the diagram leaves them open: the carry d13 out of
// the p6 adder goes into the p7 adder (fa11), and a last adder fa15 adds the
// two carries of weight 7 (d6 from fa6, d14 from fa11) to give p8. Full
// adders drawn with two inputs get a constant 0 on the third.
//
// Interface: p = a * b, with p[k] holding product bit p(k+1).
// Purely combinational: no clock, no reset, a result for every input.
module dadda4x4_rca
  import dadda_pkg::*;
(
  input  operand_t a,
  input  operand_t b,
  output product_t p
);
  pp_array_t   pp;
  logic        p1;
  logic [14:0] m;

  pp_gen4x4 u_pp (.a(a), .b(b), .pp(pp));

  always_comb begin
    p1    = pp[0][0];  m[0]  = pp[0][1];  m[1]  = pp[0][2];  m[2]  = pp[0][3];
    m[6]  = pp[1][0];  m[7]  = pp[1][1];  m[8]  = pp[1][2];  m[3]  = pp[1][3];
    m[11] = pp[2][0];  m[12] = pp[2][1];  m[9]  = pp[2][2];  m[4]  = pp[2][3];
    m[14] = pp[3][0];  m[13] = pp[3][1];  m[10] = pp[3][2];  m[5]  = pp[3][3];
  end

  logic p2, p3, p4, p5, p6, p7, p8;
  logic s2, s3, s4, s5, s6, s8, s9, s10;
  logic d1, d2, d3, d4, d5, d6, d7, d8, d9, d10, d11, d12, d13, d14, d15;

  // row 1
  full_adder fa1  (.a(m[6]),  .b(m[0]), .cin(1'b0), .sum(p2),  .cout(d1));
  full_adder fa2  (.a(m[7]),  .b(m[1]), .cin(d1),   .sum(s2),  .cout(d2));
  full_adder fa3  (.a(m[8]),  .b(m[2]), .cin(d2),   .sum(s3),  .cout(d3));
  full_adder fa4  (.a(m[9]),  .b(m[3]), .cin(d3),   .sum(s4),  .cout(d4));
  full_adder fa5  (.a(m[10]), .b(m[4]), .cin(d4),   .sum(s5),  .cout(d5));
  full_adder fa6  (.a(m[5]),  .b(1'b0), .cin(d5),   .sum(s6),  .cout(d6));
  // row 2
  full_adder fa7  (.a(m[11]), .b(s2),   .cin(1'b0), .sum(p3),  .cout(d7));
  full_adder fa8  (.a(m[12]), .b(s3),   .cin(d7),   .sum(s8),  .cout(d8));
  full_adder fa9  (.a(m[13]), .b(s4),   .cin(d8),   .sum(s9),  .cout(d9));
  full_adder fa10 (.a(s5),    .b(1'b0), .cin(d9),   .sum(s10), .cout(d10));
  full_adder fa11 (.a(s6),    .b(d13),  .cin(d10),  .sum(p7),  .cout(d14));
  // row 3
  full_adder fa12 (.a(m[14]), .b(s8),   .cin(1'b0), .sum(p4),  .cout(d11));
  full_adder fa13 (.a(s9),    .b(1'b0), .cin(d11),  .sum(p5),  .cout(d12));
  full_adder fa14 (.a(s10),   .b(1'b0), .cin(d12),  .sum(p6),  .cout(d13));
  // weight 7: at most one of d6, d14 is set since a * b <= 225, so d15 is 0
  full_adder fa15 (.a(d6),    .b(d14),  .cin(1'b0), .sum(p8),  .cout(d15));

  assign p = {p8, p7, p6, p5, p4, p3, p2, p1};

  always_comb assert (d15 == 1'b0);
endmodule
