// End-to-end test of dadda4x4_top at its default parameters: every pair of
// 4-bit operands is applied, and both products are compared with integer
// multiplication and with each other (p_match).
// It also counts, through hierarchical references, how often each carry path
// of the two multipliers is used, and counts a failure for any that never is:
//   rca_row_ripple   a carry leaving the top of row 1 of dadda4x4_rca (d6)
//   rca_d13          the carry of the p6 adder entering the p7 adder
//   rca_d14          the carry of the p7 adder reaching p8
//   csa_saved        a carry saved from row 2 of dadda4x4_csa into the final adder
//   csa_d10          the carry of the a3b3 adder reaching p8
//   csa_final_ripple the final ripple-carry adder carrying into its top bit
// The operand pair 6 x 7 = 42 is also checked on its own.
module dadda4x4_top_tb;
  timeunit 1ns; timeprecision 1ps;
  import dadda_pkg::*;

  operand_t a, b;
  product_t p_rca, p_csa;
  logic     p_match;
  int checks = 0, failures = 0;
  int rca_row_ripple = 0, rca_d13 = 0, rca_d14 = 0;
  int csa_saved = 0, csa_d10 = 0, csa_final_ripple = 0;

  dadda4x4_top dut (.a(a), .b(b), .p_rca(p_rca), .p_csa(p_csa), .p_match(p_match));

  initial begin
    #100000;
    failures++;
    $display("watchdog: simulation did not end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int va, input int vb);
    product_t want;
    a = operand_t'(va);
    b = operand_t'(vb);
    want = product_t'(va * vb);
    #1;
    checks += 3;
    if (p_rca != want) begin
      failures++;
      $display("FAIL rca %0d x %0d: got %0d", va, vb, p_rca);
    end
    if (p_csa != want) begin
      failures++;
      $display("FAIL csa %0d x %0d: got %0d", va, vb, p_csa);
    end
    if (p_match !== (p_rca == p_csa)) begin
      failures++;
      $display("FAIL p_match %0d x %0d: got %b", va, vb, p_match);
    end
    if (dut.u_rca.d6)  rca_row_ripple++;
    if (dut.u_rca.d13) rca_d13++;
    if (dut.u_rca.d14) rca_d14++;
    if ({dut.u_csa.d6, dut.u_csa.d7, dut.u_csa.d8, dut.u_csa.d9} != 4'b0) csa_saved++;
    if (dut.u_csa.d10) csa_d10++;
    if (dut.u_csa.u_rca.c[4]) csa_final_ripple++;
  endtask

  task automatic need(input string what, input int n);
    checks++;
    $display("%-18s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL %s never happened", what);
    end
  endtask

  initial begin
    check(6, 7);
    for (int va = 0; va < 16; va++)
      for (int vb = 0; vb < 16; vb++)
        check(va, vb);
    need("rca_row_ripple", rca_row_ripple);
    need("rca_d13", rca_d13);
    need("rca_d14", rca_d14);
    need("csa_saved", csa_saved);
    need("csa_d10", csa_d10);
    need("csa_final_ripple", csa_final_ripple);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
