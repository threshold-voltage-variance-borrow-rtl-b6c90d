// Self-checking test of dadda4x4_csa: all 256 pairs of 4-bit operands,
// each product compared with integer multiplication. The case 6 x 7 = 42,
// the sample shown for the multiplier in simulation, is among them and is
// also checked on its own.
module dadda4x4_csa_tb;
  timeunit 1ns; timeprecision 1ps;
  import dadda_pkg::*;

  operand_t a, b;
  product_t p;
  int checks = 0, failures = 0;

  dadda4x4_csa dut (.a(a), .b(b), .p(p));

  initial begin
    #100000;
    failures++;
    $display("watchdog: simulation did not end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int va, input int vb);
    a = operand_t'(va);
    b = operand_t'(vb);
    #1;
    checks++;
    if (p != product_t'(va * vb)) begin
      failures++;
      $display("FAIL %0d x %0d: got %0d", va, vb, p);
    end
  endtask

  initial begin
    check(6, 7);
    for (int va = 0; va < 16; va++)
      for (int vb = 0; vb < 16; vb++)
        check(va, vb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
