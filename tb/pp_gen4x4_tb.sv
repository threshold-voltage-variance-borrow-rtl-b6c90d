// Self-checking test of pp_gen4x4: for all 256 operand pairs, every one of
// the sixteen products pp[j][i] is compared with bit i of a and bit j of b,
// and the weighted sum of the array is compared with a * b.
module pp_gen4x4_tb;
  timeunit 1ns; timeprecision 1ps;
  import dadda_pkg::*;

  operand_t  a, b;
  pp_array_t pp;
  int checks = 0, failures = 0;

  pp_gen4x4 dut (.a(a), .b(b), .pp(pp));

  initial begin
    #100000;
    failures++;
    $display("watchdog: simulation did not end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int va = 0; va < 16; va++)
      for (int vb = 0; vb < 16; vb++) begin
        int unsigned total;
        a = operand_t'(va);
        b = operand_t'(vb);
        #1;
        total = 0;
        for (int j = 0; j < 4; j++)
          for (int i = 0; i < 4; i++) begin
            logic want;
            want = ((va >> i) & 1) == 1 && ((vb >> j) & 1) == 1;
            checks++;
            if (pp[j][i] !== want) begin
              failures++;
              $display("FAIL a=%0d b=%0d pp[%0d][%0d]=%b", va, vb, j, i, pp[j][i]);
            end
            if (pp[j][i]) total += 1 << (i + j);
          end
        checks++;
        if (total != va * vb) begin
          failures++;
          $display("FAIL a=%0d b=%0d weighted sum %0d", va, vb, total);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
