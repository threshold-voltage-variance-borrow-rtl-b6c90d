// Self-checking test of ripple_carry_adder at its default width of 4 bits:
// every x, y and carry in (512 cases), compared with integer addition.
// Also counts the cases where a carry ripples through all four adders
// (x + y = 15 with carry in) and where the carry out is set; each must occur.
module ripple_carry_adder_tb;
  timeunit 1ns; timeprecision 1ps;
  localparam int unsigned W = 4;

  logic [W-1:0] x, y, s;
  logic         cin, cout;
  int checks = 0, failures = 0;
  int full_ripple = 0, carried_out = 0;

  ripple_carry_adder dut (.x(x), .y(y), .cin(cin), .s(s), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("watchdog: simulation did not end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int vx = 0; vx < (1 << W); vx++)
      for (int vy = 0; vy < (1 << W); vy++)
        for (int vc = 0; vc < 2; vc++) begin
          int unsigned want;
          x = W'(vx); y = W'(vy); cin = 1'(vc);
          want = vx + vy + vc;
          #1;
          checks++;
          if ({cout, s} != (W+1)'(want)) begin
            failures++;
            $display("FAIL %0d + %0d + %0d: got %0d", vx, vy, vc, {cout, s});
          end
          if (vx + vy == (1 << W) - 1 && vc == 1) full_ripple++;
          if (cout) carried_out++;
        end
    checks++;
    if (full_ripple == 0 || carried_out == 0) begin
      failures++;
      $display("FAIL no full-length ripple (%0d) or no carry out (%0d)", full_ripple, carried_out);
    end
    $display("full-length ripples %0d, carries out %0d", full_ripple, carried_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
