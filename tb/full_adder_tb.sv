// Self-checking test of full_adder: all eight input combinations, each
// compared with the two-bit count of ones among the inputs.
module full_adder_tb;
  timeunit 1ns; timeprecision 1ps;

  logic a, b, cin, sum, cout;
  int checks = 0, failures = 0;

  full_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    #10000;
    failures++;
    $display("watchdog: simulation did not end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int unsigned ones;
      {a, b, cin} = 3'(v);
      ones = int'(a) + int'(b) + int'(cin);
      #1;
      checks++;
      if ({cout, sum} != 2'(ones)) begin
        failures++;
        $display("FAIL a=%b b=%b cin=%b: got cout=%b sum=%b", a, b, cin, cout, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
