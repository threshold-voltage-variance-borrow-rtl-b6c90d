// Ripple-carry adder: WIDTH full adders in a chain, each taking the carry
// out of the one below it, so the carry "ripples" from bit 0 to the top.
// Computes {cout, s} = x + y + cin. Purely combinational; the delay grows
// with WIDTH, one full-adder carry delay per bit.
// The default WIDTH of 4 is the four full adders of the last row of the
// carry-save multiplier diagram; that multiplier instantiates it with 5 bits
// so that the carry of the top bit lands in product bit p8.
module ripple_carry_adder #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic             cout
);
  logic [WIDTH:0] c;

  assign c[0] = cin;
  assign cout = c[WIDTH];

  for (genvar k = 0; k < WIDTH; k++) begin : g_fa
    full_adder u_fa (
      .a   (x[k]),
      .b   (y[k]),
      .cin (c[k]),
      .sum (s[k]),
      .cout(c[k+1])
    );
  end
endmodule
