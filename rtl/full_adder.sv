// One-bit full adder, the only arithmetic cell of both multipliers.
// Adds three bits of equal weight and returns a sum bit of that weight and
// a carry bit of the next weight. Purely combinational; no clock.
// The cells of the multipliers are described as full adders built in
// pass-transistor logic styles; only their logic function is modelled here,
// written as the usual XOR sum and majority carry.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  always_comb begin
    sum  = a ^ b ^ cin;
    cout = (a & b) | (a & cin) | (b & cin);
  end
endmodule
