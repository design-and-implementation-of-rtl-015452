// full_adder: one-bit full adder.
//
// sum  = a ^ b ^ cin, from two AND/OR/NOT XORs (xor_aoi).
// cout = (a & b) | (b & cin) | (cin & a), a majority gate of 3 ANDs and 2 ORs.
// This costs 7 AND, 4 OR and 4 NOT gates per bit, which is the gate budget of
// the 4-bit ripple carry adder (28 AND, 16 OR, 16 NOT) in the area comparison
// between ripple carry adders and excess-1 converters. The choice of the
// majority form for the carry is made to match that budget.
// Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  logic p;

  xor_aoi u_xor0 (.a(a), .b(b),   .y(p));
  xor_aoi u_xor1 (.a(p), .b(cin), .y(sum));

  always_comb cout = (a & b) | (b & cin) | (cin & a);
endmodule
