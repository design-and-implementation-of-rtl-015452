// half_adder: one-bit half adder, sum = a ^ b, cout = a & b.
//
// Used as bit 0 of the ripple carry adders whose carry input is a constant 0,
// where a full adder would waste gates. The XOR is the AND/OR/NOT form of
// xor_aoi. The gate structure is the usual one; only the use of a half adder
// at the carry-in-0 position comes from the adder's description.
// Purely combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic cout
);
  xor_aoi u_xor (.a(a), .b(b), .y(sum));

  always_comb cout = a & b;
endmodule
