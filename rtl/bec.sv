// bec: N-bit binary to excess-1 converter, x = b + 1 (modulo 2^N).
//
// x[0] = ~b[0]
// x[i] = b[i] ^ (b[0] & b[1] & ... & b[i-1])    for i >= 1
// The AND terms are built as one chain (b0&b1, then that & b2, ...), one new
// AND gate per bit, as in the 4-bit converter's drawing; each XOR is the
// AND/OR/NOT form of xor_aoi. An excess-1 converter is cheaper than a second
// ripple carry adder, and in the carry-select adder it turns the carry-in-0
// result of a group into its carry-in-1 result.
// Generalising the 4-bit equations to any N is this design's choice.
// Purely combinational.
module bec #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] b,
  output logic [N-1:0] x
);
  // all_ones[i] = b[0] & ... & b[i-1]; all_ones[0] is the empty product.
  logic [N-1:0] all_ones;

  assign all_ones[0] = 1'b1;
  assign x[0]        = ~b[0];

  for (genvar i = 1; i < N; i++) begin : g_bit
    assign all_ones[i] = all_ones[i-1] & b[i-1];
    xor_aoi u_xor (.a(b[i]), .b(all_ones[i]), .y(x[i]));
  end
endmodule
