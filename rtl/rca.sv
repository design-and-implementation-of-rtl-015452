// rca: N-bit ripple carry adder.
//
// A chain of one-bit adders, the carry of bit i feeding bit i+1; the carry out
// of the top bit is cout. Delay grows linearly with N.
//
// HAS_CIN = 1: every bit is a full_adder and cin is added at bit 0.
// HAS_CIN = 0: the adder always assumes a carry in of 0, so bit 0 is a
//   half_adder and the cin port is not used. This is the form used in every
//   carry-select group of the square-root adder, where the carry-in-1 result is
//   derived from this one by an excess-1 converter.
// Purely combinational. The HAS_CIN switch is this design's way of expressing
// the half-adder-at-bit-0 arrangement; N defaults to the 4-bit adder used in
// the gate-count comparison.
module rca #(
  parameter int unsigned N       = 4,
  parameter bit          HAS_CIN = 1'b1
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);
  logic [N:0] c;

  if (HAS_CIN) begin : g_fa0
    assign c[0] = cin;
    full_adder u_bit0 (.a(a[0]), .b(b[0]), .cin(c[0]), .sum(sum[0]), .cout(c[1]));
  end else begin : g_ha0
    // No carry in: bit 0 is a half adder; c[0] is a constant placeholder.
    logic unused_cin;
    assign unused_cin = cin;
    assign c[0] = 1'b0;
    half_adder u_bit0 (.a(a[0]), .b(b[0]), .sum(sum[0]), .cout(c[1]));
  end

  for (genvar i = 1; i < N; i++) begin : g_bit
    full_adder u_fa (.a(a[i]), .b(b[i]), .cin(c[i]), .sum(sum[i]), .cout(c[i+1]));
  end

  assign cout = c[N];
endmodule
