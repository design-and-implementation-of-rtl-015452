// mod_sqrt_csla128: 128-bit modified square-root carry select adder.
//
// {cout, sum} = a + b + cin, built from two 64-bit modified square-root carry
// select adders (mod_sqrt_csla64). The lower half adds bits [63:0] with cin; its
// carry out is the carry in of the upper half, which adds bits
// [127:64] and produces cout. Inside each half the carry still skips
// through the group multiplexers; between the halves it passes once.
// This is the top of the design. Building it from two 64-bit adders follows
// the adder's description; the carry connection between the halves and the
// cin port are this design's choices.
// Purely combinational.
module mod_sqrt_csla128 (
  input  logic [127:0] a,
  input  logic [127:0] b,
  input  logic        cin,
  output logic [127:0] sum,
  output logic        cout
);
  localparam int unsigned HALF = 64;

  logic c_mid;   // carry from the lower half into the upper half

  mod_sqrt_csla64 u_lo (
    .a   (a[HALF-1:0]),
    .b   (b[HALF-1:0]),
    .cin (cin),
    .sum (sum[HALF-1:0]),
    .cout(c_mid)
  );

  mod_sqrt_csla64 u_hi (
    .a   (a[2*HALF-1:HALF]),
    .b   (b[2*HALF-1:HALF]),
    .cin (c_mid),
    .sum (sum[2*HALF-1:HALF]),
    .cout(cout)
  );
endmodule
