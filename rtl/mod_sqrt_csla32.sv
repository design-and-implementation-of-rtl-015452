// mod_sqrt_csla32: 32-bit modified square-root carry select adder.
//
// {cout, sum} = a + b + cin, built from two 16-bit modified square-root carry
// select adders (mod_sqrt_csla16). The lower half adds bits [15:0] with cin; its
// carry out is the carry in of the upper half, which adds bits
// [31:16] and produces cout. Inside each half the carry still skips
// through the group multiplexers; between the halves it passes once.
// The group sizes of the 32-bit adder are not spelled out; building it from
// two 16-bit adders, like the 64- and 128-bit ones, is this design's choice.
// Purely combinational.
module mod_sqrt_csla32 (
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic        cin,
  output logic [31:0] sum,
  output logic        cout
);
  localparam int unsigned HALF = 16;

  logic c_mid;   // carry from the lower half into the upper half

  mod_sqrt_csla16 u_lo (
    .a   (a[HALF-1:0]),
    .b   (b[HALF-1:0]),
    .cin (cin),
    .sum (sum[HALF-1:0]),
    .cout(c_mid)
  );

  mod_sqrt_csla16 u_hi (
    .a   (a[2*HALF-1:HALF]),
    .b   (b[2*HALF-1:HALF]),
    .cin (c_mid),
    .sum (sum[2*HALF-1:HALF]),
    .cout(cout)
  );
endmodule
