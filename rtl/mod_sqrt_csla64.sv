// mod_sqrt_csla64: 64-bit modified square-root carry select adder.
//
// {cout, sum} = a + b + cin, built from two 32-bit modified square-root carry
// select adders (mod_sqrt_csla32). The lower half adds bits [31:0] with cin; its
// carry out is the carry in of the upper half, which adds bits
// [63:32] and produces cout. Inside each half the carry still skips
// through the group multiplexers; between the halves it passes once.
// Building the 64-bit adder from two 32-bit ones follows the adder's
// description; the carry connection between the halves is the natural one.
// Purely combinational.
module mod_sqrt_csla64 (
  input  logic [63:0] a,
  input  logic [63:0] b,
  input  logic        cin,
  output logic [63:0] sum,
  output logic        cout
);
  localparam int unsigned HALF = 32;

  logic c_mid;   // carry from the lower half into the upper half

  mod_sqrt_csla32 u_lo (
    .a   (a[HALF-1:0]),
    .b   (b[HALF-1:0]),
    .cin (cin),
    .sum (sum[HALF-1:0]),
    .cout(c_mid)
  );

  mod_sqrt_csla32 u_hi (
    .a   (a[2*HALF-1:HALF]),
    .b   (b[2*HALF-1:HALF]),
    .cin (c_mid),
    .sum (sum[2*HALF-1:HALF]),
    .cout(cout)
  );
endmodule
