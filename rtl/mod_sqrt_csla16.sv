// mod_sqrt_csla16: 16-bit modified square-root carry select adder.
//
// {cout, sum} = a + b + cin. Bits [1:0] are added by a 2-bit ripple carry adder
// that takes cin. Bits [3:2], [6:4], [10:7] and [15:11] are csla_bec_group
// blocks of 2, 3, 4 and 5 bits: each precomputes its result for carry in 0
// (ripple adder) and for carry in 1 (excess-1 converter on that result), and
// its mux selects one with the carry coming out of the group below. The
// carry out of the last group's mux is cout.
// The group boundaries, converter widths (N+1 for an N-bit group) and mux
// widths follow the adder's block diagram; the cin port and the mux select
// polarity (carry 1 selects the converter output) are this design's choices.
// Purely combinational.
module mod_sqrt_csla16
  import csla_pkg::*;
(
  input  logic [SLICE_W-1:0] a,
  input  logic [SLICE_W-1:0] b,
  input  logic               cin,
  output logic [SLICE_W-1:0] sum,
  output logic               cout
);
  // c[g] is the carry out of group g.
  logic [N_GROUPS-1:0] c;

  rca #(.N(GROUP_WIDTH[0]), .HAS_CIN(1'b1)) u_group0 (
    .a   (a[GROUP_LSB[0] +: GROUP_WIDTH[0]]),
    .b   (b[GROUP_LSB[0] +: GROUP_WIDTH[0]]),
    .cin (cin),
    .sum (sum[GROUP_LSB[0] +: GROUP_WIDTH[0]]),
    .cout(c[0])
  );

  for (genvar g = 1; g < N_GROUPS; g++) begin : g_group
    csla_bec_group #(.N(GROUP_WIDTH[g])) u_group (
      .a    (a[GROUP_LSB[g] +: GROUP_WIDTH[g]]),
      .b    (b[GROUP_LSB[g] +: GROUP_WIDTH[g]]),
      .c_sel(c[g-1]),
      .sum  (sum[GROUP_LSB[g] +: GROUP_WIDTH[g]]),
      .cout (c[g])
    );
  end

  assign cout = c[N_GROUPS-1];
endmodule
