// csla_bec_group: one N-bit group of the modified (BEC-based) carry select adder.
//
// An N-bit ripple carry adder with carry in 0 produces the (N+1)-bit result
// {c0, s0} = a + b. An (N+1)-bit excess-1 converter adds one to it, giving
// {c1, s1} = a + b + 1 without a second adder. When the real carry from the
// group below (c_sel) arrives, an (N+1)-bit 2:1 mux picks one of the two, so
// the group adds only one mux delay to the carry path once its own operands
// have settled. This replaces the second (carry-in-1) ripple adder of the
// regular carry select adder.
// Ports: a, b (N bits), c_sel; outputs sum (N bits) and cout.
// Purely combinational.
module csla_bec_group #(
  parameter int unsigned N = 2
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         c_sel,
  output logic [N-1:0] sum,
  output logic         cout
);
  logic [N-1:0] s0;
  logic         c0;
  logic [N:0]   r1;   // {c1, s1}, the carry-in-1 result

  rca #(.N(N), .HAS_CIN(1'b0)) u_rca (
    .a(a), .b(b), .cin(1'b0), .sum(s0), .cout(c0)
  );

  bec #(.N(N+1)) u_bec (.b({c0, s0}), .x(r1));

  csel_mux #(.W(N+1)) u_mux (
    .in0({c0, s0}), .in1(r1), .sel(c_sel), .y({cout, sum})
  );
endmodule
