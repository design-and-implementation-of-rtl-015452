// csel_mux: W-bit 2:1 multiplexer of a carry-select group.
//
// y = sel ? in1 : in0. in0 is the group's result (sum bits and carry) computed
// for a carry in of 0, in1 the result for a carry in of 1, and sel is the real
// carry arriving from the group below. A group of N sum bits uses W = N+1
// (the "Mux 6-3" .. "Mux 12-6" of the 16-bit adder: 2W inputs, W outputs).
// The per-bit mux form is this design's choice; only its function is given.
// Purely combinational.
module csel_mux #(
  parameter int unsigned W = 3
) (
  input  logic [W-1:0] in0,
  input  logic [W-1:0] in1,
  input  logic         sel,
  output logic [W-1:0] y
);
  always_comb y = sel ? in1 : in0;
endmodule
