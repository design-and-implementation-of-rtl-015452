// xor_aoi: two-input exclusive OR built only from AND, OR and NOT gates.
//
// y = (a & ~b) | (~a & b). Two inverters, two AND gates and one OR gate, three
// gate levels deep. This is the "AOI" XOR used to count area and delay in the
// adder family: every gate is one unit of area and one unit of delay. All other
// XORs in this design (full adder, half adder, excess-1 converter) use it.
// Purely combinational; no clock.
module xor_aoi (
  input  logic a,
  input  logic b,
  output logic y
);
  logic a_n, b_n, t0, t1;

  always_comb begin
    a_n = ~a;
    b_n = ~b;
    t0  = a & b_n;
    t1  = a_n & b;
    y   = t0 | t1;
  end
endmodule
