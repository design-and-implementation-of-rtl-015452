// tb_mod_sqrt_csla64: self-checking test of the 64-bit modified square-root carry select
// adder. Operands are directed corner cases (zero, all ones, a carry entering
// at bit 0 and rippling through every group, alternating patterns) followed by
// 30000 random operand pairs with random carry in. Each result is compared with
// {cout, sum} = a + b + cin computed by 65-bit integer addition.
//
// The test also counts how the carry-select mechanism was exercised: for every
// group multiplexer (groups 1..4 of each 16-bit slice) the carry arriving at
// the group is worked out from the reference sum as a[p] ^ b[p] ^ ref[p],
// where p is the group's lowest bit. Each mux must have selected its
// carry-in-0 (ripple adder) input and its carry-in-1 (excess-1 converter)
// input at least once; each carry between 16-bit slices must have been 1 at
// least once; cout must have been 1, and one addition must have carried from
// bit 0 all the way out of the top bit. A mechanism that never happened counts
// as a failure.
module tb_mod_sqrt_csla64;
  import csla_pkg::*;

  localparam int unsigned W       = 64;
  localparam int unsigned NSLICE  = W / SLICE_W;
  localparam int unsigned NRANDOM = 30000;

  logic [W-1:0] a, b, sum;
  logic         cin, cout;
  int checks = 0, failures = 0;

  // Coverage counters.
  int sel0 [NSLICE][N_GROUPS];
  int sel1 [NSLICE][N_GROUPS];
  int slice_carry [NSLICE];
  int n_cout = 0, n_full_ripple = 0;

  mod_sqrt_csla64 dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [W-1:0] ta, input logic [W-1:0] tb_, input logic tc);
    logic [W:0] expected;
    int unsigned p;
    a = ta; b = tb_; cin = tc;
    expected = {1'b0, ta} + {1'b0, tb_} + (W+1)'(tc);
    #1;
    checks++;
    if ({cout, sum} !== expected) begin
      failures++;
      if (failures < 10)
        $display("FAIL a=%h b=%h cin=%b got %b_%h expected %b_%h",
                 ta, tb_, tc, cout, sum, expected[W], expected[W-1:0]);
    end
    // Carry arriving at each group mux and slice boundary, from the reference.
    for (int s = 0; s < NSLICE; s++) begin
      for (int g = 1; g < N_GROUPS; g++) begin
        p = s * SLICE_W + GROUP_LSB[g];
        if ((ta[p] ^ tb_[p] ^ expected[p]) == 1'b1) sel1[s][g]++;
        else                                         sel0[s][g]++;
      end
      if (s > 0) begin
        p = s * SLICE_W;
        if ((ta[p] ^ tb_[p] ^ expected[p]) == 1'b1) slice_carry[s]++;
      end
    end
    if (expected[W]) n_cout++;
    if (tc && (ta ^ tb_) == '1) n_full_ripple++;
  endtask

  initial begin
    foreach (sel0[s, g]) begin sel0[s][g] = 0; sel1[s][g] = 0; end
    foreach (slice_carry[s]) slice_carry[s] = 0;
    a = '0; b = '0; cin = 1'b0;

    // Directed cases.
    apply('0, '0, 1'b0);
    apply('0, '0, 1'b1);
    apply('1, '0, 1'b1);          // carry ripples from bit 0 out of the top
    apply('0, '1, 1'b1);
    apply('1, '1, 1'b1);
    apply('1, '1, 1'b0);
    apply({(W/2){2'b01}}, {(W/2){2'b10}}, 1'b1);
    apply({(W/2){2'b01}}, {(W/2){2'b01}}, 1'b0);
    apply({(W/4){4'h5}}, {(W/4){4'hb}}, 1'b0);
    // One bit set at each position, added to all ones.
    for (int i = 0; i < W; i++) apply(W'(1) << i, '1, 1'b0);

    // Random cases.
    for (int n = 0; n < NRANDOM; n++) begin
      logic [W-1:0] ra, rb;
      for (int k = 0; k < W; k += 32) begin
        ra[k +: 32] = $urandom;
        rb[k +: 32] = $urandom;
      end
      apply(ra, rb, 1'($urandom));
    end

    // Every mechanism must have happened.
    for (int s = 0; s < NSLICE; s++) begin
      for (int g = 1; g < N_GROUPS; g++) begin
        checks += 2;
        if (sel0[s][g] == 0) begin failures++; $display("NEVER: slice %0d group %0d selected its carry-in-0 result", s, g); end
        if (sel1[s][g] == 0) begin failures++; $display("NEVER: slice %0d group %0d selected its excess-1 result", s, g); end
      end
      if (s > 0) begin
        checks++;
        if (slice_carry[s] == 0) begin failures++; $display("NEVER: carry into slice %0d", s); end
      end
    end
    checks += 2;
    if (n_cout == 0)        begin failures++; $display("NEVER: carry out"); end
    if (n_full_ripple == 0) begin failures++; $display("NEVER: carry from bit 0 to carry out"); end

    $display("coverage: slice0 group4 sel0=%0d sel1=%0d, cout=%0d, full ripple=%0d",
             sel0[0][N_GROUPS-1], sel1[0][N_GROUPS-1], n_cout, n_full_ripple);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
