// tb_csla_bec_group: exhaustive check of one carry-select group at every width
// the 16-bit adder uses (2, 3, 4 and 5 bits): for all operands and both values
// of the incoming carry, {cout, sum} must equal a + b + c_sel.
module tb_csla_bec_group;
  logic [1:0] a2, b2, s2;
  logic [2:0] a3, b3, s3;
  logic [3:0] a4, b4, s4;
  logic [4:0] a5, b5, s5;
  logic       c2, c3, c4, c5, csel;
  int checks = 0, failures = 0;

  csla_bec_group dut2 (.a(a2), .b(b2), .c_sel(csel), .sum(s2), .cout(c2));
  csla_bec_group #(.N(3)) dut3 (.a(a3), .b(b3), .c_sel(csel), .sum(s3), .cout(c3));
  csla_bec_group #(.N(4)) dut4 (.a(a4), .b(b4), .c_sel(csel), .sum(s4), .cout(c4));
  csla_bec_group #(.N(5)) dut5 (.a(a5), .b(b5), .c_sel(csel), .sum(s5), .cout(c5));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2048; i++) begin
      {csel, a5, b5} = 11'(i);
      a4 = 4'(a5); b4 = 4'(b5);
      a3 = 3'(a5); b3 = 3'(b5);
      a2 = 2'(a5); b2 = 2'(b5);
      #1;
      checks++;
      if ({c5, s5} !== 6'(a5 + b5 + csel)) begin failures++; $display("FAIL N=5 a=%h b=%h c=%b", a5, b5, csel); end
      if (a5[4] == 1'b0 && b5[4] == 1'b0) begin
        checks++;
        if ({c4, s4} !== 5'(a4 + b4 + csel)) begin failures++; $display("FAIL N=4 a=%h b=%h c=%b", a4, b4, csel); end
        if (a5[3] == 1'b0 && b5[3] == 1'b0) begin
          checks++;
          if ({c3, s3} !== 4'(a3 + b3 + csel)) begin failures++; $display("FAIL N=3 a=%h b=%h c=%b", a3, b3, csel); end
          if (a5[2] == 1'b0 && b5[2] == 1'b0) begin
            checks++;
            if ({c2, s2} !== 3'(a2 + b2 + csel)) begin failures++; $display("FAIL N=2 a=%h b=%h c=%b", a2, b2, csel); end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
