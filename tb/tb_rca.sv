// tb_rca: exhaustive check of the ripple carry adder at its default width
// (4 bits, with carry in) and of a 5-bit carry-in-0 variant (half adder at
// bit 0), against integer addition.
module tb_rca;
  logic [3:0] a4, b4, s4;
  logic       cin, c4;
  logic [4:0] a5, b5, s5;
  logic       c5;
  int checks = 0, failures = 0;

  rca dut (.a(a4), .b(b4), .cin(cin), .sum(s4), .cout(c4));
  rca #(.N(5), .HAS_CIN(1'b0)) dut0 (.a(a5), .b(b5), .cin(1'b1), .sum(s5), .cout(c5));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      {cin, a4, b4} = 9'(i);
      #1;
      checks++;
      if ({c4, s4} !== 5'(a4 + b4 + cin)) begin
        failures++;
        $display("FAIL N=4 a=%h b=%h cin=%b -> %b%h", a4, b4, cin, c4, s4);
      end
    end
    // Carry-in-0 variant: its cin port (tied to 1 above) must have no effect.
    for (int i = 0; i < 1024; i++) begin
      {a5, b5} = 10'(i);
      #1;
      checks++;
      if ({c5, s5} !== 6'(a5 + b5)) begin
        failures++;
        $display("FAIL N=5 cin0 a=%h b=%h -> %b%h", a5, b5, c5, s5);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
