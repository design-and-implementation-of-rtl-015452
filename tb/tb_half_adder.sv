// tb_half_adder: exhaustive check of the half adder against integer addition.
module tb_half_adder;
  logic a, b, sum, cout;
  int checks = 0, failures = 0;

  half_adder dut (.a(a), .b(b), .sum(sum), .cout(cout));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if ({cout, sum} !== 2'(a + b)) begin
        failures++;
        $display("FAIL a=%b b=%b -> cout=%b sum=%b", a, b, cout, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
