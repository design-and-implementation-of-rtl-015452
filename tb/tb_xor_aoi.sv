// tb_xor_aoi: exhaustive check of the AND/OR/NOT exclusive OR against the
// truth table of XOR, written out as a constant.
module tb_xor_aoi;
  logic a, b, y;
  int checks = 0, failures = 0;
  localparam logic [3:0] TRUTH = 4'b0110;   // index {a,b}

  xor_aoi dut (.a(a), .b(b), .y(y));

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
      if (y !== TRUTH[i]) begin
        failures++;
        $display("FAIL a=%b b=%b y=%b", a, b, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
