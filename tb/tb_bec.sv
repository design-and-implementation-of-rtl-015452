// tb_bec: exhaustive check of the excess-1 converter at its default 4 bits
// and at 3 and 6 bits (the smallest and largest widths the 16-bit adder uses):
// x must equal b + 1 modulo 2^N, including the all-ones wrap to zero.
module tb_bec;
  logic [3:0] b4, x4;
  logic [2:0] b3, x3;
  logic [5:0] b6, x6;
  int checks = 0, failures = 0;

  bec dut (.b(b4), .x(x4));
  bec #(.N(3)) dut3 (.b(b3), .x(x3));
  bec #(.N(6)) dut6 (.b(b6), .x(x6));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      b4 = 4'(i); b3 = 3'(i); b6 = 6'(i);
      #1;
      checks += 3;
      if (x4 !== 4'(i + 1)) begin failures++; $display("FAIL N=4 b=%h x=%h", b4, x4); end
      if (x3 !== 3'(i + 1)) begin failures++; $display("FAIL N=3 b=%h x=%h", b3, x3); end
      if (x6 !== 6'(i + 1)) begin failures++; $display("FAIL N=6 b=%h x=%h", b6, x6); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
