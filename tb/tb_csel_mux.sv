// tb_csel_mux: random check of the 2:1 carry-select mux (default 3 bits and
// a 6-bit instance): sel = 0 passes in0, sel = 1 passes in1.
module tb_csel_mux;
  logic [2:0] i0a, i1a, ya;
  logic [5:0] i0b, i1b, yb;
  logic       sel;
  int checks = 0, failures = 0;

  csel_mux dut (.in0(i0a), .in1(i1a), .sel(sel), .y(ya));
  csel_mux #(.W(6)) dut6 (.in0(i0b), .in1(i1b), .sel(sel), .y(yb));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      i0a = 3'($urandom); i1a = 3'($urandom);
      i0b = 6'($urandom); i1b = 6'($urandom);
      sel = i[0];
      #1;
      checks += 2;
      if (ya !== (sel ? i1a : i0a)) begin failures++; $display("FAIL W=3 sel=%b y=%h", sel, ya); end
      if (yb !== (sel ? i1b : i0b)) begin failures++; $display("FAIL W=6 sel=%b y=%h", sel, yb); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
