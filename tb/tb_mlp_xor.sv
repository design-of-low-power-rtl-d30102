// tb_mlp_xor: exhaustive self-checking test of the two-layer perceptron XOR.
module tb_mlp_xor;

  int checks   = 0;
  int failures = 0;

  logic a, b, p;

  mlp_xor dut (.a(a), .b(b), .p(p));

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    for (int v = 0; v < 4; v++) begin
      {b, a} = 2'(v);
      #1;
      exp = (a != b);
      checks++;
      if (p !== exp) begin
        failures++;
        $display("FAIL a=%0b b=%0b: p=%0b expected %0b", a, b, p, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
