// tb_mlpha: exhaustive self-checking test of the multi-layer perceptron
// hybrid full adder.
//
// All eight (a, b, ci) vectors are applied. The expected sum and carry are
// the two bits of the integer a + b + ci. The internal propagate signal p is
// also checked against a ^ b.
module tb_mlpha;

  int checks   = 0;
  int failures = 0;

  logic a, b, ci, s, co;

  mlpha dut (.a(a), .b(b), .ci(ci), .s(s), .co(co));

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total;
    for (int v = 0; v < 8; v++) begin
      {a, b, ci} = 3'(v);
      #1;
      total = int'(a) + int'(b) + int'(ci);
      checks += 3;
      if ({co, s} !== 2'(total)) begin
        failures++;
        $display("FAIL a=%0b b=%0b ci=%0b: co,s=%0b%0b expected %0d", a, b, ci, co, s, total);
      end
      if (s !== total[0]) failures++;
      if (dut.p !== (a ^ b)) begin
        failures++;
        $display("FAIL a=%0b b=%0b: p=%0b", a, b, dut.p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
