// tb_nn_mux_unit: exhaustive self-checking test of the neural 2:1 multiplexer.
//
// All eight (s, i1, i0) combinations are applied and y is compared with the
// input that s selects.
module tb_nn_mux_unit;

  int checks   = 0;
  int failures = 0;

  logic i0, i1, s, y;

  nn_mux_unit dut (.i0(i0), .i1(i1), .s(s), .y(y));

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    for (int v = 0; v < 8; v++) begin
      {s, i1, i0} = 3'(v);
      #1;
      exp = s ? i1 : i0;
      checks++;
      if (y !== exp) begin
        failures++;
        $display("FAIL s=%0b i1=%0b i0=%0b: y=%0b expected %0b", s, i1, i0, y, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
