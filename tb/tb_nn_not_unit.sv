// tb_nn_not_unit: exhaustive self-checking test of the neural inverter.
module tb_nn_not_unit;

  int checks   = 0;
  int failures = 0;

  logic x, z;

  nn_not_unit dut (.x(x), .z(z));

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2; v++) begin
      x = 1'(v);
      #1;
      checks++;
      if (z !== ~x) begin
        failures++;
        $display("FAIL x=%0b: z=%0b expected %0b", x, z, ~x);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
