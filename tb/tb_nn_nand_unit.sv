// tb_nn_nand_unit: exhaustive self-checking test of the neural NAND unit.
//
// All four input pairs are applied; the expected output is the Boolean
// NAND of the inputs, written directly in the testbench.
module tb_nn_nand_unit;

  int checks   = 0;
  int failures = 0;

  logic x, y, z;

  nn_nand_unit dut (.x(x), .y(y), .z(z));

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
      {y, x} = 2'(v);
      #1;
      exp = ~(x & y);
      checks++;
      if (z !== exp) begin
        failures++;
        $display("FAIL x=%0b y=%0b: z=%0b expected %0b", x, y, z, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
