// tb_threshold_neuron: self-checking test of the generic threshold neuron.
//
// Three instances are checked exhaustively over their inputs: the default
// (two inputs, weights 2, 2, threshold 3), a three-input neuron with mixed
// positive and negative weights and a negative threshold, and a one-input
// neuron with a negative weight. The expected output is computed in the
// testbench with integer arithmetic, independently of the design's
// fixed-width sum.
module tb_threshold_neuron;
  import ann_pkg::*;

  int checks   = 0;
  int failures = 0;

  logic [1:0] x2;
  logic [2:0] x3;
  logic       x1;
  logic       z2, z3, z1;

  threshold_neuron dut_default (.x(x2), .z(z2));

  threshold_neuron #(
    .N         (3),
    .WEIGHTS   ({8'sd5, -8'sd3, 8'sd4}),   // WEIGHTS[2]=5, [1]=-3, [0]=4
    .THRESHOLD (-8'sd2)
  ) dut_mixed (.x(x3), .z(z3));

  threshold_neuron #(
    .N         (1),
    .WEIGHTS   (-8'sd2),
    .THRESHOLD (-8'sd1)
  ) dut_one (.x(x1), .z(z1));

  function automatic void check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endfunction

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s;
    for (int v = 0; v < 4; v++) begin
      x2 = 2'(v);
      #1;
      s = 2 * int'(x2[0]) + 2 * int'(x2[1]);
      check($sformatf("default x=%b", x2), z2, s > 3);
    end
    for (int v = 0; v < 8; v++) begin
      x3 = 3'(v);
      #1;
      s = 4 * int'(x3[0]) - 3 * int'(x3[1]) + 5 * int'(x3[2]);
      check($sformatf("mixed x=%b", x3), z3, s > -2);
    end
    for (int v = 0; v < 2; v++) begin
      x1 = 1'(v);
      #1;
      s = -2 * int'(x1);
      check($sformatf("one x=%b", x1), z1, s > -1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
