// mlp_xor: two-layer perceptron computing p = a XOR b.
//
// XOR is not linearly separable, so it takes two neuron layers. The hidden
// layer has a NAND neuron (weights -2, -2, threshold -3) and an OR neuron
// (weights 2, 2, threshold 1), both fed by a and b. The output neuron is an
// AND neuron (weights 2, 2, threshold 3) over the two hidden outputs. This is
// the decomposition p = (~a | ~b) & (a | b): three gates in place of the five
// of the textbook ~a&b | a&~b form.
//
// Interface: a, b in, p out. Combinational, two neuron delays.
//
// The structure (NAND and OR hidden neurons, AND output neuron) and the
// thresholds -3, 1 and 3 follow the source design's multi-layer adder.
module mlp_xor (
  input  logic a,
  input  logic b,
  output logic p
);

  logic h_nand;  // hidden neuron 1: ~(a & b)
  logic h_or;    // hidden neuron 2:   a | b

  nn_nand_unit u_hidden_nand(.x(a),      .y(b),    .z(h_nand));
  nn_or_unit   u_hidden_or  (.x(a),      .y(b),    .z(h_or));
  nn_and_unit  u_output_and (.x(h_nand), .y(h_or), .z(p));

endmodule
