// mlpha: multi-layer perceptron hybrid adder, a 1-bit full adder made of
// threshold neurons.
//
// The adder has three parts, each a small neural network:
//   * p  = a ^ b   : a two-layer perceptron (mlp_xor: NAND and OR hidden
//                    neurons, AND output neuron);
//   * s  = p ^ ci  : a second, identical two-layer perceptron;
//   * co = p ? ci : a : a neural 2:1 multiplexer (nn_mux_unit) selected by p.
// The carry form uses the fact that when a and b differ (p = 1) the carry in
// propagates, and when they are equal (p = 0) the carry out equals a (= b).
// It is the same function as co = p & ci | a & b.
//
// Interface: a, b, ci in; s, co out. Purely combinational. The critical path
// is a -> p (two neurons) -> multiplexer select -> co (three more neurons);
// s takes four neuron delays.
//
// The partition into the two XOR networks and the multiplexer, and the
// neurons inside the XOR networks, follow the source design. Which
// multiplexer data input receives a and which ci is not stated there; it is
// fixed here by the full-adder function (a on select 0, ci on select 1).
module mlpha (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);

  logic p;  // propagate, a ^ b

  mlp_xor     u_xor_p(.a(a), .b(b),  .p(p));
  mlp_xor     u_xor_s(.a(p), .b(ci), .p(s));
  nn_mux_unit u_carry(.i0(a), .i1(ci), .s(p), .y(co));

endmodule
