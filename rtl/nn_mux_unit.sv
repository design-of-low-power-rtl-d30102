// nn_mux_unit: 2:1 multiplexer y = (~s & i0) | (s & i1) built from neurons.
//
// A multiplexer is not linearly separable (it is not monotone in s), so no
// single threshold neuron can compute it. This unit realises the
// sum-of-products equation directly with four neural logic units: a NOT
// neuron makes ~s, two AND neurons form the two product terms, and an OR
// neuron combines them. That is a two-layer network (plus the inverter).
//
// Interface: i0, i1, s in, y out; y = i0 when s = 0, y = i1 when s = 1.
// Combinational, three neuron delays from s, two from i0 / i1.
//
// The Boolean equation comes from the source design; it gives the
// multiplexer only as that equation, and the choice to build it from the NOT,
// AND and OR neurons is this design's own.
module nn_mux_unit (
  input  logic i0,
  input  logic i1,
  input  logic s,
  output logic y
);

  logic s_n;   // ~s
  logic t0;    // ~s & i0
  logic t1;    //  s & i1

  nn_not_unit u_not (.x(s),   .z(s_n));
  nn_and_unit u_and0(.x(s_n), .y(i0), .z(t0));
  nn_and_unit u_and1(.x(s),   .y(i1), .z(t1));
  nn_or_unit  u_or  (.x(t0),  .y(t1), .z(y));

endmodule
