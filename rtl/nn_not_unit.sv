// nn_not_unit: inverter realised as a single one-input threshold neuron.
//
// The neuron has weight NOT_W = -2 and threshold NOT_T = -1 (ann_pkg), so it
// fires when -2X > -1: z = 1 for X = 0 and z = 0 for X = 1. This is the
// source's condition "output 0 if 2X > 1, otherwise 1" written with the
// single firing rule of threshold_neuron.
//
// Interface: x in, z out. Combinational, one neuron delay.
module nn_not_unit
  import ann_pkg::*;
(
  input  logic x,
  output logic z
);

  threshold_neuron #(
    .N         (1),
    .WEIGHTS   (NOT_W),
    .THRESHOLD (NOT_T)
  ) u_neuron (
    .x (x),
    .z (z)
  );

endmodule
