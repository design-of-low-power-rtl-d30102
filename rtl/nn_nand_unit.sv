// nn_nand_unit: two-input NAND gate realised as a single threshold neuron.
//
// One threshold_neuron with both weights NAND_W and threshold NAND_T from
// ann_pkg: z = 1 exactly when -2X - 2Y > -3, the same as 2X + 2Y < 3, which over binary inputs is NOT (X AND Y).
//
// Interface: x, y in, z out. Combinational, one neuron delay.
//
// The gate and its weighted-sum condition follow the source design; the
// numeric form of the weights and threshold is explained in ann_pkg.
module nn_nand_unit
  import ann_pkg::*;
(
  input  logic x,
  input  logic y,
  output logic z
);

  threshold_neuron #(
    .N         (2),
    .WEIGHTS   ({NAND_W, NAND_W}),
    .THRESHOLD (NAND_T)
  ) u_neuron (
    .x ({y, x}),
    .z (z)
  );

endmodule
