// ann_pkg: weights and thresholds shared by the neural logic units.
//
// Every gate in this design is a single threshold neuron (see threshold_neuron):
// it forms y = sum(W_i * X_i) over binary inputs X_i and fires (Z = 1) when
// y > T. Firing strictly above the threshold is the convention of the AND, OR,
// NAND and NOT equations; the general neuron equation writes y >= T, which
// gives the same truth tables here because every weighted sum is even and
// every threshold odd. A bias b, as in y = sum(W_i X_i) + b, is the same as a
// threshold T = -b.
//
// The numbers: AND and OR use weights +2 with thresholds 3 and 1. The NAND
// neuron uses weights -2, -2 and threshold -3, that is -2X-2Y > -3, which is
// the same condition as 2X+2Y < 3. The NOT neuron uses weight -2 and
// threshold -1, i.e. it fires unless 2X > 1. The negative-weight forms are this
// design's way of writing the "below threshold" conditions with one firing
// rule; the -3 matches the value printed at the NAND hidden neuron of the
// multi-layer adder.
package ann_pkg;

  // Weights and thresholds are small signed integers, 8 bits wide.
  localparam int WEIGHT_BITS = 8;
  typedef logic signed [WEIGHT_BITS-1:0] weight_t;

  localparam weight_t AND_W     = 2;
  localparam weight_t AND_T     = 3;

  localparam weight_t OR_W      = 2;
  localparam weight_t OR_T      = 1;

  localparam weight_t NAND_W    = -2;
  localparam weight_t NAND_T    = -3;

  localparam weight_t NOT_W     = -2;
  localparam weight_t NOT_T     = -1;

endpackage
