// threshold_neuron: one McCulloch-Pitts / perceptron neuron with binary inputs.
//
// The neuron multiplies each binary input x[i] by a fixed signed weight
// WEIGHTS[i], adds the products, and compares the sum with THRESHOLD. The
// output z is 1 when the sum is strictly greater than THRESHOLD and 0
// otherwise (a hard step as the "squashing" activation). Because the inputs
// are single bits, each product is either 0 or the weight, so the weighted
// sum is a small adder tree over constants selected by the inputs.
//
// Parameters: N inputs; WEIGHTS, a packed array of N signed WEIGHT_BITS-bit
// weights (WEIGHTS[i] belongs to x[i], so the concatenation {w1, w0} lists
// the weight of x[1] first); THRESHOLD, a signed WEIGHT_BITS-bit value.
//
// Interface: x[N-1:0] in, z out. Purely combinational, no clock or reset:
// z settles one adder-tree-plus-comparator delay after x changes.
//
// The weighted sum, the threshold step and the use of weights and thresholds
// to turn one neuron into a logic gate follow the source design, as do the
// default parameters (the AND neuron: weights 2, 2, threshold 3). The strict
// ">" comparison (rather than ">="), the single firing rule for all gates and
// the 8-bit weight width are choices of this design; see ann_pkg.
module threshold_neuron
  import ann_pkg::*;
#(
  parameter int      N                 = 2,
  parameter weight_t [N-1:0] WEIGHTS   = {AND_W, AND_W},
  parameter weight_t THRESHOLD         = AND_T
) (
  input  logic [N-1:0] x,
  output logic         z
);

  // The sum of N weights of WEIGHT_BITS bits each needs $clog2(N) more bits.
  localparam int SUM_BITS = WEIGHT_BITS + $clog2(N) + 1;

  logic signed [SUM_BITS-1:0] sum;

  // Weighted summation (the "soma"): add the weight of every active input.
  always_comb begin
    sum = '0;
    for (int i = 0; i < N; i++) begin
      if (x[i]) sum = sum + SUM_BITS'(weight_t'(WEIGHTS[i]));
    end
  end

  // Hard-threshold activation.
  assign z = (sum > SUM_BITS'(THRESHOLD));

endmodule
