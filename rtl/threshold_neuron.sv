// threshold_neuron: one binary threshold neuron.
//
// The output is 1 when the weighted sum of the binary inputs reaches the
// threshold: y = (sum_i w[i]*x[i] >= theta). Weights and threshold are signed
// run-time inputs (the "binding coefficients"), so the same neuron can be set
// to OR (all weights 1, theta 1), AND (all weights 1, theta N) or to take an
// input negated (weight -1, theta lowered by one). Purely combinational.
//
// The neurons in the networks this design follows are multi-layer perceptrons
// whose outputs are digitised after every step; using a hard threshold with
// small integer weights in place of a trained analogue neuron is this design's
// choice.
module threshold_neuron #(
  parameter int N  = 2,  // number of inputs
  parameter int WW = 4   // weight width (signed)
) (
  input  logic [N-1:0]                       x,
  input  logic signed [WW-1:0]               w     [N],
  input  logic signed [WW+$clog2(N+1):0]     theta,
  output logic                               y
);
  localparam int SW = WW + $clog2(N + 1) + 1;

  logic signed [SW-1:0] sum;

  always_comb begin
    sum = '0;
    for (int i = 0; i < N; i++)
      if (x[i]) sum = sum + SW'(w[i]);
    y = (sum >= theta);
  end
endmodule
