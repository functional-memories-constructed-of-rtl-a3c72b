// nn_select: two-way select built from three threshold neurons.
//
// y = sel ? b : a, computed as OR(AND(a, not sel), AND(b, sel)):
//   n_keep = [a - sel >= 1], n_set = [b + sel >= 2], y = [n_keep + n_set >= 1].
// This is the feedback network of a one-bit neural memory: with a = the
// stored bit, b = new data and sel = the "set" operator, y is the next state.
// Purely combinational.
module nn_select (
  input  logic a,
  input  logic b,
  input  logic sel,
  output logic y
);
  logic n_keep, n_set;

  threshold_neuron #(.N(2), .WW(2)) u_keep (
    .x({sel, a}), .w('{2'sd1, -2'sd1}), .theta(5'sd1), .y(n_keep));
  threshold_neuron #(.N(2), .WW(2)) u_set (
    .x({sel, b}), .w('{2'sd1, 2'sd1}),  .theta(5'sd2), .y(n_set));
  threshold_neuron #(.N(2), .WW(2)) u_or (
    .x({n_set, n_keep}), .w('{2'sd1, 2'sd1}), .theta(5'sd1), .y(y));
endmodule
