// nn_logic_net: two-layer neuron network for any binary function.
//
// Layer 1 has N_TERMS OR neurons. OR neuron t sees every input i with
// lit_use[t][i] = 1, plain or negated (lit_neg[t][i] = 1): the weight is +1
// for a plain and -1 for a negated input and the threshold is 1 minus the
// number of negated inputs, so it fires when any of its literals is true.
// Layer 2 is one AND neuron over the enabled OR neurons (weight 1, threshold
// = number of enabled terms). With N_TERMS = 2^N_IN every function of N_IN
// inputs can be set up as a product of its maxterms: enable one OR neuron per
// input combination where F = 0, negating the inputs that are 1 there.
//
// The OR-then-AND structure and the sizes (two inputs, four OR units) follow
// the source's figure; its text writes the same idea as a sum of products.
// Making the wiring programmable rather than fixed is this design's choice.
// Purely combinational.
module nn_logic_net #(
  parameter int N_IN    = 2,
  parameter int N_TERMS = 4
) (
  input  logic [N_IN-1:0] x,
  input  logic [N_IN-1:0] lit_use [N_TERMS],
  input  logic [N_IN-1:0] lit_neg [N_TERMS],
  input  logic [N_TERMS-1:0] term_en,
  output logic            y
);
  localparam int TW1 = 2 + $clog2(N_IN + 1) + 1;     // threshold width, layer 1
  localparam int TW2 = 2 + $clog2(N_TERMS + 1) + 1;  // threshold width, layer 2

  logic [N_TERMS-1:0] or_out;

  for (genvar t = 0; t < N_TERMS; t++) begin : g_or
    logic signed [1:0]     w  [N_IN];
    logic signed [TW1-1:0] th;
    always_comb begin
      th = TW1'(1);
      for (int i = 0; i < N_IN; i++) begin
        if (!lit_use[t][i])     w[i] = 2'sd0;
        else if (lit_neg[t][i]) begin
          w[i] = -2'sd1;
          th   = th - TW1'(1);
        end else                w[i] = 2'sd1;
      end
    end
    threshold_neuron #(.N(N_IN), .WW(2)) u_or (.x, .w, .theta(th), .y(or_out[t]));
  end

  logic signed [1:0]     w_and [N_TERMS];
  logic signed [TW2-1:0] th_and;
  always_comb begin
    th_and = '0;
    for (int t = 0; t < N_TERMS; t++) begin
      w_and[t] = term_en[t] ? 2'sd1 : 2'sd0;
      if (term_en[t]) th_and = th_and + TW2'(1);
    end
  end
  threshold_neuron #(.N(N_TERMS), .WW(2)) u_and (.x(or_out), .w(w_and), .theta(th_and), .y(y));
endmodule
