// nn_bit_memory: one-bit memory made of a neuron network and one feedback loop.
//
// The network computes (Q, Z_{n+1}) = NN(Z_n, id, D) with
//   id = 0 ("keep"): Z_{n+1} = Z_n
//   id = 1 ("set") : Z_{n+1} = D
// and Q = Z_{n+1}. The feedback loop returns Z_{n+1} to the Z_n input at the
// next iteration, here the next rising clock edge, so the whole is a D
// flip-flop with a load enable. The truth table and the loop follow the
// source; the network is three threshold neurons (nn_select) because trained
// weights are not given, and the asynchronous active-low reset (Z = 0) is
// this design's addition.
//
// Timing: q is combinational from d, id and the stored bit; z changes one
// cycle after id = 1.
module nn_bit_memory (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  input  logic id,
  output logic q,
  output logic z
);
  logic z_next;

  nn_select u_net (.a(z), .b(d), .sel(id), .y(z_next));

  assign q = z_next;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) z <= 1'b0;
    else        z <= z_next;
endmodule
