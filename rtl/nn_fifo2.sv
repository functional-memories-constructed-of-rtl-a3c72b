// nn_fifo2: two-bit first-in first-out stage with two feedback loops.
//
// State Z{0} (input side) and Z{1} (output side). Per iteration:
//   id = 0: Z keeps its value.
//   id = 1: Z{0} <= D, Z{1} <= Z{0}; the bit in Z{1} leaves.
// Q is always Z{1}, the bit that leaves on the next shift, and id_next repeats
// id so that a further stage, fed from Q, shifts in step: two stages make a
// four-bit FIFO (see nn_fifo). Each next-state bit is computed by the same
// three-neuron select network as the one-bit memory. The shift on id = 1 is
// read from the source's truth table; the reset (Z = 0) is this design's.
//
// Timing: q and id_next are combinational; z updates on the rising edge.
module nn_fifo2 (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       d,
  input  logic       id,
  output logic       q,
  output logic       id_next,
  output logic [1:0] z       // z[0] = Z{0}, z[1] = Z{1}
);
  logic [1:0] z_next;

  nn_select u_loop0 (.a(z[0]), .b(d),    .sel(id), .y(z_next[0]));
  nn_select u_loop1 (.a(z[1]), .b(z[0]), .sel(id), .y(z_next[1]));

  assign q       = z[1];
  assign id_next = id;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) z <= '0;
    else        z <= z_next;
endmodule
