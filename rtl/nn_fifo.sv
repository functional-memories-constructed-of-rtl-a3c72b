// nn_fifo: DEPTH-bit first-in first-out memory made of chained two-bit stages.
//
// DEPTH/2 nn_fifo2 stages form a chain: stage k takes its D from stage k-1's Q
// and its id from stage k-1's id_next, so one shift request moves every bit
// one place. A bit written with id = 1 appears on q after DEPTH shifts and
// leaves the chain on the shift that follows; id_next lets a further FIFO be
// chained behind this one. Doubling by chaining follows the source; the
// fixed-length queue without full/empty flags is the plain reading of it.
//
// Interface: d, id (shift) in; q, id_next, z out. z[0] is the newest bit,
// z[DEPTH-1] the oldest. q and id_next are combinational, z updates on the
// rising edge. DEPTH must be even.
module nn_fifo #(
  parameter int DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             d,
  input  logic             id,
  output logic             q,
  output logic             id_next,
  output logic [DEPTH-1:0] z
);
  localparam int STAGES = DEPTH / 2;

  logic [STAGES:0] s_d, s_id;

  assign s_d[0]  = d;
  assign s_id[0] = id;

  for (genvar k = 0; k < STAGES; k++) begin : g_stage
    nn_fifo2 u_stage (
      .clk, .rst_n,
      .d(s_d[k]), .id(s_id[k]),
      .q(s_d[k+1]), .id_next(s_id[k+1]),
      .z(z[2*k +: 2]));
  end

  assign q       = s_d[STAGES];
  assign id_next = s_id[STAGES];

  initial assert (DEPTH >= 2 && DEPTH % 2 == 0)
    else $error("nn_fifo: DEPTH must be even");
endmodule
