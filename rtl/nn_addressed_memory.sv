// nn_addressed_memory: word-addressed memory of one-bit neuron memories.
//
// WORDS x WIDTH nn_bit_memory cells. The address is the label that tells the
// cells apart: on a write, the cells of word addr get id = "set" and take
// wdata, all others get id = "keep". rdata is the stored word at addr,
// read asynchronously. Labelling the cells by an address follows the source;
// the decoder, the read multiplexer and the sizes are this design's.
//
// Timing: a write with we = 1 is stored at the rising edge and is visible on
// rdata in the next cycle.
module nn_addressed_memory #(
  parameter int WORDS = 8,
  parameter int WIDTH = 8,
  localparam int AW = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] word [WORDS];

  for (genvar a = 0; a < WORDS; a++) begin : g_word
    logic sel;
    assign sel = we && (addr == AW'(a));
    for (genvar b = 0; b < WIDTH; b++) begin : g_bit
      logic unused_q;
      nn_bit_memory u_cell (
        .clk, .rst_n, .d(wdata[b]), .id(sel), .q(unused_q), .z(word[a][b]));
    end
  end

  always_comb begin
    rdata = '0;
    for (int a = 0; a < WORDS; a++)
      if (addr == AW'(a)) rdata = word[a];
  end
endmodule
