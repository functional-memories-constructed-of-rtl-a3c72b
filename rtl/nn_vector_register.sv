// nn_vector_register: BANKS-bit, DEPTH-word neural vector register.
//
// Each bank is one copy of the one-bit network (nn_vreg_slice) and stores
// one bit of every word; all banks see the same w, r and rs, so their
// counters stay equal and bank 0's are brought out. Eight banks of two words
// hold two 8-bit samples of a converted analogue stream, as in the source's
// test; keeping the counters in every bank mirrors "one network per bit".
//
// Interface: d is the digitised input word, q the word read (all ones when
// nothing is read, the digitised "meaningless" value), q_valid marks a read.
// Timing as nn_vreg_slice: q in the cycle of r, state at the rising edge.
module nn_vector_register
  import nn_mem_pkg::*;
#(
  parameter int BANKS = 8,
  parameter int DEPTH = 2,
  localparam int CW = $clog2(DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [BANKS-1:0] d,
  input  logic             w,
  input  logic             r,
  input  rs_e              rs,
  output logic [BANKS-1:0] q,
  output logic             q_valid,
  output logic [CW-1:0]    wc,
  output logic [CW-1:0]    rc
);
  logic [BANKS-1:0]  b_valid;
  logic [CW-1:0]     b_wc [BANKS];
  logic [CW-1:0]     b_rc [BANKS];

  for (genvar i = 0; i < BANKS; i++) begin : g_bank
    nn_vreg_slice #(.DEPTH(DEPTH)) u_slice (
      .clk, .rst_n, .d(d[i]), .w, .r, .rs,
      .q(q[i]), .q_valid(b_valid[i]), .wc(b_wc[i]), .rc(b_rc[i]),
      .m());  // words are seen through q only
  end

  // All banks see the same requests, so their valid flags are equal.
  assign q_valid = b_valid[0];
  assign wc      = b_wc[0];
  assign rc      = b_rc[0];
endmodule
