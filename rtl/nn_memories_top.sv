// nn_memories_top: the neural memory networks side by side.
//
// Five independent circuits share only the clock and reset:
//   logic net    - nn_logic_net, any function of X1, X2 as OR neurons into an
//                  AND neuron (combinational);
//   bit memory   - nn_bit_memory, keep/set one bit through a feedback loop;
//   FIFO         - nn_fifo, four bits from two chained two-bit stages;
//   addressed    - nn_addressed_memory, words of bit memories told apart by a
//                  label (address);
//   vector reg.  - adc_model -> nn_vector_register (8 banks, 2 words) ->
//                  dac_model: an analogue sample is digitised, stored, read
//                  back oldest first and converted back.
// They stand side by side because the source presents them as separate
// examples of memories made of neuron networks; each keeps its own ports.
// The two converters are behavioural models, so the analogue ports are reals.
module nn_memories_top
  import nn_mem_pkg::*;
#(
  parameter int LN_IN    = 2,
  parameter int LN_TERMS = 4,
  parameter int FIFO_DEPTH = 4,
  parameter int AM_WORDS = 8,
  parameter int AM_WIDTH = 8,
  parameter int VR_BANKS = 8,
  parameter int VR_DEPTH = 2,
  localparam int AM_AW = (AM_WORDS > 1) ? $clog2(AM_WORDS) : 1,
  localparam int VR_CW = $clog2(VR_DEPTH + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // logic network
  input  logic [LN_IN-1:0]      ln_x,
  input  logic [LN_IN-1:0]      ln_lit_use [LN_TERMS],
  input  logic [LN_IN-1:0]      ln_lit_neg [LN_TERMS],
  input  logic [LN_TERMS-1:0]   ln_term_en,
  output logic                  ln_y,
  // one-bit memory
  input  logic                  bm_d,
  input  logic                  bm_id,
  output logic                  bm_q,
  output logic                  bm_z,
  // FIFO
  input  logic                  ff_d,
  input  logic                  ff_id,
  output logic                  ff_q,
  output logic                  ff_id_next,
  output logic [FIFO_DEPTH-1:0] ff_z,
  // addressed memory
  input  logic                  am_we,
  input  logic [AM_AW-1:0]      am_addr,
  input  logic [AM_WIDTH-1:0]   am_wdata,
  output logic [AM_WIDTH-1:0]   am_rdata,
  // vector register with converters
  input  real                   vr_d_analog,
  input  logic                  vr_w,
  input  logic                  vr_r,
  input  rs_e                   vr_rs,
  output real                   vr_q_analog,
  output logic [VR_BANKS-1:0]   vr_d_code,
  output logic [VR_BANKS-1:0]   vr_q_code,
  output logic                  vr_q_valid,
  output logic [VR_CW-1:0]      vr_wc,
  output logic [VR_CW-1:0]      vr_rc
);
  nn_logic_net #(.N_IN(LN_IN), .N_TERMS(LN_TERMS)) u_logic_net (
    .x(ln_x), .lit_use(ln_lit_use), .lit_neg(ln_lit_neg), .term_en(ln_term_en), .y(ln_y));

  nn_bit_memory u_bit_memory (
    .clk, .rst_n, .d(bm_d), .id(bm_id), .q(bm_q), .z(bm_z));

  nn_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .d(ff_d), .id(ff_id), .q(ff_q), .id_next(ff_id_next), .z(ff_z));

  nn_addressed_memory #(.WORDS(AM_WORDS), .WIDTH(AM_WIDTH)) u_addressed (
    .clk, .rst_n, .we(am_we), .addr(am_addr), .wdata(am_wdata), .rdata(am_rdata));

  adc_model #(.N(VR_BANKS)) u_adc (.ain(vr_d_analog), .code(vr_d_code));

  nn_vector_register #(.BANKS(VR_BANKS), .DEPTH(VR_DEPTH)) u_vreg (
    .clk, .rst_n, .d(vr_d_code), .w(vr_w), .r(vr_r), .rs(vr_rs),
    .q(vr_q_code), .q_valid(vr_q_valid), .wc(vr_wc), .rc(vr_rc));

  dac_model #(.N(VR_BANKS)) u_dac (.code(vr_q_code), .aout(vr_q_analog));
endmodule
