// nn_vreg_slice: one bit of the neural vector register.
//
// State: words M0..M(DEPTH-1) of one bit each, write counter wc and read
// counter rc (each 0..DEPTH). One iteration per clock:
//   rs = RS_ALL : wc = rc = 0, every word set to the "meaningless" value.
//   rs = RS_RC  : rc = 0, nothing else changes.
//   w (wc < DEPTH): M0 <= D, M(k) <= M(k-1) (the words shift), wc += 1.
//   r (rc < wc)   : Q = M[wc-1-rc], the oldest word not yet read, rc += 1.
// With DEPTH = 2 this is the two-word truth table the design follows: write1
// puts D in M0, write2 moves M0 to M1 and puts D in M0, the first read returns
// M1 and the second M0, and an rc reset lets the words be read again.
//
// Choices of this design where the table is silent: binary-coded counters and
// reset code; the meaningless value "*" is stored and output as 1 (a value of
// one half digitised upward); a write to a full register or a read past wc is
// ignored; w and r may come together (the read sees the words before the
// shift, which keeps the order since wc rises with the shift); rs overrides w
// and r; rst_n acts like rs = RS_ALL. q_valid is added to mark a real read.
//
// Timing: q and q_valid are combinational from the inputs and the state in the
// same cycle as r; state updates on the rising edge.
module nn_vreg_slice
  import nn_mem_pkg::*;
#(
  parameter int DEPTH = 2,
  localparam int CW = $clog2(DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             d,
  input  logic             w,
  input  logic             r,
  input  rs_e              rs,
  output logic             q,
  output logic             q_valid,
  output logic [CW-1:0]    wc,
  output logic [CW-1:0]    rc,
  output logic [DEPTH-1:0] m      // m[0] = M0 (newest)
);
  localparam logic STAR = 1'b1;   // stored/output form of "*"

  logic             rs_idle, wr_ok, rd_ok;
  logic [CW-1:0]    rd_idx;
  logic [CW-1:0]    wc_n, rc_n;
  logic [DEPTH-1:0] m_n;

  always_comb begin
    rs_idle = (rs != RS_ALL) && (rs != RS_RC);
    wr_ok   = rs_idle && w && (wc < CW'(DEPTH));
    rd_ok   = rs_idle && r && (rc < wc);
    rd_idx  = wc - rc - CW'(1);
    q_valid = rd_ok;
    q       = STAR;
    for (int k = 0; k < DEPTH; k++)
      if (rd_ok && rd_idx == CW'(k)) q = m[k];

    wc_n = wc;
    rc_n = rc;
    m_n  = m;
    if (rs == RS_ALL) begin
      wc_n = '0;
      rc_n = '0;
      m_n  = {DEPTH{STAR}};
    end else if (rs == RS_RC) begin
      rc_n = '0;
    end else begin
      if (wr_ok) begin
        m_n  = {m[DEPTH-2:0], d};
        wc_n = wc + CW'(1);
      end
      if (rd_ok) rc_n = rc + CW'(1);
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      wc <= '0;
      rc <= '0;
      m  <= {DEPTH{STAR}};
    end else begin
      wc <= wc_n;
      rc <= rc_n;
      m  <= m_n;
    end

  initial assert (DEPTH >= 2) else $error("nn_vreg_slice: DEPTH must be at least 2");
endmodule
