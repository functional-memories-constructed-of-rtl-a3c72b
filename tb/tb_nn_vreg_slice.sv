// tb_nn_vreg_slice: one bit of the two-word vector register.
// Part 1 walks through the rows of the two-word truth table (initial reset,
// write1, write2, reads oldest first, rc reset and reading again) with the
// expected Q and counters written out by hand. Part 2 drives random
// requests and compares with a reference: a queue of the written bits, oldest
// first, and a read index.
module tb_nn_vreg_slice;
  import nn_mem_pkg::*;
  localparam int DEPTH = 2, CW = 2;
  logic clk = 0, rst_n = 0, d = 0, w = 0, r = 0;
  rs_e  rs = RS_NONE;
  logic q, q_valid;
  logic [CW-1:0]    wc, rc;
  logic [DEPTH-1:0] m;
  int checks = 0, failures = 0;
  bit ref_q[$];
  int ref_rc;

  nn_vreg_slice #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .d, .w, .r, .rs, .q, .q_valid, .wc, .rc, .m);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Apply one iteration; check Q in the cycle and wc/rc after the edge.
  task automatic step(input logic d_i, w_i, r_i, input rs_e rs_i,
                      input logic exp_q, input int exp_wc, exp_rc, input string what);
    @(negedge clk);
    d = d_i; w = w_i; r = r_i; rs = rs_i;
    #1 checks++;
    if (q !== exp_q) begin
      failures++;
      $display("FAIL %s: q=%b exp=%b", what, q, exp_q);
    end
    @(posedge clk); #1;
    checks++;
    if (wc !== CW'(exp_wc) || rc !== CW'(exp_rc)) begin
      failures++;
      $display("FAIL %s: wc=%0d rc=%0d exp %0d %0d", what, wc, rc, exp_wc, exp_rc);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // Part 1: truth-table walk (a = 1, b = 0), "*" reads as 1.
    step(0, 0, 0, RS_ALL,  1, 0, 0, "initial reset");
    step(1, 0, 0, RS_NONE, 1, 0, 0, "initial hold");
    step(1, 1, 0, RS_NONE, 1, 1, 0, "write1");
    step(0, 0, 1, RS_NONE, 1, 1, 1, "write1-read");
    step(0, 0, 0, RS_RC,   1, 1, 0, "rc-reset");
    step(0, 1, 0, RS_NONE, 1, 2, 0, "write2");
    checks++;
    if (m !== 2'b10) begin failures++; $display("FAIL words after write2: %b", m); end
    step(0, 0, 1, RS_NONE, 1, 2, 1, "write2 read (M1)");
    step(1, 0, 1, RS_NONE, 0, 2, 2, "write2 read (M0)");
    step(1, 0, 1, RS_NONE, 1, 2, 2, "read past wc ignored");
    step(1, 1, 0, RS_NONE, 1, 2, 2, "write when full ignored");
    step(0, 0, 0, RS_RC,   1, 2, 0, "rc-reset");
    step(0, 0, 1, RS_NONE, 1, 2, 1, "read again M1");
    step(0, 0, 0, RS_ALL,  1, 0, 0, "initial reset");
    checks++;
    if (m !== 2'b11) begin failures++; $display("FAIL words after reset: %b", m); end

    // Part 2: random against the reference queue.
    ref_q.delete();
    ref_rc = 0;
    for (int k = 0; k < 2000; k++) begin
      logic exp_q, exp_v;
      logic [DEPTH-1:0] exp_m;
      @(negedge clk);
      d = 1'($urandom);
      w = 1'($urandom);
      r = 1'($urandom);
      case ($urandom_range(0, 15))
        0:       rs = RS_ALL;
        1, 2:    rs = RS_RC;
        default: rs = RS_NONE;
      endcase
      exp_v = (rs == RS_NONE) && r && (ref_rc < ref_q.size());
      exp_q = exp_v ? ref_q[ref_rc] : 1'b1;
      for (int i = 0; i < DEPTH; i++)
        exp_m[i] = (i < ref_q.size()) ? ref_q[ref_q.size() - 1 - i] : 1'b1;
      #1 checks++;
      if (q !== exp_q || q_valid !== exp_v || m !== exp_m ||
          wc !== CW'(ref_q.size()) || rc !== CW'(ref_rc)) begin
        failures++;
        $display("FAIL random %0d: q=%b/%b v=%b/%b m=%b/%b wc=%0d/%0d rc=%0d/%0d", k,
                 q, exp_q, q_valid, exp_v, m, exp_m, wc, ref_q.size(), rc, ref_rc);
      end
      @(posedge clk);
      if (rs == RS_ALL) begin
        ref_q.delete();
        ref_rc = 0;
      end else if (rs == RS_RC) begin
        ref_rc = 0;
      end else begin
        if (exp_v) ref_rc++;
        if (w && ref_q.size() < DEPTH) ref_q.push_back(d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
