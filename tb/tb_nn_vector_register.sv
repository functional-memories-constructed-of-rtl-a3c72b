// tb_nn_vector_register: the 8-bank, two-word register with random words.
// A reference queue of whole words, oldest first, gives the expected q,
// q_valid and counters every cycle; write-when-full, read-past-end and both
// resets are all exercised.
module tb_nn_vector_register;
  import nn_mem_pkg::*;
  localparam int BANKS = 8, DEPTH = 2, CW = 2;
  logic clk = 0, rst_n = 0, w = 0, r = 0;
  logic [BANKS-1:0] d = '0, q;
  rs_e  rs = RS_NONE;
  logic q_valid;
  logic [CW-1:0] wc, rc;
  int checks = 0, failures = 0, n_reads = 0, n_full = 0;
  logic [BANKS-1:0] ref_q[$];
  int ref_rc;

  nn_vector_register #(.BANKS(BANKS), .DEPTH(DEPTH)) dut (.clk, .rst_n, .d, .w, .r, .rs, .q, .q_valid, .wc, .rc);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    ref_rc = 0;
    for (int k = 0; k < 2000; k++) begin
      logic [BANKS-1:0] exp_q;
      logic exp_v;
      @(negedge clk);
      d = BANKS'($urandom);
      w = 1'($urandom);
      r = 1'($urandom);
      case ($urandom_range(0, 15))
        0:       rs = RS_ALL;
        1, 2:    rs = RS_RC;
        default: rs = RS_NONE;
      endcase
      exp_v = (rs == RS_NONE) && r && (ref_rc < ref_q.size());
      exp_q = exp_v ? ref_q[ref_rc] : '1;
      #1 checks++;
      if (q !== exp_q || q_valid !== exp_v || wc !== CW'(ref_q.size()) || rc !== CW'(ref_rc)) begin
        failures++;
        $display("FAIL %0d: q=%h/%h v=%b/%b wc=%0d/%0d rc=%0d/%0d", k,
                 q, exp_q, q_valid, exp_v, wc, ref_q.size(), rc, ref_rc);
      end
      @(posedge clk);
      if (rs == RS_ALL) begin
        ref_q.delete();
        ref_rc = 0;
      end else if (rs == RS_RC) begin
        ref_rc = 0;
      end else begin
        if (exp_v) begin ref_rc++; n_reads++; end
        if (w && ref_q.size() < DEPTH) ref_q.push_back(d);
        else if (w) n_full++;
      end
    end
    checks++;
    if (n_reads == 0 || n_full == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
