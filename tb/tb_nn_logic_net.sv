// tb_nn_logic_net: every one of the 16 functions of two inputs is set up as a
// product of maxterms (one OR neuron per input combination where F = 0) and
// checked over all inputs. Random wirings are then compared with a reference
// AND-of-ORs computed in the testbench.
module tb_nn_logic_net;
  localparam int N_IN = 2, N_TERMS = 4;
  logic [N_IN-1:0]    x;
  logic [N_IN-1:0]    lit_use [N_TERMS];
  logic [N_IN-1:0]    lit_neg [N_TERMS];
  logic [N_TERMS-1:0] term_en;
  logic               y;
  int checks = 0, failures = 0;

  nn_logic_net #(.N_IN(N_IN), .N_TERMS(N_TERMS)) dut (.x, .lit_use, .lit_neg, .term_en, .y);

  function automatic logic ref_f();
    logic f = 1'b1;
    for (int t = 0; t < N_TERMS; t++) begin
      logic o = 1'b0;
      for (int i = 0; i < N_IN; i++)
        if (lit_use[t][i]) o |= lit_neg[t][i] ? ~x[i] : x[i];
      if (term_en[t]) f &= o;
    end
    return f;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < 16; f++) begin
      for (int m = 0; m < 4; m++) begin
        lit_use[m] = 2'b11;
        lit_neg[m] = m[1:0];           // maxterm that is 0 exactly at input m
        term_en[m] = ~f[m];
      end
      for (int p = 0; p < 4; p++) begin
        x = p[1:0];
        #1 checks++;
        if (y !== f[p]) begin
          failures++;
          $display("FAIL truth table %b at x=%b: y=%b", f[3:0], x, y);
        end
      end
    end
    for (int k = 0; k < 500; k++) begin
      for (int t = 0; t < N_TERMS; t++) begin
        lit_use[t] = 2'($urandom);
        lit_neg[t] = 2'($urandom);
      end
      term_en = 4'($urandom);
      x = 2'($urandom);
      #1 checks++;
      if (y !== ref_f()) begin
        failures++;
        $display("FAIL random wiring x=%b y=%b", x, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
