// tb_adc_model: the converter against the sample values of the vector
// register test (0.888889 -> 228, 0.777778 -> 199, 0.987654 -> 253) and a
// sweep in which code must be the nearest step, limited to 0..255.
module tb_adc_model;
  real ain;
  logic [7:0] code;
  int checks = 0, failures = 0;

  adc_model #(.N(8)) dut (.ain, .code);

  task automatic expect_code(input real a, input int exp);
    ain = a;
    #1 checks++;
    if (int'(code) != exp) begin
      failures++;
      $display("FAIL ain=%f code=%0d exp=%0d", a, code, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    expect_code(0.888889, 228);
    expect_code(0.777778, 199);
    expect_code(0.987654, 253);
    expect_code(0.555556, 142);
    expect_code(0.0, 0);
    expect_code(-0.2, 0);
    expect_code(1.0, 255);
    expect_code(0.999, 255);
    for (int k = 0; k < 256; k++) begin
      // a value 0.3 step above and 0.3 step below step k
      expect_code((real'(k) + 0.3) / 256.0, k);
      if (k > 0) expect_code((real'(k) - 0.3) / 256.0, k);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
