// tb_dac_model: every code must convert to code/256 (255 -> 0.996094,
// 228 -> 0.890625, 199 -> 0.777344 as in the vector register test).
module tb_dac_model;
  logic [7:0] code;
  real aout;
  int checks = 0, failures = 0;

  dac_model #(.N(8)) dut (.code, .aout);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 256; k++) begin
      code = 8'(k);
      #1 checks++;
      if (aout < real'(k) / 256.0 - 1e-9 || aout > real'(k) / 256.0 + 1e-9) begin
        failures++;
        $display("FAIL code=%0d aout=%f", k, aout);
      end
    end
    code = 8'd255; #1 checks++;
    if ($rtoi(aout * 1e6 + 0.5) != 996094) begin failures++; $display("FAIL 255 -> %f", aout); end
    code = 8'd228; #1 checks++;
    if ($rtoi(aout * 1e6 + 0.5) != 890625) begin failures++; $display("FAIL 228 -> %f", aout); end
    code = 8'd199; #1 checks++;
    if ($rtoi(aout * 1e6 + 0.5) != 777344) begin failures++; $display("FAIL 199 -> %f", aout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
