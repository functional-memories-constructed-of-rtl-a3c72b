// tb_threshold_neuron: exhaustive check of a 3-input threshold neuron.
// Every input pattern is tried with random signed weights and thresholds and
// also with the OR, AND and negated-input settings; the expected output is the
// weighted sum compared with the threshold, worked out in plain integers.
module tb_threshold_neuron;
  localparam int N = 3, WW = 4;
  logic [N-1:0]              x;
  logic signed [WW-1:0]      w [N];
  logic signed [WW+$clog2(N+1):0] theta;
  logic                      y;
  int checks = 0, failures = 0;

  threshold_neuron #(.N(N), .WW(WW)) dut (.x, .w, .theta, .y);

  task automatic check(input logic exp, input string what);
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL %s: x=%b w=%0d,%0d,%0d theta=%0d y=%b exp=%b",
               what, x, w[0], w[1], w[2], theta, y, exp);
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
    // OR, AND, and OR(x0, not x1, x2)
    for (int p = 0; p < 8; p++) begin
      x = p[2:0];
      w = '{4'sd1, 4'sd1, 4'sd1}; theta = 1; #1 check(|x, "OR");
      theta = 3;                             #1 check(&x, "AND");
      w = '{4'sd1, -4'sd1, 4'sd1}; theta = 0; #1 check(x[0] | ~x[1] | x[2], "OR with NOT");
    end
    for (int k = 0; k < 300; k++) begin
      int s;
      x = 3'($urandom);
      for (int i = 0; i < N; i++) w[i] = 4'($urandom);
      theta = 7'($urandom_range(0, 40)) - 7'sd20;
      s = 0;
      for (int i = 0; i < N; i++) if (x[i]) s += int'(w[i]);
      #1 check(s >= int'(theta), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
