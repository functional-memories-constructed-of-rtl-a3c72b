// tb_nn_bit_memory: the one-bit memory against its truth table.
// Each cycle random D and id are applied; Q must be D when id = 1 and the
// stored bit when id = 0, and the stored bit must take that value one cycle
// later. A reference bit is kept in the testbench.
module tb_nn_bit_memory;
  logic clk = 0, rst_n = 0, d = 0, id = 0, q, z;
  logic ref_z;
  int checks = 0, failures = 0, n_set = 0, n_keep = 0;

  nn_bit_memory dut (.clk, .rst_n, .d, .id, .q, .z);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_z = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 400; k++) begin
      @(negedge clk);
      d  = 1'($urandom);
      id = 1'($urandom);
      #1;
      checks++;
      if (z !== ref_z || q !== (id ? d : ref_z)) begin
        failures++;
        $display("FAIL cycle %0d: d=%b id=%b q=%b z=%b ref=%b", k, d, id, q, z, ref_z);
      end
      if (id) n_set++; else n_keep++;
      @(posedge clk);
      if (id) ref_z = d;
    end
    checks++;
    if (n_set == 0 || n_keep == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
