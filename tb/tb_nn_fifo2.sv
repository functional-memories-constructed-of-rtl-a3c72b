// tb_nn_fifo2: the two-bit FIFO stage against a reference queue.
// Random D and id; on id = 1 D enters Z{0} and Z{0} moves to Z{1}; Q is
// always Z{1} and id_next equals id.
module tb_nn_fifo2;
  logic clk = 0, rst_n = 0, d = 0, id = 0, q, id_next;
  logic [1:0] z, ref_z;
  int checks = 0, failures = 0;

  nn_fifo2 dut (.clk, .rst_n, .d, .id, .q, .id_next, .z);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_z = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 400; k++) begin
      @(negedge clk);
      d  = 1'($urandom);
      id = 1'($urandom);
      #1;
      checks++;
      if (z !== ref_z || q !== ref_z[1] || id_next !== id) begin
        failures++;
        $display("FAIL cycle %0d: d=%b id=%b z=%b ref=%b q=%b", k, d, id, z, ref_z, q);
      end
      @(posedge clk);
      if (id) ref_z = {ref_z[0], d};
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
