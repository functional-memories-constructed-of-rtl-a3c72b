// tb_nn_addressed_memory: random writes and reads against a reference array.
// After reset every word reads 0; a write changes only the addressed word and
// is visible in the next cycle.
module tb_nn_addressed_memory;
  localparam int WORDS = 8, WIDTH = 8, AW = 3;
  logic clk = 0, rst_n = 0, we = 0;
  logic [AW-1:0]    addr = '0;
  logic [WIDTH-1:0] wdata = '0, rdata;
  logic [WIDTH-1:0] ref_mem [WORDS];
  int checks = 0, failures = 0;

  nn_addressed_memory #(.WORDS(WORDS), .WIDTH(WIDTH)) dut (.clk, .rst_n, .we, .addr, .wdata, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (ref_mem[a]) ref_mem[a] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 1000; k++) begin
      @(negedge clk);
      we    = ($urandom_range(0, 2) == 0);
      addr  = AW'($urandom);
      wdata = WIDTH'($urandom);
      #1;
      checks++;
      if (rdata !== ref_mem[addr]) begin
        failures++;
        $display("FAIL cycle %0d: addr=%0d rdata=%h exp=%h", k, addr, rdata, ref_mem[addr]);
      end
      @(posedge clk);
      if (we) ref_mem[addr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
