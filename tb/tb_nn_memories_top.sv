// tb_nn_memories_top: end-to-end test of all five circuits at their default
// sizes.
//
// Vector register: replays the analogue test sequence (initial reset, write1,
// write2, read1, read2, read-counter reset, read1, read2) through the
// converters and checks Q against the values expected for an 8-bit converter
// (0.996094 when nothing is read, 0.890625 and 0.777344 for the two stored
// samples) and the stored bit patterns M0 = 11000111, M1 = 11100100. It then
// also forces a write to a full register, a read past the stored words and a
// write and read in the same cycle.
// FIFO: a bit stream shifted through the four-bit chain with random pauses.
// Bit memory: random keep/set. Addressed memory: writes and reads back.
// Logic net: XOR and a random function set up as products of maxterms.
// Each mechanism is counted and one that never happened is a failure.
module tb_nn_memories_top;
  import nn_mem_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [1:0] ln_x = '0;
  logic [1:0] ln_lit_use [4];
  logic [1:0] ln_lit_neg [4];
  logic [3:0] ln_term_en = '0;
  logic ln_y;
  logic bm_d = 0, bm_id = 0, bm_q, bm_z;
  logic ff_d = 0, ff_id = 0, ff_q, ff_id_next;
  logic [3:0] ff_z;
  logic am_we = 0;
  logic [2:0] am_addr = '0;
  logic [7:0] am_wdata = '0, am_rdata;
  real  vr_d_analog = 0.0, vr_q_analog;
  logic vr_w = 0, vr_r = 0;
  rs_e  vr_rs = RS_NONE;
  logic [7:0] vr_d_code, vr_q_code;
  logic vr_q_valid;
  logic [1:0] vr_wc, vr_rc;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_init_reset = 0, n_rc_reset = 0, n_write = 0, n_read = 0, n_full_write = 0,
      n_empty_read = 0, n_write_read = 0, n_ff_shift = 0, n_ff_hold = 0,
      n_bm_set = 0, n_bm_keep = 0, n_am_write = 0, n_am_read = 0, n_ln_eval = 0;

  nn_memories_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] word(input int k);   // M(k) across the banks
    logic [7:0] v;
    v[0] = dut.u_vreg.g_bank[0].u_slice.m[k];
    v[1] = dut.u_vreg.g_bank[1].u_slice.m[k];
    v[2] = dut.u_vreg.g_bank[2].u_slice.m[k];
    v[3] = dut.u_vreg.g_bank[3].u_slice.m[k];
    v[4] = dut.u_vreg.g_bank[4].u_slice.m[k];
    v[5] = dut.u_vreg.g_bank[5].u_slice.m[k];
    v[6] = dut.u_vreg.g_bank[6].u_slice.m[k];
    v[7] = dut.u_vreg.g_bank[7].u_slice.m[k];
    return v;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // One vector-register iteration: expected Q in millionths.
  task automatic vr_step(input real d, input logic w, r, input rs_e rs,
                         input int exp_q_micro, input string what);
    @(negedge clk);
    vr_d_analog = d; vr_w = w; vr_r = r; vr_rs = rs;
    #1;
    check($rtoi(vr_q_analog * 1e6 + 0.5) == exp_q_micro,
          $sformatf("%s: Q=%f expected %0d e-6", what, vr_q_analog, exp_q_micro));
    if (rs == RS_ALL) n_init_reset++;
    if (rs == RS_RC) n_rc_reset++;
    if (rs == RS_NONE && w && vr_wc < 2) n_write++;
    if (rs == RS_NONE && w && vr_wc == 2) n_full_write++;
    if (rs == RS_NONE && r && vr_q_valid) n_read++;
    if (rs == RS_NONE && r && !vr_q_valid) n_empty_read++;
    if (rs == RS_NONE && w && r && vr_q_valid && vr_wc < 2) n_write_read++;
    @(posedge clk);
  endtask

  // ---------------------------------------------------------------- vector register
  task automatic run_vector_register();
    // the analogue test sequence; "*" (nothing read) converts to 255/256
    vr_step(0.987654, 0, 0, RS_ALL,  996094, "(1) initial reset");
    #1 check(vr_wc == 0 && vr_rc == 0 && word(0) == 8'hff && word(1) == 8'hff, "(1) cleared");
    vr_step(0.888889, 1, 0, RS_NONE, 996094, "(2) write1");
    #1 check(word(0) == 8'b11100100, $sformatf("(2) M0=%b", word(0)));
    vr_step(0.777778, 1, 0, RS_NONE, 996094, "(3) write2");
    #1 check(word(0) == 8'b11000111 && word(1) == 8'b11100100,
             $sformatf("(3) M0=%b M1=%b", word(0), word(1)));
    vr_step(0.555556, 0, 1, RS_NONE, 890625, "(4) read1");
    vr_step(0.444444, 0, 1, RS_NONE, 777344, "(5) read2");
    vr_step(0.333333, 0, 0, RS_RC,   996094, "(6) read counter reset");
    vr_step(0.0,      0, 1, RS_NONE, 890625, "(7) read1");
    vr_step(0.0,      0, 1, RS_NONE, 777344, "(8) read2");
    // beyond the sequence: full, empty and concurrent cases
    vr_step(0.5,      1, 0, RS_NONE, 996094, "write to full register");
    vr_step(0.5,      0, 1, RS_NONE, 996094, "read past stored words");
    #1 check(vr_wc == 2 && vr_rc == 2 && word(0) == 8'b11000111, "full register unchanged");
    vr_step(0.0,      0, 0, RS_ALL,  996094, "initial reset");
    vr_step(0.25,     1, 0, RS_NONE, 996094, "write 0.25");
    vr_step(0.75,     1, 1, RS_NONE, 250000, "write 0.75 and read 0.25");
    vr_step(0.0,      0, 1, RS_NONE, 750000, "read 0.75");
  endtask

  // ---------------------------------------------------------------- FIFO
  task automatic run_fifo();
    logic [3:0] sh = '0;                 // reference: sh[0] newest
    for (int k = 0; k < 300; k++) begin
      @(negedge clk);
      ff_d  = 1'($urandom);
      ff_id = ($urandom_range(0, 3) != 0);
      #1 check(ff_q == sh[3] && ff_z == sh && ff_id_next == ff_id,
               $sformatf("FIFO cycle %0d q=%b z=%b ref=%b", k, ff_q, ff_z, sh));
      if (ff_id) n_ff_shift++; else n_ff_hold++;
      @(posedge clk);
      if (ff_id) sh = {sh[2:0], ff_d};
    end
    ff_id = 0;
  endtask

  // ---------------------------------------------------------------- bit memory
  task automatic run_bit_memory();
    logic zr = 1'b0;
    for (int k = 0; k < 200; k++) begin
      @(negedge clk);
      bm_d  = 1'($urandom);
      bm_id = 1'($urandom);
      #1 check(bm_z == zr && bm_q == (bm_id ? bm_d : zr), $sformatf("bit memory cycle %0d", k));
      if (bm_id) n_bm_set++; else n_bm_keep++;
      @(posedge clk);
      if (bm_id) zr = bm_d;
    end
    bm_id = 0;
  endtask

  // ---------------------------------------------------------------- addressed memory
  task automatic run_addressed();
    logic [7:0] img [8];
    for (int a = 0; a < 8; a++) img[a] = 8'(a * 37 + 5);
    for (int a = 0; a < 8; a++) begin
      @(negedge clk);
      am_we = 1; am_addr = 3'(a); am_wdata = img[a];
      n_am_write++;
      @(posedge clk);
    end
    @(negedge clk) am_we = 0;
    for (int a = 7; a >= 0; a--) begin
      @(negedge clk);
      am_addr = 3'(a);
      #1 check(am_rdata == img[a], $sformatf("addressed read %0d: %h", a, am_rdata));
      n_am_read++;
    end
  endtask

  // ---------------------------------------------------------------- logic net
  task automatic program_ln(input logic [3:0] f);
    for (int m = 0; m < 4; m++) begin
      ln_lit_use[m] = 2'b11;
      ln_lit_neg[m] = 2'(m);
      ln_term_en[m] = ~f[m];
    end
  endtask

  task automatic run_logic_net();
    logic [3:0] f;
    for (int k = 0; k < 8; k++) begin
      f = (k == 0) ? 4'b0110 : 4'($urandom);    // XOR first
      program_ln(f);
      for (int p = 0; p < 4; p++) begin
        ln_x = 2'(p);
        #1 check(ln_y == f[p], $sformatf("logic net f=%b x=%b y=%b", f, ln_x, ln_y));
        n_ln_eval++;
      end
    end
  endtask

  initial begin
    program_ln(4'b0000);
    repeat (2) @(posedge clk);
    rst_n = 1;
    run_vector_register();
    run_fifo();
    run_bit_memory();
    run_addressed();
    run_logic_net();

    check(n_init_reset > 0, "no initial reset");
    check(n_rc_reset > 0,   "no read-counter reset");
    check(n_write > 0,      "no write");
    check(n_read > 0,       "no read");
    check(n_full_write > 0, "no write to a full register");
    check(n_empty_read > 0, "no read past the stored words");
    check(n_write_read > 0, "no write and read together");
    check(n_ff_shift > 0 && n_ff_hold > 0, "FIFO shift/hold missing");
    check(n_bm_set > 0 && n_bm_keep > 0,   "bit memory set/keep missing");
    check(n_am_write > 0 && n_am_read > 0, "addressed write/read missing");
    check(n_ln_eval > 0,    "logic net never evaluated");
    $display("mechanisms: init_reset=%0d rc_reset=%0d write=%0d read=%0d full_write=%0d empty_read=%0d write_read=%0d fifo_shift=%0d fifo_hold=%0d bit_set=%0d bit_keep=%0d addr_write=%0d addr_read=%0d logic_eval=%0d",
             n_init_reset, n_rc_reset, n_write, n_read, n_full_write, n_empty_read, n_write_read,
             n_ff_shift, n_ff_hold, n_bm_set, n_bm_keep, n_am_write, n_am_read, n_ln_eval);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
