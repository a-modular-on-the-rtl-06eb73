// tb_rkg_ctrl: self-checking test of the control unit. For each key length
// it checks, cycle by cycle, a cipher pass, a decipher pass that reuses the
// stored decipher start key, and a decipher pass after a new key write that
// must first run the Nr-step forward pre-computation.
module tb_rkg_ctrl;
  import aes_key_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, key_wr = 1'b0, start = 1'b0, e_mode = 1'b0;
  key_len_e key_len = KL128;
  logic sched_start, sched_run, sched_mode, init_sel_dec, dec_wr, dec_ready;
  logic f_rk_valid, rk_valid, done, busy, precomputing;
  logic [3:0] rk_round;
  int checks = 0, failures = 0;

  rkg_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_bits(string what, logic [9:0] got, logic [9:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %b expected %b (start,run,mode,dec_sel,dec_wr,f_rk_v,rk_v,done,busy,pre)", what, got, exp);
    end
  endtask

  function automatic logic [9:0] outs();
    return {sched_start, sched_run, sched_mode, init_sel_dec, dec_wr, f_rk_valid, rk_valid, done, busy, precomputing};
  endfunction

  // Check the Nr cycles in which round keys are delivered.
  task automatic run_phase(int nr, bit dec);
    for (int r = 1; r <= nr; r++) begin
      @(negedge clk);
      expect_bits($sformatf("round %0d dec=%0d", r, dec), outs(),
                  {1'b0, r != nr, dec, 1'b0, (r == nr) && !dec, 1'b0, 1'b1, r == nr, 1'b1, 1'b0});
      checks++;
      if (rk_round !== 4'(dec ? nr - r : r)) begin failures++; $display("rk_round %0d", rk_round); end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int kl = 0; kl < 3; kl++) begin
      int nr;
      nr = 10 + 2 * kl;
      key_len = key_len_e'(kl);
      // New key: stored decipher start key becomes stale.
      @(negedge clk); key_wr = 1'b1;
      @(negedge clk); key_wr = 1'b0;
      checks++; if (dec_ready !== 1'b0) failures++;
      // Cipher pass.
      start = 1'b1; e_mode = 1'b0; #1;
      expect_bits("cipher start", outs(), 10'b1000010000);
      run_phase(nr, 1'b0);
      start = 1'b0;
      @(negedge clk);
      expect_bits("idle", outs(), 10'b0000000000);
      checks++; if (dec_ready !== 1'b1) failures++;
      // Decipher reusing the stored key.
      start = 1'b1; e_mode = 1'b1; #1;
      expect_bits("decipher start", outs(), 10'b1011010000);
      run_phase(nr, 1'b1);
      start = 1'b0;
      @(negedge clk);
      // New key, then decipher: pre-computation first.
      key_wr = 1'b1;
      @(negedge clk); key_wr = 1'b0;
      checks++; if (dec_ready !== 1'b0) failures++;
      start = 1'b1; e_mode = 1'b1; #1;
      expect_bits("precompute start", outs(), 10'b1000000000);
      @(negedge clk); start = 1'b0;
      for (int r = 1; r <= nr; r++) begin
        expect_bits($sformatf("precompute %0d", r), outs(), {1'b0, r != nr, 1'b0, 1'b0, r == nr, 5'b00011});
        @(negedge clk);
      end
      expect_bits("decipher start after precompute", outs(), 10'b1011010011);
      checks++; if (dec_ready !== 1'b1) failures++;
      run_phase(nr, 1'b1);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
