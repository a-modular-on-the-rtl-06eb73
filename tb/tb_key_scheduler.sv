// tb_key_scheduler: self-checking test of the iterative key scheduler, normal
// and speed-up datapaths side by side. For each key length, with the FIPS-197
// Appendix A keys and random keys, it runs a cipher pass from the cipher key
// and a decipher pass from the final state, and after every clock compares
// the valid Nk words of RK_R with the reference key expansion. It also holds
// 'run' low for a few cycles in the middle of a pass and checks that RK_R
// holds and then continues correctly.
module tb_key_scheduler;
  import aes_key_pkg::*;
  import aes_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, run = 1'b0, e_mode = 1'b0;
  logic [255:0] key_init = '0;
  key_len_e key_len = KL128;
  logic [255:0] st_n, st_f;
  logic [127:0] rk_n, rk_f;
  int checks = 0, failures = 0, holds = 0;

  key_scheduler #(.SPEEDUP(1'b0)) dut_n (.clk, .rst_n, .start, .run, .key_init, .key_len, .e_mode,
                                         .rk_state(st_n), .rk(rk_n));
  key_scheduler #(.SPEEDUP(1'b1)) dut_f (.clk, .rst_n, .start, .run, .key_init, .key_len, .e_mode,
                                         .rk_state(st_f), .rk(rk_f));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(int kl, logic [255:0] exp, string what, int r);
    logic [255:0] m;
    m = ref_mask(kl);
    checks += 3;
    if ((st_n & m) !== exp) begin
      failures++; $display("%s kl=%0d round %0d normal: %h exp %h", what, kl, r, st_n & m, exp);
    end
    if ((st_f & m) !== exp) begin
      failures++; $display("%s kl=%0d round %0d speedup: %h exp %h", what, kl, r, st_f & m, exp);
    end
    if (rk_n !== exp[255:128]) failures++;
  endtask

  task automatic pass(int kl, logic [255:0] key, bit hold_mid);
    w_t w [64];
    int nr;
    nr = ref_nr(kl);
    ref_expand(key, kl, w);
    // Cipher.
    @(negedge clk);
    key_len = key_len_e'(kl); e_mode = 1'b0; key_init = key; start = 1'b1; run = 1'b0;
    @(negedge clk);
    start = 1'b0; key_init = '0; run = 1'b1;
    for (int r = 1; r <= nr; r++) begin
      chk(kl, ref_state(w, kl, r), "cipher", r);
      if (hold_mid && r == 4) begin
        run = 1'b0;
        repeat (3) @(negedge clk);
        chk(kl, ref_state(w, kl, r), "cipher hold", r);
        holds++;
        run = 1'b1;
      end
      if (r == nr) run = 1'b0;
      @(negedge clk);
    end
    // Decipher from the final state.
    e_mode = 1'b1; key_init = ref_state(w, kl, nr); start = 1'b1;
    @(negedge clk);
    start = 1'b0; key_init = '0; run = 1'b1;
    for (int r = nr - 1; r >= 0; r--) begin
      chk(kl, ref_state(w, kl, r), "decipher", r);
      if (hold_mid && r == 5) begin
        run = 1'b0;
        repeat (2) @(negedge clk);
        chk(kl, ref_state(w, kl, r), "decipher hold", r);
        holds++;
        run = 1'b1;
      end
      if (r == 0) run = 1'b0;
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    pass(0, FIPS_KEY128, 1'b1);
    pass(1, FIPS_KEY192, 1'b1);
    pass(2, FIPS_KEY256, 1'b1);
    for (int n = 0; n < 12; n++) begin
      logic [255:0] k;
      k = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      pass(n % 3, k & ref_mask(n % 3), 1'b0);
    end
    checks++;
    if (holds != 6) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
