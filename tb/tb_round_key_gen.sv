// tb_round_key_gen: end-to-end test of the non-pipelined round key generator
// at its default parameters.
//
// For the three key lengths, with the FIPS-197 Appendix A keys and random
// keys, it writes a cipher key and runs:
//   - a cipher pass: F_RK = round key 0 in the start cycle, then round keys
//     1..Nr on consecutive clocks (one per clock);
//   - a decipher pass that reuses the decipher start key stored by the
//     cipher pass: F_RK = round key Nr, then Nr-1..0;
//   - after a new key write, a decipher pass that must first pre-compute the
//     decipher start key (Nr + 1 extra clocks);
//   - a key write attempted in the middle of a pass, which must be ignored.
// Every round key is compared with an independent reference key expansion,
// and the latencies are checked. Each of these mechanisms is counted and a
// mechanism that never happened counts as a failure.
module tb_round_key_gen;
  import aes_key_pkg::*;
  import aes_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, key_wr = 1'b0, start = 1'b0, e_mode = 1'b0;
  logic [255:0] key_data = '0;
  key_len_e key_len_in = KL128;
  logic [127:0] f_rk, rk;
  logic f_rk_valid, rk_valid, done, busy, dec_ready, precomputing;
  logic [3:0] rk_round;
  int checks = 0, failures = 0;
  int n_cipher = 0, n_dec_stored = 0, n_precomp = 0, n_wr_ignored = 0;
  int n_len [3] = '{0, 0, 0};

  round_key_gen dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [127:0] rkey(w_t w [64], int r);
    return {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
  endfunction

  task automatic write_key(logic [255:0] k, int kl);
    @(negedge clk);
    key_wr = 1'b1; key_data = k; key_len_in = key_len_e'(kl);
    @(negedge clk);
    key_wr = 1'b0; key_data = '0;
  endtask

  // Start a pass and check every round key it delivers. 'wr_mid' writes a
  // different key in the middle of the pass.
  task automatic do_pass(w_t w [64], int kl, bit dec, bit expect_pre, bit wr_mid);
    int nr, wait_cycles, r_exp;
    nr = ref_nr(kl);
    @(negedge clk);
    start = 1'b1; e_mode = dec;
    #1;
    wait_cycles = 0;
    if (expect_pre) begin
      chk(!f_rk_valid && busy == 1'b0, "pre-computation start has no F_RK");
      @(negedge clk); start = 1'b0;
      while (!f_rk_valid && wait_cycles < 100) begin
        chk(precomputing && !rk_valid, "pre-computation delivers no round keys");
        @(negedge clk); wait_cycles++;
      end
      chk(wait_cycles == nr, $sformatf("pre-computation took %0d cycles after start, expected %0d", wait_cycles, nr));
      if (wait_cycles == nr) n_precomp++;
    end
    chk(f_rk_valid === 1'b1, "f_rk_valid in start cycle");
    chk(f_rk === rkey(w, dec ? nr : 0), $sformatf("F_RK kl=%0d dec=%0d: %h", kl, dec, f_rk));
    @(negedge clk);
    start = 1'b0;
    for (int i = 1; i <= nr; i++) begin
      r_exp = dec ? nr - i : i;
      chk(rk_valid === 1'b1, "rk_valid");
      chk(rk_round === 4'(r_exp), $sformatf("rk_round %0d expected %0d", rk_round, r_exp));
      chk(rk === rkey(w, r_exp), $sformatf("RK[%0d] kl=%0d dec=%0d: %h expected %h", r_exp, kl, dec, rk, rkey(w, r_exp)));
      chk(done === (i == nr), "done only with the last round key");
      if (wr_mid && i == 3) begin
        key_wr = 1'b1; key_data = ~key_data;
      end else begin
        key_wr = 1'b0;
      end
      @(negedge clk);
    end
    key_wr = 1'b0;
    chk(!busy && !rk_valid, "idle after the pass");
    if (dec) begin
      if (!expect_pre) n_dec_stored++;
    end else begin
      n_cipher++;
    end
    n_len[kl]++;
  endtask

  initial begin
    w_t w [64];
    logic [255:0] k;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 9; n++) begin
      int kl;
      kl = n % 3;
      if (n < 3) k = (kl == 0) ? FIPS_KEY128 : (kl == 1) ? FIPS_KEY192 : FIPS_KEY256;
      else       k = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom} & ref_mask(kl);
      ref_expand(k, kl, w);
      write_key(k, kl);
      chk(!dec_ready, "decipher start key stale after key write");
      if (n % 2 == 0) begin
        do_pass(w, kl, 1'b0, 1'b0, 1'b0);            // cipher
        chk(dec_ready, "decipher start key ready after cipher pass");
        do_pass(w, kl, 1'b1, 1'b0, n == 0);          // decipher, stored key
        if (n == 0) begin
          do_pass(w, kl, 1'b0, 1'b0, 1'b0);          // key unchanged by ignored write
          n_wr_ignored++;
        end
      end else begin
        do_pass(w, kl, 1'b1, 1'b1, 1'b0);            // decipher with pre-computation
        do_pass(w, kl, 1'b0, 1'b0, 1'b0);            // cipher
        do_pass(w, kl, 1'b1, 1'b0, 1'b0);            // decipher, stored key
      end
    end
    chk(n_cipher > 0, "cipher pass happened");
    chk(n_dec_stored > 0, "decipher from stored start key happened");
    chk(n_precomp > 0, "pre-computation happened");
    chk(n_wr_ignored > 0, "key write while busy ignored");
    for (int kl = 0; kl < 3; kl++) chk(n_len[kl] > 0, $sformatf("key length %0d exercised", kl));
    $display("mechanisms: cipher=%0d decipher_stored=%0d precompute=%0d write_ignored=%0d lengths=%0d/%0d/%0d",
             n_cipher, n_dec_stored, n_precomp, n_wr_ignored, n_len[0], n_len[1], n_len[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
