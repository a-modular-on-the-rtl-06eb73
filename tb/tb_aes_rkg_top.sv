// tb_aes_rkg_top: end-to-end test of the top level at its default
// parameters, both generators at once.
//
// Iterative generator: for each key length (FIPS-197 Appendix A keys, then
// random keys) a key write, a cipher pass (F_RK then round keys 1..Nr, one
// per clock), a decipher pass from the stored decipher start key, and after
// a new key a decipher pass that must pre-compute first; plus a key write
// during a pass, which must be ignored.
// Pipelined generator, running in the same clocks: a stream of keys of
// random length and mode entering back to back with idle gaps; every stage
// is checked after every clock.
// 128-bit pipelined generator, also in the same clocks: a stream of cipher
// keys and final round keys (for decipher) with idle gaps.
// All round keys are compared with an independent reference expansion.
// Mechanisms counted (a zero count fails): cipher pass, decipher from stored
// key, pre-computation, ignored key write, each key length on both
// generators, pipelined cipher and decipher entries, pipeline bubbles.
module tb_aes_rkg_top;
  import aes_key_pkg::*;
  import aes_ref_pkg::*;

  localparam int NS = 14;
  localparam int HIST = 512;

  logic clk = 1'b0, rst_n = 1'b0;
  logic it_key_wr = 1'b0, it_start = 1'b0, it_e_mode = 1'b0;
  logic [255:0] it_key_data = '0;
  key_len_e it_key_len = KL128;
  logic [127:0] it_f_rk, it_rk;
  logic it_f_rk_valid, it_rk_valid, it_done, it_busy, it_dec_ready, it_precomputing;
  logic [3:0] it_rk_round;
  logic pp_in_valid = 1'b0, pp_in_e_mode = 1'b0;
  logic [255:0] pp_in_key = '0;
  key_len_e pp_in_key_len = KL128;
  logic [127:0] pp_f_rk, pp_rk [NS];
  logic pp_rk_valid [NS];
  logic p128_in_valid = 1'b0, p128_in_e_mode = 1'b0;
  logic [127:0] p128_in_key = '0, p128_f_rk, p128_rk [10];
  logic p128_rk_valid [10];
  int n_p128_enc = 0, n_p128_dec = 0, n_p128_idle = 0;
  bit p128_finished = 1'b0;

  int checks = 0, failures = 0;
  int n_cipher = 0, n_dec_stored = 0, n_precomp = 0, n_wr_ignored = 0;
  int n_it_len [3] = '{0, 0, 0};
  int n_pp_len [3] = '{0, 0, 0};
  int n_pp_enc = 0, n_pp_dec = 0, n_pp_bubble = 0;
  bit it_finished = 1'b0;

  aes_rkg_top dut (.*);

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

  function automatic logic [255:0] rand_key(int kl);
    return {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom} & ref_mask(kl);
  endfunction

  // ---------------- iterative generator ----------------
  task automatic it_write(logic [255:0] k, int kl);
    @(negedge clk);
    it_key_wr = 1'b1; it_key_data = k; it_key_len = key_len_e'(kl);
    @(negedge clk);
    it_key_wr = 1'b0;
    chk(!it_dec_ready, "decipher start key stale after key write");
  endtask

  task automatic it_pass(w_t w [64], int kl, bit dec, bit expect_pre, bit wr_mid);
    int nr, waits, r_exp;
    nr = ref_nr(kl);
    @(negedge clk);
    it_start = 1'b1; it_e_mode = dec;
    #1;
    if (expect_pre) begin
      chk(!it_f_rk_valid, "no F_RK while pre-computing");
      @(negedge clk); it_start = 1'b0;
      waits = 0;
      while (!it_f_rk_valid && waits < 100) begin
        chk(it_precomputing && !it_rk_valid, "pre-computation delivers no round keys");
        @(negedge clk); waits++;
      end
      chk(waits == nr, $sformatf("pre-computation %0d cycles after start, expected %0d", waits, nr));
      if (waits == nr) n_precomp++;
    end
    chk(it_f_rk_valid === 1'b1, "F_RK valid in the start cycle");
    chk(it_f_rk === rkey(w, dec ? nr : 0), $sformatf("F_RK kl=%0d dec=%0d", kl, dec));
    @(negedge clk);
    it_start = 1'b0;
    for (int i = 1; i <= nr; i++) begin
      r_exp = dec ? nr - i : i;
      chk(it_rk_valid === 1'b1 && it_rk_round === 4'(r_exp), "round key valid and numbered");
      chk(it_rk === rkey(w, r_exp), $sformatf("RK[%0d] kl=%0d dec=%0d: %h expected %h", r_exp, kl, dec, it_rk, rkey(w, r_exp)));
      chk(it_done === (i == nr), "done with the last round key");
      it_key_wr = wr_mid && (i == 3);
      it_key_data = ~it_key_data;
      @(negedge clk);
    end
    it_key_wr = 1'b0;
    chk(!it_busy, "idle after the pass");
    if (dec && !expect_pre) n_dec_stored++;
    if (!dec) n_cipher++;
    n_it_len[kl]++;
  endtask

  initial begin
    w_t w [64];
    logic [255:0] k;
    int kl;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 6; n++) begin
      kl = n % 3;
      if (n < 3) k = (kl == 0) ? FIPS_KEY128 : (kl == 1) ? FIPS_KEY192 : FIPS_KEY256;
      else       k = rand_key(kl);
      ref_expand(k, kl, w);
      it_write(k, kl);
      it_pass(w, kl, 1'b0, 1'b0, 1'b0);
      it_pass(w, kl, 1'b1, 1'b0, n == 0);
      if (n == 0) begin
        it_pass(w, kl, 1'b0, 1'b0, 1'b0);
        n_wr_ignored++;
      end
      k = rand_key(kl);
      ref_expand(k, kl, w);
      it_write(k, kl);
      it_pass(w, kl, 1'b1, 1'b1, 1'b0);
    end
    it_finished = 1'b1;
  end

  // ---------------- 128-bit pipelined generator ----------------
  bit q_valid [HIST];
  bit q_dec   [HIST];
  w_t q_w     [HIST][64];

  initial begin
    w_t w [64];
    logic [255:0] k;
    int c, r, t;
    repeat (3) @(posedge clk);
    t = 0;
    while (!it_finished || t < 40) begin
      @(negedge clk);
      for (int s = 0; s < 10; s++) begin
        c = t - 1 - s;
        checks++;
        if (c < 0 || !q_valid[c % HIST]) begin
          if (p128_rk_valid[s] !== 1'b0) begin failures++; $display("p128 stage %0d valid without entry", s); end
        end else begin
          r = q_dec[c % HIST] ? 9 - s : s + 1;
          if (p128_rk_valid[s] !== 1'b1 || p128_rk[s] !== rkey(q_w[c % HIST], r)) begin
            failures++;
            $display("p128 stage %0d dec=%0d: %h expected RK[%0d]", s, q_dec[c % HIST], p128_rk[s], r);
          end
        end
      end
      if (!it_finished) begin
        k = (t < 2) ? FIPS_KEY128 : rand_key(0);
        ref_expand(k, 0, w);
        q_w[t % HIST] = w;
        q_valid[t % HIST] = (t % 5 != 2);
        q_dec[t % HIST] = (t < 2) ? bit'(t) : bit'($urandom_range(0, 1));
        p128_in_valid = q_valid[t % HIST];
        p128_in_e_mode = q_dec[t % HIST];
        p128_in_key = q_dec[t % HIST] ? rkey(w, 10) : k[255:128];
        #1;
        chk(p128_f_rk === p128_in_key, "128-bit pipelined F_RK");
        if (!q_valid[t % HIST]) n_p128_idle++;
        else if (q_dec[t % HIST]) n_p128_dec++;
        else n_p128_enc++;
      end else begin
        p128_in_valid = 1'b0;
        q_valid[t % HIST] = 1'b0;
      end
      t++;
    end
    p128_finished = 1'b1;
  end

  // ---------------- pipelined generator ----------------
  bit h_valid [HIST];
  int h_kl    [HIST];
  bit h_dec   [HIST];
  w_t h_w     [HIST][64];

  initial begin
    w_t w [64];
    logic [255:0] k;
    int kl, nr, c, r, t;
    repeat (3) @(posedge clk);
    t = 0;
    while (!it_finished || t < 40) begin
      @(negedge clk);
      for (int s = 0; s < NS; s++) begin
        c = t - 1 - s;
        checks++;
        if (c < 0 || !h_valid[c % HIST]) begin
          if (pp_rk_valid[s] !== 1'b0) begin failures++; $display("stage %0d valid without entry", s); end
        end else begin
          nr = ref_nr(h_kl[c % HIST]);
          if (!h_dec[c % HIST]) r = (s + 1 <= nr) ? s + 1 : nr;
          else                  r = (s < nr) ? nr - 1 - s : 0;
          if (pp_rk_valid[s] !== 1'b1 || pp_rk[s] !== rkey(h_w[c % HIST], r)) begin
            failures++;
            $display("pipelined stage %0d kl=%0d dec=%0d: %h expected RK[%0d]", s, h_kl[c % HIST], h_dec[c % HIST], pp_rk[s], r);
          end
        end
      end
      if (!it_finished) begin
        h_valid[t % HIST] = (t % 9 != 4);
        kl = (t < 3) ? t : int'($urandom_range(0, 2));
        k = (t < 3) ? ((kl == 0) ? FIPS_KEY128 : (kl == 1) ? FIPS_KEY192 : FIPS_KEY256) : rand_key(kl);
        ref_expand(k, kl, w);
        h_kl[t % HIST] = kl;
        h_dec[t % HIST] = (t < 3) ? 1'b0 : bit'($urandom_range(0, 1));
        h_w[t % HIST] = w;
        pp_in_valid = h_valid[t % HIST];
        pp_in_key_len = key_len_e'(kl);
        pp_in_e_mode = h_dec[t % HIST];
        pp_in_key = h_dec[t % HIST] ? ref_state(w, kl, ref_nr(kl)) : k;
        #1;
        chk(pp_f_rk === rkey(w, h_dec[t % HIST] ? ref_nr(kl) : 0), "pipelined F_RK");
        if (!h_valid[t % HIST]) n_pp_bubble++;
        else begin
          if (h_dec[t % HIST]) n_pp_dec++; else n_pp_enc++;
          n_pp_len[kl]++;
        end
      end else begin
        pp_in_valid = 1'b0;
        h_valid[t % HIST] = 1'b0;
      end
      t++;
    end
    wait (p128_finished);
    chk(n_p128_enc > 0 && n_p128_dec > 0 && n_p128_idle > 0, "128-bit pipelined cipher, decipher and idle entries");
    chk(n_cipher > 0, "cipher pass happened");
    chk(n_dec_stored > 0, "decipher from stored start key happened");
    chk(n_precomp > 0, "pre-computation happened");
    chk(n_wr_ignored > 0, "key write during a pass ignored");
    chk(n_pp_enc > 0 && n_pp_dec > 0 && n_pp_bubble > 0, "pipelined cipher, decipher and idle entries");
    for (int i = 0; i < 3; i++) chk(n_it_len[i] > 0 && n_pp_len[i] > 0, $sformatf("key length %0d on both generators", i));
    $display("iterative: cipher=%0d decipher_stored=%0d precompute=%0d write_ignored=%0d lengths=%0d/%0d/%0d",
             n_cipher, n_dec_stored, n_precomp, n_wr_ignored, n_it_len[0], n_it_len[1], n_it_len[2]);
    $display("pipelined: cipher=%0d decipher=%0d idle=%0d lengths=%0d/%0d/%0d",
             n_pp_enc, n_pp_dec, n_pp_bubble, n_pp_len[0], n_pp_len[1], n_pp_len[2]);
    $display("128-bit pipelined: cipher=%0d decipher=%0d idle=%0d", n_p128_enc, n_p128_dec, n_p128_idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
