// tb_rkg_pipelined: self-checking test of the pipelined round key generator.
// Keys of random length and mode (cipher key, or for a decipher the final
// Nk-word state of the reference expansion) enter back to back, with some
// idle cycles; after every clock every stage's round key and valid bit are
// compared with the reference expansion of the key that entered s+1 clocks
// earlier. The last entries are the FIPS-197 Appendix A keys.
module tb_rkg_pipelined;
  import aes_key_pkg::*;
  import aes_ref_pkg::*;

  localparam int NS = 14;
  localparam int NKEYS = 120;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, in_e_mode = 1'b0;
  logic [255:0] in_key = '0;
  key_len_e in_key_len = KL128;
  logic [127:0] f_rk, rk [NS];
  logic rk_valid [NS];
  int checks = 0, failures = 0;
  int n_enc = 0, n_dec = 0, n_bubble = 0;

  // Entry history, by cycle.
  bit   h_valid [NKEYS + NS + 2];
  int   h_kl    [NKEYS + NS + 2];
  bit   h_dec   [NKEYS + NS + 2];
  w_t   h_w     [NKEYS + NS + 2][64];

  rkg_pipelined dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [127:0] rkey(w_t w [64], int r);
    return {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
  endfunction

  initial begin
    w_t w [64];
    logic [255:0] k;
    int kl, nr, c, r;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < NKEYS + NS + 1; t++) begin
      @(negedge clk);
      // Check what the last clock edge produced.
      for (int s = 0; s < NS; s++) begin
        c = t - 1 - s;
        checks++;
        if (c < 0 || !h_valid[c]) begin
          if (rk_valid[s] !== 1'b0) begin failures++; $display("stage %0d valid without entry", s); end
        end else begin
          nr = ref_nr(h_kl[c]);
          if (!h_dec[c]) r = (s + 1 <= nr) ? s + 1 : nr;
          else           r = (s < nr) ? nr - 1 - s : 0;
          if (rk_valid[s] !== 1'b1 || rk[s] !== rkey(h_w[c], r)) begin
            failures++;
            $display("cycle %0d stage %0d kl=%0d dec=%0d: %h expected RK[%0d] %h", t, s, h_kl[c], h_dec[c], rk[s], r, rkey(h_w[c], r));
          end
        end
      end
      // Drive the next entry.
      if (t < NKEYS) begin
        h_valid[t] = (t % 7 != 5);
        kl = (t >= NKEYS - 6) ? (t % 3) : int'($urandom_range(0, 2));
        if (t >= NKEYS - 6) k = (kl == 0) ? FIPS_KEY128 : (kl == 1) ? FIPS_KEY192 : FIPS_KEY256;
        else k = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom} & ref_mask(kl);
        ref_expand(k, kl, w);
        h_kl[t] = kl;
        h_dec[t] = (t >= NKEYS - 6) ? (t >= NKEYS - 3) : bit'($urandom_range(0, 1));
        h_w[t] = w;
        in_valid = h_valid[t];
        in_key_len = key_len_e'(kl);
        in_e_mode = h_dec[t];
        in_key = h_dec[t] ? ref_state(w, kl, ref_nr(kl)) : k;
        #1;
        checks++;
        if (f_rk !== rkey(w, h_dec[t] ? ref_nr(kl) : 0)) begin failures++; $display("f_rk mismatch"); end
        if (!h_valid[t]) n_bubble++;
        else if (h_dec[t]) n_dec++;
        else n_enc++;
      end else begin
        in_valid = 1'b0;
        h_valid[t] = 1'b0;
      end
    end
    checks++;
    if (n_enc == 0 || n_dec == 0 || n_bubble == 0) failures++;
    $display("entries: cipher=%0d decipher=%0d idle=%0d", n_enc, n_dec, n_bubble);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
