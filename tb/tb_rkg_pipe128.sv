// tb_rkg_pipe128: self-checking test of the 128-bit pipelined generator.
// Random 128-bit keys, cipher (cipher key enters) or decipher (round key 10
// of the reference expansion enters), back to back with idle gaps; after
// every clock every stage is compared with the reference round key of the
// key that entered s+1 clocks earlier. The first entries use the FIPS-197
// key in both modes.
module tb_rkg_pipe128;
  import aes_ref_pkg::*;

  localparam int NKEYS = 100;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, in_e_mode = 1'b0;
  logic [127:0] in_key = '0, f_rk, rk [10];
  logic rk_valid [10];
  int checks = 0, failures = 0, n_enc = 0, n_dec = 0, n_idle = 0;

  bit h_valid [NKEYS + 12];
  bit h_dec   [NKEYS + 12];
  w_t h_w     [NKEYS + 12][64];

  rkg_pipe128 dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
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
    int c, r;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < NKEYS + 11; t++) begin
      @(negedge clk);
      for (int s = 0; s < 10; s++) begin
        c = t - 1 - s;
        checks++;
        if (c < 0 || !h_valid[c]) begin
          if (rk_valid[s] !== 1'b0) begin failures++; $display("stage %0d valid without entry", s); end
        end else begin
          r = h_dec[c] ? 9 - s : s + 1;
          if (rk_valid[s] !== 1'b1 || rk[s] !== rkey(h_w[c], r)) begin
            failures++;
            $display("stage %0d dec=%0d: %h expected RK[%0d] %h", s, h_dec[c], rk[s], r, rkey(h_w[c], r));
          end
        end
      end
      if (t < NKEYS) begin
        k = (t < 2) ? FIPS_KEY128 : {$urandom, $urandom, $urandom, $urandom, 128'h0};
        ref_expand(k, 0, w);
        h_w[t] = w;
        h_valid[t] = (t % 6 != 3);
        h_dec[t] = (t < 2) ? bit'(t) : bit'($urandom_range(0, 1));
        in_valid = h_valid[t];
        in_e_mode = h_dec[t];
        in_key = h_dec[t] ? rkey(w, 10) : k[255:128];
        #1;
        checks++;
        if (f_rk !== in_key) failures++;
        if (!h_valid[t]) n_idle++; else if (h_dec[t]) n_dec++; else n_enc++;
      end else begin
        in_valid = 1'b0;
        h_valid[t] = 1'b0;
      end
    end
    checks++;
    if (n_enc == 0 || n_dec == 0 || n_idle == 0) failures++;
    $display("entries: cipher=%0d decipher=%0d idle=%0d", n_enc, n_dec, n_idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
