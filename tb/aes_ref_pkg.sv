// aes_ref_pkg: reference model for the testbenches.
//
// A plain software-style AES key expansion (FIPS-197 KeyExpansion), written
// independently of the RTL: the S-box is generated by walking the
// multiplicative group with generator 3 (p <- 3p, q <- q/3) rather than by
// inversion, and Rcon is a fixed list. Keys are 256-bit, left justified.
package aes_ref_pkg;

  typedef logic [31:0] w_t;

  function automatic logic [7:0] rot8(logic [7:0] x, int s);
    return (x << s) | (x >> (8 - s));
  endfunction

  function automatic logic [7:0] ref_sbox(logic [7:0] a);
    logic [7:0] p, q, s;
    logic [7:0] tab [256];
    p = 8'h01;
    q = 8'h01;
    do begin
      p = p ^ {p[6:0], 1'b0} ^ (p[7] ? 8'h1b : 8'h00);
      q = q ^ {q[6:0], 1'b0};
      q = q ^ {q[5:0], 2'b0};
      q = q ^ {q[3:0], 4'b0};
      if (q[7]) q = q ^ 8'h09;
      s = q ^ rot8(q, 1) ^ rot8(q, 2) ^ rot8(q, 3) ^ rot8(q, 4);
      tab[p] = s ^ 8'h63;
    end while (p != 8'h01);
    tab[0] = 8'h63;
    return tab[a];
  endfunction

  function automatic w_t ref_subword(w_t w);
    return {ref_sbox(w[31:24]), ref_sbox(w[23:16]), ref_sbox(w[15:8]), ref_sbox(w[7:0])};
  endfunction

  function automatic w_t ref_rotword(w_t w);
    return {w[23:0], w[31:24]};
  endfunction

  function automatic int ref_nk(int kl);   // kl: 0 = 128, 1 = 192, 2 = 256
    return 4 + 2 * kl;
  endfunction

  function automatic int ref_nr(int kl);
    return 10 + 2 * kl;
  endfunction

  // Full key expansion, enough words for the last Nk-word state (64 words).
  task automatic ref_expand(input logic [255:0] key, input int kl, output w_t w [64]);
    logic [7:0] rcon [11];
    w_t tmp;
    int nk;
    rcon = '{8'h00, 8'h01, 8'h02, 8'h04, 8'h08, 8'h10, 8'h20, 8'h40, 8'h80, 8'h1b, 8'h36};
    nk = ref_nk(kl);
    foreach (w[i]) w[i] = '0;
    for (int i = 0; i < nk; i++) w[i] = key[255 - 32*i -: 32];
    for (int i = nk; i < 64; i++) begin
      tmp = w[i-1];
      if (i % nk == 0) begin
        if (i / nk <= 10) tmp = ref_subword(ref_rotword(tmp)) ^ {rcon[i/nk], 24'h0};
        else              tmp = ref_subword(ref_rotword(tmp));  // beyond any use
      end else if (nk > 6 && i % nk == 4) begin
        tmp = ref_subword(tmp);
      end
      w[i] = w[i-nk] ^ tmp;
    end
  endtask

  // The Nk-word state whose first round key is round r, left justified.
  function automatic logic [255:0] ref_state(w_t w [64], int kl, int r);
    logic [255:0] s;
    s = '0;
    for (int k = 0; k < ref_nk(kl); k++) s[255 - 32*k -: 32] = w[4*r + k];
    return s;
  endfunction

  // Mask of the valid words of a state.
  function automatic logic [255:0] ref_mask(int kl);
    logic [255:0] m;
    m = '0;
    for (int k = 0; k < ref_nk(kl); k++) m[255 - 32*k -: 32] = 32'hffffffff;
    return m;
  endfunction

  // FIPS-197 Appendix A cipher keys.
  localparam logic [255:0] FIPS_KEY128 = {128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h0};
  localparam logic [255:0] FIPS_KEY192 = {192'h8e73b0f7da0e6452c810f32b809079e562f8ead2522c6b7b, 64'h0};
  localparam logic [255:0] FIPS_KEY256 = 256'h603deb1015ca71be2b73aef0857d77811f352c073b6108d72d9810a30914dff4;

endpackage
