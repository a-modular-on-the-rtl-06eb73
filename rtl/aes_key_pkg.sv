// aes_key_pkg: types and functions shared by the AES on-the-fly round key
// generator.
//
// Holds the key-length and cell-type encodings, the 32-bit word type, and the
// AES byte functions the key expansion needs: the S-box (computed from its
// definition, the multiplicative inverse in GF(2^8) modulo x^8+x^4+x^3+x+1
// followed by the affine map, so no table is stored), SubWord, RotWord and the
// round-constant LFSR steps. All functions are combinational and synthesizable.
//
// Key words are numbered left to right: in a 256-bit key bus, word T0 is
// bits [255:224] and word T7 is bits [31:0]. 128- and 192-bit keys are left
// justified, as in the cipher key register of the design.
package aes_key_pkg;

  typedef logic [31:0] word_t;

  // Key length, the 2-bit Key_size of the control unit (encoding is this
  // design's choice).
  typedef enum logic [1:0] {
    KL128 = 2'd0,
    KL192 = 2'd1,
    KL256 = 2'd2
  } key_len_e;

  // Transform applied by Key_Exp_M to its Exp_in word (the sel[1:0] mux).
  typedef enum logic [1:0] {
    SEL_PASS   = 2'd0,  // Exp_in unchanged (192-bit cells E_3 / D_1)
    SEL_SUB    = 2'd1,  // SubWord(Exp_in)  (256-bit cells E_2 / D_1)
    SEL_SUBROT = 2'd2   // SubWord(RotWord(Exp_in)) xor Rcon
  } msel_e;

  // Number of rounds for each key length.
  function automatic logic [3:0] num_rounds(key_len_e kl);
    case (kl)
      KL128:   return 4'd10;
      KL192:   return 4'd12;
      default: return 4'd14;
    endcase
  endfunction

  // Number of cell types the key length cycles through (1, 3 or 2).
  function automatic logic [1:0] num_cells(key_len_e kl);
    case (kl)
      KL128:   return 2'd1;
      KL192:   return 2'd3;
      default: return 2'd2;
    endcase
  endfunction

  // Multiply by x in GF(2^8).
  function automatic logic [7:0] xtime(logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // Divide by x in GF(2^8): the inverse of xtime.
  function automatic logic [7:0] xtime_inv(logic [7:0] a);
    return {1'b0, a[7:1]} ^ (a[0] ? 8'h8d : 8'h00);
  endfunction

  function automatic logic [7:0] gf_mul(logic [7:0] a, logic [7:0] b);
    logic [7:0] p;
    logic [7:0] aa;
    p  = 8'h00;
    aa = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p = p ^ aa;
      aa = xtime(aa);
    end
    return p;
  endfunction

  // a^254, which is a^-1 for a != 0 and 0 for a == 0.
  function automatic logic [7:0] gf_inv(logic [7:0] a);
    logic [7:0] a2, a3, a6, a12, a14, a15, a30, a60, a120, a126, a127, a254;
    a2   = gf_mul(a, a);
    a3   = gf_mul(a2, a);
    a6   = gf_mul(a3, a3);
    a12  = gf_mul(a6, a6);
    a14  = gf_mul(a12, a2);
    a15  = gf_mul(a14, a);
    a30  = gf_mul(a15, a15);
    a60  = gf_mul(a30, a30);
    a120 = gf_mul(a60, a60);
    a126 = gf_mul(a120, a6);
    a127 = gf_mul(a126, a);
    a254 = gf_mul(a127, a127);
    return a254;
  endfunction

  // AES S-box: inverse followed by the affine transform
  // b_i ^ b_(i+4) ^ b_(i+5) ^ b_(i+6) ^ b_(i+7) ^ c_i with c = 0x63.
  function automatic logic [7:0] sbox(logic [7:0] a);
    logic [7:0] b;
    logic [7:0] s;
    b = gf_inv(a);
    for (int i = 0; i < 8; i++)
      s[i] = b[i] ^ b[(i + 4) % 8] ^ b[(i + 5) % 8] ^ b[(i + 6) % 8] ^ b[(i + 7) % 8];
    return s ^ 8'h63;
  endfunction

  function automatic word_t sub_word(word_t w);
    return {sbox(w[31:24]), sbox(w[23:16]), sbox(w[15:8]), sbox(w[7:0])};
  endfunction

  function automatic word_t rot_word(word_t w);
    return {w[23:0], w[31:24]};
  endfunction

  // Word Tk of a left-justified 256-bit key bus.
  function automatic word_t key_word(logic [255:0] k, int unsigned idx);
    return k[255 - 32*idx -: 32];
  endfunction

  // ---- Cell sequencing -------------------------------------------------
  // A key-expansion step turns the Nk-word state starting at round key r into
  // the state starting at round key r+1 (cipher) or r-1 (decipher). Forward
  // step r uses cell type (r mod num_cells): for 192-bit keys E_1, E_2, E_3,
  // for 256-bit keys E_1, E_2, for 128-bit keys the single cell. A decipher
  // step applies the inverse of the forward cell it undoes, so it carries the
  // same cell index.

  // Does forward cell 'c' use a round constant (the SubWord(RotWord) path)?
  function automatic logic cell_uses_rc(key_len_e kl, logic [1:0] c);
    case (kl)
      KL128:   return 1'b1;
      KL192:   return (c != 2'd2);
      default: return (c == 2'd0);
    endcase
  endfunction

  // Cell index of the next step.
  function automatic logic [1:0] cell_next(key_len_e kl, logic e_mode, logic [1:0] c);
    logic [1:0] n;
    n = num_cells(kl);
    if (!e_mode) return (c == n - 2'd1) ? 2'd0 : c + 2'd1;
    else         return (c == 2'd0) ? n - 2'd1 : c - 2'd1;
  endfunction

  // Cell index of the first step: forward step 0, or the inverse of the last
  // forward step Nr-1 (index (Nr-1) mod num_cells).
  function automatic logic [1:0] cell_first(key_len_e kl, logic e_mode);
    if (!e_mode) return 2'd0;
    case (kl)
      KL128:   return 2'd0;  // 9 mod 1
      KL192:   return 2'd2;  // 11 mod 3
      default: return 2'd1;  // 13 mod 2
    endcase
  endfunction

  // Round constant of the first step that uses one: Rcon[1] for the cipher;
  // for the decipher the last constant the forward expansion used:
  // Rcon[10] = 0x36 (128), Rcon[8] = 0x80 (192), Rcon[7] = 0x40 (256).
  function automatic logic [7:0] rc_first(key_len_e kl, logic e_mode);
    if (!e_mode) return 8'h01;
    case (kl)
      KL128:   return 8'h36;
      KL192:   return 8'h80;
      default: return 8'h40;
    endcase
  endfunction

  // Rcon[i] = x^(i-1) in GF(2^8), i >= 1.
  function automatic logic [7:0] rcon(int unsigned i);
    logic [7:0] r;
    r = 8'h01;
    for (int unsigned k = 1; k < 16; k++)
      if (k < i) r = xtime(r);
    return r;
  endfunction

  // Round constant used by forward step r (0-based), when that step uses one:
  // 128-bit keys use Rcon[r+1]; 192-bit keys use two constants in every three
  // steps; 256-bit keys one in every two.
  function automatic logic [7:0] step_rcon(key_len_e kl, int unsigned r);
    case (kl)
      KL128:   return rcon(r + 1);
      KL192:   return rcon((r / 3) * 2 + (r % 3) + 1);
      default: return rcon(r / 2 + 1);
    endcase
  endfunction

endpackage
