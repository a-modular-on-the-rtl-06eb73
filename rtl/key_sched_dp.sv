// key_sched_dp: combinational datapath of the key scheduler.
//
// One key-expansion step: from the current Nk-word state Key_in (words T0..T7,
// left justified, T0 = bits [255:224]) it forms the next state RK_in, in the
// forward (cipher, e_mode = 0) or reverse (decipher, e_mode = 1) direction.
// It holds one Key_Exp_M and two Key_Exp_S cells, multiplexers on their
// inputs and four 64-bit multiplexers that assemble RK_in.
//
// Each cell yields two words, so the three cells give up to six; a step needs
// four. Two pairings occur and never at once:
//   {Key_Exp_M -> Key_Exp_S(2)}: M produces the first two new words and its
//     low output feeds SB_in of S(2) (cipher: every cell but 192-bit E_2);
//     in the decipher S(2) is fed from the state instead.
//   {Key_Exp_S(1) -> Key_Exp_M}: S(1) produces two words whose low word feeds
//     Exp_in of M (192-bit E_2 and its inverse D_2, and the 128-bit decipher,
//     where RotWord needs w[i-1] = T3 ^ T2, the output of S(1)).
// Bypassed words: forward, the right-most Nk-4 words of Key_in move to the
// left-most positions; reverse, the left-most Nk-4 words move to the
// right-most positions. Words of RK_in beyond Nk are don't-care; they carry
// whatever the output multiplexers select by default.
//
// 'cidx' is the index of the forward cell applied (cipher) or undone
// (decipher); 'rc' is the round constant for that step. All input and output
// selections below were derived from FIPS-197 key expansion and checked
// against the design's drawings of the cells; see the README for the table.
module key_sched_dp
  import aes_key_pkg::*;
#(
  parameter bit SPEEDUP = 1'b0
) (
  input  logic [255:0] key_in,
  input  key_len_e     key_len,
  input  logic         e_mode,
  input  logic [1:0]   cidx,
  input  logic [7:0]   rc,
  output logic [255:0] rk_in
);

  word_t t [8];
  always_comb for (int k = 0; k < 8; k++) t[k] = key_word(key_in, k);

  // Cell-type flags.
  logic is128, is192, is256, c1, c2;
  always_comb begin
    is128 = (key_len == KL128);
    is192 = (key_len == KL192);
    is256 = !is128 && !is192;
    c1    = (cidx == 2'd1);
    c2    = (cidx == 2'd2);
  end

  // S(1) output chained into Exp_in of M: cipher 192-bit E_2 and 128-bit
  // decipher. (In 192-bit D_2, S(1) comes first in word order but M takes
  // its Exp_in straight from the state.)
  logic s1_chain;
  assign s1_chain = (!e_mode && is192 && c1) || (e_mode && is128);

  // ---------------- Key_Exp_S(1) ----------------
  logic [63:0] rx;
  key_exp_s #(.SPEEDUP(SPEEDUP)) u_s1 (
    .sb_in    (e_mode ? t[1] : t[5]),
    .e1       (t[0]),
    .e0       (t[1]),
    .d1       (t[2]),
    .d0       (t[3]),
    .e_mode   (e_mode),
    .exp_s_out(rx)
  );

  // ---------------- Key_Exp_M ----------------
  word_t m_in, m_e1, m_e0, m_d1, m_d0;
  msel_e m_sel;
  logic [63:0] rm;
  always_comb begin
    // Exp_in mux array.
    if (s1_chain)           m_in = rx[31:0];
    else if (e_mode)        m_in = (is192 && !c1) ? t[1] : t[3];
    else if (is128)         m_in = t[3];
    else if (is192)         m_in = t[5];
    else                    m_in = t[7];
    // Transform.
    if (is192 && c2)        m_sel = SEL_PASS;
    else if (is256 && c1)   m_sel = SEL_SUB;
    else                    m_sel = SEL_SUBROT;
    // Cipher inputs: w[i-Nk], w[i+1-Nk].
    m_e1 = (is192 && c1) ? t[2] : t[0];
    m_e0 = (is192 && c1) ? t[3] : t[1];
    // Decipher inputs: w[i], w[i+1].
    if (is128)              begin m_d1 = t[0]; m_d0 = t[1]; end
    else if (is192 && !c1)  begin m_d1 = t[2]; m_d0 = t[3]; end
    else                    begin m_d1 = t[4]; m_d0 = t[5]; end
  end

  key_exp_m #(.SPEEDUP(SPEEDUP)) u_m (
    .exp_in (m_in),
    .rc     (rc),
    .sel    (m_sel),
    .e1     (m_e1),
    .e0     (m_e0),
    .d1     (m_d1),
    .d0     (m_d0),
    .e_mode (e_mode),
    .exp_out(rm)
  );

  // ---------------- Key_Exp_S(2) ----------------
  word_t s2_in, s2_d1, s2_d0;
  logic [63:0] rs;
  always_comb begin
    if (!e_mode)     s2_in = rm[31:0];
    else if (is256)  s2_in = t[5];
    else             s2_in = t[3];
    s2_d1 = is256 ? t[6] : t[4];
    s2_d0 = is256 ? t[7] : t[5];
  end

  key_exp_s #(.SPEEDUP(SPEEDUP)) u_s2 (
    .sb_in    (s2_in),
    .e1       (t[2]),
    .e0       (t[3]),
    .d1       (s2_d1),
    .d0       (s2_d0),
    .e_mode   (e_mode),
    .exp_s_out(rs)
  );

  // ---------------- Output multiplexers ----------------
  logic [63:0] o3, o2, o1, o0;  // RK_in[255:192], [191:128], [127:64], [63:0]
  always_comb begin
    if (!e_mode) begin
      o3 = is128 ? rm : {t[4], t[5]};
      if (is128)            o2 = rs;
      else if (is256)       o2 = {t[6], t[7]};
      else if (c1)          o2 = rx;
      else                  o2 = rm;
      o1 = (is192 && !c1) ? rs : rm;
      o0 = rs;
    end else begin
      o3 = (is192 && c1) ? rx : rm;
      if (is128)            o2 = rx;
      else if (is192 && c1) o2 = rm;
      else                  o2 = rs;
      o1 = {t[0], t[1]};
      o0 = {t[2], t[3]};
    end
  end

  assign rk_in = {o3, o2, o1, o0};

endmodule
