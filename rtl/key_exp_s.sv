// key_exp_s: Key_Exp_S, the slave key expansion cell.
//
// Produces two consecutive 32-bit key-expansion words with XORs only (no
// S-box), for the forward or the reverse key expansion:
//   cipher   (e_mode = 0): H = SB_in ^ E1,  L = SB_in ^ E1 ^ E0
//   decipher (e_mode = 1): H = SB_in ^ D1,  L = D1 ^ D0
// with Exp_s_out = {H, L}. In the forward expansion SB_in is w[i-1], E1/E0
// are w[i-Nk], w[i+1-Nk]; in the reverse expansion SB_in is w[i-1] and D1/D0
// are w[i], w[i+1] of the later words, H/L being w[i-Nk], w[i+1-Nk].
//
// SPEEDUP = 0 chains the two cipher XORs (2 XOR + MUX); SPEEDUP = 1
// pre-computes E1 ^ E0 so both outputs are one XOR after SB_in. The cell
// structure follows the design's drawing; the e_mode encoding is this
// design's own. Purely combinational.
module key_exp_s
  import aes_key_pkg::*;
#(
  parameter bit SPEEDUP = 1'b0
) (
  input  word_t       sb_in,
  input  word_t       e1,
  input  word_t       e0,
  input  word_t       d1,
  input  word_t       d0,
  input  logic        e_mode,
  output logic [63:0] exp_s_out
);

  word_t eh, el, dh, dl;

  always_comb begin
    eh = sb_in ^ e1;
    el = SPEEDUP ? (sb_in ^ (e1 ^ e0)) : (eh ^ e0);
    dh = sb_in ^ d1;
    dl = d1 ^ d0;
  end

  assign exp_s_out = e_mode ? {dh, dl} : {eh, el};

endmodule
