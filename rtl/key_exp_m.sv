// key_exp_m: Key_Exp_M, the master key expansion cell.
//
// Produces two consecutive 32-bit key-expansion words, for the forward
// (cipher) or the reverse (decipher) key expansion, on one piece of hardware.
// The word Exp_in is first transformed as chosen by sel:
//   SEL_SUBROT: SubWord(RotWord(Exp_in)) xor {RC, 24'h0}
//   SEL_SUB   : SubWord(Exp_in)
//   SEL_PASS  : Exp_in
// and the transformed word t then gives
//   cipher   (e_mode = 0): H = t ^ E1,  L = t ^ E1 ^ E0
//   decipher (e_mode = 1): H = t ^ D1,  L = D1 ^ D0
// with Exp_out = {H, L}. In the forward expansion E1/E0 are w[i-Nk] and
// w[i+1-Nk] and H/L are w[i], w[i+1]; in the reverse expansion D1/D0 are w[i]
// and w[i+1] and H/L are w[i-Nk], w[i+1-Nk].
//
// SPEEDUP = 0 is the normal cell (SubWord + 3 XOR + 2 MUX on the longest
// path); SPEEDUP = 1 is the speed-up cell, which folds RC into E1/D1 and
// pre-computes E1 ^ E0 beside the S-boxes so that only one XOR follows
// SubWord. Both give identical results. Purely combinational.
//
// The transform choices, the order of the XORs and the two output words
// follow the cell drawing of the design; the sel and e_mode encodings are
// this design's own.
module key_exp_m
  import aes_key_pkg::*;
#(
  parameter bit SPEEDUP = 1'b0
) (
  input  word_t       exp_in,
  input  logic [7:0]  rc,
  input  msel_e       sel,
  input  word_t       e1,
  input  word_t       e0,
  input  word_t       d1,
  input  word_t       d0,
  input  logic        e_mode,
  output logic [63:0] exp_out
);

  word_t sub_rot, sub_only, rc_word;
  word_t eh, el, dh, dl;

  always_comb begin
    sub_only = sub_word(exp_in);
    // RotWord is a byte rotation and commutes with the byte-wise SubWord.
    sub_rot  = rot_word(sub_only);
    rc_word  = {rc, 24'h000000};
  end

  if (!SPEEDUP) begin : g_normal
    word_t t;
    always_comb begin
      case (sel)
        SEL_SUBROT: t = sub_rot ^ rc_word;
        SEL_SUB:    t = sub_only;
        default:    t = exp_in;
      endcase
      eh = t ^ e1;
      el = eh ^ e0;
      dh = t ^ d1;
      dl = d1 ^ d0;
    end
  end else begin : g_speedup
    word_t t, rc_sel, e1_rc, e10_rc, d1_rc;
    always_comb begin
      rc_sel = (sel == SEL_SUBROT) ? rc_word : 32'h0;
      e1_rc  = e1 ^ rc_sel;
      e10_rc = e1 ^ e0 ^ rc_sel;
      d1_rc  = d1 ^ rc_sel;
      case (sel)
        SEL_SUBROT: t = sub_rot;
        SEL_SUB:    t = sub_only;
        default:    t = exp_in;
      endcase
      eh = t ^ e1_rc;
      el = t ^ e10_rc;
      dh = t ^ d1_rc;
      dl = d1 ^ d0;
    end
  end

  assign exp_out = e_mode ? {dh, dl} : {eh, el};

endmodule
