// exp_128_d: EXP_128_D, the dedicated reverse key expansion cell for
// 128-bit keys (one round of the pipelined 128-bit decipher key generator).
//
// From round key {w4, w5, w6, w7} and the round constant it forms the
// previous round key {w0, w1, w2, w3}:
//   w3 = w7 ^ w6, w2 = w6 ^ w5, w1 = w5 ^ w4,
//   w0 = w4 ^ SubWord(RotWord(w3)) ^ {rc, 24'h0}.
// SPEEDUP = 0 is the normal cell (SubWord + 2 XOR after it: Rcon, then w4);
// SPEEDUP = 1 forms w4 ^ Rcon beside the S-boxes, leaving SubWord + 1 XOR.
// Both give the same words. Purely combinational.
//
// The cell and its two versions follow the design; the gate arrangement of
// the speed-up version is this design's own reading of its path length.
module exp_128_d
  import aes_key_pkg::*;
#(
  parameter bit SPEEDUP = 1'b0
) (
  input  logic [127:0] rk_in,
  input  logic [7:0]   rc,
  output logic [127:0] rk_out
);

  word_t w4, w5, w6, w7, w0, w1, w2, w3, s, rcw;

  always_comb begin
    {w4, w5, w6, w7} = rk_in;
    rcw = {rc, 24'h000000};
    w3  = w7 ^ w6;
    w2  = w6 ^ w5;
    w1  = w5 ^ w4;
    s   = sub_word(rot_word(w3));
    w0  = SPEEDUP ? (s ^ (w4 ^ rcw)) : ((s ^ rcw) ^ w4);
  end

  assign rk_out = {w0, w1, w2, w3};

endmodule
