// exp_128_e: EXP_128_E, the dedicated forward key expansion cell for
// 128-bit keys (one round of the pipelined 128-bit cipher key generator).
//
// From round key {w0, w1, w2, w3} and the round constant it forms the next
// round key {w4, w5, w6, w7}:
//   w4 = w0 ^ t, w5 = w1 ^ w4, w6 = w2 ^ w5, w7 = w3 ^ w6,
//   t  = SubWord(RotWord(w3)) ^ {rc, 24'h0}.
// VERSION selects how the XOR chain is arranged; all give the same words:
//   0 normal       : the chain above, SubWord + 5 XOR on the longest path;
//   1 speed-up (I) : prefixes w0, w0^w1, w0^w1^w2, w0^w1^w2^w3 are formed
//                    beside the S-boxes, so SubWord + 2 XOR (Rcon, prefix);
//   2 speed-up (II): Rcon is also folded into the prefixes, SubWord + 1 XOR.
// Purely combinational. RotWord is wiring.
//
// The three versions and their path lengths follow the design; the exact
// placement of the prefix XORs is this design's own.
module exp_128_e
  import aes_key_pkg::*;
#(
  parameter int unsigned VERSION = 0
) (
  input  logic [127:0] rk_in,
  input  logic [7:0]   rc,
  output logic [127:0] rk_out
);

  word_t w0, w1, w2, w3, s, p1, p2, p3, rcw;
  word_t w4, w5, w6, w7;

  always_comb begin
    {w0, w1, w2, w3} = rk_in;
    s   = sub_word(rot_word(w3));
    rcw = {rc, 24'h000000};
    p1  = w0 ^ w1;
    p2  = p1 ^ w2;
    p3  = p2 ^ w3;
    case (VERSION)
      0: begin
        w4 = w0 ^ (s ^ rcw);
        w5 = w1 ^ w4;
        w6 = w2 ^ w5;
        w7 = w3 ^ w6;
      end
      1: begin
        w4 = (s ^ rcw) ^ w0;
        w5 = (s ^ rcw) ^ p1;
        w6 = (s ^ rcw) ^ p2;
        w7 = (s ^ rcw) ^ p3;
      end
      default: begin
        w4 = s ^ (w0 ^ rcw);
        w5 = s ^ (p1 ^ rcw);
        w6 = s ^ (p2 ^ rcw);
        w7 = s ^ (p3 ^ rcw);
      end
    endcase
  end

  assign rk_out = {w4, w5, w6, w7};

endmodule
