// rc_gen: RC_gen, the round-constant generator.
//
// An 8-bit LFSR over GF(2^8) holding RC[i] = x^(i-1). A forward step
// multiplies by x (shift left, XOR 0x1b when the top bit falls out) and serves
// the cipher key expansion, which needs Rcon[1], Rcon[2], ... in order. A
// backward step divides by x (shift right, XOR 0x8d when the low bit falls
// out) and serves the decipher key expansion, which needs the constants in
// reverse order.
//
// Interface and timing: 'rc' is the constant for the key-expansion step of
// the current cycle. In the cycle 'load' is high, rc = init (a bypass, so the
// first step needs no extra cycle); otherwise rc is the register. At the
// clock edge the register takes rc, advanced one place (direction 'dir_rev')
// when 'step' is high.
//
// The LFSR structure is the design's; the load/step interface and the
// backward step are this design's own.
module rc_gen
  import aes_key_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,
  input  logic [7:0] init,
  input  logic       step,
  input  logic       dir_rev,
  output logic [7:0] rc
);

  logic [7:0] rc_q;

  assign rc = load ? init : rc_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      rc_q <= 8'h01;
    else if (step)
      rc_q <= dir_rev ? xtime_inv(rc) : xtime(rc);
    else
      rc_q <= rc;
  end

endmodule
