// rkg_pipe128: pipelined round key generator for 128-bit keys built from
// the dedicated EXP_128_E / EXP_128_D cells.
//
// Ten registered stages. Stage s holds a forward cell EXP_128_E with
// Rcon[s+1] and a reverse cell EXP_128_D with Rcon[10-s]; the mode bit that
// travels with each key picks which result is registered. A cipher key thus
// becomes round keys 1..10 on stages 0..9; a decipher entry, which must be
// the final round key (round key 10, found by a forward expansion), becomes
// round keys 9..0.
//
// Interface and timing: in_valid/in_key/in_e_mode enter together
// (e_mode 0 = cipher, 1 = decipher); f_rk = in_key is the first round key in
// the entry cycle; rk[s]/rk_valid[s] are stage s's register, s+1 clocks
// after entry. A new key may enter every clock.
//
// The chain of cells and its Rcon order follow the design's 128-bit
// pipelined schemes; putting the cipher and decipher cells in one stage with
// a per-key mode bit is this design's own. E_VERSION / D_SPEEDUP choose the
// cell versions (default: the normal cells).
module rkg_pipe128
  import aes_key_pkg::*;
#(
  parameter int unsigned E_VERSION = 0,
  parameter bit          D_SPEEDUP = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [127:0] in_key,
  input  logic         in_e_mode,
  output logic [127:0] f_rk,
  output logic [127:0] rk [10],
  output logic         rk_valid [10]
);

  logic [127:0] key_q  [10];
  logic         vld_q  [10];
  logic         mode_q [10];

  assign f_rk = in_key;

  for (genvar s = 0; s < 10; s++) begin : g_stage
    logic [127:0] key_i, enc, dec;
    logic         vld_i, mode_i;

    if (s == 0) begin : g_first
      assign key_i  = in_key;
      assign vld_i  = in_valid;
      assign mode_i = in_e_mode;
    end else begin : g_chain
      assign key_i  = key_q[s-1];
      assign vld_i  = vld_q[s-1];
      assign mode_i = mode_q[s-1];
    end

    exp_128_e #(.VERSION(E_VERSION)) u_e (.rk_in(key_i), .rc(rcon(s + 1)),  .rk_out(enc));
    exp_128_d #(.SPEEDUP(D_SPEEDUP)) u_d (.rk_in(key_i), .rc(rcon(10 - s)), .rk_out(dec));

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        key_q[s]  <= '0;
        vld_q[s]  <= 1'b0;
        mode_q[s] <= 1'b0;
      end else begin
        key_q[s]  <= mode_i ? dec : enc;
        vld_q[s]  <= vld_i;
        mode_q[s] <= mode_i;
      end
    end

    assign rk[s]       = key_q[s];
    assign rk_valid[s] = vld_q[s];
  end

endmodule
