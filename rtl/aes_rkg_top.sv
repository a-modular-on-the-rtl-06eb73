// aes_rkg_top: the on-the-fly AES round key generators, side by side.
//
// it_*: round_key_gen, the iterative generator for a non-pipelined AES
//       processor (one round per clock): cipher key register, decipher
//       start key register with forward pre-computation, and a key scheduler
//       built from one Key_Exp_M and two Key_Exp_S cells. It delivers one
//       round key per clock.
// pp_*: rkg_pipelined, the generator for a fully pipelined AES processor:
//       one registered Key_Exp_M/Key_Exp_S stage per round, a new key (any
//       length, either mode) accepted every clock.
// p128_*: rkg_pipe128, a pipelined generator for 128-bit keys only, built
//       from the dedicated EXP_128_E / EXP_128_D cells.
// The first two use the same key expansion cells. The AES round datapath that would
// consume the round keys is not part of this design; the round keys leave
// through the ports. See round_key_gen and rkg_pipelined for the timing of
// each port group. The generators share only the clock and reset.
module aes_rkg_top
  import aes_key_pkg::*;
#(
  parameter int unsigned NSTAGE  = 14,
  parameter bit          SPEEDUP = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  // iterative generator
  input  logic         it_key_wr,
  input  logic [255:0] it_key_data,
  input  key_len_e     it_key_len,
  input  logic         it_start,
  input  logic         it_e_mode,
  output logic [127:0] it_f_rk,
  output logic         it_f_rk_valid,
  output logic [127:0] it_rk,
  output logic         it_rk_valid,
  output logic [3:0]   it_rk_round,
  output logic         it_done,
  output logic         it_busy,
  output logic         it_dec_ready,
  output logic         it_precomputing,
  // pipelined generator
  input  logic         pp_in_valid,
  input  logic [255:0] pp_in_key,
  input  key_len_e     pp_in_key_len,
  input  logic         pp_in_e_mode,
  output logic [127:0] pp_f_rk,
  output logic [127:0] pp_rk [NSTAGE],
  output logic         pp_rk_valid [NSTAGE],
  // 128-bit pipelined generator
  input  logic         p128_in_valid,
  input  logic [127:0] p128_in_key,
  input  logic         p128_in_e_mode,
  output logic [127:0] p128_f_rk,
  output logic [127:0] p128_rk [10],
  output logic         p128_rk_valid [10]
);

  round_key_gen #(.SPEEDUP(SPEEDUP)) u_iter (
    .clk         (clk),
    .rst_n       (rst_n),
    .key_wr      (it_key_wr),
    .key_data    (it_key_data),
    .key_len_in  (it_key_len),
    .start       (it_start),
    .e_mode      (it_e_mode),
    .f_rk        (it_f_rk),
    .f_rk_valid  (it_f_rk_valid),
    .rk          (it_rk),
    .rk_valid    (it_rk_valid),
    .rk_round    (it_rk_round),
    .done        (it_done),
    .busy        (it_busy),
    .dec_ready   (it_dec_ready),
    .precomputing(it_precomputing)
  );

  rkg_pipelined #(.NSTAGE(NSTAGE), .SPEEDUP(SPEEDUP)) u_pipe (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (pp_in_valid),
    .in_key    (pp_in_key),
    .in_key_len(pp_in_key_len),
    .in_e_mode (pp_in_e_mode),
    .f_rk      (pp_f_rk),
    .rk        (pp_rk),
    .rk_valid  (pp_rk_valid)
  );

  rkg_pipe128 u_pipe128 (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (p128_in_valid),
    .in_key   (p128_in_key),
    .in_e_mode(p128_in_e_mode),
    .f_rk     (p128_f_rk),
    .rk       (p128_rk),
    .rk_valid (p128_rk_valid)
  );

endmodule
