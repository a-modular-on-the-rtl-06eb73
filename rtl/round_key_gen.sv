// round_key_gen: on-the-fly round key generator for a non-pipelined
// (one round per clock) AES processor with 128-, 192- and 256-bit keys and
// both cipher and decipher.
//
// Holds the 256-bit cipher key register (128- and 192-bit keys left
// justified), the 256-bit decipher start key register (the last Nk words of
// the key expansion, found by a forward pre-computation), the multiplexer
// that picks the first round key F_RK and the scheduler's starting state,
// the key scheduler (RK_R, RC_gen, Key_Exp_M, two Key_Exp_S) and its control
// unit.
//
// Interface:
//   key_wr, key_data, key_len_in : write a cipher key and its length (only
//                                  while idle; ignored when busy).
//   start, e_mode                : begin a pass; e_mode 0 = cipher,
//                                  1 = decipher (round keys in reverse).
//   f_rk, f_rk_valid             : first round key, valid in the start cycle
//                                  (round key 0 for the cipher, Nr for the
//                                  decipher), for the initial AddRoundKey.
//   rk, rk_valid, rk_round       : round key RK[i] from RK_R, one per clock
//                                  for Nr clocks after the start cycle.
//   done                         : with the last round key.
//   busy, dec_ready, precomputing: status.
// A decipher start without a valid decipher start key first spends Nr+1
// clocks on the pre-computation (f_rk_valid is raised when the decipher pass
// itself begins). The round datapath that consumes f_rk and rk is outside
// this module.
//
// Registers, multiplexer and scheduler follow the design; the port protocol
// and the pre-computation sequencing are this design's own.
module round_key_gen
  import aes_key_pkg::*;
#(
  parameter bit SPEEDUP = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         key_wr,
  input  logic [255:0] key_data,
  input  key_len_e     key_len_in,
  input  logic         start,
  input  logic         e_mode,
  output logic [127:0] f_rk,
  output logic         f_rk_valid,
  output logic [127:0] rk,
  output logic         rk_valid,
  output logic [3:0]   rk_round,
  output logic         done,
  output logic         busy,
  output logic         dec_ready,
  output logic         precomputing
);

  logic [255:0] cipher_key_r, dec_key_r, key_init, rk_state;
  key_len_e     key_len_r;
  logic         sched_start, sched_run, sched_mode, init_sel_dec, dec_wr;
  logic         key_wr_ok;

  assign key_wr_ok = key_wr && !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cipher_key_r <= '0;
      dec_key_r    <= '0;
      key_len_r    <= KL128;
    end else begin
      if (key_wr_ok) begin
        cipher_key_r <= key_data;
        key_len_r    <= key_len_in;
      end
      if (dec_wr) dec_key_r <= rk_state;
    end
  end

  rkg_ctrl u_ctrl (
    .clk         (clk),
    .rst_n       (rst_n),
    .key_wr      (key_wr_ok),
    .start       (start),
    .e_mode      (e_mode),
    .key_len     (key_len_r),
    .sched_start (sched_start),
    .sched_run   (sched_run),
    .sched_mode  (sched_mode),
    .init_sel_dec(init_sel_dec),
    .dec_wr      (dec_wr),
    .dec_ready   (dec_ready),
    .f_rk_valid  (f_rk_valid),
    .rk_valid    (rk_valid),
    .rk_round    (rk_round),
    .done        (done),
    .busy        (busy),
    .precomputing(precomputing)
  );

  // F_RK / Key_in source: cipher key register or decipher start key register.
  assign key_init = init_sel_dec ? dec_key_r : cipher_key_r;
  assign f_rk     = key_init[255:128];

  key_scheduler #(.SPEEDUP(SPEEDUP)) u_sched (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (sched_start),
    .run     (sched_run),
    .key_init(key_init),
    .key_len (key_len_r),
    .e_mode  (sched_mode),
    .rk_state(rk_state),
    .rk      (rk)
  );

endmodule
