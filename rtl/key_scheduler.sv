// key_scheduler: iterative (one step per clock) key scheduler.
//
// Holds the 256-bit round key register RK_R, which stores the Nk-word
// key-expansion state, the RC_gen round-constant LFSR, a small cell-index
// counter, and the combinational datapath key_sched_dp (one Key_Exp_M, two
// Key_Exp_S, multiplexers). The left-most four words of RK_R are the current
// round key RK[i].
//
// Interface and timing:
//   start    : Key_in is taken from key_init (the cipher key or the
//              decipher start key, left justified) instead of RK_R, and
//              key_len / e_mode are latched. The first step is computed in
//              the same cycle, so RK_R holds round key 1 (cipher) or Nr-1
//              (decipher) after the clock edge.
//   run      : with start low, Key_in = RK_R and RK_R advances one step per
//              clock while run is high; with run low RK_R holds.
//   rk       : RK_R[255:128], the round key; rk_state is all of RK_R.
// The cell index and round constant start at the values of the first step
// of the chosen direction (aes_key_pkg::cell_first / rc_first) and advance
// with each step.
//
// Structure (Key_in mux, RK_R, RC_gen) follows the design; the start/run
// handshake and the cell counter are this design's own.
module key_scheduler
  import aes_key_pkg::*;
#(
  parameter bit SPEEDUP = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         run,
  input  logic [255:0] key_init,
  input  key_len_e     key_len,
  input  logic         e_mode,
  output logic [255:0] rk_state,
  output logic [127:0] rk
);

  logic [255:0] rk_r, key_in, rk_in;
  key_len_e     kl_q, kl;
  logic         em_q, em;
  logic [1:0]   cell_q, cidx;
  logic [7:0]   rc;
  logic         adv;

  always_comb begin
    kl     = start ? key_len : kl_q;
    em     = start ? e_mode : em_q;
    cidx   = start ? cell_first(key_len, e_mode) : cell_q;
    key_in = start ? key_init : rk_r;
    adv    = start || run;
  end

  rc_gen u_rc_gen (
    .clk    (clk),
    .rst_n  (rst_n),
    .load   (start),
    .init   (rc_first(key_len, e_mode)),
    .step   (adv && cell_uses_rc(kl, cidx)),
    .dir_rev(em),
    .rc     (rc)
  );

  key_sched_dp #(.SPEEDUP(SPEEDUP)) u_dp (
    .key_in (key_in),
    .key_len(kl),
    .e_mode (em),
    .cidx   (cidx),
    .rc     (rc),
    .rk_in  (rk_in)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rk_r   <= '0;
      kl_q   <= KL128;
      em_q   <= 1'b0;
      cell_q <= 2'd0;
    end else begin
      kl_q <= kl;
      em_q <= em;
      if (adv) begin
        rk_r   <= rk_in;
        cell_q <= cell_next(kl, em, cidx);
      end
    end
  end

  assign rk_state = rk_r;
  assign rk       = rk_r[255:128];

endmodule
