// rkg_ctrl: control unit of the non-pipelined round key generator.
//
// Sequences the key scheduler for one cipher or decipher pass and runs the
// forward pre-computation that produces the decipher start key (the last
// Nk words of the key expansion).
//
// Operation:
//   key_wr      : a new cipher key was written; the stored decipher start key
//                 becomes stale (dec_ready falls).
//   start/e_mode: in IDLE, begins a pass. Cipher: the scheduler starts from
//                 the cipher key. Decipher with a valid decipher start key:
//                 starts from it. Decipher without one: first a silent
//                 forward pass of Nr steps (PRECOMP) writes the decipher
//                 start key, then the decipher pass starts one cycle later.
//   Every forward pass (cipher or pre-computation) ends by writing the final
//   state into the decipher start key register (dec_wr), so after one
//   encryption a decryption needs no pre-computation.
// Timing of a pass: in the start cycle f_rk_valid is high (the first round
// key is taken straight from the key register); in each of the next Nr
// cycles rk_valid is high and RK_R holds round key rk_round (1..Nr for the
// cipher, Nr-1..0 for the decipher); done pulses with the last one. A new
// start is accepted in the cycle after done.
//
// The pass and pre-computation sequencing is this design's own reading of
// the design's "on-the-fly pre-computation"; the one-round-key-per-clock rate
// follows the design.
module rkg_ctrl
  import aes_key_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       key_wr,
  input  logic       start,
  input  logic       e_mode,
  input  key_len_e   key_len,
  output logic       sched_start,
  output logic       sched_run,
  output logic       sched_mode,
  output logic       init_sel_dec,
  output logic       dec_wr,
  output logic       dec_ready,
  output logic       f_rk_valid,
  output logic       rk_valid,
  output logic [3:0] rk_round,
  output logic       done,
  output logic       busy,
  output logic       precomputing
);

  typedef enum logic [1:0] {S_IDLE, S_PRE, S_DSTART, S_RUN} state_e;

  state_e     state, state_n;
  logic [3:0] cnt, cnt_n;      // steps taken in the current pass
  logic       mode_q, mode_n;  // e_mode of the current pass
  logic       rdy_n;
  logic [3:0] nr;

  assign nr = num_rounds(key_len);

  always_comb begin
    state_n      = state;
    cnt_n        = cnt;
    mode_n       = mode_q;
    rdy_n        = dec_ready;
    sched_start  = 1'b0;
    sched_run    = 1'b0;
    sched_mode   = mode_q;
    init_sel_dec = 1'b0;
    dec_wr       = 1'b0;
    f_rk_valid   = 1'b0;
    done         = 1'b0;

    case (state)
      S_IDLE: begin
        if (start) begin
          sched_start = 1'b1;
          cnt_n       = 4'd1;
          if (e_mode && !dec_ready) begin
            sched_mode = 1'b0;
            mode_n     = 1'b0;
            state_n    = S_PRE;
          end else begin
            sched_mode   = e_mode;
            mode_n       = e_mode;
            init_sel_dec = e_mode;
            f_rk_valid   = 1'b1;
            state_n      = S_RUN;
          end
        end
      end
      S_PRE: begin
        if (cnt == nr) begin
          dec_wr  = 1'b1;
          rdy_n   = 1'b1;
          state_n = S_DSTART;
        end else begin
          sched_run = 1'b1;
          cnt_n     = cnt + 4'd1;
        end
      end
      S_DSTART: begin
        sched_start  = 1'b1;
        sched_mode   = 1'b1;
        mode_n       = 1'b1;
        init_sel_dec = 1'b1;
        f_rk_valid   = 1'b1;
        cnt_n        = 4'd1;
        state_n      = S_RUN;
      end
      default: begin  // S_RUN
        if (cnt == nr) begin
          done    = 1'b1;
          state_n = S_IDLE;
          if (!mode_q) begin
            dec_wr = 1'b1;
            rdy_n  = 1'b1;
          end
        end else begin
          sched_run = 1'b1;
          cnt_n     = cnt + 4'd1;
        end
      end
    endcase

    if (key_wr) rdy_n = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cnt       <= '0;
      mode_q    <= 1'b0;
      dec_ready <= 1'b0;
    end else begin
      state     <= state_n;
      cnt       <= cnt_n;
      mode_q    <= mode_n;
      dec_ready <= rdy_n;
    end
  end

  assign rk_valid     = (state == S_RUN);
  assign rk_round     = mode_q ? nr - cnt : cnt;
  assign busy         = (state != S_IDLE);
  assign precomputing = (state == S_PRE) || (state == S_DSTART);

endmodule
