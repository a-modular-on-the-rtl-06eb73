// rkg_pipelined: on-the-fly round key generator for a pipelined AES
// processor (one round per pipeline stage), 128/192/256-bit keys, cipher and
// decipher.
//
// The key expansion is unrolled into NSTAGE registered stages. Stage s
// applies key-expansion step s to the Nk-word state it receives and
// registers the result, so stage s holds the state whose first four words
// are the round key of round s+1 (cipher) or round Nr-1-s (decipher). Each
// stage is the same Key_Exp_M / Key_Exp_S combination as the iterative
// scheduler (key_sched_dp); its cell type and round constant are fixed by
// the stage number and by the key length and mode that travel down the
// pipeline with the key, so a new key of any length and either mode can enter
// every clock. For a decipher the entering key must be the decipher start
// state (the last Nk words of the forward expansion, as produced by
// round_key_gen's pre-computation), because the final round key cannot be
// derived from the cipher key without running the expansion. Stages beyond
// Nr pass their state on unchanged.
//
// Interface and timing: in_valid/in_key/in_key_len/in_e_mode enter together.
// f_rk = in_key[255:128] is the first round key, in the entry cycle.
// rk[s] and rk_valid[s] are stage s's register: round key s+1 (cipher) or
// Nr-1-s (decipher) of the key that entered s+1 clocks earlier, i.e. aligned
// with a round pipeline whose stage s takes one clock. Reset clears the
// valid bits.
//
// The chained cells and their per-round cell types and constants follow the
// design's pipelined schemes; the use of the merged cipher/decipher cells in
// every stage and the port protocol are this design's own.
module rkg_pipelined
  import aes_key_pkg::*;
#(
  parameter int unsigned NSTAGE  = 14,
  parameter bit          SPEEDUP = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [255:0] in_key,
  input  key_len_e     in_key_len,
  input  logic         in_e_mode,
  output logic [127:0] f_rk,
  output logic [127:0] rk [NSTAGE],
  output logic         rk_valid [NSTAGE]
);

  typedef struct packed {
    logic         valid;
    key_len_e     key_len;
    logic         e_mode;
    logic [255:0] state;
  } stage_t;

  stage_t stg_in [NSTAGE];
  stage_t stg_q  [NSTAGE];

  assign f_rk = in_key[255:128];

  for (genvar s = 0; s < NSTAGE; s++) begin : g_stage
    logic [3:0]   nr;
    logic [1:0]   ncell;
    logic [1:0]   cidx;
    logic [7:0]   rc;
    logic         active;
    logic [255:0] nxt;
    int unsigned  fstep;   // forward step this stage performs or undoes

    if (s == 0) begin : g_first
      assign stg_in[s] = '{valid: in_valid, key_len: in_key_len, e_mode: in_e_mode, state: in_key};
    end else begin : g_chain
      assign stg_in[s] = stg_q[s-1];
    end

    always_comb begin
      nr     = num_rounds(stg_in[s].key_len);
      ncell  = num_cells(stg_in[s].key_len);
      active = (s < 32'(nr));
      fstep  = stg_in[s].e_mode ? 32'(nr) - 1 - s : s;
      if (!active) fstep = 0;
      cidx   = 2'(fstep % 32'(ncell));
      rc     = step_rcon(stg_in[s].key_len, fstep);
    end

    key_sched_dp #(.SPEEDUP(SPEEDUP)) u_dp (
      .key_in (stg_in[s].state),
      .key_len(stg_in[s].key_len),
      .e_mode (stg_in[s].e_mode),
      .cidx   (cidx),
      .rc     (rc),
      .rk_in  (nxt)
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) stg_q[s] <= '0;
      else        stg_q[s] <= '{valid:   stg_in[s].valid,
                                key_len: stg_in[s].key_len,
                                e_mode:  stg_in[s].e_mode,
                                state:   active ? nxt : stg_in[s].state};
    end

    assign rk[s]       = stg_q[s].state[255:128];
    assign rk_valid[s] = stg_q[s].valid;
  end

endmodule
