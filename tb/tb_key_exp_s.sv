// tb_key_exp_s: self-checking test of the Key_Exp_S cell, normal and
// speed-up versions side by side, with random words in both modes.
module tb_key_exp_s;
  import aes_key_pkg::*;

  word_t sb_in, e1, e0, d1, d0;
  logic e_mode;
  logic [63:0] out_n, out_f, exp;
  int checks = 0, failures = 0;

  key_exp_s #(.SPEEDUP(1'b0)) dut_n (.sb_in, .e1, .e0, .d1, .d0, .e_mode, .exp_s_out(out_n));
  key_exp_s #(.SPEEDUP(1'b1)) dut_f (.sb_in, .e1, .e0, .d1, .d0, .e_mode, .exp_s_out(out_f));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) begin
      sb_in = $urandom; e1 = $urandom; e0 = $urandom; d1 = $urandom; d0 = $urandom;
      e_mode = n[0];
      #1;
      // forward: w[i] = w[i-Nk] ^ w[i-1]; w[i+1] = w[i+1-Nk] ^ w[i]
      // reverse: w[i-Nk] = w[i] ^ w[i-1]; w[i+1-Nk] = w[i+1] ^ w[i]
      if (!e_mode) exp = {e1 ^ sb_in, e0 ^ e1 ^ sb_in};
      else         exp = {d1 ^ sb_in, d0 ^ d1};
      checks += 2;
      if (out_n !== exp) begin failures++; $display("normal mismatch %h %h", out_n, exp); end
      if (out_f !== exp) begin failures++; $display("speedup mismatch %h %h", out_f, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
