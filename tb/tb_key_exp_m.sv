// tb_key_exp_m: self-checking test of the Key_Exp_M cell, normal and
// speed-up versions side by side: every transform (pass, SubWord,
// SubWord(RotWord) ^ Rcon) in both modes with random words, against the
// reference S-box of aes_ref_pkg.
module tb_key_exp_m;
  import aes_key_pkg::*;
  import aes_ref_pkg::*;

  word_t exp_in, e1, e0, d1, d0, tr;
  logic [7:0] rc;
  msel_e sel;
  logic e_mode;
  logic [63:0] out_n, out_f, exp;
  int checks = 0, failures = 0;

  key_exp_m #(.SPEEDUP(1'b0)) dut_n (.exp_in, .rc, .sel, .e1, .e0, .d1, .d0, .e_mode, .exp_out(out_n));
  key_exp_m #(.SPEEDUP(1'b1)) dut_f (.exp_in, .rc, .sel, .e1, .e0, .d1, .d0, .e_mode, .exp_out(out_f));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 600; n++) begin
      exp_in = $urandom; e1 = $urandom; e0 = $urandom; d1 = $urandom; d0 = $urandom;
      rc = 8'($urandom);
      e_mode = n[0];
      sel = msel_e'((n / 2) % 3);
      #1;
      case (sel)
        SEL_SUBROT: tr = ref_subword(ref_rotword(exp_in)) ^ {rc, 24'h0};
        SEL_SUB:    tr = ref_subword(exp_in);
        default:    tr = exp_in;
      endcase
      if (!e_mode) exp = {e1 ^ tr, e0 ^ e1 ^ tr};
      else         exp = {d1 ^ tr, d0 ^ d1};
      checks += 2;
      if (out_n !== exp) begin failures++; $display("normal sel=%0d mode=%0d %h exp %h", sel, e_mode, out_n, exp); end
      if (out_f !== exp) begin failures++; $display("speedup sel=%0d mode=%0d %h exp %h", sel, e_mode, out_f, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
