// tb_exp_128_e: self-checking test of the 128-bit forward cell, all three
// versions side by side, on random round keys and constants, and on the
// FIPS-197 128-bit key schedule (ten rounds chained through the cell).
module tb_exp_128_e;
  import aes_ref_pkg::*;

  logic [127:0] rk_in, o0, o1, o2, exp;
  logic [7:0] rc;
  int checks = 0, failures = 0;

  exp_128_e #(.VERSION(0)) dut0 (.rk_in, .rc, .rk_out(o0));
  exp_128_e #(.VERSION(1)) dut1 (.rk_in, .rc, .rk_out(o1));
  exp_128_e #(.VERSION(2)) dut2 (.rk_in, .rc, .rk_out(o2));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp();
    #1;
    checks += 3;
    if (o0 !== exp) begin failures++; $display("normal %h exp %h", o0, exp); end
    if (o1 !== exp) begin failures++; $display("speed-up I %h exp %h", o1, exp); end
    if (o2 !== exp) begin failures++; $display("speed-up II %h exp %h", o2, exp); end
  endtask

  initial begin
    w_t w [64];
    w_t a0, a1, a2, a3, t;
    logic [7:0] rcon [10] = '{8'h01, 8'h02, 8'h04, 8'h08, 8'h10, 8'h20, 8'h40, 8'h80, 8'h1b, 8'h36};
    for (int n = 0; n < 300; n++) begin
      rk_in = {$urandom, $urandom, $urandom, $urandom};
      rc = 8'($urandom);
      {a0, a1, a2, a3} = rk_in;
      t = ref_subword(ref_rotword(a3)) ^ {rc, 24'h0};
      exp = {a0 ^ t, a0 ^ a1 ^ t, a0 ^ a1 ^ a2 ^ t, a0 ^ a1 ^ a2 ^ a3 ^ t};
      cmp();
    end
    ref_expand(FIPS_KEY128, 0, w);
    for (int r = 0; r < 10; r++) begin
      rk_in = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
      rc = rcon[r];
      exp = {w[4*r+4], w[4*r+5], w[4*r+6], w[4*r+7]};
      cmp();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
