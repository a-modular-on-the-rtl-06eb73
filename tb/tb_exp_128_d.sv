// tb_exp_128_d: self-checking test of the 128-bit reverse cell, normal and
// speed-up versions side by side: random round keys and constants, then the
// FIPS-197 128-bit key schedule walked backwards from round key 10.
module tb_exp_128_d;
  import aes_ref_pkg::*;

  logic [127:0] rk_in, o0, o1, exp;
  logic [7:0] rc;
  int checks = 0, failures = 0;

  exp_128_d #(.SPEEDUP(1'b0)) dut0 (.rk_in, .rc, .rk_out(o0));
  exp_128_d #(.SPEEDUP(1'b1)) dut1 (.rk_in, .rc, .rk_out(o1));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp();
    #1;
    checks += 2;
    if (o0 !== exp) begin failures++; $display("normal %h exp %h", o0, exp); end
    if (o1 !== exp) begin failures++; $display("speed-up %h exp %h", o1, exp); end
  endtask

  initial begin
    w_t w [64];
    w_t b0, b1, b2, b3;
    logic [7:0] rcon [10] = '{8'h01, 8'h02, 8'h04, 8'h08, 8'h10, 8'h20, 8'h40, 8'h80, 8'h1b, 8'h36};
    // Random: pick the older round key, expand it forward in the reference
    // way, and expect the cell to recover it.
    for (int n = 0; n < 300; n++) begin
      w_t a0, a1, a2, a3, t;
      {a0, a1, a2, a3} = {$urandom, $urandom, $urandom, $urandom};
      rc = 8'($urandom);
      t  = ref_subword(ref_rotword(a3)) ^ {rc, 24'h0};
      b0 = a0 ^ t; b1 = a1 ^ b0; b2 = a2 ^ b1; b3 = a3 ^ b2;
      rk_in = {b0, b1, b2, b3};
      exp = {a0, a1, a2, a3};
      cmp();
    end
    ref_expand(FIPS_KEY128, 0, w);
    for (int r = 10; r > 0; r--) begin
      rk_in = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
      rc = rcon[r-1];
      exp = {w[4*r-4], w[4*r-3], w[4*r-2], w[4*r-1]};
      cmp();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
