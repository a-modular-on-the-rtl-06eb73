// tb_rc_gen: self-checking test of the round-constant LFSR: the ten forward
// constants from Rcon[1], then backward from Rcon[10], and hold and load
// behaviour.
module tb_rc_gen;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, step = 1'b0, dir_rev = 1'b0;
  logic [7:0] init = 8'h00, rc;
  logic [7:0] rcon [10] = '{8'h01, 8'h02, 8'h04, 8'h08, 8'h10, 8'h20, 8'h40, 8'h80, 8'h1b, 8'h36};
  int checks = 0, failures = 0;

  rc_gen dut (.*);

  always #5 clk = ~clk;

  task automatic chk(logic [7:0] e, string what);
    #1;
    checks++;
    if (rc !== e) begin failures++; $display("%s: rc=%h expected %h", what, rc, e); end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // Forward: load 0x01 with a step in the same cycle.
    @(negedge clk); load = 1'b1; init = 8'h01; step = 1'b1; dir_rev = 1'b0;
    chk(rcon[0], "fwd load");
    @(negedge clk); load = 1'b0;
    for (int i = 1; i < 10; i++) begin chk(rcon[i], "fwd"); @(negedge clk); end
    // Hold.
    step = 1'b0; load = 1'b1; init = 8'h36; #1 chk(8'h36, "rev load");
    step = 1'b1; dir_rev = 1'b1;
    @(negedge clk); load = 1'b0;
    for (int i = 8; i >= 0; i--) begin chk(rcon[i], "rev"); @(negedge clk); end
    step = 1'b0;
    @(negedge clk); chk(8'h8d, "hold after wrap");
    @(negedge clk); chk(8'h8d, "hold");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
