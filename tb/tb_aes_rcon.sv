// tb_aes_rcon: checks the round constant of every round number 0..15 against
// 2^((round-1)/2) for rounds 1..14 and 0 otherwise.
module tb_aes_rcon;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [3:0] round;
  logic [7:0] rcon, exp;
  aes_rcon dut (.round, .rcon);
  initial begin
    for (int r = 0; r < 16; r++) begin
      round = 4'(r); #1;
      exp = (r >= 1 && r <= 14) ? 8'(1 << ((r - 1) / 2)) : 8'h00;
      checks++;
      if (rcon !== exp) begin failures++; $display("FAIL round %0d: got %02h exp %02h", r, rcon, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
