// tb_aes_add_round_key: drives random 128-bit blocks and round keys into aes_add_round_key and compares the output with
// the reference model of gcm_ref_pkg.
module tb_aes_add_round_key;
  import gcm_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [127:0] din, k, dout, exp;
  aes_add_round_key dut (.din, .round_key(k), .dout);

  task automatic run(input logic [127:0] d, input logic [127:0] kk);
    din = d; k = kk; #1;
    for (int b = 0; b < 128; b++) exp[b] = (din[b] != k[b]);
    checks++;
    if (dout !== exp) begin failures++; $display("FAIL in=%032h got=%032h exp=%032h", d, dout, exp); end
  endtask

  initial begin
    run('1, 128'h0123456789abcdef0123456789abcdef);
    for (int i = 0; i < 200; i++) run(rand128(), rand128());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
