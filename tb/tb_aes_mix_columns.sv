// tb_aes_mix_columns: drives random 128-bit blocks into aes_mix_columns and compares the output with
// the reference model of gcm_ref_pkg.
module tb_aes_mix_columns;
  import gcm_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [127:0] din, k, dout, exp;
  aes_mix_columns dut (.din, .dout);

  task automatic run(input logic [127:0] d, input logic [127:0] kk);
    din = d; k = kk; #1;
    exp = ref_mix_columns(din);
    checks++;
    if (dout !== exp) begin failures++; $display("FAIL in=%032h got=%032h exp=%032h", d, dout, exp); end
  endtask

  initial begin
    run({4{32'hdb135345}}, '0);
    checks++; if (dout !== {4{32'h8e4da1bc}}) begin failures++; $display("FAIL known column %032h", dout); end
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
