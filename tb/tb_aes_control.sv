// tb_aes_control: starts the AES controller several times (isolated and back to
// back) and checks every decoded output in every state R1..R15, that done comes
// exactly one clock after R15 (16 clocks after start), and that the controller
// stays idle without start.
module tb_aes_control;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, start = 0;
  logic control_1, control_2, key_control_1, key_control_2, busy, done;
  logic [3:0] round;
  always #5 clk = ~clk;

  aes_control dut (.clk, .rst, .start, .control_1, .control_2, .key_control_1,
                   .key_control_2, .round, .busy, .done);

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic rounds();
    for (int k = 1; k <= 15; k++) begin
      chk(round == 4'(k), $sformatf("round %0d", k));
      chk(control_1 == (k == 1), $sformatf("control_1 in R%0d", k));
      chk(control_2 == (k == 15), $sformatf("control_2 in R%0d", k));
      chk(key_control_2 == (k % 2 == 0), $sformatf("h_k in R%0d", k));
      chk(!key_control_1 && busy && !done, $sformatf("busy/done in R%0d", k));
      @(negedge clk);
    end
    chk(done && round == 0 && key_control_1 && !busy, "done one clock after R15");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (5) begin
      @(negedge clk);
      chk(!busy && !done && key_control_1, "idle without start");
    end
    start = 1;
    @(negedge clk) start = 0;
    rounds();
    @(negedge clk) chk(!done && !busy, "done is one clock long");
    start = 1;
    @(negedge clk) start = 0;
    rounds();
    start = 1;         // next start given in the done clock
    @(negedge clk) start = 0;
    rounds();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
