// tb_gctr_counter: presets Y0 = IV || 0^31 || 1 for random IVs, steps the counter
// with idle clocks in between and checks every value, including the known
// Y0..Y4 of IV = cafebabefacedbaddecaf888.
module tb_gctr_counter;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, init = 0, inc = 0;
  logic [95:0] iv = '0;
  logic [127:0] ctr, j0;
  logic [31:0] n;
  always #5 clk = ~clk;

  gctr_counter dut (.clk, .rst, .iv, .init, .inc, .ctr, .j0);

  task automatic chk(input logic [127:0] got, input logic [127:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %032h exp %032h", what, got, exp); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    iv = 96'hcafebabefacedbaddecaf888;
    init = 1;
    @(negedge clk) init = 0;
    chk(ctr, 128'hcafebabefacedbaddecaf88800000001, "Y0");
    chk(j0, 128'hcafebabefacedbaddecaf88800000001, "J0");
    for (int i = 2; i <= 5; i++) begin
      inc = 1;
      @(negedge clk) inc = 0;
      chk(ctr, {96'hcafebabefacedbaddecaf888, 32'(i)}, $sformatf("Y%0d", i - 1));
    end
    for (int m = 0; m < 10; m++) begin
      iv = {$urandom, $urandom, $urandom};
      init = 1;
      @(negedge clk) init = 0;
      n = 1;
      for (int i = 0; i < 50; i++) begin
        inc = $urandom_range(0, 1);
        @(negedge clk);
        if (inc) n++;
        inc = 0;
        chk(ctr, {iv, n}, $sformatf("iv %024h step %0d", iv, i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
