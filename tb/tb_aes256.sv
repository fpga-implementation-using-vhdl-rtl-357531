// tb_aes256: encrypts known-answer vectors (FIPS-197 AES-256 example, the hash
// keys and counter blocks of the GCM AES-256 test vectors) and random blocks,
// compares with the reference cipher, and checks the timing: done exactly 16
// clocks after the start clock, and a new start accepted in the done clock.
module tb_aes256;
  import gcm_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, start = 0, done, busy;
  logic [255:0] key;
  logic [127:0] data_in, data_out;
  always #5 clk = ~clk;

  aes256 dut (.clk, .rst, .start, .key, .data_in, .data_out, .done, .busy);

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  // start in the current clock (called right after a negedge)
  task automatic enc(input logic [255:0] k, input logic [127:0] pt, input logic [127:0] exp, input bit chain);
    int n = 1;
    key = k; data_in = pt; start = 1;
    @(negedge clk); start = 0; key = ~k;   // key is only sampled in the start clock
    while (!done && n < 40) begin
      @(negedge clk);
      n++;
    end
    chk(n == 16, $sformatf("latency %0d clocks, expected 16", n));
    chk(data_out === exp, $sformatf("E(%064h, %032h) = %032h exp %032h", k, pt, data_out, exp));
    if (!chain) @(negedge clk);
  endtask

  initial begin
    data_in = '0; key = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    @(negedge clk);
    enc(256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f,
        128'h00112233445566778899aabbccddeeff, 128'h8ea2b7ca516745bfeafc49904b496089, 0);
    enc('0, '0, 128'hdc95c078a2408989ad48a21492842087, 0);
    enc('0, 128'h00000000000000000000000000000001, 128'h530f8afbc74536b9a963b4f1c4cb738b, 0);
    enc({2{128'hfeffe9928665731c6d6a8f9467308308}}, '0, 128'hacbef20579b4b8ebce889bac8732dad7, 1);
    enc({2{128'hfeffe9928665731c6d6a8f9467308308}}, 128'hcafebabefacedbaddecaf88800000001,
        128'hfd2caa16a5832e76aa132c1453eeda7e, 1);
    enc({2{128'hfeffe9928665731c6d6a8f9467308308}}, 128'hcafebabefacedbaddecaf88800000002,
        128'h8b1cf3d561d27be251263e66857164e7, 0);
    for (int i = 0; i < 30; i++) begin
      automatic logic [255:0] k = {rand128(), rand128()};
      automatic logic [127:0] p = rand128();
      enc(k, p, aes256_ref(k, p), i % 2 == 1);
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
