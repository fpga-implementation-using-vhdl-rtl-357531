// tb_aes_key_scheduler: drives the key scheduler the way the AES controller does
// (load in the idle clock, then rounds 1..15 with h_k alternating 0,1,...) and
// compares each round key with the textbook AES-256 expansion, for the FIPS-197
// example key, the all-zero key and random keys.
module tb_aes_key_scheduler;
  import gcm_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic [255:0] key;
  logic key_control_1 = 1, key_control_2 = 0;
  logic [3:0] round = 0;
  logic [127:0] round_key, exp;
  always #5 clk = ~clk;

  aes_key_scheduler dut (.clk, .rst, .key, .key_control_1, .key_control_2, .round, .round_key);

  task automatic run(input logic [255:0] k);
    @(negedge clk);
    key = k; key_control_1 = 1; key_control_2 = 0; round = 0;
    @(negedge clk);
    key = ~k;  // the key input is only sampled in the load clock
    key_control_1 = 0;
    for (int r = 1; r <= 15; r++) begin
      round = 4'(r); key_control_2 = (r % 2 == 0);
      #1;
      exp = ref_round_key(k, r - 1);
      checks++;
      if (round_key !== exp) begin
        failures++; $display("FAIL key %064h round %0d: got %032h exp %032h", k, r, round_key, exp);
      end
      @(negedge clk);
    end
    key_control_1 = 1; key_control_2 = 0; round = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    run(256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f);
    run('0);
    for (int i = 0; i < 20; i++) run({rand128(), rand128()});
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
