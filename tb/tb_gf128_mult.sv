// tb_gf128_mult: checks the parallel GF(2^128) multiplier against the published
// example X*Y = 8efa30ce83298b85fe71abefc0cdd01d (X = H, Y = X1 ^ A2 of the
// AES-256 GCM vector with AAD) and against the bit-serial
// algorithm for random operands and a few edge cases (zero, one = bit 127).
module tb_gf128_mult;
  import gcm_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [127:0] x, y, z;
  gf128_mult dut (.x, .y, .z);

  task automatic run(input logic [127:0] a, input logic [127:0] b, input logic [127:0] exp);
    x = a; y = b; #1;
    checks++;
    if (z !== exp) begin failures++; $display("FAIL %032h * %032h = %032h exp %032h", a, b, z, exp); end
  endtask

  initial begin
    run(128'hacbef20579b4b8ebce889bac8732dad7, 128'hfac80890c2592c0a6375e2622cf925d2,
        128'h8efa30ce83298b85fe71abefc0cdd01d);
    run('0, rand128(), '0);
    run({1'b1, 127'b0}, 128'h0123456789abcdef0123456789abcdef, 128'h0123456789abcdef0123456789abcdef);
    for (int i = 0; i < 300; i++) begin
      automatic logic [127:0] a = rand128(), b = rand128();
      run(a, b, gfmul_ref(a, b));
    end
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
