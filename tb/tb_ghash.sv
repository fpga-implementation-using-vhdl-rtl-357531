// tb_ghash: loads H, absorbs sequences of blocks one per clock (with idle clocks
// in between) and compares the accumulator with an iterative reference
// X = (X ^ B) * H. Includes the AES-256 GCM vector with zero key: one block
// C = cea7403d4d606b6e074ec5d3baf39d18 and the length block 0||128 must give
// GHASH = 83de425c5edc5d498f382c441041ca92. Also checks that clear zeroes X.
module tb_ghash;
  import gcm_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, clear = 0, h_load = 0, en = 0;
  logic [127:0] h_in = '0, blk = '0, x, model, hk;
  always #5 clk = ~clk;

  ghash dut (.clk, .rst, .clear, .h_load, .h_in, .en, .blk, .x);

  task automatic chk(input logic [127:0] exp, input string what);
    checks++;
    if (x !== exp) begin failures++; $display("FAIL %s: got %032h exp %032h", what, x, exp); end
  endtask

  task automatic new_hash(input logic [127:0] h);
    @(negedge clk) h_in = h; h_load = 1; clear = 1;
    @(negedge clk) h_load = 0; clear = 0; h_in = rand128();
    chk('0, "cleared");
    model = '0; hk = h;
  endtask

  task automatic absorb(input logic [127:0] b);
    blk = b; en = 1;
    @(negedge clk) en = 0; blk = rand128();
    model = gfmul_ref(model ^ b, hk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    new_hash(128'hdc95c078a2408989ad48a21492842087);
    absorb(128'hcea7403d4d606b6e074ec5d3baf39d18);
    chk(128'hfd6ab7586e556dba06d69cfe6223b262, "X1 of zero-key vector");
    absorb(128'h00000000000000000000000000000080);
    chk(128'h83de425c5edc5d498f382c441041ca92, "GHASH of zero-key vector");
    for (int m = 0; m < 20; m++) begin
      new_hash(rand128());
      for (int i = 0; i < 1 + m; i++) begin
        absorb(rand128());
        if ($urandom_range(0, 2) == 0) @(negedge clk);   // idle clock: X must hold
        chk(model, $sformatf("msg %0d block %0d", m, i));
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
