// tb_aes_sbox: checks all 256 entries of the S-box against a computed reference
// (GF(2^8) inverse + affine map) and a few entries read off the printed table.
module tb_aes_sbox;
  import gcm_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [7:0] a, y;
  aes_sbox dut (.a, .y);

  task automatic chk(input logic [7:0] got, input logic [7:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %02h exp %02h", what, got, exp); end
  endtask

  initial begin
    for (int i = 0; i < 256; i++) begin
      a = 8'(i); #1;
      chk(y, sbox_ref(a), $sformatf("S(%02h)", i));
    end
    a = 8'h00; #1 chk(y, 8'h63, "S(00) table");
    a = 8'h53; #1 chk(y, 8'hed, "S(53) table");
    a = 8'hff; #1 chk(y, 8'h16, "S(ff) table");
    a = 8'hc0; #1 chk(y, 8'hba, "S(c0) table");
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
