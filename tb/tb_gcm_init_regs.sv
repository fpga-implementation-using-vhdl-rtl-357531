// tb_gcm_init_regs: loads each register from the input with its strobe, with
// unrelated input values and idle clocks in between, and checks that each
// register takes exactly its word and holds it.
module tb_gcm_init_regs;
  import gcm_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic [127:0] din = '0, last_mask, len_block;
  logic reg_iv = 0, reg_key = 0, part = 0, reg_lsb = 0, reg_size = 0;
  logic [95:0] iv;
  logic [255:0] key;
  logic [127:0] w_iv, w_k1, w_k2, w_lsb, w_size;
  always #5 clk = ~clk;

  gcm_init_regs dut (.clk, .rst, .din, .reg_iv, .reg_key, .part, .reg_lsb, .reg_size,
                     .iv, .key, .last_mask, .len_block);

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic noise();
    repeat ($urandom_range(0, 3)) begin
      din = rand128(); part = 1'($urandom);
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    chk(iv == 0 && key == 0 && last_mask == 0 && len_block == 0, "cleared by reset");
    for (int m = 0; m < 20; m++) begin
      w_iv = rand128(); w_k1 = rand128(); w_k2 = rand128(); w_lsb = rand128(); w_size = rand128();
      noise(); din = w_iv;  reg_iv = 1;             @(negedge clk) reg_iv = 0;
      noise(); din = w_k1;  reg_key = 1; part = 0;  @(negedge clk) reg_key = 0;
      noise(); din = w_k2;  reg_key = 1; part = 1;  @(negedge clk) reg_key = 0;
      noise(); din = w_lsb; reg_lsb = 1;            @(negedge clk) reg_lsb = 0;
      noise(); din = w_size; reg_size = 1;          @(negedge clk) reg_size = 0;
      noise();
      chk(iv == w_iv[127:32], "IV");
      chk(key == {w_k1, w_k2}, "key");
      chk(last_mask == w_lsb, "mask");
      chk(len_block == w_size, "sizes");
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
