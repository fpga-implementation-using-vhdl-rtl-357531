// tb_gcm_control: runs the GCM controller through whole messages with a model of
// the AES core (done 16 clocks after start) and a buffer that withholds the
// init strobes at random. Checks the state sequence, that each init word is
// loaded once with the right strobe and key half, that H is stored when AES is
// done, that AAD is taken one block per clock, plaintext one block per 16 clocks
// with a cipher output and a GHASH step for each, one length-block step in R4,
// and that the tag comes after a final AES run. Counts messages with and
// without AAD/plaintext and with init stalls.
module tb_gcm_control;
  import gcm_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic start = 0, iv_rdy = 0, key_rdy = 0, lsb_rdy = 0, size_rdy = 0, done_aad = 0, done_gcm = 0, aes_rdy;
  logic reg_iv, reg_key, part, reg_lsb, reg_size, init_ctrl, ctr_init, aes_start, h_load, ghash_en;
  logic ctr_inc, in_ack, cipher_out, tag_out;
  aes_sel_e aes_sel;
  ghash_sel_e ghash_sel;
  gcm_state_e state;
  always #5 clk = ~clk;

  gcm_control dut (.*);

  // AES model: done pulses 16 clocks after a start
  logic [15:0] aes_pipe = '0;
  always_ff @(posedge clk) aes_pipe <= {aes_pipe[14:0], aes_start & ~rst};
  assign aes_rdy = aes_pipe[15];

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  int ctr_count = 0;
  int n_stall = 0, n_noaad = 0, n_aad = 0, n_noplain = 0, n_plain = 0;

  task automatic message(input int na, input int np);
    int cnt_aad = 0, cnt_ct = 0, cnt_gh = 0, cnt_tag = 0, cnt_h = 0, last_inc = -1, cyc = 0;
    int r1_len = 0;
    logic stalled = 0;
    logic [4:0] loads = '0;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    chk(state == G_R_IN1, "R_IN1 after start");
    // init words, with random withheld strobes
    while (state inside {G_R_IN1, G_R_IN2A, G_R_IN2B, G_R_IN3, G_R_IN4}) begin
      logic give = ($urandom_range(0, 2) != 0);
      stalled |= !give;
      iv_rdy = give && state == G_R_IN1;  key_rdy = give && state inside {G_R_IN2A, G_R_IN2B};
      lsb_rdy = give && state == G_R_IN3; size_rdy = give && state == G_R_IN4;
      #1;
      if (reg_iv)   begin chk(state == G_R_IN1 && in_ack, "reg_iv in R_IN1"); loads[0] = 1; end
      if (reg_key)  begin chk(part == (state == G_R_IN2B) && in_ack, "key half"); loads[state == G_R_IN2B ? 2 : 1] = 1; end
      if (reg_lsb)  loads[3] = 1;
      if (reg_size) begin chk(aes_start, "AES started with the size word"); loads[4] = 1; end
      chk(in_ack == give, "in_ack only with a strobe");
      @(negedge clk);
    end
    iv_rdy = 0; key_rdy = 0; lsb_rdy = 0; size_rdy = 0;
    chk(loads == 5'b11111, "all five init words loaded");
    if (stalled) n_stall++;
    // R1: hash key
    while (state == G_R1) begin
      chk(aes_sel == AES_ZERO, "AES input 0 in R1");
      r1_len++;
      if (h_load) cnt_h++;
      @(negedge clk);
    end
    chk(r1_len == 16 && cnt_h == 1, $sformatf("R1 lasted %0d clocks", r1_len));
    // R2 / R3 / R4 .. R6 with the buffer's end flags
    while (state != G_RST && cyc < 5000) begin
      done_aad = (cnt_aad >= na);
      done_gcm = (ctr_count >= np);
      #1;
      if (state == G_R2 && in_ack) begin chk(ghash_en && ghash_sel == GH_AAD, "AAD into GHASH"); cnt_aad++; end
      if (ctr_inc) begin
        chk(aes_start && in_ack && state == G_R3, "plaintext taken with AES start");
        if (last_inc >= 0) chk(cyc - last_inc == 16, $sformatf("plaintext period %0d", cyc - last_inc));
        last_inc = cyc; ctr_count++;
      end
      if (cipher_out) begin chk(ghash_en && ghash_sel == GH_CIPHER && aes_rdy, "cipher into GHASH"); cnt_ct++; end
      if (ghash_en) cnt_gh++;
      if (state == G_R4) chk(ghash_en && ghash_sel == GH_LEN, "length block in R4");
      if (state == G_R5) chk(aes_start, "AES start in R5");
      if (state == G_R6) chk(aes_sel == AES_J0, "Y0 into AES in R6");
      if (tag_out) begin cnt_tag++; chk(state == G_R6, "tag in R6"); end
      cyc++;
      @(negedge clk);
    end
    chk(cnt_aad == na, "AAD count");
    chk(cnt_ct == np && ctr_count == np, "plaintext count");
    chk(cnt_gh == na + np + 1, "GHASH steps");
    chk(cnt_tag == 1, "one tag");
    if (na == 0) n_noaad++; else n_aad++;
    if (np == 0) n_noplain++; else n_plain++;
    ctr_count = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    message(0, 1);
    message(2, 4);
    message(1, 0);
    message(0, 0);
    for (int i = 0; i < 6; i++) message($urandom_range(0, 4), $urandom_range(0, 5));
    chk(n_stall > 0 && n_noaad > 0 && n_aad > 0 && n_noplain > 0 && n_plain > 0, "all cases seen");
    $display("messages: stalled=%0d noaad=%0d aad=%0d noplain=%0d plain=%0d", n_stall, n_noaad, n_aad, n_noplain, n_plain);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
