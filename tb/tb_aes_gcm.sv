// tb_aes_gcm: end-to-end test of the AES-GCM engine with a buffer model in front
// of its single input.
//
// The buffer feeds start, the five init words (IV, two key halves, last-block
// mask, sizes), the AAD blocks and the plaintext blocks, raising the *_end
// strobes as the engine expects; it withholds init strobes at random. The
// ciphertext blocks and the tag are collected from dout and compared with a
// reference GCM built from the reference AES-256 and the bit-serial GF(2^128)
// product. Messages: the three AES-256 GCM test vectors (zero key and one
// zero block; 64-byte plaintext without AAD; 60-byte plaintext with 20-byte
// AAD) and random messages with random lengths, including empty AAD, empty
// plaintext and partial last blocks. Timing checks: H is ready 16 clocks after
// the size word, AAD blocks are taken one per clock and ciphertext blocks leave
// exactly 16 clocks apart. Mechanisms counted, each must occur: init stall,
// AAD phase, empty AAD, masked partial last block, full last block, empty
// plaintext, back-to-back plaintext blocks.
module tb_aes_gcm;
  import gcm_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic start = 0, iv_end = 0, key_end = 0, lsb_end = 0, size_end = 0, aad_end = 0, plain_end = 0;
  logic [127:0] din = '0, dout;
  logic in_ack, c_out_rdy, done;
  always #5 clk = ~clk;

  aes_gcm dut (.clk, .rst, .start, .iv_end, .key_end, .lsb_end, .size_end, .aad_end,
               .plain_end, .din, .in_ack, .c_out_rdy, .done, .dout);

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // message under test
  logic [255:0] K;
  logic [95:0]  IV;
  logic [127:0] A[$], P[$], Cexp[$], Cgot[$];
  logic [127:0] Texp, Tgot;
  longint unsigned lenA, lenP;
  logic [127:0] expect_c[$];   // optional published ciphertext
  logic [127:0] expect_t;
  bit           have_expect;

  int n_stall = 0, n_aad = 0, n_noaad = 0, n_partial = 0, n_full = 0, n_noplain = 0, n_b2b = 0;

  function automatic logic [127:0] lead_mask(input int bits);
    return (bits >= 128) ? '1 : ~({128{1'b1}} >> bits);
  endfunction

  // reference GCM (96-bit IV, 128-bit tag)
  task automatic reference();
    logic [127:0] H, X, E, J0, Y;
    int np = P.size();
    H = aes256_ref(K, '0);
    J0 = {IV, 32'd1};
    X = '0;
    foreach (A[i]) X = gfmul_ref(X ^ A[i], H);
    Y = J0;
    Cexp.delete();
    foreach (P[i]) begin
      logic [127:0] c;
      Y = {Y[127:32], Y[31:0] + 32'd1};
      c = P[i] ^ aes256_ref(K, Y);
      if (i == np - 1) c &= lead_mask(int'(lenP - 128 * (np - 1)));
      Cexp.push_back(c);
      X = gfmul_ref(X ^ c, H);
    end
    X = gfmul_ref(X ^ {lenA, lenP}, H);
    Texp = X ^ aes256_ref(K, J0);
  endtask

  int msg_stalls;

  task automatic put(input logic [127:0] w, input int which);
    logic give;
    do begin
      give = ($urandom_range(0, 3) != 0);
      if (!give) begin n_stall++; msg_stalls++; end
      din = w;
      iv_end = give && which == 0; key_end = give && which == 1;
      lsb_end = give && which == 2; size_end = give && which == 3;
      #1 if (give) chk(in_ack, "init word taken");
      @(negedge clk);
    end while (!give);
    iv_end = 0; key_end = 0; lsb_end = 0; size_end = 0;
  endtask

  int cyc = 0;
  always @(posedge clk) cyc++;

  task automatic run_message(input string name);
    int ai = 0, pi = 0, t_size, t_first_aad = -1, t_prev_c = -1, guard = 0, t_start, lat;
    int np = P.size();
    reference();
    Cgot.delete();
    msg_stalls = 0;
    @(negedge clk) start = 1;
    t_start = cyc;
    @(negedge clk) start = 0;
    put({IV, 32'h0}, 0);
    put(K[255:128], 1);
    put(K[127:0], 1);
    put(np == 0 ? '0 : lead_mask(int'(lenP - 128 * (np - 1))), 2);
    put({lenA, lenP}, 3);
    t_size = cyc;
    // stream AAD and plaintext; collect outputs
    while (!done && guard < 100000) begin
      aad_end   = (ai >= A.size());
      plain_end = (pi >= np);
      din = !aad_end ? A[ai] : (!plain_end ? P[pi] : rand128());
      #1;
      if (in_ack && dut.state == gcm_pkg::G_R2) begin
        if (ai == 0) begin
          t_first_aad = cyc;
          chk(cyc - t_size == 16, $sformatf("%s: H ready %0d clocks after the size word", name, cyc - t_size));
        end else chk(cyc - t_first_aad == ai, $sformatf("%s: AAD one block per clock", name));
        ai++;
      end else if (in_ack && dut.state == gcm_pkg::G_R3) pi++;
      @(negedge clk);
      guard++;
      if (c_out_rdy) begin
        Cgot.push_back(dout);
        if (t_prev_c >= 0) begin
          chk(cyc - t_prev_c == 16, $sformatf("%s: cipher blocks %0d clocks apart", name, cyc - t_prev_c));
          n_b2b++;
        end
        t_prev_c = cyc;
      end
    end
    Tgot = dout;
    chk(done, $sformatf("%s: finished", name));
    // clock of done, the start clock being clock 0:
    // 1 + 5 init + 16 (H) + (nA + 1) + (16 nP + 1) + 1 (R4) + 1 (R5) + 16 (R6)
    lat = cyc - t_start;
    chk(lat == 42 + A.size() + 16 * np + msg_stalls,
        $sformatf("%s: tag %0d clocks after start, expected %0d", name, lat, 42 + A.size() + 16 * np + msg_stalls));
    chk(Cgot.size() == np, $sformatf("%s: %0d cipher blocks, expected %0d", name, Cgot.size(), np));
    foreach (Cexp[i]) if (i < Cgot.size())
      chk(Cgot[i] === Cexp[i], $sformatf("%s: C%0d = %032h exp %032h", name, i + 1, Cgot[i], Cexp[i]));
    chk(Tgot === Texp, $sformatf("%s: T = %032h exp %032h", name, Tgot, Texp));
    if (have_expect) begin
      foreach (expect_c[i]) if (i < Cgot.size())
        chk(Cgot[i] === expect_c[i], $sformatf("%s: C%0d vs known answer", name, i + 1));
      chk(Tgot === expect_t, $sformatf("%s: T vs known answer %032h", name, expect_t));
    end
    if (A.size() == 0) n_noaad++; else n_aad++;
    if (np == 0) n_noplain++;
    else if (lenP % 128 != 0) n_partial++;
    else n_full++;
    @(negedge clk);
    chk(!done && !c_out_rdy, "outputs are one clock long");
    aad_end = 0; plain_end = 0;
    have_expect = 0;
  endtask

  localparam logic [255:0] KF = {2{128'hfeffe9928665731c6d6a8f9467308308}};

  initial begin
    have_expect = 0;
    repeat (3) @(negedge clk);
    rst = 0;

    // zero key, zero IV, one zero plaintext block
    K = '0; IV = '0; A = {}; P = {128'h0}; lenA = 0; lenP = 128;
    expect_c = {128'hcea7403d4d606b6e074ec5d3baf39d18};
    expect_t = 128'hd0d1c8a799996bf0265b98b5d48ab919; have_expect = 1;
    run_message("vector 1");

    // 64-byte plaintext, no AAD
    K = KF; IV = 96'hcafebabefacedbaddecaf888; A = {};
    P = {128'hd9313225f88406e5a55909c5aff5269a, 128'h86a7a9531534f7da2e4c303d8a318a72,
         128'h1c3c0c95956809532fcf0e2449a6b525, 128'hb16aedf5aa0de657ba637b391aafd255};
    lenA = 0; lenP = 512;
    expect_c = {128'h522dc1f099567d07f47f37a32a84427d, 128'h643a8cdcbfe5c0c97598a2bd2555d1aa,
                128'h8cb08e48590dbb3da7b08b1056828838, 128'hc5f61e6393ba7a0abcc9f662898015ad};
    expect_t = 128'hb094dac5d93471bdec1a502270e3cc6c; have_expect = 1;
    run_message("vector 2");

    // 60-byte plaintext, 20-byte AAD
    A = {128'hfeedfacedeadbeeffeedfacedeadbeef, 128'habaddad2000000000000000000000000};
    P = {128'hd9313225f88406e5a55909c5aff5269a, 128'h86a7a9531534f7da2e4c303d8a318a72,
         128'h1c3c0c95956809532fcf0e2449a6b525, 128'hb16aedf5aa0de657ba637b3900000000};
    lenA = 160; lenP = 480;
    expect_c = {128'h522dc1f099567d07f47f37a32a84427d, 128'h643a8cdcbfe5c0c97598a2bd2555d1aa,
                128'h8cb08e48590dbb3da7b08b1056828838, 128'hc5f61e6393ba7a0abcc9f66200000000};
    expect_t = 128'h76fc6ece0f4e1768cddf8853bb2d551b; have_expect = 1;
    run_message("vector 3");

    // random messages
    for (int m = 0; m < 12; m++) begin
      automatic int na_bits = (m % 4 == 0) ? 0 : $urandom_range(1, 5 * 128);
      automatic int np_bits = (m % 5 == 1) ? 0 : $urandom_range(1, 6 * 128);
      K = {rand128(), rand128()}; IV = {$urandom, $urandom, $urandom};
      A = {}; P = {};
      for (int b = 0; b < na_bits; b += 128) A.push_back(rand128() & lead_mask(na_bits - b));
      for (int b = 0; b < np_bits; b += 128) P.push_back(rand128() & lead_mask(np_bits - b));
      lenA = longint'(na_bits); lenP = longint'(np_bits);
      run_message($sformatf("random %0d (A %0d bits, P %0d bits)", m, na_bits, np_bits));
    end

    $display("mechanisms: init_stall=%0d aad=%0d no_aad=%0d partial_last=%0d full_last=%0d no_plain=%0d back_to_back=%0d",
             n_stall, n_aad, n_noaad, n_partial, n_full, n_noplain, n_b2b);
    chk(n_stall > 0, "init stall seen");
    chk(n_aad > 0, "AAD seen");
    chk(n_noaad > 0, "empty AAD seen");
    chk(n_partial > 0, "partial last block seen");
    chk(n_full > 0, "full last block seen");
    chk(n_noplain > 0, "empty plaintext seen");
    chk(n_b2b > 0, "back-to-back plaintext blocks seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
