// aes_gcm: AES-GCM authenticated encryption with a 256-bit key and a 96-bit IV,
// built around one iterative AES-256 core and one single-clock GF(2^128)
// multiplier.
//
// Everything enters through one 128-bit input `din` and leaves through one
// 128-bit output `dout`. A message runs as:
//   1. start; then IV (din[127:32]) with iv_end, K[255:128] and K[127:0] with
//      key_end, the last-block mask with lsb_end, len(A)||len(C) in bits with
//      size_end; one clock each when the strobes are high.
//   2. H = E(K, 0^128): 16 clocks.
//   3. AAD: one zero-padded block per clock while aad_end = 0; aad_end = 1 ends it.
//   4. Plaintext: one zero-padded block per 16 clocks; a block is taken in a
//      clock with in_ack high, and plain_end = 1 in such a clock ends the phase.
//      Each block is XORed with E(K, Y_i) (Y_i from the GCTR counter), the last
//      block is masked with the mask register, and the ciphertext leaves on dout
//      with c_out_rdy for one clock and enters GHASH.
//   5. len(A)||len(C) enters GHASH; E(K, Y0) is computed and the tag
//      T = GHASH ^ E(K, Y0) leaves on dout with done for one clock.
// in_ack marks every clock in which din is consumed (init words, AAD, plaintext).
// The output multiplexer selects the ciphertext or the tag; dout is registered.
// The flow and the 16-clocks-per-block rate follow the design description; the
// strobe meanings, the mask format and in_ack are this design's choices. The
// full 128-bit tag is produced (t = 128).
module aes_gcm (
  input  logic            clk,
  input  logic            rst,
  input  logic            start,
  input  logic            iv_end,
  input  logic            key_end,
  input  logic            lsb_end,
  input  logic            size_end,
  input  logic            aad_end,
  input  logic            plain_end,
  input  gcm_pkg::block_t din,
  output logic            in_ack,
  output logic            c_out_rdy,
  output logic            done,
  output gcm_pkg::block_t dout
);
  import gcm_pkg::*;

  // control
  logic       reg_iv, reg_key, part, reg_lsb, reg_size, init_ctrl, ctr_init;
  logic       aes_start, h_load, ghash_en, ctr_inc, cipher_out, tag_out;
  aes_sel_e   aes_sel;
  ghash_sel_e ghash_sel;
  gcm_state_e state;

  // datapath
  logic [95:0] iv;
  key256_t     key;
  block_t      last_mask, len_block, ctr, j0;
  block_t      aes_in, aes_out, ghash_in, ghash_x, plain_q, cipher, tag;
  logic        aes_done, aes_busy, last_blk;
  logic [63:0] blk_cnt, n_blocks;

  gcm_control u_ctrl (
    .clk, .rst, .start,
    .iv_rdy(iv_end), .key_rdy(key_end), .lsb_rdy(lsb_end), .size_rdy(size_end),
    .done_aad(aad_end), .done_gcm(plain_end), .aes_rdy(aes_done),
    .reg_iv, .reg_key, .part, .reg_lsb, .reg_size, .init_ctrl, .ctr_init,
    .aes_start, .aes_sel, .h_load, .ghash_en, .ghash_sel, .ctr_inc, .in_ack,
    .cipher_out, .tag_out, .state
  );

  gcm_init_regs u_regs (
    .clk, .rst, .din, .reg_iv, .reg_key, .part, .reg_lsb, .reg_size,
    .iv, .key, .last_mask, .len_block
  );

  gctr_counter u_ctr (.clk, .rst, .iv, .init(ctr_init), .inc(ctr_inc), .ctr, .j0);

  always_comb begin
    unique case (aes_sel)
      AES_ZERO: aes_in = '0;
      AES_J0:   aes_in = j0;
      default:  aes_in = ctr;
    endcase
  end

  aes256 u_aes (
    .clk, .rst, .start(aes_start), .key, .data_in(aes_in),
    .data_out(aes_out), .done(aes_done), .busy(aes_busy)
  );

  // Plaintext register and block count; the block whose number reaches
  // ceil(len(C)/128) is the last one and is masked.
  assign n_blocks = (len_block[63:0] >> 7) + {63'd0, |len_block[6:0]};
  assign last_blk = (blk_cnt == n_blocks);

  always_ff @(posedge clk) begin
    if (rst || init_ctrl) begin
      plain_q <= '0;
      blk_cnt <= '0;
    end else if (ctr_inc) begin
      plain_q <= din;
      blk_cnt <= blk_cnt + 64'd1;
    end
  end

  assign cipher = (plain_q ^ aes_out) & (last_blk ? last_mask : '1);
  assign tag    = ghash_x ^ aes_out;

  always_comb begin
    unique case (ghash_sel)
      GH_CIPHER: ghash_in = cipher;
      GH_LEN:    ghash_in = len_block;
      default:   ghash_in = din;
    endcase
  end

  ghash u_ghash (
    .clk, .rst, .clear(init_ctrl), .h_load, .h_in(aes_out),
    .en(ghash_en), .blk(ghash_in), .x(ghash_x)
  );

  // Output multiplexer and register: ciphertext block or tag.
  always_ff @(posedge clk) begin
    if (rst) begin
      dout      <= '0;
      c_out_rdy <= 1'b0;
      done      <= 1'b0;
    end else begin
      c_out_rdy <= cipher_out;
      done      <= tag_out;
      if (tag_out)         dout <= tag;
      else if (cipher_out) dout <= cipher;
    end
  end

  // The AES core is only started when it is idle or finishing.
  assert property (@(posedge clk) disable iff (rst) aes_start |-> (!aes_busy || aes_done))
    else $error("aes_gcm: AES started while busy");
  // The input is only consumed in the load, AAD and plaintext states.
  assert property (@(posedge clk) disable iff (rst)
      in_ack |-> (state inside {G_R_IN1, G_R_IN2A, G_R_IN2B, G_R_IN3, G_R_IN4, G_R2, G_R3}))
    else $error("aes_gcm: input consumed outside a load phase");
  // A ciphertext block and the tag never share the output.
  assert property (@(posedge clk) disable iff (rst) !(c_out_rdy && done))
    else $error("aes_gcm: cipher and tag on the output together");
endmodule
