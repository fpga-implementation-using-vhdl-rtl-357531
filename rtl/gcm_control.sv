// gcm_control: the 12-state controller of the AES-GCM engine.
//
// Sequence (one message):
//   RST     idle; the GHASH accumulator is held at zero. start -> R_IN1.
//   R_IN1   load the IV when iv_rdy          R_IN2a  load K[255:128] when key_rdy
//   R_IN2b  load K[127:0] when key_rdy       R_IN3   load last-block mask when lsb_rdy
//   R_IN4   load len(A)||len(C) when size_rdy, and start AES on 0^128
//   R1      wait for AES (aes_rdy), store the result as H; the counter is preset
//           to Y0 meanwhile
//   R2      each clock with done_aad = 0 absorbs one AAD block from the input;
//           done_aad = 1 moves on
//   R3      plaintext loop, one block per 16 clocks: when no block is in flight
//           (or the one in flight finishes this clock) and done_gcm = 0, take
//           the next plaintext block, step the counter and start AES; when AES
//           finishes, the ciphertext block goes out (cipher_out) and into GHASH.
//           done_gcm = 1, sampled once nothing is in flight, moves on
//   R4      absorb the length block into GHASH
//   R5      start AES on Y0
//   R6      wait for AES; tag_out (done_cipher) when it finishes, then RST
// The transitions are those of the state diagram of the design. Outputs are
// decoded from the state, the inputs and one flag (`inflight`, a block is being
// encrypted); their timing inside a state is this design's own choice.
module gcm_control (
  input  logic                clk,
  input  logic                rst,
  input  logic                start,
  input  logic                iv_rdy,
  input  logic                key_rdy,
  input  logic                lsb_rdy,
  input  logic                size_rdy,
  input  logic                done_aad,
  input  logic                done_gcm,
  input  logic                aes_rdy,
  output logic                reg_iv,
  output logic                reg_key,
  output logic                part,
  output logic                reg_lsb,
  output logic                reg_size,
  output logic                init_ctrl,
  output logic                ctr_init,
  output logic                aes_start,
  output gcm_pkg::aes_sel_e   aes_sel,
  output logic                h_load,
  output logic                ghash_en,
  output gcm_pkg::ghash_sel_e ghash_sel,
  output logic                ctr_inc,
  output logic                in_ack,
  output logic                cipher_out,
  output logic                tag_out,
  output gcm_pkg::gcm_state_e state
);
  import gcm_pkg::*;

  gcm_state_e state_n;
  logic       inflight, inflight_n;

  always_comb begin
    state_n    = state;
    inflight_n = inflight;
    reg_iv     = 1'b0;
    reg_key    = 1'b0;
    part       = 1'b0;
    reg_lsb    = 1'b0;
    reg_size   = 1'b0;
    init_ctrl  = 1'b0;
    ctr_init   = 1'b0;
    aes_start  = 1'b0;
    aes_sel    = AES_CTR;
    h_load     = 1'b0;
    ghash_en   = 1'b0;
    ghash_sel  = GH_AAD;
    ctr_inc    = 1'b0;
    in_ack     = 1'b0;
    cipher_out = 1'b0;
    tag_out    = 1'b0;
    unique case (state)
      G_RST: begin
        init_ctrl  = 1'b1;
        inflight_n = 1'b0;
        if (start) state_n = G_R_IN1;
      end
      G_R_IN1: begin
        reg_iv = iv_rdy;
        in_ack = iv_rdy;
        if (iv_rdy) state_n = G_R_IN2A;
      end
      G_R_IN2A: begin
        reg_key = key_rdy;
        in_ack  = key_rdy;
        if (key_rdy) state_n = G_R_IN2B;
      end
      G_R_IN2B: begin
        reg_key = key_rdy;
        part    = 1'b1;
        in_ack  = key_rdy;
        if (key_rdy) state_n = G_R_IN3;
      end
      G_R_IN3: begin
        reg_lsb = lsb_rdy;
        in_ack  = lsb_rdy;
        if (lsb_rdy) state_n = G_R_IN4;
      end
      G_R_IN4: begin
        reg_size  = size_rdy;
        in_ack    = size_rdy;
        aes_start = size_rdy;
        if (size_rdy) state_n = G_R1;
      end
      G_R1: begin
        aes_sel  = AES_ZERO;
        ctr_init = 1'b1;
        h_load   = aes_rdy;
        if (aes_rdy) state_n = G_R2;
      end
      G_R2: begin
        ghash_sel = GH_AAD;
        if (done_aad) state_n = G_R3;
        else begin
          ghash_en = 1'b1;
          in_ack   = 1'b1;
        end
      end
      G_R3: begin
        ghash_sel = GH_CIPHER;
        if (inflight && aes_rdy) begin
          ghash_en   = 1'b1;
          cipher_out = 1'b1;
          inflight_n = 1'b0;
        end
        if (!inflight || aes_rdy) begin
          if (done_gcm) state_n = G_R4;
          else begin
            in_ack     = 1'b1;
            ctr_inc    = 1'b1;
            aes_start  = 1'b1;
            inflight_n = 1'b1;
          end
        end
      end
      G_R4: begin
        ghash_sel = GH_LEN;
        ghash_en  = 1'b1;
        state_n   = G_R5;
      end
      G_R5: begin
        aes_start = 1'b1;
        state_n   = G_R6;
      end
      G_R6: begin
        aes_sel = AES_J0;
        tag_out = aes_rdy;
        if (aes_rdy) state_n = G_RST;
      end
      default: state_n = G_RST;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= G_RST;
      inflight <= 1'b0;
    end else begin
      state    <= state_n;
      inflight <= inflight_n;
    end
  end
endmodule
