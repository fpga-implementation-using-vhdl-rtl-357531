// aes256: iterative AES-256 encryption core, one round per clock.
//
// Datapath: a 128-bit State register feeds ShiftRows -> SubBytes -> MixColumns.
// A multiplexer takes the SubBytes output instead of MixColumns in the last
// round (control_2); a second one takes data_in instead in R1 (control_1); the
// result is XORed with the round key (AddRoundKey) and written back to the State
// register. Round keys come from aes_key_scheduler, which expands the key on the
// fly, and the sequence from aes_control.
// Interface and timing: pulse `start` while idle with `key` valid; data_in is
// sampled one clock later (R1). Fifteen clocks later data_out holds the
// ciphertext and `done` is high for one clock; data_out stays valid until the
// next start. A new start is accepted in the clock `done` is high, so the core
// encrypts one block every 16 clocks. Only encryption is built, as GCM needs no
// AES decryption.
module aes256 (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  input  gcm_pkg::key256_t key,
  input  gcm_pkg::block_t  data_in,
  output gcm_pkg::block_t  data_out,
  output logic             done,
  output logic             busy
);
  import gcm_pkg::*;

  logic       control_1, control_2, key_control_1, key_control_2;
  logic [3:0] round;
  block_t     state_q, sr, sb, mc, round_out, ark_in, ark_out, round_key;

  aes_control u_ctrl (
    .clk, .rst, .start, .control_1, .control_2, .key_control_1, .key_control_2,
    .round, .busy, .done
  );

  aes_key_scheduler u_keys (
    .clk, .rst, .key, .key_control_1, .key_control_2, .round, .round_key
  );

  aes_shift_rows    u_shift (.din(state_q), .dout(sr));
  aes_sub_bytes     u_sub   (.din(sr), .dout(sb));
  aes_mix_columns   u_mix   (.din(sb), .dout(mc));

  assign round_out = control_2 ? sb : mc;
  assign ark_in    = control_1 ? data_in : round_out;

  aes_add_round_key u_ark (.din(ark_in), .round_key(round_key), .dout(ark_out));

  always_ff @(posedge clk) begin
    if (rst)       state_q <= '0;
    else if (busy) state_q <= ark_out;
  end

  assign data_out = state_q;
endmodule
