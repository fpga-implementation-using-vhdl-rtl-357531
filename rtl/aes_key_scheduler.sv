// aes_key_scheduler: on-the-fly AES-256 key expansion.
//
// A 256-bit register holds eight key-schedule words w[8j..8j+7]. Its upper half
// is the round key of one round and its lower half that of the next, so each
// register value serves two rounds and the register is expanded seven times for
// the fourteen rounds. One expansion step, done in a single clock:
//   t  = SubWord(RotWord(w7)) ^ {Rcon, 24'h0}
//   n0 = w0 ^ t,  n1 = w1 ^ n0,  n2 = w2 ^ n1,  n3 = w3 ^ n2
//   n4 = w4 ^ SubWord(n3),  n5 = w5 ^ n4,  n6 = w6 ^ n5,  n7 = w7 ^ n6
// Interface: key_control_1 = 1 loads `key` (the controller holds it high while
// idle, so the key is sampled in the start cycle). key_control_2 selects the
// half: 0 -> upper 128 bits, 1 -> lower 128 bits; after a cycle that used the
// lower half the register steps, using the Rcon of the current `round`.
// round_key is combinational from the register.
// The word order, the Rcon byte position and the extra SubWord on n4 follow
// FIPS-197 so that standard test vectors are reproduced.
module aes_key_scheduler (
  input  logic             clk,
  input  logic             rst,
  input  gcm_pkg::key256_t key,
  input  logic             key_control_1,
  input  logic             key_control_2,
  input  logic [3:0]       round,
  output gcm_pkg::block_t  round_key
);
  import gcm_pkg::*;

  key256_t    kreg, knext;
  logic [7:0] rcon;

  aes_rcon u_rcon (.round(round), .rcon(rcon));

  always_comb begin
    logic [31:0] w[8];
    logic [31:0] n[8];
    for (int i = 0; i < 8; i++) w[i] = kreg[255-32*i -: 32];
    n[0] = w[0] ^ sub_word({w[7][23:0], w[7][31:24]}) ^ {rcon, 24'h0};
    for (int i = 1; i < 4; i++) n[i] = w[i] ^ n[i-1];
    n[4] = w[4] ^ sub_word(n[3]);
    for (int i = 5; i < 8; i++) n[i] = w[i] ^ n[i-1];
    for (int i = 0; i < 8; i++) knext[255-32*i -: 32] = n[i];
  end

  always_ff @(posedge clk) begin
    if (rst)                kreg <= '0;
    else if (key_control_1) kreg <= key;
    else if (key_control_2) kreg <= knext;
  end

  assign round_key = key_control_2 ? kreg[127:0] : kreg[255:128];
endmodule
