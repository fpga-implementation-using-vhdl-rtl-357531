// aes_add_round_key: the AddRoundKey step of AES ("addkey" in the core's
// datapath). The 128-bit State is XORed with the 128-bit round key; this is the
// only place the key enters the data. Combinational.
module aes_add_round_key (
  input  gcm_pkg::block_t din,
  input  gcm_pkg::block_t round_key,
  output gcm_pkg::block_t dout
);
  assign dout = din ^ round_key;
endmodule
