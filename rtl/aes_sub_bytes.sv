// aes_sub_bytes: the SubBytes step of AES ("sub" in the core's datapath).
//
// Sixteen aes_sbox instances substitute every byte of the 128-bit State in
// parallel. Purely combinational; byte 0 is din[127:120].
module aes_sub_bytes (
  input  gcm_pkg::block_t din,
  output gcm_pkg::block_t dout
);
  for (genvar k = 0; k < 16; k++) begin : g_byte
    aes_sbox u_sbox (.a(din[127-8*k -: 8]), .y(dout[127-8*k -: 8]));
  end
endmodule
