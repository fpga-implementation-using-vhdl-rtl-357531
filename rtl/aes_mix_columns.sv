// aes_mix_columns: the MixColumns step of AES.
//
// Each column (a0..a3, a0 the top byte) is multiplied over GF(2^8) by the fixed
// matrix
//   b0 = 2a0 ^ 3a1 ^  a2 ^  a3      b1 =  a0 ^ 2a1 ^ 3a2 ^  a3
//   b2 =  a0 ^  a1 ^ 2a2 ^ 3a3      b3 = 3a0 ^  a1 ^  a2 ^ 2a3
// with 2x done by xtime (shift and conditional XOR with 1b) and 3x = 2x ^ x.
// Combinational.
module aes_mix_columns (
  input  gcm_pkg::block_t din,
  output gcm_pkg::block_t dout
);
  import gcm_pkg::xtime;

  for (genvar c = 0; c < 4; c++) begin : g_col
    logic [7:0] a0, a1, a2, a3;
    assign a0 = din[127-32*c -: 8];
    assign a1 = din[119-32*c -: 8];
    assign a2 = din[111-32*c -: 8];
    assign a3 = din[103-32*c -: 8];
    assign dout[127-32*c -: 8] = xtime(a0) ^ (xtime(a1) ^ a1) ^ a2 ^ a3;
    assign dout[119-32*c -: 8] = a0 ^ xtime(a1) ^ (xtime(a2) ^ a2) ^ a3;
    assign dout[111-32*c -: 8] = a0 ^ a1 ^ xtime(a2) ^ (xtime(a3) ^ a3);
    assign dout[103-32*c -: 8] = (xtime(a0) ^ a0) ^ a1 ^ a2 ^ xtime(a3);
  end
endmodule
