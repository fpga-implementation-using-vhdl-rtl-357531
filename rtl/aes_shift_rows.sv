// aes_shift_rows: the ShiftRows step of AES ("shift_128" in the core's datapath).
//
// The 16 bytes of the block form the 4x4 State column by column (byte 4c+r is
// row r, column c, byte 0 = din[127:120]). Row r is rotated left by r positions:
// s'(r,c) = s(r,(c+r) mod 4). Row 0 is unchanged. Only wiring, combinational.
module aes_shift_rows (
  input  gcm_pkg::block_t din,
  output gcm_pkg::block_t dout
);
  for (genvar c = 0; c < 4; c++) begin : g_col
    for (genvar r = 0; r < 4; r++) begin : g_row
      assign dout[127-8*(4*c+r) -: 8] = din[127-8*(4*(((c+r)%4))+r) -: 8];
    end
  end
endmodule
