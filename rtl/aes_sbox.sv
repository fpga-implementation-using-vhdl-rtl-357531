// aes_sbox: the AES S-box for one byte, a 256-entry look-up table.
//
// Combinational: y = S(a). The table (row = high nibble, column = low nibble)
// is the standard AES S-box and is held in gcm_pkg::sbox so that the key
// scheduler and SubBytes share one copy.
module aes_sbox (
  input  logic [7:0] a,
  output logic [7:0] y
);
  assign y = gcm_pkg::sbox(a);
endmodule
