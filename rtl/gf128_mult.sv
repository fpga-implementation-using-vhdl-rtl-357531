// gf128_mult: fully parallel (Mastrovito-style) multiplier in GF(2^128), the
// field of GCM, reduced by x^128 + x^7 + x^2 + x + 1.
//
// Bit 127 of a vector is the first bit x_0 of the block (the coefficient of
// x^0 in GCM's reflected convention). The circuit builds the 128 rows
//   V_0 = y,  V_{j+1} = (V_j >> 1) ^ (V_j[0] ? R : 0),  R = E1 || 0^120,
// which are only shifts and a few XORs, and then forms each output bit as an
// AND-XOR tree over the rows:  z[i] = XOR_j ( V_j[i] & x[127-j] ).
// The whole product is combinational, so one multiplication fits in one clock;
// the depth is ~128 XOR levels for V plus a 7-level XOR tree. R is the value of
// the GCM specification.
module gf128_mult (
  input  gcm_pkg::block_t x,
  input  gcm_pkg::block_t y,
  output gcm_pkg::block_t z
);
  import gcm_pkg::*;

  localparam block_t R = {8'he1, 120'h0};

  block_t v [128];

  always_comb begin
    v[0] = y;
    for (int j = 1; j < 128; j++)
      v[j] = (v[j-1] >> 1) ^ (v[j-1][0] ? R : '0);
  end

  always_comb begin
    z = '0;
    for (int j = 0; j < 128; j++)
      z = z ^ (v[j] & {128{x[127-j]}});
  end
endmodule
