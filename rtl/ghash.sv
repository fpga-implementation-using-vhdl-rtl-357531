// ghash: the GHASH accumulator of GCM, one 128-bit block per clock.
//
// H_reg holds the hash key H = E(K, 0^128); the accumulator X (the register that
// feeds the multiplier) starts at 0 and absorbs one block per enabled clock:
//   X <= (X ^ blk) * H        (gf128_mult, combinational)
// After the AAD blocks, the ciphertext blocks and the length block len(A)||len(C)
// have been absorbed, x is GHASH(H, A, C).
// Interface: `clear` zeroes X, `h_load` stores h_in into H_reg, `en` absorbs
// blk; `clear` has priority over `en`. All synchronous.
module ghash (
  input  logic            clk,
  input  logic            rst,
  input  logic            clear,
  input  logic            h_load,
  input  gcm_pkg::block_t h_in,
  input  logic            en,
  input  gcm_pkg::block_t blk,
  output gcm_pkg::block_t x
);
  import gcm_pkg::*;

  block_t h_reg, x_reg, prod;

  gf128_mult u_mult (.x(x_reg ^ blk), .y(h_reg), .z(prod));

  always_ff @(posedge clk) begin
    if (rst) begin
      h_reg <= '0;
      x_reg <= '0;
    end else begin
      if (h_load) h_reg <= h_in;
      if (clear)   x_reg <= '0;
      else if (en) x_reg <= prod;
    end
  end

  assign x = x_reg;
endmodule
