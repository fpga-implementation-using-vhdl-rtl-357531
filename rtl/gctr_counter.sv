// gctr_counter: counter-block register of GCTR.
//
// `init` presets the register to the pre-counter block Y0 = IV || 0^31 || 1 of a
// 96-bit IV; every `inc` then steps it with inc32 (the low 32 bits count modulo
// 2^32, the upper 96 bits stay), giving Y1, Y2, ... for the plaintext blocks.
// j0 is Y0 itself, combinational from the IV, used to encrypt the tag mask.
// Only 96-bit IVs are supported.
module gctr_counter (
  input  logic            clk,
  input  logic            rst,
  input  logic [95:0]     iv,
  input  logic            init,
  input  logic            inc,
  output gcm_pkg::block_t ctr,
  output gcm_pkg::block_t j0
);
  import gcm_pkg::*;

  block_t ctr_q;

  assign j0 = {iv, 32'd1};

  always_ff @(posedge clk) begin
    if (rst)       ctr_q <= '0;
    else if (init) ctr_q <= j0;
    else if (inc)  ctr_q <= inc32(ctr_q);
  end

  assign ctr = ctr_q;
endmodule
