// gcm_init_regs: the parameter registers of the GCM engine, loaded from the single
// 128-bit input during initialization (five clocks).
//   reg_iv          IV      <= din[127:32]          (96-bit IV, left-aligned)
//   reg_key, part=0 K[255:128] <= din
//   reg_key, part=1 K[127:0]   <= din
//   reg_lsb         last_mask <= din (1s mark the valid bits of the last
//                   plaintext block, left-aligned)
//   reg_size        len_block <= din = len(A) (64 bits) || len(C) (64 bits)
// All registers clear to zero on reset and hold otherwise.
module gcm_init_regs (
  input  logic             clk,
  input  logic             rst,
  input  gcm_pkg::block_t  din,
  input  logic             reg_iv,
  input  logic             reg_key,
  input  logic             part,
  input  logic             reg_lsb,
  input  logic             reg_size,
  output logic [95:0]      iv,
  output gcm_pkg::key256_t key,
  output gcm_pkg::block_t  last_mask,
  output gcm_pkg::block_t  len_block
);
  always_ff @(posedge clk) begin
    if (rst) begin
      iv        <= '0;
      key       <= '0;
      last_mask <= '0;
      len_block <= '0;
    end else begin
      if (reg_iv)            iv             <= din[127:32];
      if (reg_key && !part)  key[255:128]   <= din;
      if (reg_key &&  part)  key[127:0]     <= din;
      if (reg_lsb)           last_mask      <= din;
      if (reg_size)          len_block      <= din;
    end
  end
endmodule
