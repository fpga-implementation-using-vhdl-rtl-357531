// aes_rcon: round constant of the AES-256 key schedule.
//
// The key register is expanded once per pair of rounds, so the constant changes
// every second round: rounds 1,2 -> 01, 3,4 -> 02, 5,6 -> 04, 7,8 -> 08,
// 9,10 -> 10, 11,12 -> 20, 13,14 -> 40. Any other round number gives 00.
// Combinational.
module aes_rcon (
  input  logic [3:0] round,
  output logic [7:0] rcon
);
  always_comb begin
    unique case (round)
      4'd1,  4'd2:  rcon = 8'h01;
      4'd3,  4'd4:  rcon = 8'h02;
      4'd5,  4'd6:  rcon = 8'h04;
      4'd7,  4'd8:  rcon = 8'h08;
      4'd9,  4'd10: rcon = 8'h10;
      4'd11, 4'd12: rcon = 8'h20;
      4'd13, 4'd14: rcon = 8'h40;
      default:      rcon = 8'h00;
    endcase
  end
endmodule
