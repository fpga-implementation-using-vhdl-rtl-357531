// aes_control: controller of the iterative AES-256 core.
//
// States RST, R1..R15. `start` in RST moves to R1; every other state lasts one
// clock and moves to the next; R15 returns to RST. R1 applies the first round key
// to the incoming data, R2..R14 are the thirteen full rounds and R15 is the last
// round, which skips MixColumns. Outputs, all decoded from the state:
//   control_1      R1: the round input is data_in
//   control_2      R15: MixColumns is bypassed
//   key_control_1  RST: the key scheduler loads the key
//   key_control_2  h_k, 0 in R1,R3,..,R15 (upper key half), 1 in R2,R4,..,R14
//   round          1..15 in R1..R15, 0 in RST
//   busy           not in RST
//   done           registered: high for the one clock after R15
// A block therefore takes 15 clocks of work and comes out in the 16th; a new
// start may be given in that same clock. The h_k sequence matches the state
// diagram; busy, round and done are this design's own outputs.
module aes_control (
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  output logic       control_1,
  output logic       control_2,
  output logic       key_control_1,
  output logic       key_control_2,
  output logic [3:0] round,
  output logic       busy,
  output logic       done
);
  import gcm_pkg::*;

  aes_state_e state, state_n;

  always_comb begin
    state_n = state;
    unique case (state)
      A_RST:   if (start) state_n = A_R1;
      A_R15:   state_n = A_RST;
      default: state_n = aes_state_e'(state + 5'd1);
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= A_RST;
      done  <= 1'b0;
    end else begin
      state <= state_n;
      done  <= (state == A_R15);
    end
  end

  assign control_1     = (state == A_R1);
  assign control_2     = (state == A_R15);
  assign key_control_1 = (state == A_RST);
  assign key_control_2 = (state != A_RST) && !state[0];
  assign round         = state[3:0];
  assign busy          = (state != A_RST);
endmodule
