// sig_reg: reconfigurable signature register.
//
// WIDTH flip-flops FF0..FF(WIDTH-1) in a ring.  In signature mode (sge = 1)
// it is an internal-XOR LFSR that folds one serial input bit per capture:
//   FF0 <= in ^ FF(W-1)
//   FFi <= FF(i-1) ^ (FB_MASK[i] & FF(W-1))      for i > 0
// In shift mode (sge = 0) the feedback and the input are cut and the register
// is a plain shift register from sgi to sgo, so several signature registers
// chain sgo -> sgi into one long register that is unloaded to the tester.
// sck is the capture enable: the register only changes on a rising clk edge
// while sck = 1, which lets it pick the one target bit out of a stream of
// shifted test responses.
//
// Follows the published structure: XOR feedback from the last stage into the
// inputs of FF0 and FF1 of the 4-bit example (FB_MASK = 4'b0011), the serial
// input entering FF0, and a shift-register configuration.  With WIDTH = 3 and
// FB_MASK = 3'b011 it reproduces the published 3-bit signature table exactly.
// This design's choices: sge = 1 means signature mode (the control line is
// described as the register's enable), sck is a synchronous clock enable
// rather than an AND gate on the clock, the register changes only when sck = 1
// in both modes, the 8-bit feedback polynomial x^8+x^4+x^3+x^2+1, and an
// asynchronous active-high reset.
// Timing: one state update per enabled rising clk edge; sgo = FF(W-1).
`timescale 1ns/1fs
module sig_reg #(
  parameter int unsigned          WIDTH   = 8,
  parameter logic [WIDTH-1:0]     FB_MASK = dm_pkg::SIG8_FB_MASK
) (
  input  logic clk,
  input  logic rst,
  input  logic sck,   // capture / shift enable
  input  logic sge,   // 1: signature mode, 0: shift mode
  input  logic in,    // serial test response (cluster tail flip-flop)
  input  logic sgi,   // shift input (previous register's sgo)
  output logic sgo    // shift output
);

  logic [WIDTH-1:0] state, state_next;

  always_comb begin
    if (sge) begin
      state_next[0] = in ^ (FB_MASK[0] & state[WIDTH-1]);
      for (int i = 1; i < WIDTH; i++)
        state_next[i] = state[i-1] ^ (FB_MASK[i] & state[WIDTH-1]);
    end else begin
      state_next = {state[WIDTH-2:0], sgi};
    end
  end

  always_ff @(posedge clk or posedge rst)
    if (rst)      state <= '0;
    else if (sck) state <= state_next;

  assign sgo = state[WIDTH-1];

endmodule
