// two_pulse_gen: 2-pulse generator of the variable clock generator.
//
// After a rising edge of the asynchronous trigger, exactly two high phases of
// the variable-frequency clock clk are passed to pulses; otherwise pulses
// stays low.  The time between the two rising edges is one period of clk,
// which is the test clock width of a launch/capture pair.
// How it works: a three flip-flop chain on clk samples trig (two stages
// synchronise, the third detects the rising edge); an edge loads a pulse
// counter with 2.  An enable flip-flop on the falling clock edge follows
// "counter non-zero", and pulses = clk AND enable, so the gate opens and
// closes only while clk is low and the pulses are whole.
// The flip-flop chain and output gate follow the published generator; the
// counter and falling-edge enable are this design's choice.  The clock gate
// is the purpose of this block.
// Latency: the first pulse rises 3 to 4 clk periods after trig rises.
`timescale 1ns/1fs
module two_pulse_gen (
  input  logic clk,     // variable-frequency clock from the phase interpolator
  input  logic rst,
  input  logic trig,    // trigger from the tester
  output logic pulses
);

  logic [2:0] sync;
  logic [1:0] remaining;
  logic       en;

  always_ff @(posedge clk or posedge rst)
    if (rst) begin
      sync      <= '0;
      remaining <= '0;
    end else begin
      sync <= {sync[1:0], trig};
      if (sync[1] && !sync[2])  remaining <= 2'd2;
      else if (remaining != 0)  remaining <= remaining - 2'd1;
    end

  always_ff @(negedge clk or posedge rst)
    if (rst) en <= 1'b0;
    else     en <= (remaining != 0);

  assign pulses = clk & en;

endmodule
