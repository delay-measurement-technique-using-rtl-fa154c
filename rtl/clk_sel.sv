// clk_sel: clock select of the measurement system.
//
// cs = 1 routes the fast double pulse from the variable clock generator to the
// clock line of the scan flip-flops and signature registers; cs = 0 routes the
// slow tester clock tck.  The select polarity follows the published system;
// that it is a plain combinational multiplexer is this design's choice, so the
// tester must change cs only while both clocks are low (the double-pulse output
// is low between triggers and tck is held low), which keeps the clock line
// free of glitches.
`timescale 1ns/1fs
module clk_sel (
  input  logic cs,
  input  logic fast_clk,
  input  logic tck,
  output logic clk
);

  assign clk = cs ? fast_clk : tck;

endmodule
