// scan_ff: measurement scan flip-flop.
//
// A D flip-flop preceded by two cascaded 2:1 multiplexers.  The first mux,
// steered by se[1], picks the scan input si (1) or the test-vector bit coming
// from the flip-flop's extra latch (0).  The second mux, steered by se[0], picks
// the first mux's output (1) or the functional data D (0).  So:
//   se0 = 0          normal mode, captures D
//   se0 = 1, se1 = 1 scan mode, captures si
//   se0 = 1, se1 = 0 reload mode, captures the stored test-vector bit
// This mux structure and the mode table follow the published scan cell.  The
// output Q also serves as scan output so.  The asynchronous active-high reset
// is this design's choice (the chip has a reset line for its flip-flops; its
// polarity and timing are not specified).
// Timing: one rising clk edge per capture, no combinational path from inputs
// to q.
`timescale 1ns/1fs
module scan_ff (
  input  logic       clk,
  input  logic       rst,
  input  logic [1:0] se,     // {se1, se0}
  input  logic       d,
  input  logic       si,
  input  logic       latch,
  output logic       q
);

  logic upper_mux, lower_mux;

  always_comb begin
    upper_mux = se[1] ? si : latch;
    lower_mux = se[0] ? upper_mux : d;
  end

  always_ff @(posedge clk or posedge rst)
    if (rst) q <= 1'b0;
    else     q <= lower_mux;

endmodule
