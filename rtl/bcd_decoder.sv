// bcd_decoder: capture-control decoder for the signature registers.
//
// The tester drives an L-bit code on sc; the decoder turns it into the M
// capture enables sck[M-1:0], one per signature register, so that the tester
// needs L = clog2(M+2) lines instead of M.
//   code 0          : no register captures
//   code k, 1..M    : only register k-1 captures
//   code all-ones   : every register is enabled (used to unload the chained
//                     registers in shift mode)
//   other codes     : none
// That a decoder reduces the control lines is from the published system; the
// code assignment above is this design's own choice.  Purely combinational.
`timescale 1ns/1fs
module bcd_decoder #(
  parameter int unsigned M = 6,
  parameter int unsigned L = $clog2(M + 2)
) (
  input  logic [L-1:0] sc,
  output logic [M-1:0] sck
);

  initial assert (M + 1 < (1 << L)) else $error("bcd_decoder: L too small for M");

  always_comb begin
    sck = '0;
    if (sc == {L{1'b1}})
      sck = '1;
    else
      for (int k = 0; k < M; k++)
        if (sc == L'(k + 1)) sck[k] = 1'b1;
  end

endmodule
