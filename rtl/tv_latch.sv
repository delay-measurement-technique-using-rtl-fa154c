// tv_latch: extra test-vector latch attached to one measurement scan flip-flop.
//
// A level-sensitive latch: while lck is high it follows the flip-flop output,
// when lck falls it keeps the last value.  After a test vector has been scanned
// in, one lck pulse copies it into the latches; from then on every repetition
// of the test reloads the vector from here in a single clock instead of a full
// scan-in.  One latch per flip-flop, as in the basic form of the method.
// Interface: d is the flip-flop's Q, q goes to the flip-flop's latch input.
// Timing: lck must be pulsed while the flip-flops are stable (clock low).
// The latch is intentional: it is the storage element of this block.  When
// the cell is inlined into a cluster, Verilator may report that it finds no
// latch here; the level-sensitive storage is nevertheless what is meant.
`timescale 1ns/1fs
module tv_latch (
  input  logic lck,
  input  logic d,
  output logic q
);

  always_latch
    if (lck) q = d;

endmodule
