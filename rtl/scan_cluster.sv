// scan_cluster: one cluster CL_k of measurement scan flip-flops.
//
// N measurement scan flip-flops (k,0)..(k,N-1), each with its own extra
// test-vector latch, chained into one scan segment: si enters flip-flop 0,
// the output of flip-flop j drives the scan input of flip-flop j+1, and the
// tail flip-flop N-1 drives so.  so goes both to the head of the next cluster
// and to the serial input of the cluster's signature register, so the
// response captured by flip-flop j reaches that register after N-j shift
// clocks.  d/q are the functional connections to the circuit under test.
// Structure follows the published measurement system; one latch per
// flip-flop is the basic (unshared) form.
// Timing: all flip-flops share clk, se and rst; the latches share lck.
`timescale 1ns/1fs
module scan_cluster #(
  parameter int unsigned N = 32
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [1:0]   se,    // {se1, se0}, see scan_ff
  input  logic         lck,
  input  logic         si,
  input  logic [N-1:0] d,
  output logic [N-1:0] q,
  output logic         so
);

  logic [N-1:0] lat;
  logic [N:0]   chain;

  assign chain[0] = si;

  for (genvar j = 0; j < N; j++) begin : g_cell
    scan_ff u_ff (
      .clk   (clk),
      .rst   (rst),
      .se    (se),
      .d     (d[j]),
      .si    (chain[j]),
      .latch (lat[j]),
      .q     (q[j])
    );
    tv_latch u_lat (
      .lck (lck),
      .d   (q[j]),
      .q   (lat[j])
    );
    assign chain[j+1] = q[j];
  end

  assign so = chain[N];

endmodule
