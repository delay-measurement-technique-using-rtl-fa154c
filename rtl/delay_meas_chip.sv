// delay_meas_chip: chip side of the signature-based path delay measurement.
//
// The NUM_FF flip-flops of the circuit under test are replaced by measurement
// scan flip-flops, each with an extra latch holding its test-vector bit, and
// are split into M = ceil(NUM_FF / N_CL) clusters of N_CL flip-flops (the
// last cluster takes the remainder).  The clusters form one scan chain
// sci -> CL_0 -> ... -> CL_(M-1) -> sco.  The tail of every cluster also feeds
// the serial input of that cluster's signature register SIG_k, so a path
// ending in flip-flop (k,j) is measured by SIG_k, and up to M paths can be
// measured at once.  The signature registers chain SIG_0 -> ... -> SIG_(M-1)
// -> sgo for unloading.  A decoder turns the L-bit code sc into the M capture
// enables.  One clock line drives all flip-flops and signature registers: the
// slow tester clock tck (cs = 0) or the double pulse of the on-chip variable
// clock generator (cs = 1), whose width is set by cnt and which fires on trg.
//
// One measurement of a test vector (already held in the latches), repeated
// with the clock width shortened by one step each time:
//   1. se = latch-load, one tck       : vector reloaded from the latches
//   2. se = normal, cs = 1, trg       : launch pulse, capture pulse
//   3. se = scan, sge = 1, N_CL tck   : responses shift to the cluster tails;
//      sc selects which SIG captures at which clock (target (k,j) at the
//      (N_k - j)-th clock)
// After the last repetition: sge = 0, sc = all-ones, M*SIG_W tck unload the
// signatures on sgo; the tester compares them with the signature table.
// d_func / q_func are the functional connections to the combinational logic
// of the circuit under test, which is outside this block.
// Follows the published measurement system; the reset polarity, the use of
// rst_ff for the 2-pulse generator too, the decoder code and SIG_0's shift
// input tied low are this design's choices.  NUM_FF = 179 is the flip-flop
// count of the smallest evaluated benchmark circuit (s5378); N_CL = 32 is a
// choice.  Contains the behavioural clock-generator model, so the top as a
// whole is for simulation; every other block is synthesizable.
`timescale 1ns/1fs
module delay_meas_chip #(
  parameter int unsigned      NUM_FF      = 179,
  parameter int unsigned      N_CL        = 32,
  parameter int unsigned      SIG_W       = 8,
  parameter logic [SIG_W-1:0] SIG_FB_MASK = dm_pkg::SIG8_FB_MASK,
  parameter int unsigned      CNT_W       = 7,
  parameter int unsigned T_MAX_FS = 1_000_000,
  parameter int unsigned T_MIN_FS = 500_000,
  parameter int unsigned STEP_FS  = 5_200,
  localparam int unsigned     M           = (NUM_FF + N_CL - 1) / N_CL,
  localparam int unsigned     L           = $clog2(M + 2)
) (
  // tester side
  input  logic              tck,       // slow tester clock
  input  logic              cs,        // 1: fast double pulse, 0: tck
  input  logic              trg,       // double-pulse trigger
  input  logic [CNT_W-1:0]  cnt,       // double-pulse width control
  input  logic [1:0]        se,        // {se1, se0} scan flip-flop mode
  input  logic              lck,       // test-vector latch enable
  input  logic [L-1:0]      sc,        // encoded signature capture control
  input  logic              sge,       // 1: signature mode, 0: shift mode
  input  logic              rst_ff,    // reset of flip-flops
  input  logic              rst_sig,   // reset of signature registers
  input  logic              sci,       // scan in
  output logic              sco,       // scan out
  output logic              sgo,       // signature out
  // on-chip reference clock of the clock generator
  input  logic              clk_ref,
  // circuit under test
  input  logic [NUM_FF-1:0] d_func,
  output logic [NUM_FF-1:0] q_func
);

  logic         fast_clk, clk;
  logic [M-1:0] sck;
  logic [M:0]   scan_link;
  logic [M:0]   sig_link;
  logic [M-1:0] tail;

  vcg #(
    .CNT_W(CNT_W), .T_MAX_FS(T_MAX_FS), .T_MIN_FS(T_MIN_FS), .STEP_FS(STEP_FS)
  ) u_vcg (
    .clk_ref (clk_ref),
    .rst     (rst_ff),
    .cnt     (cnt),
    .trg     (trg),
    .pulses  (fast_clk)
  );

  clk_sel u_clk_sel (
    .cs       (cs),
    .fast_clk (fast_clk),
    .tck      (tck),
    .clk      (clk)
  );

  bcd_decoder #(.M(M), .L(L)) u_dec (
    .sc  (sc),
    .sck (sck)
  );

  assign scan_link[0] = sci;
  assign sig_link[0]  = 1'b0;

  for (genvar k = 0; k < M; k++) begin : g_cl
    localparam int unsigned NK = (k == M - 1) ? NUM_FF - (M - 1) * N_CL : N_CL;

    scan_cluster #(.N(NK)) u_cluster (
      .clk (clk),
      .rst (rst_ff),
      .se  (se),
      .lck (lck),
      .si  (scan_link[k]),
      .d   (d_func[k*N_CL +: NK]),
      .q   (q_func[k*N_CL +: NK]),
      .so  (tail[k])
    );
    assign scan_link[k+1] = tail[k];

    sig_reg #(.WIDTH(SIG_W), .FB_MASK(SIG_FB_MASK)) u_sig (
      .clk (clk),
      .rst (rst_sig),
      .sck (sck[k]),
      .sge (sge),
      .in  (tail[k]),
      .sgi (sig_link[k]),
      .sgo (sig_link[k+1])
    );
  end

  assign sco = scan_link[M];
  assign sgo = sig_link[M];

endmodule
