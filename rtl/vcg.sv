// vcg: on-chip variable clock generator.
//
// BEHAVIOURAL MODEL as a whole, because it contains the phase-interpolator
// clock generator model (pi_clk_gen); its second half, the 2-pulse generator
// (two_pulse_gen), is synthesizable RTL.  cnt sets the width of the test
// clock; a rising edge of trg makes the generator emit one double pulse on
// pulses whose two rising edges are one programmed clock width apart: the
// first pulse launches the transition, the second captures it.
// Structure (clock generator feeding the 2-pulse generator, trigger input,
// width control) follows the published generator; see the two sub-blocks for
// the modelling choices.  rst clears the 2-pulse generator only.
`timescale 1ns/1fs
module vcg #(
  parameter int unsigned CNT_W    = 7,
  parameter int unsigned T_MAX_FS = 1_000_000,
  parameter int unsigned T_MIN_FS = 500_000,
  parameter int unsigned STEP_FS  = 5_200
) (
  input  logic             clk_ref,
  input  logic             rst,
  input  logic [CNT_W-1:0] cnt,
  input  logic             trg,
  output logic             pulses
);

  logic clk_var;

  pi_clk_gen #(
    .CNT_W(CNT_W), .T_MAX_FS(T_MAX_FS), .T_MIN_FS(T_MIN_FS), .STEP_FS(STEP_FS)
  ) u_pi (
    .clk_ref (clk_ref),
    .cnt     (cnt),
    .clk_out (clk_var)
  );

  two_pulse_gen u_2p (
    .clk    (clk_var),
    .rst    (rst),
    .trig   (trg),
    .pulses (pulses)
  );

endmodule
