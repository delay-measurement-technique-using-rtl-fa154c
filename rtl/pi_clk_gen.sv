// pi_clk_gen: behavioural model of the phase-interpolator clock generator.
//
// BEHAVIOURAL MODEL, not synthesizable.  The real part is analog/mixed-signal:
// a 4-phase generator, phase interpolators, a phase combiner and a controller
// that together synthesise an output clock of arbitrary width from a 4-phase
// input clock.  This model keeps the ports and the programmable behaviour:
// once clk_ref has started, clk_out runs with period
//     T = T_MAX_FS - cnt * STEP_FS   (limited to T_MIN_FS; times in fs)
// so each increment of cnt shortens the test clock width by one phase step.
// The defaults are the published figures of the generator: output 1 GHz to
// 2 GHz (1000 ps to 500 ps) and a 5.2 ps phase step.  The linear
// cnt-to-period mapping and a single-phase reference input are this model's
// choices.  A new cnt takes effect at the next clock edge.  Jitter, duty-cycle
// and phase controls of the real part are not modelled.  The half-period
// delays depend on cnt at run time, so lint cannot prove them non-zero; they
// are at least T_MIN_FS / 2.
`timescale 1ns/1fs
module pi_clk_gen #(
  parameter int unsigned CNT_W     = 7,
  parameter int unsigned T_MAX_FS  = 1_000_000,   // 1 GHz
  parameter int unsigned T_MIN_FS  = 500_000,     // 2 GHz
  parameter int unsigned STEP_FS   = 5_200        // 5.2 ps phase step
) (
  input  logic             clk_ref,   // input (reference) clock
  input  logic [CNT_W-1:0] cnt,       // clock width control
  output logic             clk_out
);

  realtime period_ns;

  always_comb begin
    if (longint'(cnt) * STEP_FS + longint'(T_MIN_FS) > longint'(T_MAX_FS))
      period_ns = real'(T_MIN_FS) / 1.0e6;
    else
      period_ns = real'(longint'(T_MAX_FS) - longint'(cnt) * STEP_FS) / 1.0e6;
  end

  initial begin
    clk_out = 1'b0;
    @(posedge clk_ref);
    forever begin
      #(period_ns / 2.0) clk_out = 1'b1;
      #(period_ns / 2.0) clk_out = 1'b0;
    end
  end

endmodule
