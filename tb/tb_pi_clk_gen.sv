// tb_pi_clk_gen: self-checking testbench of the phase-interpolator clock
// generator model at its default settings.  For several control words it
// measures the output period over 8 cycles and compares it with
// 1000 ps - cnt * 5.2 ps, limited to 500 ps (2 GHz); it also checks that the
// output stays idle until the reference clock starts.
`timescale 1ns/1fs
module tb_pi_clk_gen;
  logic clk_ref = 0, clk_out;
  logic [6:0] cnt = 0;
  int checks = 0, failures = 0;
  int edges = 0;

  pi_clk_gen dut (.clk_ref, .cnt, .clk_out);

  always @(posedge clk_out) edges++;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int codes [6] = '{0, 1, 10, 50, 96, 127};
    realtime t0, t1, meas, exp_ps;
    #20;
    checks++;
    if (edges != 0) begin failures++; $display("clock ran before the reference started"); end
    fork
      forever #0.3333 clk_ref = ~clk_ref;   // 1.5 GHz reference
    join_none
    foreach (codes[i]) begin
      cnt = 7'(codes[i]);
      repeat (3) @(posedge clk_out);        // let the new width take effect
      t0 = $realtime;
      repeat (8) @(posedge clk_out);
      t1 = $realtime;
      meas = (t1 - t0) / 8.0 * 1000.0;      // ps
      exp_ps = 1000.0 - 5.2 * codes[i];
      if (exp_ps < 500.0) exp_ps = 500.0;
      checks++;
      if (meas < exp_ps - 0.01 || meas > exp_ps + 0.01) begin
        failures++;
        $display("cnt=%0d: period %f ps expected %f ps", codes[i], meas, exp_ps);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
