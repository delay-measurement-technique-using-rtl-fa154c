// tb_two_pulse_gen: self-checking testbench of the 2-pulse generator.
// Runs the clock at several periods; for each trigger edge it counts the
// output pulses (must be 2), checks that their rising edges are one clock
// period apart, that each pulse is a whole clock high phase and that the
// first pulse comes 3 to 4 periods after the trigger.  Without a trigger edge
// (trigger held high or low) no pulse may appear.
`timescale 1ns/1fs
module tb_two_pulse_gen;
  logic clk = 0, rst = 1, trig = 0, pulses;
  realtime half = 0.5;
  int checks = 0, failures = 0;
  int npulse = 0;
  realtime t_rise [$];
  realtime t_fall [$];

  two_pulse_gen dut (.clk, .rst, .trig, .pulses);

  always #(half) clk = ~clk;

  always @(posedge pulses) begin npulse++; t_rise.push_back($realtime); end
  always @(negedge pulses) t_fall.push_back($realtime);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("%s failed at %t", what, $realtime); end
  endtask

  initial begin
    realtime period, t_trig;
    #3.3 rst = 0;
    for (int p = 0; p < 4; p++) begin
      half = (p == 0) ? 0.5 : (p == 1) ? 0.25 : (p == 2) ? 0.4321 : 5.0;
      period = 2 * half;
      #(20 * period);
      npulse = 0; t_rise.delete(); t_fall.delete();
      t_trig = $realtime;
      trig = 1;
      #(10 * period);
      check(npulse == 2, "two pulses");
      if (t_rise.size() == 2 && t_fall.size() == 2) begin
        check(t_rise[1] - t_rise[0] > period - 0.001 && t_rise[1] - t_rise[0] < period + 0.001,
              "pulse spacing");
        check(t_fall[0] - t_rise[0] > half - 0.001 && t_fall[0] - t_rise[0] < half + 0.001,
              "pulse width");
        check(t_rise[0] - t_trig > 3 * period - 0.001 && t_rise[0] - t_trig < 4 * period + 0.001,
              "trigger latency");
      end else check(0, "pulse edges");
      // trigger held high: nothing more
      npulse = 0;
      #(10 * period);
      check(npulse == 0, "no pulse while trigger stays high");
      trig = 0;
      #(10 * period);
      check(npulse == 0, "no pulse on falling trigger");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
