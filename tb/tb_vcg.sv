// tb_vcg: self-checking testbench of the variable clock generator at its
// default settings.  For a sweep of width codes it fires the trigger and
// checks that exactly two pulses come out and that their rising edges are
// 1000 ps - cnt * 5.2 ps apart: the launch-to-capture test clock width.
`timescale 1ns/1fs
module tb_vcg;
  logic clk_ref = 0, rst = 1, trg = 0, pulses;
  logic [6:0] cnt = 0;
  int checks = 0, failures = 0;
  int npulse = 0;
  realtime t_rise [$];

  vcg dut (.clk_ref, .rst, .cnt, .trg, .pulses);

  always #0.3333 clk_ref = ~clk_ref;
  always @(posedge pulses) begin npulse++; t_rise.push_back($realtime); end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime w_ps, exp_ps;
    #5 rst = 0;
    for (int c = 0; c <= 100; c += 4) begin
      cnt = 7'(c);
      #10;
      npulse = 0; t_rise.delete();
      trg = 1; #20; trg = 0; #10;
      exp_ps = 1000.0 - 5.2 * c;
      if (exp_ps < 500.0) exp_ps = 500.0;
      checks++;
      if (npulse != 2) begin
        failures++; $display("cnt=%0d: %0d pulses", c, npulse);
      end else begin
        w_ps = (t_rise[1] - t_rise[0]) * 1000.0;
        checks++;
        if (w_ps < exp_ps - 0.01 || w_ps > exp_ps + 0.01) begin
          failures++; $display("cnt=%0d: width %f ps expected %f ps", c, w_ps, exp_ps);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
