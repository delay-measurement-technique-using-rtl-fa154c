// tb_clk_sel: exhaustive self-checking testbench of the clock select:
// cs = 1 must pass the fast clock, cs = 0 the tester clock.
`timescale 1ns/1fs
module tb_clk_sel;
  logic cs, fast_clk, tck, clk;
  int checks = 0, failures = 0;

  clk_sel dut (.cs, .fast_clk, .tck, .clk);

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {cs, fast_clk, tck} = 3'(v);
      #1;
      checks++;
      if (clk !== (cs ? fast_clk : tck)) begin
        failures++;
        $display("cs=%b fast=%b tck=%b: clk=%b", cs, fast_clk, tck, clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
