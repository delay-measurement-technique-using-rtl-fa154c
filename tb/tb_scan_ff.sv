// tb_scan_ff: self-checking testbench of the measurement scan flip-flop.
// Drives random mode, D, si and latch values and compares q after every
// rising clock edge with the mode table (se0=0: D, se0=1/se1=1: si,
// se0=1/se1=0: latch); also checks the asynchronous reset.
`timescale 1ns/1fs
module tb_scan_ff;
  logic clk = 0, rst = 1;
  logic [1:0] se;
  logic d, si, latch, q, exp_q;
  int checks = 0, failures = 0;

  scan_ff dut (.clk, .rst, .se, .d, .si, .latch, .q);

  always #5 clk = ~clk;

  initial begin
    #2000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    se = 0; d = 1; si = 1; latch = 1;
    #1;
    checks++; if (q !== 1'b0) begin failures++; $display("reset: q=%b", q); end
    @(negedge clk); rst = 0;
    repeat (100) begin
      se = 2'($urandom); d = 1'($urandom); si = 1'($urandom); latch = 1'($urandom);
      exp_q = !se[0] ? d : (se[1] ? si : latch);
      @(posedge clk); #1;
      checks++;
      if (q !== exp_q) begin
        failures++;
        $display("se=%b d=%b si=%b latch=%b: q=%b expected %b", se, d, si, latch, q, exp_q);
      end
      @(negedge clk);
    end
    // asynchronous reset in the middle of a cycle
    se = 2'b00; d = 1; @(posedge clk); #1;
    rst = 1; #1;
    checks++; if (q !== 1'b0) begin failures++; $display("async reset failed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
