// tb_tv_latch: self-checking testbench of the test-vector latch.
// Checks that the latch follows d while lck is high and holds the value
// captured at the falling edge of lck while d keeps changing.
`timescale 1ns/1fs
module tb_tv_latch;
  logic lck = 0, d = 0, q;
  logic held;
  int checks = 0, failures = 0;

  tv_latch dut (.lck, .d, .q);

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50) begin
      // transparent phase
      lck = 1;
      repeat (3) begin
        d = 1'($urandom); #1;
        checks++; if (q !== d) begin failures++; $display("transparent: q=%b d=%b", q, d); end
      end
      held = d;
      lck = 0; #1;
      // hold phase: d toggles, q must not follow
      repeat (4) begin
        d = ~d; #1;
        checks++; if (q !== held) begin failures++; $display("hold: q=%b expected %b", q, held); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
