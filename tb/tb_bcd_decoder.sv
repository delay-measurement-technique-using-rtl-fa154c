// tb_bcd_decoder: exhaustive self-checking testbench of the capture-control
// decoder at its default size (M = 6 registers, L = 3 code lines).
// Expected: code 0 none, code k (1..M) one-hot bit k-1, all-ones every bit,
// any other code none.
`timescale 1ns/1fs
module tb_bcd_decoder;
  localparam int M = 6;
  localparam int L = 3;
  logic [L-1:0] sc;
  logic [M-1:0] sck, exp_sck;
  int checks = 0, failures = 0;

  bcd_decoder dut (.sc, .sck);

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < (1 << L); c++) begin
      sc = L'(c);
      if (c == (1 << L) - 1)       exp_sck = '1;
      else if (c >= 1 && c <= M)   exp_sck = M'(1) << (c - 1);
      else                         exp_sck = '0;
      #1;
      checks++;
      if (sck !== exp_sck) begin
        failures++;
        $display("sc=%0d: sck=%b expected %b", c, sck, exp_sck);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
