// tb_scan_cluster: self-checking testbench of one scan cluster (N = 8).
// 1. scan-in of a random vector, checked on q and, by shifting it out, on so;
// 2. lck stores the vector in the latches;
// 3. a normal-mode capture of random functional data overwrites q;
// 4. one latch-load clock must restore the stored vector, repeatedly;
// 5. the response captured by flip-flop j reaches so after N-1-j shifts.
`timescale 1ns/1fs
module tb_scan_cluster;
  localparam int N = 8;
  logic clk = 0, rst = 1, lck = 0, si = 0, so;
  logic [1:0] se = dm_pkg::SE_NORMAL;
  logic [N-1:0] d = '0, q, vec, fdata;
  int checks = 0, failures = 0;

  scan_cluster #(.N(N)) dut (.clk, .rst, .se, .lck, .si, .d, .q, .so);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic tick();
    #5 clk = 1; #5 clk = 0;
  endtask

  task automatic check(input logic [N-1:0] got, input logic [N-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("%s: %b expected %b", what, got, exp); end
  endtask

  initial begin
    logic [N-1:0] shifted;
    #3 rst = 0;
    repeat (10) begin
      vec = N'($urandom);
      // 1. scan in: the bit for flip-flop N-1 goes first
      se = dm_pkg::SE_SCAN;
      for (int b = N-1; b >= 0; b--) begin si = vec[b]; tick(); end
      check(q, vec, "scan-in");
      // 2. store in latches
      #2 lck = 1; #2 lck = 0;
      // 3. functional capture
      fdata = N'($urandom);
      d = fdata; se = dm_pkg::SE_NORMAL; tick();
      check(q, fdata, "normal capture");
      // 4. reload, twice, with a capture in between
      repeat (2) begin
        se = dm_pkg::SE_LATCH; tick();
        check(q, vec, "latch reload");
        d = ~vec; se = dm_pkg::SE_NORMAL; tick();
        check(q, ~vec, "capture after reload");
      end
      // 5. shift out the captured response: so shows flip-flop N-1-s after s shifts
      se = dm_pkg::SE_SCAN;
      for (int s = 0; s < N; s++) begin
        shifted[N-1-s] = so;
        si = 1'($urandom);
        tick();
      end
      check(shifted, ~vec, "scan-out");
      // latches still hold the vector
      se = dm_pkg::SE_LATCH; tick();
      check(q, vec, "latch retention");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
