// tb_iscas_sizes: the measurement at the flip-flop count of the evaluated
// benchmark circuit s9234: 228 flip-flops in 7 clusters of 32 and a short
// last cluster of 4, so eight paths are measured at once.  Two vectors, rising and falling, each through the full 97-step
// width sweep; every decoded delay bracket and the tester-clock count of each
// measurement are checked (see meas_bench).
`timescale 1ns/1fs
module tb_iscas_sizes;
  logic done;
  int bench_checks, bench_failures, n_paths;
  int checks = 0, failures = 0;

  meas_bench #(.NUM_FF(228), .NVEC(2)) u_s9234 (
    .done(done), .checks(bench_checks), .failures(bench_failures), .n_paths(n_paths));

  initial begin
    #30ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    wait (done);
    checks = bench_checks + 1;
    failures = bench_failures + ((n_paths == 0) ? 1 : 0);
    $display("228 flip-flops: %0d paths measured", n_paths);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
