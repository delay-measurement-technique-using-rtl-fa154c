// tb_s38584_size: the measurement at the flip-flop count of the evaluated
// benchmark circuit s38584: 1426 flip-flops in 44 clusters of 32 and one of
// 18, with a 6-line capture decoder for the 45 signature registers.  There
// are more clusters than shift positions, so one vector measures at most 30
// paths at once (one per position); the other registers must keep a zero
// signature.  One vector, rising transitions, full 97-step width sweep; every
// decoded delay bracket and the tester-clock count are checked (see
// meas_bench).
`timescale 1ns/1fs
module tb_s38584_size;
  logic done;
  int bench_checks, bench_failures, n_paths;
  int checks = 0, failures = 0;

  meas_bench #(.NUM_FF(1426), .NVEC(1), .BOTH_EDGES(1'b0)) u_s38584 (
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
    $display("1426 flip-flops: %0d paths measured", n_paths);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
