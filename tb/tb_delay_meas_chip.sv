// tb_delay_meas_chip: end-to-end testbench of the delay measurement chip at
// its default size (179 flip-flops in six clusters, 8-bit signature
// registers, 1 GHz..2 GHz clock generator with 5.2 ps steps).
//
// Circuit under test (model): a ring in which flip-flop i is fed by
// flip-flop i-1 through a path of known delay PD(i) = 300.5 + (53*i mod 900)
// ps, so paths range from faster than the shortest test clock (500 ps) to
// slower than the normal clock (1000 ps).
//
// Tester (model), per test vector:
//   scan the vector in, check it on the flip-flops, store it in the latches;
//   reset the signature registers; then for cnt = 0, 1, ..., 96 (clock width
//   1000 ps down to 500.8 ps): reload the vector from the latches, fire one
//   double pulse (launch + capture), shift the responses to the cluster
//   tails while the decoder makes each signature register capture its own
//   target bit; finally unload all signatures through sgo.
// Six paths (one per cluster) are measured at once.  The signature of each
// is looked up in a signature table the tester builds from its own LFSR model
// (case c = the first c tests pass), and the delay bracket found is checked
// against the true path delay.  Both rising and falling transitions are
// measured.  First a scan flush test checks the chain through sco, and a
// latch check stores a pattern, overwrites the chain, reloads the pattern
// and scans it out through sco.
// Mechanisms counted (each must occur): flush bits, latch-check bits, latch reloads, double
// pulses, signature captures, signature unloads, passing and failing tests,
// paths slower than the normal clock, paths faster than the shortest clock,
// rising and falling measurements.
`timescale 1ns/1fs
module tb_delay_meas_chip;
  localparam int NUM_FF = 179;
  localparam int N_CL   = 32;
  localparam int M      = 6;
  localparam int L      = 3;
  localparam int SIG_W  = 8;
  localparam int T      = 97;          // tests per measurement: cnt 0..96
  localparam realtime TCK_NS = 100.0;  // 10 MHz tester clock

  logic              tck = 0, cs = 0, trg = 0, lck = 0, sge = 0;
  logic [6:0]        cnt = 0;
  logic [1:0]        se = dm_pkg::SE_NORMAL;
  logic [L-1:0]      sc = '0;
  logic              rst_ff = 1, rst_sig = 1, sci = 0, sco, sgo;
  logic              clk_ref = 0;
  logic [NUM_FF-1:0] d_func, q_func;

  int checks = 0, failures = 0;
  int n_flush = 0, n_latchk = 0, n_reload = 0, n_dpulse = 0, n_capture = 0, n_unload = 0;
  int n_pass = 0, n_fail = 0, n_slow = 0, n_fast = 0, n_rise = 0, n_fall = 0;
  int pulse_edges = 0;

  delay_meas_chip dut (
    .tck, .cs, .trg, .cnt, .se, .lck, .sc, .sge, .rst_ff, .rst_sig,
    .sci, .sco, .sgo, .clk_ref, .d_func, .q_func
  );

  // ---------------------------------------------------------------- CUT model
  function automatic real pd_ps(int i);
    return 300.5 + real'((i * 53) % 900);
  endfunction

  for (genvar i = 0; i < NUM_FF; i++) begin : g_path
    localparam real PD_NS = (300.5 + real'((i * 53) % 900)) / 1000.0;
    assign #(PD_NS) d_func[i] = q_func[(i + NUM_FF - 1) % NUM_FF];
  end

  always #0.3333 clk_ref = ~clk_ref;   // 1.5 GHz reference
  always @(posedge dut.fast_clk) pulse_edges++;

  initial begin
    #50ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %t", what, $realtime); end
  endtask

  task automatic tck_pulse();
    #(TCK_NS / 2) tck = 1;
    #(TCK_NS / 2) tck = 0;
  endtask

  // ------------------------------------------------------------ tester tasks
  task automatic scan_in(input logic [NUM_FF-1:0] v);
    se = dm_pkg::SE_SCAN;
    for (int b = NUM_FF - 1; b >= 0; b--) begin sci = v[b]; tck_pulse(); end
  endtask

  function automatic real width_ps(int c);
    real w = 1000.0 - 5.2 * c;
    return (w < 500.0) ? 500.0 : w;
  endfunction

  // independent model of the 8-bit signature register, x^8+x^4+x^3+x^2+1
  function automatic logic [7:0] lfsr8(logic [7:0] s, logic b);
    logic fb = s[7];
    return {s[6], s[5], s[4], s[3] ^ fb, s[2] ^ fb, s[1] ^ fb, s[0], b ^ fb};
  endfunction

  function automatic logic [7:0] table_sig(int c, bit rising);
    logic [7:0] s = '0;
    for (int i = 0; i < T; i++) begin
      bit pass = (i < c);
      s = lfsr8(s, rising ? pass : !pass);
    end
    return s;
  endfunction

  task automatic measure(input int v, input bit rising);
    logic [NUM_FF-1:0] vec;
    int tgt [M];
    int cap [M];
    logic [7:0] sig [M];
    // targets: one per cluster, captured at distinct shift clocks
    for (int k = 0; k < M; k++) begin
      int nk = (k == M - 1) ? NUM_FF - (M - 1) * N_CL : N_CL;
      cap[k] = (v < 3) ? (1 + 3 * k + v) : (2 + 2 * k);
      tgt[k] = k * N_CL + nk - cap[k];
    end
    // vector: random, with a transition launched into each target path
    for (int b = 0; b < NUM_FF; b++) vec[b] = 1'($urandom);
    for (int k = 0; k < M; k++) begin
      vec[tgt[k] - 2] = rising;
      vec[tgt[k] - 1] = !rising;
    end
    scan_in(vec);
    check(q_func == vec, "scan-in of test vector");
    #10 lck = 1; #10 lck = 0;
    #10 rst_sig = 1; #10 rst_sig = 0;
    sge = 1;
    for (int i = 0; i < T; i++) begin
      int edges0;
      cnt = 7'(i);
      // reload from latches
      se = dm_pkg::SE_LATCH; tck_pulse();
      check(q_func == vec, "latch reload");
      n_reload++;
      // double pulse at the programmed width
      se = dm_pkg::SE_NORMAL; #10 cs = 1;
      edges0 = pulse_edges;
      #5 trg = 1; #20 trg = 0; #10;
      check(pulse_edges - edges0 == 2, "double pulse count");
      n_dpulse++;
      cs = 0;
      // shift responses to the tails; SIG_k captures at shift clock cap[k]
      se = dm_pkg::SE_SCAN;
      for (int c = 1; c <= N_CL; c++) begin
        sc = '0;
        for (int k = 0; k < M; k++)
          if (cap[k] == c) begin sc = L'(k + 1); n_capture++; end
        tck_pulse();
      end
      sc = '0;
    end
    // unload: SIG_(M-1) first, most significant stage first
    sge = 0; sc = '1;
    for (int k = M - 1; k >= 0; k--)
      for (int b = SIG_W - 1; b >= 0; b--) begin
        sig[k][b] = sgo;
        tck_pulse();
      end
    sc = '0; n_unload++;
    if (rising) n_rise++; else n_fall++;
    // look up each signature in the table and check the delay bracket
    for (int k = 0; k < M; k++) begin
      real pd = pd_ps(tgt[k]);
      int expc = 0, found = -1, nmatch = 0;
      while (expc < T && pd < width_ps(expc)) expc++;   // tests that pass
      n_pass += expc;
      n_fail += T - expc;
      for (int c = 0; c <= T; c++)
        if (table_sig(c, rising) == sig[k]) begin found = c; nmatch++; end
      check(nmatch == 1 && found == expc, $sformatf(
            "path to FF %0d (%.1f ps, %s): signature %h -> case %0d, expected case %0d",
            tgt[k], pd, rising ? "rise" : "fall", sig[k], found, expc));
      if (found == 0) n_slow++;
      if (found == T) n_fast++;
      if (found > 0 && found < T)
        $display("path to FF %3d: %7.1f ps measured in (%6.1f, %6.1f] ps, %s",
                 tgt[k], pd, width_ps(found), width_ps(found - 1), rising ? "rise" : "fall");
      else
        $display("path to FF %3d: %7.1f ps measured as %s, %s", tgt[k], pd,
                 found == 0 ? "> 1000 ps" : "< 500.8 ps", rising ? "rise" : "fall");
    end
  endtask

  initial begin
    logic [NUM_FF-1:0] v;
    #100 rst_ff = 0; rst_sig = 0;
    // scan flush: shift a pattern in and out through sco
    for (int b = 0; b < NUM_FF; b++) v[b] = 1'($urandom);
    scan_in(v);
    check(q_func == v, "flush scan-in");
    for (int b = NUM_FF - 1; b >= 0; b--) begin
      check(sco == v[b], "flush scan-out bit");
      n_flush++;
      sci = 0; tck_pulse();
    end
    // latch check through sco: store v, overwrite the chain, reload, scan out
    scan_in(v);
    #10 lck = 1; #10 lck = 0;
    scan_in(~v);
    check(q_func == ~v, "overwrite before latch check");
    se = dm_pkg::SE_LATCH; tck_pulse();
    se = dm_pkg::SE_SCAN;
    for (int b = NUM_FF - 1; b >= 0; b--) begin
      check(sco == v[b], "latch check scan-out bit");
      n_latchk++;
      sci = 0; tck_pulse();
    end
    for (int v_i = 0; v_i < 4; v_i++) begin
      measure(v_i, 1'b1);
      measure(v_i, 1'b0);
    end
    check(n_flush > 0,   "mechanism: scan flush");
    check(n_reload > 0,  "mechanism: latch reload");
    check(n_latchk > 0,  "mechanism: latch check through sco");
    check(n_dpulse > 0,  "mechanism: double pulse");
    check(n_capture > 0, "mechanism: selective signature capture");
    check(n_unload > 0,  "mechanism: signature unload");
    check(n_pass > 0,    "mechanism: passing test");
    check(n_fail > 0,    "mechanism: failing test");
    check(n_slow > 0,    "mechanism: path slower than normal clock");
    check(n_fast > 0,    "mechanism: path faster than shortest clock");
    check(n_rise > 0 && n_fall > 0, "mechanism: rising and falling");
    $display("flush=%0d latchk=%0d reload=%0d dpulse=%0d capture=%0d unload=%0d pass=%0d fail=%0d slow=%0d fast=%0d rise=%0d fall=%0d",
             n_flush, n_latchk, n_reload, n_dpulse, n_capture, n_unload, n_pass, n_fail, n_slow, n_fast, n_rise, n_fall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
