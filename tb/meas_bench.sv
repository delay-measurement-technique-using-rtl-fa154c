// meas_bench: parameterised measurement bench used by tb_iscas_sizes.
//
// One delay_meas_chip of NUM_FF flip-flops in clusters of N_CL, a ring-shaped
// model circuit (flip-flop i fed by flip-flop i-1 through a path of
// 300.5 + 50 * (7*i mod 18) ps: 18 distinct delays from 300.5 ps to 1150.5 ps,
// few enough that large chips still simulate quickly) and a tester model.  For each of NVEC vectors,
// rising and falling (rising only with BOTH_EDGES = 0), the tester picks one target per cluster, at most one
// per shift position (positions 1..min(30, N_k - 2)), runs the 97-step width
// sweep (1000 ps down to 500.8 ps), unloads all signatures and checks every
// decoded delay bracket against the true path delay.  It also checks the
// tester-clock count of each measurement:
//   NUM_FF (scan-in) + 97 * (1 reload + N_CL shifts) + M * SIG_W (unload).
// done rises when finished; checks/failures count the results.
`timescale 1ns/1fs
module meas_bench #(
  parameter int NUM_FF = 228,
  parameter int N_CL   = 32,
  parameter int NVEC   = 1,
  parameter bit BOTH_EDGES = 1'b1   // 0: rising transitions only
) (
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_paths
);
  localparam int M      = (NUM_FF + N_CL - 1) / N_CL;
  localparam int L      = $clog2(M + 2);
  localparam int SIG_W  = 8;
  localparam int T      = 97;
  localparam realtime TCK_NS = 100.0;

  logic              tck = 0, cs = 0, trg = 0, lck = 0, sge = 0;
  logic [6:0]        cnt = 0;
  logic [1:0]        se = dm_pkg::SE_NORMAL;
  logic [L-1:0]      sc = '0;
  logic              rst_ff = 1, rst_sig = 1, sci = 0, sco, sgo;
  logic              clk_ref = 0;
  logic [NUM_FF-1:0] d_func, q_func;
  int                tck_count = 0;
  int                pulse_edges = 0;

  delay_meas_chip #(.NUM_FF(NUM_FF), .N_CL(N_CL)) dut (
    .tck, .cs, .trg, .cnt, .se, .lck, .sc, .sge, .rst_ff, .rst_sig,
    .sci, .sco, .sgo, .clk_ref, .d_func, .q_func
  );

  for (genvar i = 0; i < NUM_FF; i++) begin : g_path
    localparam real PD_NS = (300.5 + 50.0 * real'((i * 7) % 18)) / 1000.0;
    assign #(PD_NS) d_func[i] = q_func[(i + NUM_FF - 1) % NUM_FF];
  end

  always #0.3333 clk_ref = ~clk_ref;
  always @(posedge dut.fast_clk) pulse_edges++;
  always @(posedge tck) tck_count++;

  function automatic real pd_ps(int i);
    return 300.5 + 50.0 * real'((i * 7) % 18);
  endfunction

  function automatic real width_ps(int c);
    real w = 1000.0 - 5.2 * c;
    return (w < 500.0) ? 500.0 : w;
  endfunction

  function automatic logic [7:0] lfsr8(logic [7:0] s, logic b);
    logic fb = s[7];
    return {s[6], s[5], s[4], s[3] ^ fb, s[2] ^ fb, s[1] ^ fb, s[0], b ^ fb};
  endfunction

  function automatic logic [7:0] table_sig(int c, bit rising);
    logic [7:0] s = '0;
    for (int i = 0; i < T; i++) s = lfsr8(s, rising ? (i < c) : !(i < c));
    return s;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL (NUM_FF=%0d): %s", NUM_FF, what); end
  endtask

  task automatic tck_pulse();
    #(TCK_NS / 2) tck = 1;
    #(TCK_NS / 2) tck = 0;
  endtask

  task automatic measure(input int v, input bit rising);
    logic [NUM_FF-1:0] vec;
    int tgt [M];
    int cap [M];
    bit used [31];
    logic [7:0] sig [M];
    int tck0;
    foreach (used[i]) used[i] = 0;
    for (int k = 0; k < M; k++) begin
      int nk = (k == M - 1) ? NUM_FF - (M - 1) * N_CL : N_CL;
      int lim = (nk - 2 < 30) ? nk - 2 : 30;
      cap[k] = 0;
      for (int p = 0; p < lim && cap[k] == 0; p++) begin
        int c = 1 + (k * 7 + v * 3 + p) % lim;
        if (!used[c]) begin cap[k] = c; used[c] = 1; end
      end
      tgt[k] = (cap[k] == 0) ? -1 : k * N_CL + nk - cap[k];
    end
    for (int b = 0; b < NUM_FF; b++) vec[b] = 1'($urandom);
    for (int k = 0; k < M; k++)
      if (tgt[k] >= 0) begin
        vec[tgt[k] - 2] = rising;
        vec[tgt[k] - 1] = !rising;
      end
    tck0 = tck_count;
    se = dm_pkg::SE_SCAN;
    for (int b = NUM_FF - 1; b >= 0; b--) begin sci = vec[b]; tck_pulse(); end
    check(q_func == vec, "scan-in");
    #10 lck = 1; #10 lck = 0;
    #10 rst_sig = 1; #10 rst_sig = 0;
    sge = 1;
    for (int i = 0; i < T; i++) begin
      int e0;
      cnt = 7'(i);
      se = dm_pkg::SE_LATCH; tck_pulse();
      check(q_func == vec, "latch reload");
      se = dm_pkg::SE_NORMAL; #10 cs = 1;
      e0 = pulse_edges;
      #5 trg = 1; #20 trg = 0; #10;
      check(pulse_edges - e0 == 2, "double pulse");
      cs = 0;
      se = dm_pkg::SE_SCAN;
      for (int c = 1; c <= N_CL; c++) begin
        sc = '0;
        for (int k = 0; k < M; k++) if (cap[k] == c) sc = L'(k + 1);
        tck_pulse();
      end
      sc = '0;
    end
    sge = 0; sc = '1;
    for (int k = M - 1; k >= 0; k--)
      for (int b = SIG_W - 1; b >= 0; b--) begin sig[k][b] = sgo; tck_pulse(); end
    sc = '0;
    check(tck_count - tck0 == NUM_FF + T * (1 + N_CL) + M * SIG_W, "tester clock count");
    for (int k = 0; k < M; k++) begin
      if (tgt[k] < 0) begin
        check(sig[k] == 8'h00, "idle signature register stays at zero");
      end else begin
        real pd = pd_ps(tgt[k]);
        int expc = 0, found = -1, nmatch = 0;
        while (expc < T && pd < width_ps(expc)) expc++;
        for (int c = 0; c <= T; c++)
          if (table_sig(c, rising) == sig[k]) begin found = c; nmatch++; end
        check(nmatch == 1 && found == expc, $sformatf("path to FF %0d: case %0d, expected %0d",
              tgt[k], found, expc));
        n_paths++;
      end
    end
  endtask

  initial begin
    done = 0; checks = 0; failures = 0; n_paths = 0;
    #100 rst_ff = 0; rst_sig = 0;
    for (int v = 0; v < NVEC; v++) begin
      measure(v, 1'b1);
      if (BOTH_EDGES) measure(v, 1'b0);
    end
    done = 1;
  end
endmodule
