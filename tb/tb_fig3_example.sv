// tb_fig3_example: the worked example of the method, run through the whole
// chip.  Six copies of a 3-flip-flop chip (one cluster, 3-bit signature
// register with feedback into stages 0 and 1) are driven by one tester
// model in parallel.  In each copy the path FF0 -> FF1 has a different delay
// (11, 9, 7, 5, 3, 1 ns), one per delay case.  The clock generator is set to
// a 10 ns normal width and a 2 ns step, and the path is tested five times at
// 10, 8, 6, 4, 2 ns; after each test the response of FF1 is shifted to the
// signature register with two clocks.  The six retrieved signatures must
// equal the published signature table (FF0 FF1 FF2):
//   rising  : 000 011 101 100 110 010   (delay > 10, 8-10, ..., 0-2 ns)
//   falling : 010 001 111 110 100 000
`timescale 1ns/1fs
module tb_fig3_example;
  localparam int NCASE = 6;
  localparam realtime TCK_NS = 100.0;

  logic       tck = 0, cs = 0, trg = 0, lck = 0, sge = 0;
  logic [2:0] cnt = 0;
  logic [1:0] se = dm_pkg::SE_NORMAL;
  logic [1:0] sc = '0;
  logic       rst_ff = 1, rst_sig = 1, sci = 0, clk_ref = 0;
  logic [NCASE-1:0] sco, sgo;
  logic [2:0] d_func [NCASE];
  logic [2:0] q_func [NCASE];
  int checks = 0, failures = 0;
  int pulses_seen = 0;

  logic [2:0] tab_r [NCASE] = '{3'b000, 3'b011, 3'b101, 3'b100, 3'b110, 3'b010};
  logic [2:0] tab_f [NCASE] = '{3'b010, 3'b001, 3'b111, 3'b110, 3'b100, 3'b000};

  for (genvar c = 0; c < NCASE; c++) begin : g_chip
    localparam real PD_NS = 11.0 - 2.0 * c;   // path FF0 -> FF1
    delay_meas_chip #(
      .NUM_FF(3), .N_CL(3), .SIG_W(3), .SIG_FB_MASK(3'b011), .CNT_W(3),
      .T_MAX_FS(10_000_000), .T_MIN_FS(2_000_000), .STEP_FS(2_000_000)
    ) dut (
      .tck, .cs, .trg, .cnt, .se, .lck, .sc, .sge, .rst_ff, .rst_sig,
      .sci, .sco(sco[c]), .sgo(sgo[c]), .clk_ref,
      .d_func(d_func[c]), .q_func(q_func[c])
    );
    // ring: FF0 <- FF2, FF1 <- FF0 (measured path), FF2 <- FF1
    assign #0.5     d_func[c][0] = q_func[c][2];
    assign #(PD_NS) d_func[c][1] = q_func[c][0];
    assign #0.5     d_func[c][2] = q_func[c][1];
  end

  always #0.3333 clk_ref = ~clk_ref;
  always @(posedge g_chip[0].dut.fast_clk) pulses_seen++;

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic tck_pulse();
    #(TCK_NS / 2) tck = 1;
    #(TCK_NS / 2) tck = 0;
  endtask

  task automatic run(input bit rising);
    logic [2:0] vec;
    logic [2:0] sig [NCASE];
    // launch FF0 from FF2: rising needs FF2 = 1, FF0 = 0
    vec = rising ? 3'b100 : 3'b011;
    se = dm_pkg::SE_SCAN;
    for (int b = 2; b >= 0; b--) begin sci = vec[b]; tck_pulse(); end
    #10 lck = 1; #10 lck = 0;
    #10 rst_sig = 1; #10 rst_sig = 0;
    sge = 1;
    for (int t = 0; t < 5; t++) begin
      int p0;
      cnt = 3'(t);                        // 10, 8, 6, 4, 2 ns
      se = dm_pkg::SE_LATCH; tck_pulse();            // reload from latches
      se = dm_pkg::SE_NORMAL; #10 cs = 1;
      p0 = pulses_seen;
      #5 trg = 1; #100 trg = 0; #20;
      checks++;
      if (pulses_seen - p0 != 2) begin failures++; $display("double pulse missing"); end
      cs = 0;
      se = dm_pkg::SE_SCAN;                         // two shift clocks, capture on the 2nd
      sc = 2'd0; tck_pulse();
      sc = 2'd1; tck_pulse();
      sc = 2'd0;
    end
    sge = 0; sc = 2'b11;
    for (int b = 0; b < 3; b++) begin     // sgo shows FF2, FF1, FF0
      for (int c = 0; c < NCASE; c++) sig[c][b] = sgo[c];
      tck_pulse();
    end
    sc = '0;
    for (int c = 0; c < NCASE; c++) begin
      logic [2:0] exp = rising ? tab_r[c] : tab_f[c];
      checks++;
      if (sig[c] !== exp) begin
        failures++;
        $display("case %0d %s: signature %b expected %b", c, rising ? "rise" : "fall", sig[c], exp);
      end else
        $display("case %0d (path %0d ns) %s: signature %b", c, 11 - 2 * c, rising ? "rise" : "fall", sig[c]);
    end
  endtask

  initial begin
    #100 rst_ff = 0; rst_sig = 0;
    run(1'b1);
    run(1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
