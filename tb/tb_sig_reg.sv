// tb_sig_reg: self-checking testbench of the reconfigurable signature register.
//
// Part 1, 3-bit register with feedback into stages 0 and 1: for each of the
// six delay cases of a five-step measurement (case c = the first c tests
// pass, the rest fail) the response sequence is compacted and the signature
// is unloaded in shift mode.  The expected values are the published example
// table (FF0 FF1 FF2):
//   rising  (pass = 1): 000 011 101 100 110 010
//   falling (pass = 0): 010 001 111 110 100 000
// Part 2, default 8-bit register: random in/sck streams compared with an
// independent bit-level model of x^8+x^4+x^3+x^2+1, unloaded through sgo;
// also checks that sck = 0 freezes the register in both modes.
`timescale 1ns/1fs
module tb_sig_reg;
  logic clk = 0;
  logic rst3, sck3, sge3, in3, sgo3;
  logic rst8, sck8, sge8, in8, sgi8, sgo8;
  int checks = 0, failures = 0;

  sig_reg #(.WIDTH(3), .FB_MASK(3'b011)) u3 (
    .clk, .rst(rst3), .sck(sck3), .sge(sge3), .in(in3), .sgi(1'b0), .sgo(sgo3));
  sig_reg u8 (
    .clk, .rst(rst8), .sck(sck8), .sge(sge8), .in(in8), .sgi(sgi8), .sgo(sgo8));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // published table, index [case], string order FF0 FF1 FF2
  logic [2:0] tab_r [6] = '{3'b000, 3'b011, 3'b101, 3'b100, 3'b110, 3'b010};
  logic [2:0] tab_f [6] = '{3'b010, 3'b001, 3'b111, 3'b110, 3'b100, 3'b000};

  task automatic run3(input int c, input bit rising, output logic [2:0] sig);
    // sig[2] = FF0 ... sig[0] = FF2 so that it reads like the table string
    rst3 = 1; sck3 = 0; sge3 = 1; in3 = 0;
    @(negedge clk); rst3 = 0;
    for (int t = 0; t < 5; t++) begin
      bit pass = (t < c);
      in3 = rising ? pass : !pass;
      sck3 = 1;
      @(negedge clk);
      // an unselected clock between captures must not change the state
      sck3 = 0; in3 = 1'($urandom);
      @(negedge clk);
    end
    sge3 = 0; sck3 = 1;
    for (int b = 0; b < 3; b++) begin
      sig[b] = sgo3;          // FF2 first, then FF1, then FF0
      @(negedge clk);
    end
    sck3 = 0;
  endtask

  // independent model of the 8-bit register
  logic [7:0] m;
  function automatic logic [7:0] lfsr8(logic [7:0] s, logic b);
    logic fb = s[7];
    logic [7:0] n;
    n[0] = b ^ fb;
    n[1] = s[0];
    n[2] = s[1] ^ fb;
    n[3] = s[2] ^ fb;
    n[4] = s[3] ^ fb;
    n[5] = s[4];
    n[6] = s[5];
    n[7] = s[6];
    return n;
  endfunction

  initial begin
    logic [2:0] sig;
    logic [7:0] got;
    rst8 = 1; sck8 = 0; sge8 = 1; in8 = 0; sgi8 = 0;
    // ---- part 1
    for (int c = 0; c < 6; c++) begin
      run3(c, 1'b1, sig);
      checks++;
      if (sig !== tab_r[c]) begin failures++; $display("rising case %0d: %b expected %b", c, sig, tab_r[c]); end
      run3(c, 1'b0, sig);
      checks++;
      if (sig !== tab_f[c]) begin failures++; $display("falling case %0d: %b expected %b", c, sig, tab_f[c]); end
    end
    // ---- part 2
    repeat (20) begin
      rst8 = 1; m = '0;
      @(negedge clk); rst8 = 0; sge8 = 1;
      repeat (40) begin
        sck8 = 1'($urandom); in8 = 1'($urandom);
        if (sck8) m = lfsr8(m, in8);
        @(negedge clk);
      end
      // shift mode with sck = 0 must hold
      sge8 = 0; sck8 = 0; sgi8 = 1;
      repeat (3) @(negedge clk);
      // unload: sgo shows stage 7 first
      sck8 = 1;
      for (int b = 7; b >= 0; b--) begin
        got[b] = sgo8;
        sgi8 = 1'($urandom);
        @(negedge clk);
      end
      sck8 = 0;
      checks++;
      if (got !== m) begin failures++; $display("8-bit signature %h expected %h", got, m); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
