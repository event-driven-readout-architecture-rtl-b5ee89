// tb_edw_token_gen: self-checking test of the token generator. For several
// (div, high) settings the clko period and high time are measured in clk
// cycles, and latch_en must be high exactly in the cycle before each clko
// rising edge.
module tb_edw_token_gen;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 0, rst_n = 0;
  logic [7:0] div, high;
  logic clko, latch_en;
  int checks = 0, failures = 0;

  edw_token_gen #(.DIVW(8)) dut (.*);
  always #1 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  int cyc = 0, last_rise = -1, last_latch = -1, hi_cnt = 0;
  int periods [$];
  int highs [$];
  logic clko_q = 0;
  always @(posedge clk) begin
    cyc++;
    if (clko && !clko_q) begin
      if (last_rise >= 0) periods.push_back(cyc - last_rise);
      last_rise = cyc;
      if (rst_n) check(last_latch == cyc - 1, "latch_en in the cycle before the token");
    end
    if (!clko && clko_q) highs.push_back(hi_cnt);
    hi_cnt = clko ? hi_cnt + 1 : 0;
    if (latch_en) last_latch = cyc;
    clko_q = clko;
  end

  initial begin
    int settings [4][2] = '{'{16, 8}, '{14, 3}, '{5, 2}, '{40, 37}};
    foreach (settings[i]) begin
      rst_n = 0; div = 8'(settings[i][0]); high = 8'(settings[i][1]);
      repeat (3) @(posedge clk);
      check(!clko, "clko low in reset");
      periods.delete(); highs.delete(); last_rise = -1;
      rst_n = 1;
      repeat (settings[i][0] * 6) @(posedge clk);
      check(periods.size() >= 4, "tokens generated");
      foreach (periods[j]) check(periods[j] == settings[i][0], $sformatf("period %0d", periods[j]));
      foreach (highs[j]) check(highs[j] == settings[i][1], $sformatf("high time %0d", highs[j]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
