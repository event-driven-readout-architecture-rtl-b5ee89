// tb_edw_output: self-checking test of the output circuit. Random bus words
// (some equal to the empty pattern) are latched every 16 cycles; the word,
// its empty flag and the 14 serial bits (MSB first, frame on the first bit)
// are compared with the bus value sampled at the latch edge.
module tb_edw_output;
  timeunit 1ns; timeprecision 1ps;
  localparam int DW = 14, P = 16;
  localparam logic [DW-1:0] EMPTY = 14'h3FC0;

  logic clk = 0, rst_n = 0, latch_en = 0;
  logic [DW-1:0] bus = 0, word;
  logic word_stb, word_empty, sdo, sfrm;
  int checks = 0, failures = 0;

  edw_output #(.DW(DW), .EMPTY(EMPTY)) dut (.*);
  always #1 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  initial begin
    logic [DW-1:0] exp;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 60; i++) begin
      repeat (P - 1) @(posedge clk);
      exp = (i % 4 == 0) ? EMPTY : DW'($urandom);
      bus <= exp; latch_en <= 1;
      @(posedge clk);
      latch_en <= 0; bus <= DW'($urandom);     // bus changes after the latch edge
      #0.1;
      check(word_stb && word == exp, "word latched before the bus changes");
      check(word_empty == (exp == EMPTY), "empty flag");
      for (int b = DW - 1; b >= 0; b--) begin
        check(sdo == exp[b], $sformatf("serial bit %0d", b));
        check(sfrm == (b == DW - 1), "frame marker");
        @(posedge clk); #0.1;
        if (b == DW - 1) check(!word_stb, "strobe one cycle");
      end
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
