// tb_edw_seitz_arbiter: self-checking test of the Seitz arbiter model.
// Checks: a lone request is granted after T_RES; the first of two requests
// wins and the second is granted only after the first is released;
// simultaneous requests are resolved (after the extra metastability time)
// to exactly one grant; grants are never both high.
module tb_edw_seitz_arbiter;
  timeunit 1ns; timeprecision 1ps;

  logic r0 = 0, r1 = 0, g0, g1;
  int   checks = 0, failures = 0;

  edw_seitz_arbiter #(.T_RES_PS(100), .T_META_PS(300)) dut (.r0, .r1, .g0, .g1);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  always @(g0 or g1) if (g0 && g1) begin failures++; $display("FAIL: both grants"); end

  int n0, n1;
  initial begin
    #1;
    // lone request on r0: grant after 100 ps, not before
    r0 = 1; #0.05; check(!g0, "no grant before T_RES"); #0.06;
    check(g0 && !g1, "r0 granted after T_RES");
    r0 = 0; #0.2; check(!g0, "g0 released");
    // r1 first, r0 later: r1 wins, r0 waits
    r1 = 1; #0.05; r0 = 1; #0.2;
    check(g1 && !g0, "first arrival (r1) wins");
    #1; check(g1 && !g0, "r0 keeps waiting while r1 holds");
    r1 = 0; #0.15; check(!g1, "g1 released");
    #0.1; check(g0, "waiting r0 granted after release");
    r0 = 0; #0.3;
    // simultaneous requests: exactly one grant after T_META + T_RES
    n0 = 0; n1 = 0;
    repeat (20) begin
      r0 = 1; r1 = 1;
      #0.35; check(!g0 && !g1, "tie still resolving");
      #0.1;  check(g0 ^ g1, "tie resolved to one grant");
      if (g0) begin n0++; r0 = 0; #0.3; check(g1, "loser served next"); r1 = 0; end
      else    begin n1++; r1 = 0; #0.3; check(g0, "loser served next"); r0 = 0; end
      #0.3;
    end
    check(n0 > 0 && n1 > 0, "ties resolved both ways");
    check(dut.ties == 20, "tie count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
