// tb_edw_pull_net: self-checking test of the bus pull network.
// Random enable patterns over 16 sources: no driver gives the pull pattern,
// one driver gives its word, two or more flag a collision.
module tb_edw_pull_net;
  timeunit 1ns; timeprecision 1ps;
  localparam int NS = 16, W = 6;
  localparam logic [W-1:0] PULL = 6'b101001;

  logic [NS-1:0] en;
  logic [NS-1:0][W-1:0] dat;
  logic [W-1:0] bus;
  logic conflict;
  int checks = 0, failures = 0;

  edw_pull_net #(.NS(NS), .W(W), .PULL(PULL)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s en=%b bus=%b", what, en, bus); end
  endtask

  initial begin
    for (int i = 0; i < 300; i++) begin
      int k, nen;
      for (int s = 0; s < NS; s++) dat[s] = W'($urandom);
      k = $urandom_range(0, NS - 1);
      case (i % 3)
        0: en = '0;
        1: en = NS'(1) << k;
        default: en = NS'($urandom) | (NS'(1) << k) | (NS'(1) << ((k + 1) % NS));
      endcase
      #1;
      nen = $countones(en);
      if (nen == 0) check(bus == PULL && !conflict, "empty bus shows pull pattern");
      else if (nen == 1) check(bus == dat[k] && !conflict, "single driver on bus");
      else check(conflict, "collision flagged");
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
