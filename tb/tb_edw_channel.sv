// tb_edw_channel: self-checking test of the in-channel logic.
// For every chain length cfg = 0 .. NPH-1 a transaction is run: rdy raises
// req at once; token k (k = 1 .. cfg+1) selects bank k-1 (one-hot rdo, bank
// word on the bus, end flag only in the last phase); token cfg+2 runs the
// reset procedure (bank off, req low, clr high); dropping rdy clears clr.
// Tokens without a request must change nothing; a token that is already
// high when the request appears does not start the transaction.
module tb_edw_channel;
  timeunit 1ns; timeprecision 1ps;
  localparam int NPH = 4, CW = 6;

  logic rst_n = 1, rdy = 0, ack = 0;
  logic [1:0] cfg = 0;
  logic clr, req, end_o, bus_en;
  logic [NPH-1:0] rdo;
  logic [NPH-1:0][CW-1:0] bank;
  logic [CW-1:0] bus_dat;
  int checks = 0, failures = 0;

  edw_channel #(.NPH(NPH), .CW(CW)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  task automatic token();
    ack = 1; #3; ack = 0; #7;
  endtask

  initial begin
    for (int i = 0; i < NPH; i++) bank[i] = CW'(7 * i + 5);
    #1 rst_n = 0; #4 rst_n = 1; #5;
    check(!req && !bus_en && !clr, "idle after reset");
    token();
    check(!bus_en && rdo == 0, "token without request ignored");
    for (int c = 0; c < NPH; c++) begin
      cfg = 2'(c);
      rdy = 1; #0.01;
      check(req, "req raised promptly on rdy");
      for (int k = 0; k <= c; k++) begin
        token();
        check(rdo == NPH'(1) << k, $sformatf("cfg %0d: phase %0d one-hot", c, k));
        check(bus_en && bus_dat == bank[k], "bank word on bus");
        check(end_o == (k == c), "end flag only in last phase");
        check(req && !clr, "request held during transaction");
      end
      token();
      check(rdo == 0 && !bus_en, "reset procedure clears phaser");
      check(!req && clr, "reset procedure clears request");
      token();
      check(rdo == 0 && !req, "no restart while rdy still high");
      rdy = 0; #0.01;
      check(!clr, "clr released when rdy drops");
      #5;
    end
    // request appearing during a token: waits for the next token edge
    cfg = 0;
    ack = 1; #1; rdy = 1; #1;
    check(req && !bus_en, "no start without a rising token edge");
    ack = 0; #5; token();
    check(bus_en && rdo == 1, "start on next token");
    token(); check(!req && clr, "single-phase transaction done");
    rdy = 0; #1;
    // asynchronous reset in mid-transaction
    rdy = 1; cfg = 3; token(); token();
    check(rdo == 2, "phase 1 before reset");
    rst_n = 0; #1; check(rdo == 0 && !bus_en, "reset clears phaser");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
