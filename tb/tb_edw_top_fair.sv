// tb_edw_top_fair: end-to-end test of edw_top built with fair arbitration
// cells (FAIR = 1), otherwise at the default size. Same stimulus and checks
// as tb_edw_top (edw_top_checks.svh), except that on every handover the
// reset token must be withdrawn first: the word of the reset token is empty.
module tb_edw_top_fair;
  timeunit 1ns; timeprecision 1ps;
  localparam bit FAIR_MODE = 1'b1;

  logic clk = 0, rst_n;
  logic [7:0] tok_div, tok_high, group_addr;
  logic [63:0] rdy, clr;
  logic [63:0][1:0] cfg;
  logic [63:0][2:0][5:0] be_data;
  logic rqo, clko, word_stb, word_empty, sdo, sfrm, bus_conflict;
  logic [13:0] word;

  edw_top #(.FAIR(1'b1)) dut (.*);

`include "edw_top_checks.svh"

  // watchdog
  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
