// tb_edw_top: end-to-end test of edw_top at its default size (64 channels,
// 4-phase phasers, unfair arbitration cells). Stimulus and checks are in
// edw_top_checks.svh: a burst of 64 simultaneous events, then random
// events; every word on the bus and on the serial output is checked against
// the back-end data, and token reuse on handover is required.
module tb_edw_top;
  timeunit 1ns; timeprecision 1ps;
  localparam bit FAIR_MODE = 1'b0;

  logic clk = 0, rst_n;
  logic [7:0] tok_div, tok_high, group_addr;
  logic [63:0] rdy, clr;
  logic [63:0][1:0] cfg;
  logic [63:0][2:0][5:0] be_data;
  logic rqo, clko, word_stb, word_empty, sdo, sfrm, bus_conflict;
  logic [13:0] word;

  edw_top dut (.*);

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
