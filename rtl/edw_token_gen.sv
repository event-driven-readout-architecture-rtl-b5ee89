// edw_token_gen: acknowledge token generator (clock divider).
//
// The serialization clock clk is divided into the token clock clko. One
// token period is div clk cycles; clko is high for the first high cycles
// of it (the token's lifetime, after which it expires). div and high are
// run-time settings, so period and duty cycle can be matched to the bus
// width and to the request/token delay through the arbitration tree.
// latch_en is high in the last clk cycle of each period: the output
// circuit samples the bus on the same clk edge that starts the next token,
// i.e. the data of a token are latched before the next token is issued.
//
// From the published EDWARD architecture: clko is clk divided with
// programmable frequency and duty cycle. This design's own: the counter
// realisation, registered clko, asynchronous active-low reset (clko held low
// in reset).
//
// Interface: clk, rst_n, div (>= 2), high (1 .. div-1) in; clko, latch_en out.
// Timing: clko rises on the clk edge after the cycle with latch_en = 1.
module edw_token_gen #(
  parameter int unsigned DIVW = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [DIVW-1:0] div,
  input  logic [DIVW-1:0] high,
  output logic            clko,
  output logic            latch_en
);
  timeunit 1ns; timeprecision 1ps;

  logic [DIVW-1:0] cnt;    // position in the token period, 0 .. div-1
  logic [DIVW-1:0] cnt_nx;

  assign latch_en = (cnt == div - DIVW'(1));
  assign cnt_nx   = latch_en ? '0 : cnt + DIVW'(1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= div - DIVW'(1);   // first period starts right after reset
      clko <= 1'b0;
    end else begin
      cnt  <= cnt_nx;
      clko <= (cnt_nx < high);
    end
  end
endmodule
