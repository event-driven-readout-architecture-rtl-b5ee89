// edw_seitz_arbiter: BEHAVIOURAL MODEL (not synthesizable) of a two-input
// Seitz arbiter, i.e. a mutual-exclusion element with a metastability filter.
//
// In silicon this is a custom analog cell (cross-coupled gates followed by a
// filter), added to the standard-cell library. The model reproduces what the
// readout relies on:
//   * grants follow request arrival time; the first request wins;
//   * requests that arrive at the same instant are "indiscernible": the model
//     then spends an extra resolution time T_META_PS and picks a winner at
//     random, as a metastable latch would;
//   * g0 and g1 are never high together and never glitch (the filter);
//   * a grant stays high until its request falls (4-phase protocol), then
//     falls after T_RES_PS and the other pending request may be granted.
// If a request is withdrawn before it is granted, no grant is issued.
//
// Interface: r0/r1 request inputs, g0/g1 grant outputs. No clock.
// Timing: grant T_RES_PS after the request (plus T_META_PS on a tie).
module edw_seitz_arbiter #(
  parameter int unsigned T_RES_PS  = 137,
  parameter int unsigned T_META_PS = 411
) (
  input  logic r0,
  input  logic r1,
  output logic g0,
  output logic g1
);
  timeunit 1ns; timeprecision 1ps;

  logic win;
  int unsigned ties;   // how often the tie (metastable) path was taken

  initial begin
    g0   = 1'b0;
    g1   = 1'b0;
    ties = 0;
  end

  always begin
    wait (r0 || r1);
    if (r0 && r1) begin
      // both requests seen at the same instant: metastable resolution
      ties++;
      #(T_META_PS * 1ps);
      win = 1'($urandom_range(0, 1));
    end else begin
      win = r1;
    end
    #(T_RES_PS * 1ps);
    if (win == 1'b0 && r0) begin
      g0 = 1'b1;
      wait (!r0);
      #(T_RES_PS * 1ps);
      g0 = 1'b0;
    end else if (win == 1'b1 && r1) begin
      g1 = 1'b1;
      wait (!r1);
      #(T_RES_PS * 1ps);
      g1 = 1'b0;
    end
  end

  // mutual exclusion is the defining property of the element
  always @(g0 or g1) assert (!(g0 && g1)) else $error("seitz arbiter: both grants high");
endmodule
