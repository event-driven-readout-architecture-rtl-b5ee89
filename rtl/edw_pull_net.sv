// edw_pull_net: shared data bus with its pull-up/down network.
//
// NS sources (banks of tristate buffers) may drive a W-bit bus. Each bus
// line also has a weak pull, up or down as given by PULL. The resolved bus
// is the word of the enabled source; with no source enabled the pulls
// define the PULL pattern, which marks "empty data" downstream. More than
// one enabled source is a collision (conflict = 1); the resolved value is
// then the OR of the drivers. The pull network follows the published
// architecture; the pattern value and the conflict flag are this design's
// own.
//
// Interface: en[NS], dat[NS] in; bus, conflict out. Purely combinational.
module edw_pull_net #(
  parameter int unsigned NS   = edw_pkg::N_CH_DEF,
  parameter int unsigned W    = edw_pkg::CW_DEF,
  parameter logic [W-1:0] PULL = '0
) (
  input  logic [NS-1:0]        en,
  input  logic [NS-1:0][W-1:0] dat,
  output logic [W-1:0]         bus,
  output logic                 conflict
);
  timeunit 1ns; timeprecision 1ps;

  logic [W-1:0] drv;
  always_comb begin
    drv = '0;
    for (int s = 0; s < NS; s++)
      if (en[s]) drv |= dat[s];
  end

  assign bus      = (|en) ? drv : PULL;
  assign conflict = !$onehot0(en);
endmodule
