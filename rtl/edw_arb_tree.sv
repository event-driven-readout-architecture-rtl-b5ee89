// edw_arb_tree: hierarchical arbitration tree over N channels.
//
// A binary tree of edw_arb_cell with log2(N) levels: level l has 2**l
// cells, and cell i of level l serves lines 2i and 2i+1 of level l+1. The
// root takes the acknowledge token acki and returns rqo, the logical sum of
// the requests below it (for fair cells: of the requests currently
// granted). Once the root accepts a request, the token path from acki down
// to one channel's ack[c] is set; a token present at the top is sent down
// at once. The binary tree and the cells follow the published architecture; N
// must be a power of two (64 for the 8 x 8 group).
//
// Interface: req[N-1:0] in, acki in, rqo out, ack[N-1:0] out. No clock.
// Timing: log2(N) cell delays from a request to rqo/ack.
module edw_arb_tree #(
  parameter int unsigned N        = 64,
  parameter bit          FAIR     = 1'b0,
  parameter int unsigned T_RES_PS = 137
) (
  input  logic [N-1:0] req,
  input  logic         acki,
  output logic         rqo,
  output logic [N-1:0] ack
);
  timeunit 1ns; timeprecision 1ps;

  initial assert (N >= 2 && (N & (N - 1)) == 0) else $fatal(1, "N must be a power of two");

  localparam int unsigned L = $clog2(N);   // number of cell levels

  // level l holds the 2**l request/token lines entering the cells of level l
  // from below (l = L: the channels; l = 0: the root's rqo and acki)
  for (genvar l = 0; l <= L; l++) begin : g_lvl
    logic [(1 << l)-1:0] rq, ak;
  end

  assign g_lvl[L].rq   = req;
  assign ack           = g_lvl[L].ak;
  assign rqo           = g_lvl[0].rq[0];
  assign g_lvl[0].ak[0] = acki;

  for (genvar l = 0; l < L; l++) begin : g_cells
    for (genvar i = 0; i < (1 << l); i++) begin : g_c
      edw_arb_cell #(.FAIR(FAIR), .T_RES_PS(T_RES_PS)) u_cell (
        .req (g_lvl[l+1].rq[2*i+1 -: 2]),
        .acki(g_lvl[l].ak[i]),
        .rqo (g_lvl[l].rq[i]),
        .ack (g_lvl[l+1].ak[2*i+1 -: 2])
      );
    end
  end
endmodule
