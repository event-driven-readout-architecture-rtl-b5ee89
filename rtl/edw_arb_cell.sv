// edw_arb_cell: two-input arbitration cell of the EDWARD arbitration tree.
//
// Stage 1: a Seitz arbiter decides between the two requests req[1:0] by
// arrival time (no fixed priority) and holds the grant g[x] while req[x] is
// high. The selection register sel (a latch) steers the acknowledge token
// from acki to ack[x]. Stage 2 decides when sel may follow g, so that a
// token is never split between two outputs:
//
//   FAIR = 1 (fair cell): a second Seitz arbiter arbitrates between the
//     token (acki, while it is routed somewhere) and a pending change of
//     sel. A routed token must be withdrawn before sel changes, so the next
//     channel is picked from the top of the tree again. rqo = |(req & g)
//     drops when the served request ends, which lets the parent cells
//     re-arbitrate.
//   FAIR = 0 (unfair cell): rqo = |req stays high while another request of
//     this cell is pending, so the token may be rerouted locally from one
//     output to the other while it is present (token reuse, the neighbour
//     is served next). sel follows g whenever the token is absent, or when
//     g names a request and rqo has not been low during the present token.
//     The second condition closes a race: if the served request ends just
//     before the other one arrives, rqo glitches, the parent may take the
//     token away, and a local reroute would hand a token fragment to a
//     second channel. In that case the new request waits for the next
//     token. A token is never moved to "no output".
//
// The two arbitration stages, the steering and the two cell flavours follow
// the published architecture; the gate-level realisation (latch enable
// equations, rqo equations) is this design's own. Cells of alternating logic
// polarity in silicon are logically identical to this single-polarity cell.
//
// Interface: req[1:0] in, acki in, rqo out, ack[1:0] out. No clock, no
// reset: sel settles to g while no token is present.
// Timing: grant delay of one Seitz arbiter per stage (T_RES_PS).
module edw_arb_cell #(
  parameter bit          FAIR     = 1'b0,
  parameter int unsigned T_RES_PS = 137
) (
  input  logic [1:0] req,
  input  logic       acki,
  output logic       rqo,
  output logic [1:0] ack
);
  timeunit 1ns; timeprecision 1ps;

  logic [1:0] g;     // stage-1 grants
  logic [1:0] sel;   // token steering

  edw_seitz_arbiter #(.T_RES_PS(T_RES_PS)) u_req_arb (
    .r0(req[0]), .r1(req[1]), .g0(g[0]), .g1(g[1])
  );

  if (FAIR) begin : g_fair
    logic tok_rq, chg, g_tok, g_chg;
    assign tok_rq = acki & (|sel);     // token present and routed
    assign chg    = (g != sel);        // selection wants to change
    edw_seitz_arbiter #(.T_RES_PS(T_RES_PS)) u_tok_arb (
      .r0(tok_rq), .r1(chg), .g0(g_tok), .g1(g_chg)
    );
    always_latch begin
      if (g_chg) sel = g;
    end
    assign ack = sel & {2{g_tok}};
    assign rqo = |(req & g);
  end else begin : g_unfair
    logic sel_en, dropped;
    assign rqo = |req;
    // dropped: rqo has been low at some time during the present token, so
    // a parent may already be moving the token; sel is then frozen until
    // the token is withdrawn
    always_latch begin
      if (!acki)     dropped = 1'b0;
      else if (!rqo) dropped = 1'b1;
    end
    assign sel_en = ~acki | ((|g) & ~dropped);
    always_latch begin
      if (sel_en) sel = g;
    end
    assign ack = sel & {2{acki}};
  end

  // the token must never reach both outputs
  always @(ack) if ($time != 0) assert (!(ack[0] && ack[1])) else $error("arb cell: token on both outputs");
endmodule
