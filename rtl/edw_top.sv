// edw_top: one EDWARD readout group (event driven, access and reset decoder).
//
// N_CH channels (8 x 8 = 64 by default) share one data bus. A channel whose
// back-end raises rdy requests the bus; an asynchronous tree of arbitration
// cells built on Seitz arbiters picks requests by arrival time, with no
// fixed priority, and steers acknowledge tokens to the winner. Tokens are the
// divided serialization clock clko; the channel advances one readout phase
// per token, and the token after its last phase resets it and moves on to
// the next requesting channel. Only the global logic (token generator,
// output latch, serializer) is clocked; the channels see no clock.
//
// Bus word (DW = GW + CW = 14 bits): {group address, channel field}. The
// channel field carries the channel address in phase 0 and back-end data
// words in phases 1 .. cfg. The group bank drives the group address while
// any of its channels drives the bus. With no driver the pull network gives
// the empty pattern {all ones, all zeros}; group_addr must not be all ones.
//
// From the published EDWARD architecture: the block structure, 8 x 8
// channels, 6-bit channel and 8-bit group addresses, token clock from clk,
// data latched before each token. This design's own: NPH = 4 phases, the word
// layout, the pull pattern, the default unfair cells (FAIR = 0), the rdy/clr
// back-end handshake.
//
// Interface: clk/rst_n (synchronous global logic, rst_n also resets the
// channels asynchronously), tok_div/tok_high (token period and lifetime in
// clk cycles, tok_div >= DW), group_addr, per channel rdy/clr/cfg/be_data;
// outputs rqo (request to the top of the tree), clko, the latched word with
// word_stb/word_empty, serial sdo/sfrm, and bus_conflict.
module edw_top #(
  parameter int unsigned N_CH     = edw_pkg::N_CH_DEF,
  parameter int unsigned NPH      = edw_pkg::NPH_DEF,
  parameter int unsigned CW       = edw_pkg::CW_DEF,
  parameter int unsigned GW       = edw_pkg::GW_DEF,
  parameter bit          FAIR     = 1'b0,
  parameter int unsigned DIVW     = 8,
  localparam int unsigned DW      = GW + CW,
  localparam int unsigned CFGW    = (NPH > 1) ? $clog2(NPH) : 1,
  localparam int unsigned NBE     = (NPH > 1) ? NPH - 1 : 1
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic [DIVW-1:0]                  tok_div,
  input  logic [DIVW-1:0]                  tok_high,
  input  logic [GW-1:0]                    group_addr,
  input  logic [N_CH-1:0]                  rdy,
  output logic [N_CH-1:0]                  clr,
  input  logic [N_CH-1:0][CFGW-1:0]        cfg,
  input  logic [N_CH-1:0][NBE-1:0][CW-1:0] be_data,
  output logic                             rqo,
  output logic                             clko,
  output logic [DW-1:0]                    word,
  output logic                             word_stb,
  output logic                             word_empty,
  output logic                             sdo,
  output logic                             sfrm,
  output logic                             bus_conflict
);
  timeunit 1ns; timeprecision 1ps;

  localparam logic [GW-1:0] GRP_PULL = '1;
  localparam logic [CW-1:0] CH_PULL  = '0;

  logic [N_CH-1:0]         req, ack, ch_en;
  logic [N_CH-1:0][CW-1:0] ch_dat;
  logic [CW-1:0]           ch_bus;
  logic [GW-1:0]           grp_bus;
  logic                    ch_conflict, grp_conflict, latch_en;

  // ---- channels ---------------------------------------------------------
  for (genvar c = 0; c < N_CH; c++) begin : g_ch
    logic [NPH-1:0][CW-1:0] bank;
    logic [NPH-1:0]         rdo;
    logic                   end_f;
    always_comb begin
      bank[0] = CW'(c);                       // phase 0: channel address
      for (int p = 1; p < NPH; p++) bank[p] = be_data[c][p-1];
    end
    edw_channel #(.NPH(NPH), .CW(CW)) u_ch (
      .rst_n(rst_n), .rdy(rdy[c]), .clr(clr[c]), .cfg(cfg[c]),
      .ack(ack[c]), .req(req[c]), .rdo(rdo), .end_o(end_f),
      .bank(bank), .bus_en(ch_en[c]), .bus_dat(ch_dat[c])
    );
  end

  // ---- arbitration tree -------------------------------------------------
  edw_arb_tree #(.N(N_CH), .FAIR(FAIR)) u_tree (
    .req(req), .acki(clko), .rqo(rqo), .ack(ack)
  );

  // ---- shared bus: channel field and group field with their pulls -------
  edw_pull_net #(.NS(N_CH), .W(CW), .PULL(CH_PULL)) u_ch_bus (
    .en(ch_en), .dat(ch_dat), .bus(ch_bus), .conflict(ch_conflict)
  );
  edw_pull_net #(.NS(1), .W(GW), .PULL(GRP_PULL)) u_grp_bus (
    .en(|ch_en), .dat(group_addr), .bus(grp_bus), .conflict(grp_conflict)
  );
  assign bus_conflict = ch_conflict | grp_conflict;

  // ---- synchronization --------------------------------------------------
  edw_token_gen #(.DIVW(DIVW)) u_tok (
    .clk(clk), .rst_n(rst_n), .div(tok_div), .high(tok_high),
    .clko(clko), .latch_en(latch_en)
  );
  edw_output #(.DW(DW), .EMPTY({GRP_PULL, CH_PULL})) u_out (
    .clk(clk), .rst_n(rst_n), .latch_en(latch_en), .bus({grp_bus, ch_bus}),
    .word(word), .word_stb(word_stb), .word_empty(word_empty),
    .sdo(sdo), .sfrm(sfrm)
  );
endmodule
