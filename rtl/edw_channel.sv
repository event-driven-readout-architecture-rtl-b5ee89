// edw_channel: in-channel logic of one EDWARD channel (controller + core).
//
// The channel has no clock. Its flip-flops are clocked by the rising edge of
// the acknowledge token ack routed to it by the arbitration tree.
//   * Controller: when the back-end raises the data-ready flag rdy, the read
//     request req is raised at once (req = rdy & ~fin).
//   * Readout phaser: a chain of NPH one-hot flip-flops. The first token
//     that reaches the channel while req is high starts the transaction
//     (phase 0). Each further token advances one phase. The chain length is
//     programmed by cfg: the transaction has cfg+1 phases. The end flag
//     end_o is high in the last phase.
//   * Reset procedure: the token after the last phase clears the phaser and
//     sets fin, which clears req; the tree then takes the token away and
//     may hand it to another channel. fin is also the "clr" output to the
//     back-end, which answers by dropping rdy; the falling edge of rdy
//     clears fin, and a new rdy may then raise a new request (4-phase
//     handshake with the back-end).
//   * Output gates: rdo (one-hot, = phaser state) selects which data bank
//     drives the shared bus. The tristate banks are modelled as bus_en plus
//     the selected bank word bus_dat; the pull network resolves the bus.
// A bank stays enabled from its token edge to the next token edge, so the
// word is stable when the output circuit latches it just before the next
// token.
//
// From the published EDWARD architecture: controller, phaser chain,
// programmable length, one-hot rdo, end flag and the token-driven reset. This
// design's own choices: the rdy/clr handshake with the back-end, end_o being
// set in the last phase (so the very next token resets), the global
// asynchronous reset rst_n.
//
// Interface: rst_n, rdy, clr, cfg (phases - 1), ack, req, rdo[NPH],
// end_o, bank[NPH] data words, bus_en, bus_dat.
module edw_channel #(
  parameter int unsigned NPH = edw_pkg::NPH_DEF,
  parameter int unsigned CW  = edw_pkg::CW_DEF,
  localparam int unsigned CFGW = (NPH > 1) ? $clog2(NPH) : 1
) (
  input  logic                   rst_n,
  input  logic                   rdy,
  output logic                   clr,
  input  logic [CFGW-1:0]        cfg,
  input  logic                   ack,
  output logic                   req,
  output logic [NPH-1:0]         rdo,
  output logic                   end_o,
  input  logic [NPH-1:0][CW-1:0] bank,
  output logic                   bus_en,
  output logic [CW-1:0]          bus_dat
);
  timeunit 1ns; timeprecision 1ps;

  logic [NPH-1:0] ph;     // phaser chain, one-hot while a transaction runs
  logic           fin;    // reset procedure done, waiting for rdy to fall
  logic           done_t, seen_t;

  assign req   = rdy & ~fin;
  assign end_o = ph[cfg];

  // phaser: one flip-flop chain clocked by the token
  always_ff @(posedge ack or negedge rst_n) begin
    if (!rst_n) begin
      ph <= '0;
    end else if (req) begin
      if (ph == '0)   ph <= NPH'(1);          // first token: phase 0
      else if (end_o) ph <= '0;               // reset procedure
      else            ph <= ph << 1;          // next phase
    end
  end

  // fin = done_t ^ seen_t: the reset token toggles done_t, the falling
  // edge of rdy copies it into seen_t. Both flip-flops are cleared only by
  // rst_n, so no set/clear pair of the same flip-flop is needed.
  always_ff @(posedge ack or negedge rst_n) begin
    if (!rst_n)            done_t <= 1'b0;
    else if (req && end_o) done_t <= ~done_t;
  end

  always_ff @(negedge rdy or negedge rst_n) begin
    if (!rst_n) seen_t <= 1'b0;
    else        seen_t <= done_t;
  end

  assign fin = done_t ^ seen_t;

  assign clr = fin;
  assign rdo = ph;

  // output gates: AND-OR of the one-hot bank enables
  always_comb begin
    bus_dat = '0;
    for (int i = 0; i < NPH; i++)
      if (ph[i]) bus_dat |= bank[i];
  end
  assign bus_en = |ph;

  // checked once the token has moved the phaser
  always @(negedge ack) if (rst_n && $time != 0) assert ($onehot0(ph)) else $error("channel: phaser not one-hot");
endmodule
