// edw_output: output circuit, synchronizing the asynchronous bus to clk.
//
// On the clk edge with latch_en = 1 (the edge that also starts the next
// token) the DW-bit data bus is latched into word. The latched word is
// compared with the bus pull pattern EMPTY; word_empty marks a token that
// carried no channel data, so it can be discarded on chip (use word_stb &
// ~word_empty) or off chip (the serial stream carries every word).
// The same word is shifted out MSB first on sdo in the DW clk cycles after
// the latch; sfrm is high with the first bit. The token period must thus be
// at least DW clk cycles.
//
// From the published EDWARD architecture: latching by clk before each token,
// serial output, the empty pattern discarded on or off chip. This design's
// own: MSB-first order, the frame marker, the parallel strobe, asynchronous
// active-low reset.
//
// Interface: clk, rst_n, latch_en, bus in; word, word_stb, word_empty,
// sdo, sfrm out. Timing: word/word_stb valid one cycle after latch_en;
// sdo bit k (k = 0 .. DW-1, MSB first) in cycle k+1 after latch_en.
module edw_output #(
  parameter int unsigned   DW    = edw_pkg::GW_DEF + edw_pkg::CW_DEF,
  parameter logic [DW-1:0] EMPTY = {edw_pkg::GRP_PULL_DEF, edw_pkg::CH_PULL_DEF}
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          latch_en,
  input  logic [DW-1:0] bus,
  output logic [DW-1:0] word,
  output logic          word_stb,
  output logic          word_empty,
  output logic          sdo,
  output logic          sfrm
);
  timeunit 1ns; timeprecision 1ps;

  logic [DW-1:0] shreg;
  logic [$clog2(DW+1)-1:0] left;   // bits still to shift out

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      word       <= EMPTY;
      word_stb   <= 1'b0;
      word_empty <= 1'b1;
      shreg      <= '0;
      left       <= '0;
      sdo        <= 1'b0;
      sfrm       <= 1'b0;
    end else begin
      word_stb <= latch_en;
      sfrm     <= latch_en;
      if (latch_en) begin
        word       <= bus;
        word_empty <= (bus == EMPTY);
        sdo        <= bus[DW-1];
        shreg      <= bus << 1;
        left       <= ($clog2(DW+1))'(DW - 1);
      end else if (left != '0) begin
        sdo   <= shreg[DW-1];
        shreg <= shreg << 1;
        left  <= left - 1'b1;
      end else begin
        sdo <= 1'b0;
      end
    end
  end
endmodule
