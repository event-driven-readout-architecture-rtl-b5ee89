// tb_edw_two_channel: the implementation example's readout scenario on the
// full 8 x 8 group at default parameters: two channels with different
// preloaded phase counts (channel 42: 4 phases, channel 5: 2 phases) get
// events 1 ns apart, the higher-numbered channel first. Expected: the
// earlier request is served first (arrival time, not position, decides),
// the words are {group, 42}, three data words, then {group, 5}, one data
// word, on six consecutive tokens: the reset token of channel 42 is reused
// as the first token of channel 5, so no empty word appears in between.
// Then the bus is empty again. Also checks the request-to-first-word
// latency: the first word is latched at the end of the first token after
// the request.
module tb_edw_two_channel;
  timeunit 1ns; timeprecision 1ps;

  localparam int DIV = 16, HIGH = 8;
  localparam logic [7:0] GRP = 8'h3C;

  logic clk = 0, rst_n = 1;
  logic [7:0] tok_div = 8'(DIV), tok_high = 8'(HIGH), group_addr = GRP;
  logic [63:0] rdy = '0, clr;
  logic [63:0][1:0] cfg = '0;
  logic [63:0][2:0][5:0] be_data = '0;
  logic rqo, clko, word_stb, word_empty, sdo, sfrm, bus_conflict;
  logic [13:0] word;
  int checks = 0, failures = 0;

  edw_top dut (.*);
  always #1 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  // back-end: drop rdy once the channel reports clr
  always @(posedge clr[42]) #3 rdy[42] = 0;
  always @(posedge clr[5])  #3 rdy[5]  = 0;

  logic [13:0] got [$];
  bit          got_empty [$];
  int          first_cyc = -1, cyc = 0, req_cyc = -1;
  always @(posedge clk) begin
    cyc++;
    if (word_stb) begin
      got.push_back(word);
      got_empty.push_back(word_empty);
    end
  end

  initial begin
    logic [13:0] exp [$];
    int start;
    cfg[42] = 2'd3; cfg[5] = 2'd1;
    be_data[42] = {6'h2A, 6'h15, 6'h33};   // phases 3, 2, 1
    be_data[5]  = {6'h00, 6'h00, 6'h1F};
    #0.5 rst_n = 0;
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (3 * DIV) @(posedge clk);
    @(negedge clko);                   // token just expired
    #1.3 rdy[42] = 1;
    #1.0 rdy[5]  = 1;
    req_cyc = cyc;
    got.delete(); got_empty.delete();
    repeat (10 * DIV) @(posedge clk);
    exp = '{{GRP, 6'd42}, {GRP, 6'h33}, {GRP, 6'h15}, {GRP, 6'h2A},
            {GRP, 6'd5},  {GRP, 6'h1F}};
    start = -1;
    foreach (got[i]) if (!got_empty[i] && start < 0) start = i;
    check(start >= 0, "words read out");
    // words before the first one are empty; the request waits for the next
    // token edge, whose word is latched one token period later
    check(start == 1, "first word latched one token period after the request");
    for (int i = 0; i < exp.size(); i++) begin
      check(start + i < got.size() && !got_empty[start + i] && got[start + i] == exp[i],
            $sformatf("word %0d: got %h expected %h", i, got[start + i], exp[i]));
    end
    for (int i = start + exp.size(); i < got.size(); i++)
      check(got_empty[i] && got[i] == {8'hFF, 6'h00}, "bus empty after both transactions");
    check(rdy[42] == 0 && rdy[5] == 0 && clr == '0, "both channels reset");
    check(!bus_conflict, "no collision");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
