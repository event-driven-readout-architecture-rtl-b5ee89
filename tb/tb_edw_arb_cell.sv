// tb_edw_arb_cell: self-checking test of both arbitration cell flavours.
// Unfair cell: while a token is present and the served request ends with
// the other request pending, the token is rerouted locally to the other
// output and rqo never drops; but if rqo glitched during the token (request
// ended just before the other arrived) the token stays put. Fair cell: in the same situation rqo drops
// (parents re-arbitrate), the token stays on the old output until it is
// withdrawn, and only the next token goes to the other output. Both: a
// lone request gets a token that is present (fair cell only), ack is
// one-hot, no request means no ack.
module tb_edw_arb_cell;
  timeunit 1ns; timeprecision 1ps;

  logic [1:0] ureq = 0, freq = 0, uack, fack;
  logic uacki = 0, facki = 0, urqo, frqo;
  int checks = 0, failures = 0;
  bit urqo_fell, frqo_fell;

  edw_arb_cell #(.FAIR(1'b0)) u_unfair (.req(ureq), .acki(uacki), .rqo(urqo), .ack(uack));
  edw_arb_cell #(.FAIR(1'b1)) u_fair   (.req(freq), .acki(facki), .rqo(frqo), .ack(fack));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  always @(negedge urqo) urqo_fell = 1;
  always @(negedge frqo) frqo_fell = 1;
  always @(uack or fack) if ((uack == 2'b11) || (fack == 2'b11)) begin
    failures++; $display("FAIL: token on both outputs");
  end

  initial begin
    #2;
    check(uack == 0 && fack == 0 && !urqo && !frqo, "idle");
    // ---------------- unfair cell ----------------
    uacki = 1; #1; check(uack == 0, "unfair: no request, no ack");
    ureq[0] = 1; #1;
    check(urqo, "unfair: rqo follows request");
    check(uack == 2'b00, "unfair: token that saw rqo low is not redirected");
    uacki = 0; #1; check(uack == 0, "unfair: token withdrawn");
    uacki = 1; #1; check(uack == 2'b01, "unfair: token routed to ch0");
    ureq[1] = 1; #1; check(uack == 2'b01, "unfair: pending request does not steal token");
    urqo_fell = 0;
    ureq[0] = 0; #1;
    check(uack == 2'b10, "unfair: token rerouted locally while present");
    check(!urqo_fell && urqo, "unfair: rqo stable during reroute");
    uacki = 0; #1; check(uack == 0, "unfair: token end");
    // race: the served request ends 39 ps before the other one arrives, so
    // rqo glitches; the token must not be rerouted during this token
    uacki = 1; #1; check(uack == 2'b10, "unfair: token to ch1");
    ureq[1] = 0; #0.039; ureq[0] = 1; #1;
    check(uack != 2'b01, "unfair: no local reroute after an rqo glitch");
    uacki = 0; #1; uacki = 1; #1;
    check(uack == 2'b01, "unfair: next token to ch0");
    uacki = 0; ureq[0] = 0; #1;
    check(!urqo, "unfair: rqo low without requests");
    uacki = 1; #1; check(uack == 0, "unfair: no ack without requests");
    uacki = 0; #1;
    // ---------------- fair cell ----------------
    freq[0] = 1; #1;
    check(frqo, "fair: rqo follows granted request");
    facki = 1; #1; check(fack == 2'b01, "fair: token to ch0");
    freq[1] = 1; #1; check(fack == 2'b01, "fair: pending request does not steal token");
    frqo_fell = 0;
    freq[0] = 0; #1;
    check(frqo_fell, "fair: rqo dropped so parents can re-arbitrate");
    check(frqo, "fair: rqo back for the pending request");
    check(fack == 2'b01, "fair: token not redirected while present");
    facki = 0; #1; check(fack == 0, "fair: token withdrawn");
    facki = 1; #1; check(fack == 2'b10, "fair: next token to ch1");
    facki = 0; #1;
    freq[1] = 0; #1; check(!frqo, "fair: rqo low without requests");
    facki = 1; #1; check(fack == 0, "fair: no ack without requests");
    freq[1] = 1; #1; check(fack == 2'b10, "fair: idle token sent to new request");
    facki = 0; freq[1] = 0; #1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
