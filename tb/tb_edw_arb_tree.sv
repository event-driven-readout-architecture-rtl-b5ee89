// tb_edw_arb_tree: self-checking test of the arbitration tree (N = 8), for
// unfair (instance u) and fair (instance f) cells. The testbench plays the
// channels: a requesting channel counts token edges and drops its request
// on the third one (two data phases, then the reset token). Checks: at most
// one channel holds the token at any time, a channel sees token edges only
// while it requests, every request is served, all channels requesting at
// once are each served exactly once, and for the unfair tree the token
// reused on the reset edge reaches the next channel within the same token,
// while the fair tree never hands a token on before it is withdrawn.
module tb_edw_arb_tree;
  timeunit 1ns; timeprecision 1ps;
  localparam int N = 8, K = 3;

  logic clko = 0;
  int   checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  always #5 clko = ~clko;   // token: 5 ns high every 10 ns

  for (genvar t = 0; t < 2; t++) begin : g_t
    logic [N-1:0] req = '0, ack;
    logic rqo;
    int cnt [N];
    int served [N];
    int reuse = 0;
    int last_reset_tok = -1;
    edw_arb_tree #(.N(N), .FAIR(t == 1)) dut (.req(req), .acki(clko), .rqo(rqo), .ack(ack));

    for (genvar c = 0; c < N; c++) begin : g_c
      initial begin cnt[c] = 0; served[c] = 0; end
      always @(posedge ack[c]) begin
        if (!req[c]) begin
          failures++; $display("FAIL: token to idle channel %0d", c);
        end else begin
          // a first edge inside the token that just reset another channel
          if (cnt[c] == 0 && int'($floor($realtime / 10.0)) == last_reset_tok) reuse++;
          cnt[c]++;
          if (cnt[c] == K) begin
            last_reset_tok = int'($floor($realtime / 10.0));
            req[c] <= 1'b0; cnt[c] = 0; served[c]++;
          end
        end
      end
    end
    always @(ack) if (!$onehot0(ack)) begin
      failures++; $display("FAIL: tree %0d, two channels acknowledged: %b", t, ack);
    end
  end

  task automatic all_idle(output bit idle);
    idle = (g_t[0].req == 0) && (g_t[1].req == 0);
  endtask

  bit idle;
  int tot0, tot1;
  initial begin
    #2;
    // all channels at once
    g_t[0].req = '1; g_t[1].req = '1;
    #(N * K * 10 + 100);
    all_idle(idle);
    check(idle, "all simultaneous requests served");
    for (int c = 0; c < N; c++) begin
      check(g_t[0].served[c] == 1, $sformatf("unfair: ch %0d served once", c));
      check(g_t[1].served[c] == 1, $sformatf("fair: ch %0d served once", c));
    end
    // random arrivals
    for (int i = 0; i < 200; i++) begin
      int c;
      c = $urandom_range(0, N - 1);
      #($urandom_range(1, 13) * 1.37);
      if (!g_t[0].req[c]) g_t[0].req[c] = 1;
      if (!g_t[1].req[c]) g_t[1].req[c] = 1;
    end
    #(N * K * 10 * 3);
    all_idle(idle);
    check(idle, "all random requests served");
    tot0 = 0; tot1 = 0;
    for (int c = 0; c < N; c++) begin tot0 += g_t[0].served[c]; tot1 += g_t[1].served[c]; end
    check(tot0 > N && tot1 > N, "random requests served");
    check(g_t[0].reuse > 0, "unfair: token reused within one token period");
    check(g_t[1].reuse == 0, "fair: token never reused before withdrawal");
    $display("served unfair=%0d fair=%0d reuse unfair=%0d fair=%0d",
             tot0, tot1, g_t[0].reuse, g_t[1].reuse);
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
