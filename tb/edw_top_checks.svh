// edw_top_checks.svh: stimulus, back-end model and scoreboard shared by the
// end-to-end testbenches of edw_top. The including module declares the DUT
// signals, instantiates edw_top as "dut" and sets FAIR_MODE.
//
// Back-end model: each channel has a preloaded phase count cfg = c % 4.
// An event raises rdy with fresh random data; the data stay put until the
// channel answers with clr, after which rdy drops and, later, a new event
// may come. A burst raises all 64 channels at the same instant (equal
// arrival times at every arbiter), then events arrive at random.
//
// Scoreboard: every latched word is either the empty pattern or belongs to
// a transaction: first {group, channel address} of a channel with an
// unread event, then exactly cfg words {group, back-end data}, with no
// empty word in between (uninterrupted phases). Each event is read once.
// One word per token period; the serial stream repeats the latched words.
// Handover after a transaction with other requests pending: the unfair tree
// must reuse the reset token (next word is data, no dead time); the fair
// tree withdraws it first (the reset token's word is empty).
// Fair tree: while an event waits, at most N-1 other transactions complete.
// Mechanisms counted (each must occur): multi-phase transactions, empty
// words, arbitration ties at the root, contention, handovers of the kind
// the cell flavour produces, serial words checked.

  localparam int N    = 64;
  localparam int DIV  = 16;
  localparam int HIGH = 8;
  localparam logic [7:0] GRP = 8'hA5;
  localparam logic [13:0] EMPTY = {8'hFF, 6'h00};

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  always #1 clk = ~clk;

  // ---------------- back-end model ----------------
  int issued [N];
  int start_idx [N];   // transactions completed before this event arrived
  int max_overtake = 0;
  int rd_cnt [N];
  bit started [N];
  bit go_burst = 0;
  bit go_random = 0;

  for (genvar c = 0; c < N; c++) begin : g_be
    initial begin
      issued[c] = 0; rd_cnt[c] = 0; started[c] = 0;
      rdy[c] = 0;
      cfg[c] = 2'(c % 4);
      for (int p = 0; p < 3; p++) be_data[c][p] = 6'($urandom);
      wait (go_burst);
      forever begin
        rdy[c] = 1; issued[c]++;
        start_idx[c] = n_trans;
        @(posedge clr[c]);
        #($urandom_range(1, 30) * 0.5);
        rdy[c] = 0;
        for (int p = 0; p < 3; p++) be_data[c][p] = 6'($urandom);
        wait (go_random);
        #($urandom_range(50, 4000) * 1.0 + c * 0.013);
        if (!go_random) wait (0);
      end
    end
  end

  // ---------------- scoreboard ----------------
  int cur = -1, left = 0, k = 0;
  logic [2:0][5:0] snap;
  int n_words = 0, n_empty = 0, n_multi = 0, n_trans = 0, n_contention = 0;
  int n_reuse = 0, n_gap_handover = 0, n_serial = 0, n_conflict = 0;
  bit handover_pending = 0;
  logic [N-1:0] req_snap, req_at_word;
  int last_stb_cyc = -1, cyc = 0;

  always @(posedge clk) begin
    cyc++;
    if (dut.u_tok.latch_en) req_snap <= dut.req;
  end
  always @(posedge bus_conflict) n_conflict++;

  always @(posedge clk) if (word_stb) begin
    #0.1;
    n_words++;
    if (last_stb_cyc >= 0) check(cyc - last_stb_cyc == DIV, "one word per token period");
    last_stb_cyc = cyc;
    if (handover_pending) begin
      handover_pending = 0;
      if (word_empty) n_gap_handover++; else n_reuse++;
      if (FAIR_MODE) check(word_empty, "fair: reset token withdrawn before reuse");
      else           check(!word_empty, "unfair: reset token reused, no dead time");
    end
    if (word_empty) begin
      n_empty++;
      check(left == 0, "no empty word inside a transaction");
      check(word == EMPTY, "empty pattern");
    end else begin
      check(word[13:6] == GRP, "group address on bus");
      if (left == 0) begin
        cur = int'(word[5:0]);
        check(!started[cur] && issued[cur] == rd_cnt[cur] + 1,
              $sformatf("address word of channel %0d with an unread event", cur));
        started[cur] = 1;
        snap = be_data[cur];   // back-end data are stable until clr
        left = int'(cfg[cur]); k = 0;
        if (left > 0) n_multi++;
        if ($countones(dut.req) > 1) n_contention++;
      end else begin
        check(word[5:0] == snap[k], $sformatf("ch %0d phase %0d data", cur, k + 1));
        k++; left--;
      end
      if (left == 0) begin
        if (n_trans - start_idx[cur] > max_overtake) max_overtake = n_trans - start_idx[cur];
        rd_cnt[cur]++; n_trans++; started[cur] = 0;
        req_at_word = req_snap;
        req_at_word[cur] = 1'b0;
        // requests pending when the reset token starts (next latch edge)
        @(posedge clk iff dut.u_tok.latch_en); #0.1;
        req_at_word = req_snap; req_at_word[cur] = 1'b0;
        handover_pending = (req_at_word != '0);
      end
    end
  end

  // serial stream: 14 bits from the frame marker, compared with the word
  always @(negedge clk) if (sfrm) begin
    logic [13:0] s;
    logic [13:0] w;
    w = word;
    for (int b = 13; b >= 0; b--) begin
      s[b] = sdo;
      @(negedge clk);
    end
    check(s == w, "serial word equals latched word");
    n_serial++;
  end

  initial begin
    bit all_read;
    rst_n = 1; #0.5 rst_n = 0; tok_div = 8'(DIV); tok_high = 8'(HIGH); group_addr = GRP;
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (5 * DIV) @(posedge clk);
    check(word_empty && !rqo, "idle bus is empty");
    #0.37 go_burst = 1;
    #1 go_random = 1;
    #40000 go_random = 0;
    wait (rdy == '0 || $time > 200000);
    repeat (4 * DIV) @(posedge clk);
    all_read = 1;
    for (int c = 0; c < N; c++) if (rd_cnt[c] != issued[c]) all_read = 0;
    check(all_read, "every event read exactly once");
    check(n_conflict == 0, "no bus collision");
    check(n_multi > 0, "multi-phase transactions happened");
    check(n_empty > 0, "empty words (pull pattern) seen");
    check(n_contention > 0, "contention between requests happened");
    check(dut.u_tree.g_cells[0].g_c[0].u_cell.u_req_arb.ties > 0, "arbitration tie at the root happened");
    check(n_serial > 100, "serial words checked");
    // fair cells: while a request waits, every other channel is served at
    // most once; unfair cells give no such bound (reported only)
    if (FAIR_MODE) check(max_overtake <= N - 1, "fair: bounded waiting");
    if (FAIR_MODE) check(n_gap_handover > 0, "fair handovers happened");
    else           check(n_reuse > 0, "token reuse happened");
    $display("longest wait: %0d other transactions", max_overtake);
    $display("words=%0d empty=%0d transactions=%0d multi=%0d reuse=%0d gap_handover=%0d contention=%0d root_ties=%0d serial=%0d",
             n_words, n_empty, n_trans, n_multi, n_reuse, n_gap_handover, n_contention,
             dut.u_tree.g_cells[0].g_c[0].u_cell.u_req_arb.ties, n_serial);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

