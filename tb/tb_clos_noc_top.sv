// tb_clos_noc_top: end-to-end test of the whole design at its default
// parameters.
//
// Network part: a series of random full permutations is run through the 16
// source and destination interfaces. Destinations drop rx_ready at random,
// so sources meet nAck. Halfway through, middle switch SW6 is made dead; the
// input switches must detect it by timeout and route the remaining
// permutations through SW5, SW7 and SW8. Checked: every destination receives
// exactly its source's words in order, every permutation completes, no word
// is delivered after the fault through a path that needed SW6 (all link
// faults flagged are links to SW6), and each mechanism happened at least once:
// backtrack on Back, retry by a source, nAck, fault timeout, release.
//
// Crossbar part: random requests and credits on the five-port switch, each
// cycle compared with a round-robin reference model; contention and
// credit blocking are counted and must both occur.
module tb_clos_noc_top;
  import clos_pkg::*;

  localparam int unsigned NT    = NUM_TERM;
  localparam int unsigned NPERM = 16;
  localparam int unsigned XN    = 5;
  localparam int unsigned XW    = 54;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic [11:0]                sw_fault;
  logic [NT-1:0]              cmd_valid, cmd_ready, tx_valid, tx_ready, busy, done, sback, snack;
  logic [NT-1:0][ADDR_W-1:0]  cmd_dest;
  logic [NT-1:0][7:0]         cmd_len;
  logic [NT-1:0][DATA_W-1:0]  tx_data;
  logic [NT-1:0]              rx_ready, rx_valid;
  logic [NT-1:0][DATA_W-1:0]  rx_data;
  logic [11:0][3:0]           lf, evb, evt;
  logic [XN-1:0]              x_in_valid, x_in_gnt, x_out_credit, x_out_valid;
  logic [XN-1:0][2:0]         x_in_dest;
  logic [XN-1:0][XW-1:0]      x_in_data, x_out_data;
  logic [NT-1:0][15:0]        seq;

  clos_noc_top dut (
    .clk, .rst_n, .sw_fault,
    .cmd_valid, .cmd_ready, .cmd_dest, .cmd_len,
    .tx_valid, .tx_ready, .tx_data,
    .src_busy(busy), .src_done(done), .src_back(sback), .src_nack(snack),
    .rx_ready, .rx_valid, .rx_data,
    .link_fault(lf), .ev_back(evb), .ev_timeout(evt),
    .x_in_valid, .x_in_dest, .x_in_data, .x_in_gnt,
    .x_out_credit, .x_out_valid, .x_out_data);

  for (genvar t = 0; t < NT; t++) begin : g_tx
    assign tx_data[t] = {8'(t), 8'hA5, seq[t]};
  end

  int n_backtrack = 0, n_retry = 0, n_nack = 0, n_timeout = 0, n_release = 0;
  int n_contend = 0, n_noncredit = 0, n_xgrant = 0;

  int exp_src [NT];
  int exp_cnt [NT];
  int got_cnt [NT];

  always @(posedge clk) begin
    if (!rst_n) seq <= '0;
    else for (int t = 0; t < NT; t++) if (tx_valid[t] && tx_ready[t]) seq[t] <= seq[t] + 1'b1;
  end

  // stimulus that changes every cycle
  always @(negedge clk) begin
    for (int t = 0; t < NT; t++) begin
      rx_ready[t] = ($urandom_range(9, 0) < 8);
      tx_valid[t] = ($urandom_range(9, 0) < 9);
    end
    for (int i = 0; i < XN; i++) begin
      x_in_valid[i]   = $urandom_range(1, 0) == 1;
      x_in_dest[i]    = 3'($urandom_range(XN - 1, 0));
      x_in_data[i]    = {22'($urandom), $urandom};
      x_out_credit[i] = ($urandom_range(3, 0) != 0);
    end
  end

  // network monitor
  always @(posedge clk) if (rst_n) begin
    for (int t = 0; t < NT; t++) begin
      if (rx_valid[t]) begin
        checks++;
        if (int'(rx_data[t][31:24]) != exp_src[t] || int'(rx_data[t][15:0]) != got_cnt[t]) begin
          failures++;
          $display("FAIL dest %0d got %h expected src %0d word %0d", t, rx_data[t], exp_src[t], got_cnt[t]);
        end
        got_cnt[t]++;
      end
      if (sback[t]) n_retry++;
      if (snack[t]) n_nack++;
      if (done[t])  n_release++;
    end
    for (int s = 0; s < 12; s++) for (int p = 0; p < 4; p++) begin
      if (evb[s][p]) n_backtrack++;
      if (evt[s][p]) n_timeout++;
    end
  end

  // crossbar reference model: one round-robin pointer per output
  int xptr [XN];
  always @(posedge clk) begin
    if (!rst_n) begin
      for (int o = 0; o < XN; o++) xptr[o] = 0;
    end else begin
      logic [XN-1:0] exp_gnt;
      exp_gnt = '0;
      for (int o = 0; o < XN; o++) begin
        int nreq, win;
        nreq = 0; win = -1;
        for (int k = 0; k < XN; k++) begin
          int i;
          i = (xptr[o] + k) % XN;
          if (x_in_valid[i] && int'(x_in_dest[i]) == o) begin
            nreq++;
            if (win < 0) win = i;
          end
        end
        if (nreq > 1) n_contend++;
        if (nreq > 0 && !x_out_credit[o]) n_noncredit++;
        checks++;
        if (win >= 0 && x_out_credit[o]) begin
          exp_gnt[win] = 1'b1;
          n_xgrant++;
          if (!x_out_valid[o] || x_out_data[o] !== x_in_data[win]) begin
            failures++;
            $display("FAIL xbar output %0d: expected input %0d", o, win);
          end
          xptr[o] = (win + 1) % XN;
        end else if (x_out_valid[o] || x_out_data[o] != '0) begin
          failures++;
          $display("FAIL xbar output %0d should be idle", o);
        end
      end
      checks++;
      if (x_in_gnt !== exp_gnt) begin
        failures++;
        $display("FAIL xbar grants %b expected %b", x_in_gnt, exp_gnt);
      end
    end
  end

  int perm [NT];

  task automatic count(input string what, input int n);
    checks++;
    $display("%s: %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  initial begin
    sw_fault  = '0;
    cmd_valid = '0;
    cmd_dest  = '0;
    cmd_len   = '0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < NPERM; k++) begin
      if (k == NPERM / 2) begin
        @(negedge clk);
        sw_fault[5] = 1'b1;  // SW6, the second middle switch
      end
      for (int t = 0; t < NT; t++) perm[t] = t;
      for (int t = NT - 1; t > 0; t--) begin
        int j, tmp;
        j = $urandom_range(t, 0);
        tmp = perm[t]; perm[t] = perm[j]; perm[j] = tmp;
      end
      @(negedge clk);
      for (int t = 0; t < NT; t++) begin
        exp_src[perm[t]] = t;
        got_cnt[perm[t]] = int'(seq[t]);
        cmd_dest[t] = ADDR_W'(perm[t]);
        cmd_len[t]  = 8'($urandom_range(12, 1));
        exp_cnt[perm[t]] = int'(seq[t]) + int'(cmd_len[t]);
      end
      cmd_valid = '1;
      @(negedge clk);
      cmd_valid = '0;
      wait (busy == '0);
      repeat (6) @(posedge clk);
      for (int t = 0; t < NT; t++) begin
        checks++;
        if (got_cnt[t] != exp_cnt[t]) begin
          failures++;
          $display("FAIL perm %0d dest %0d got %0d words, expected %0d", k, t, got_cnt[t], exp_cnt[t]);
        end
      end
    end
    // only links into SW6 may be flagged faulty
    for (int s = 0; s < 12; s++) for (int p = 0; p < 4; p++) begin
      checks++;
      if (lf[s][p] && !(s < 4 && p == 1)) begin
        failures++;
        $display("FAIL link %0d.%0d flagged faulty", s, p);
      end
    end
    count("backtracks", n_backtrack);
    count("source retries after Back", n_retry);
    count("nAck answers", n_nack);
    count("fault timeouts", n_timeout);
    count("releases", n_release);
    count("crossbar contention", n_contend);
    count("crossbar credit stalls", n_noncredit);
    count("crossbar grants", n_xgrant);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
