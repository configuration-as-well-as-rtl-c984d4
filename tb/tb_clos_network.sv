// tb_clos_network: end-to-end test of the C(4,4,4) Clos network.
//
// Sixteen src_ni / dst_ni pairs surround the network. The bench sets up a
// series of random permutations (every input to a distinct output, all
// setups started in the same cycle; every third one is partial, with only a
// random subset of the sources active) and streams numbered words over
// every path. Checked: each destination receives exactly the words of the
// source the permutation assigns to it, in order; every word crosses the
// network in exactly three cycles (one per switch); every permutation is
// completed (the network is rearrangeable, so the search always finds a
// path); and at least one backtrack happened.
module tb_clos_network;
  import clos_pkg::*;

  localparam int unsigned NT    = NUM_TERM;
  localparam int unsigned NPERM = 12;
  localparam int unsigned LAT   = 3;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic  [NT-1:0]              cmd_valid, cmd_ready, tx_ready, src_done, busy, bk, nk;
  logic  [NT-1:0][ADDR_W-1:0]  cmd_dest;
  logic  [NT-1:0][7:0]         cmd_len;
  logic  [NT-1:0][DATA_W-1:0]  tx_data;
  logic  [NT-1:0]              rx_valid;
  logic  [NT-1:0][DATA_W-1:0]  rx_data;
  logic  [NT-1:0]              n_in_req, n_out_req;
  flit_t [NT-1:0]              n_in_flit, n_out_flit;
  ans_t  [NT-1:0]              n_in_ans, n_out_ans;
  logic  [11:0][3:0]           lf, evb, evt;
  logic  [NT-1:0][15:0]        seq;

  for (genvar t = 0; t < NT; t++) begin : g_ni
    assign tx_data[t] = {8'(t), 8'(0), seq[t]};
    src_ni #(.ID(t)) u_src (
      .clk, .rst_n, .cmd_valid(cmd_valid[t]), .cmd_ready(cmd_ready[t]),
      .cmd_dest(cmd_dest[t]), .cmd_len(cmd_len[t]),
      .tx_valid(1'b1), .tx_ready(tx_ready[t]), .tx_data(tx_data[t]),
      .req(n_in_req[t]), .flit(n_in_flit[t]), .ans(n_in_ans[t]),
      .busy(busy[t]), .done(src_done[t]), .ev_back(bk[t]), .ev_nack(nk[t]));
    dst_ni u_dst (
      .clk, .rst_n, .req(n_out_req[t]), .flit(n_out_flit[t]), .ans(n_out_ans[t]),
      .rx_ready(1'b1), .rx_valid(rx_valid[t]), .rx_data(rx_data[t]));
  end

  clos_network dut (
    .clk, .rst_n, .sw_fault('0),
    .in_req(n_in_req), .in_flit(n_in_flit), .in_ans(n_in_ans),
    .out_req(n_out_req), .out_flit(n_out_flit), .out_ans(n_out_ans),
    .link_fault(lf), .ev_back(evb), .ev_timeout(evt));

  // expected traffic
  int exp_src [NT];
  int exp_cnt [NT];
  int got_cnt [NT];
  int sent_at [int unsigned];
  int backtracks = 0;

  always @(posedge clk) begin
    for (int t = 0; t < NT; t++) begin
      if (rst_n && tx_ready[t]) seq[t] <= seq[t] + 1'b1;
      if (!rst_n) seq[t] <= '0;
    end
  end

  // record the cycle each word enters the network; check it 3 cycles later
  always @(posedge clk) if (rst_n) begin
    for (int t = 0; t < NT; t++) begin
      if (n_in_req[t] && n_in_flit[t].dv) sent_at[n_in_flit[t].payload] = cyc;
      if (n_out_req[t] && n_out_flit[t].dv) begin
        checks++;
        if (!sent_at.exists(n_out_flit[t].payload) ||
            cyc - sent_at[n_out_flit[t].payload] != LAT) begin
          failures++;
          $display("FAIL latency at output %0d word %h", t, n_out_flit[t].payload);
        end
      end
    end
    for (int s = 0; s < 12; s++) for (int p = 0; p < 4; p++) if (evb[s][p]) backtracks++;
  end

  // check delivered words
  always @(posedge clk) if (rst_n) begin
    for (int t = 0; t < NT; t++) if (rx_valid[t]) begin
      checks++;
      if (int'(rx_data[t][31:24]) != exp_src[t] || int'(rx_data[t][15:0]) != got_cnt[t]) begin
        failures++;
        $display("FAIL dest %0d got %h expected src %0d word %0d", t, rx_data[t], exp_src[t], got_cnt[t]);
      end
      got_cnt[t]++;
    end
  end

  int perm [NT];
  logic [NT-1:0] act;
  int n_partial = 0;

  initial begin
    cmd_valid = '0;
    cmd_dest = '0;
    cmd_len = '0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < NPERM; k++) begin
      // random permutation (Fisher-Yates); k = 0 is the identity
      for (int t = 0; t < NT; t++) perm[t] = t;
      if (k > 0)
        for (int t = NT - 1; t > 0; t--) begin
          int j, tmp;
          j = $urandom_range(t, 0);
          tmp = perm[t]; perm[t] = perm[j]; perm[j] = tmp;
        end
      // every third arrangement is a partial permutation: a random subset
      // of the sources is active
      for (int t = 0; t < NT; t++) act[t] = (k % 3 != 2) || ($urandom_range(1, 0) == 1);
      if (k % 3 == 2) n_partial++;
      @(negedge clk);
      for (int t = 0; t < NT; t++) begin
        if (!act[t]) begin
          exp_cnt[perm[t]] = got_cnt[perm[t]];
          continue;
        end
        exp_src[perm[t]] = t;
        got_cnt[perm[t]] = int'(seq[t]);
        cmd_dest[t] = ADDR_W'(perm[t]);
        cmd_len[t]  = 8'($urandom_range(8, 1));
        exp_cnt[perm[t]] = int'(seq[t]) + int'(cmd_len[t]);
      end
      cmd_valid = act;
      @(negedge clk);
      cmd_valid = '0;
      wait (busy == '0);
      repeat (3) @(posedge clk);
      for (int t = 0; t < NT; t++) begin
        checks++;
        if (got_cnt[t] != exp_cnt[t]) begin
          failures++;
          $display("FAIL perm %0d dest %0d got %0d words, expected %0d", k, t, got_cnt[t], exp_cnt[t]);
        end
      end
    end
    checks++;
    if (backtracks == 0) begin
      failures++;
      $display("FAIL no backtrack happened");
    end
    $display("backtracks=%0d", backtracks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
