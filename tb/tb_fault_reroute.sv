// tb_fault_reroute: the failed-middle-switch scenario on the full design.
//
// Terminal 4 (on SW2) first sets up a long transfer to terminal 0, which
// takes SW2's link to SW5. SW6 is then made dead. Terminal 5 (also on SW2)
// asks for terminal 5: its link to SW5 is busy, the probe into SW6 gets no
// answer, SW2 flags that link faulty after the timeout and the path is set
// up through SW7. Checked: the SW2-to-SW6 link is the only one flagged, the
// second path runs through SW7 (SW7's input from SW2 carries Req during
// the transfer), and both transfers deliver all their words in order.
module tb_fault_reroute;
  import clos_pkg::*;
  localparam int unsigned NT = NUM_TERM;

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
  logic [NT-1:0]              rx_valid;
  logic [NT-1:0][DATA_W-1:0]  rx_data;
  logic [11:0][3:0]           lf, evb, evt;
  logic [4:0]                 xg, xv;
  logic [4:0][53:0]           xd;
  logic [NT-1:0][15:0]        seq;

  clos_noc_top dut (
    .clk, .rst_n, .sw_fault,
    .cmd_valid, .cmd_ready, .cmd_dest, .cmd_len,
    .tx_valid, .tx_ready, .tx_data,
    .src_busy(busy), .src_done(done), .src_back(sback), .src_nack(snack),
    .rx_ready('1), .rx_valid, .rx_data,
    .link_fault(lf), .ev_back(evb), .ev_timeout(evt),
    .x_in_valid('0), .x_in_dest('0), .x_in_data('0), .x_in_gnt(xg),
    .x_out_credit('0), .x_out_valid(xv), .x_out_data(xd));

  assign tx_valid = '1;
  for (genvar t = 0; t < NT; t++) begin : g_tx
    assign tx_data[t] = {8'(t), 8'h00, seq[t]};
  end
  always @(posedge clk) begin
    if (!rst_n) seq <= '0;
    else for (int t = 0; t < NT; t++) if (tx_ready[t]) seq[t] <= seq[t] + 1'b1;
  end

  int got [NT];
  int via_sw7 = 0;
  always @(posedge clk) if (rst_n) begin
    for (int t = 0; t < NT; t++) if (rx_valid[t]) begin
      checks++;
      if (t == 0 && rx_data[t] != {8'd4, 8'h00, 16'(got[0])}) failures++;
      if (t == 5 && rx_data[t] != {8'd5, 8'h00, 16'(got[5])}) failures++;
      got[t]++;
    end
    // SW7 is middle switch 2; its input 1 comes from SW2
    if (dut.u_net.g_mid[2].u_sw.in_req[1] && dut.u_net.g_mid[2].u_sw.in_flit[1].dv) via_sw7++;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  initial begin
    sw_fault = '0; cmd_valid = '0; cmd_dest = '0; cmd_len = '0;
    for (int t = 0; t < NT; t++) got[t] = 0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    // long transfer 4 -> 0 holds SW2 -> SW5
    @(negedge clk);
    cmd_valid[4] = 1'b1; cmd_dest[4] = 4'd0; cmd_len[4] = 8'd200;
    @(negedge clk);
    cmd_valid[4] = 1'b0;
    repeat (30) @(negedge clk);
    check(dut.u_net.g_mid[0].u_sw.in_req[1], "first path through SW5");
    sw_fault[5] = 1'b1;                       // SW6 dies
    @(negedge clk);
    cmd_valid[5] = 1'b1; cmd_dest[5] = 4'd5; cmd_len[5] = 8'd40;
    @(negedge clk);
    cmd_valid[5] = 1'b0;
    wait (busy == '0);
    repeat (5) @(posedge clk);
    check(lf[1] == 4'b0010, "SW2 flags its link to SW6");
    for (int s = 0; s < 12; s++) if (s != 1) check(lf[s] == '0, $sformatf("no fault flagged on SW%0d", s + 1));
    check(via_sw7 == 40, $sformatf("40 words through SW7 (saw %0d)", via_sw7));
    check(got[0] == 200, "all words of the first transfer");
    check(got[5] == 40, "all words of the rerouted transfer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
