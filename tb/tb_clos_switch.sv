// tb_clos_switch: one switch of each stage, with the bench playing both the
// upstream sources and the downstream neighbours. A downstream neighbour
// answers a raised Req one cycle later with the code chosen for its port
// (Ack, nAck, Back, or nothing to stand for a dead switch).
//
// First-stage switch: a probe must try outputs in order, move on after
// Back, mark a silent output faulty after TIMEOUT cycles and skip it from
// then on, answer Ack upstream once a path holds, forward words with one
// cycle of latency, pass nAck back, release on Req = 0, answer Back once
// every profitable output failed, and give two simultaneous probes distinct
// outputs. Middle and last stage: a probe may use only the output its
// destination selects, and Back from there goes straight upstream.
module tb_clos_switch;
  import clos_pkg::*;
  localparam int unsigned N  = 4;
  localparam int unsigned TO = 32;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0;
  int failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // three DUTs: first, middle and last stage
  logic  [2:0][N-1:0] in_req, out_req, lf, evb, evt;
  flit_t [2:0][N-1:0] in_flit, out_flit;
  ans_t  [2:0][N-1:0] in_ans, out_ans;
  ans_t  [2:0][N-1:0] mode;          // downstream behaviour per port

  clos_switch #(.STAGE(STAGE_IN)) d_in (
    .clk, .rst_n, .fault_inj(1'b0),
    .in_req(in_req[0]), .in_flit(in_flit[0]), .in_ans(in_ans[0]),
    .out_req(out_req[0]), .out_flit(out_flit[0]), .out_ans(out_ans[0]),
    .link_fault(lf[0]), .ev_back(evb[0]), .ev_timeout(evt[0]));
  clos_switch #(.STAGE(STAGE_MID)) d_mid (
    .clk, .rst_n, .fault_inj(1'b0),
    .in_req(in_req[1]), .in_flit(in_flit[1]), .in_ans(in_ans[1]),
    .out_req(out_req[1]), .out_flit(out_flit[1]), .out_ans(out_ans[1]),
    .link_fault(lf[1]), .ev_back(evb[1]), .ev_timeout(evt[1]));
  clos_switch #(.STAGE(STAGE_OUT)) d_out (
    .clk, .rst_n, .fault_inj(1'b0),
    .in_req(in_req[2]), .in_flit(in_flit[2]), .in_ans(in_ans[2]),
    .out_req(out_req[2]), .out_flit(out_flit[2]), .out_ans(out_ans[2]),
    .link_fault(lf[2]), .ev_back(evb[2]), .ev_timeout(evt[2]));

  // downstream neighbours
  always @(posedge clk) begin
    for (int d = 0; d < 3; d++)
      for (int o = 0; o < N; o++)
        out_ans[d][o] <= (!rst_n || !out_req[d][o]) ? ANS_IDLE : mode[d][o];
  end

  // log which outputs get probed (rising out_req), per DUT
  int probes [3][$];
  logic [2:0][N-1:0] out_req_d;
  always @(posedge clk) begin
    out_req_d <= out_req;
    for (int d = 0; d < 3; d++)
      for (int o = 0; o < N; o++)
        if (rst_n && out_req[d][o] && !out_req_d[d][o]) probes[d].push_back(o);
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (cycle %0d)", msg, cyc);
    end
  endtask

  task automatic probe(input int d, input int i, input int dest);
    @(negedge clk);
    in_req[d][i] = 1'b1;
    in_flit[d][i] = '{dv: 1'b0, payload: DATA_W'(dest)};
  endtask

  task automatic wait_ans(input int d, input int i, input ans_t a, input int max, output int took);
    took = 0;
    while (in_ans[d][i] != a && took < max) begin
      @(negedge clk);
      took++;
    end
  endtask

  task automatic release_all();
    @(negedge clk);
    in_req = '0;
    in_flit = '0;
    repeat (4) @(negedge clk);
  endtask

  initial begin
    int took;
    in_req = '0; in_flit = '0;
    for (int d = 0; d < 3; d++) for (int o = 0; o < N; o++) mode[d][o] = ANS_ACK;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // --- first stage: Back on 0, dead 1, Ack on 2
    mode[0][0] = ANS_BACK; mode[0][1] = ANS_IDLE; mode[0][2] = ANS_ACK; mode[0][3] = ANS_ACK;
    probe(0, 0, 9);
    wait_ans(0, 0, ANS_ACK, 200, took);
    check(in_ans[0][0] == ANS_ACK, "path set up through output 2");
    check(probes[0].size() == 3 && probes[0][0] == 0 && probes[0][1] == 1 && probes[0][2] == 2,
          "outputs probed in order 0, 1, 2");
    check(took > TO && took < TO + 20, $sformatf("setup took %0d cycles including the timeout", took));
    check(lf[0] == 4'b0010, "output 1 flagged faulty");
    check(out_req[0] == 4'b0100, "only output 2 held");
    check(out_flit[0][2].payload[ADDR_W-1:0] == 4'd9, "probe forwarded");
    // transfer: one cycle per switch
    for (int w = 0; w < 10; w++) begin
      @(negedge clk);
      in_flit[0][0] = '{dv: 1'b1, payload: DATA_W'(32'hC0DE0000 + w)};
      @(negedge clk);
      check(out_flit[0][2].dv && out_flit[0][2].payload == DATA_W'(32'hC0DE0000 + w), "word forwarded in one cycle");
    end
    mode[0][2] = ANS_NACK;
    repeat (3) @(negedge clk);
    check(in_ans[0][0] == ANS_NACK, "nAck passed upstream");
    release_all();
    check(out_req[0] == '0 && in_ans[0][0] == ANS_IDLE, "path released");

    // --- first stage: every remaining output blocked -> Back upstream
    probes[0].delete();
    mode[0][0] = ANS_BACK; mode[0][2] = ANS_BACK; mode[0][3] = ANS_BACK;
    probe(0, 3, 5);
    wait_ans(0, 3, ANS_BACK, 100, took);
    check(in_ans[0][3] == ANS_BACK, "Back after all profitable outputs failed");
    check(probes[0].size() == 3 && probes[0][0] == 0 && probes[0][1] == 2 && probes[0][2] == 3,
          "faulty output 1 skipped");
    release_all();
    check(in_ans[0][3] == ANS_IDLE, "Back withdrawn after release");

    // --- first stage: two probes at once get distinct outputs
    mode[0][0] = ANS_ACK; mode[0][2] = ANS_ACK; mode[0][3] = ANS_ACK;
    @(negedge clk);
    in_req[0][1] = 1'b1; in_flit[0][1] = '{dv: 1'b0, payload: DATA_W'(1)};
    in_req[0][2] = 1'b1; in_flit[0][2] = '{dv: 1'b0, payload: DATA_W'(2)};
    repeat (12) @(negedge clk);
    check(in_ans[0][1] == ANS_ACK && in_ans[0][2] == ANS_ACK, "both probes connected");
    check(out_req[0] == 4'b0101, "distinct outputs 0 and 2");
    release_all();

    // --- middle stage: destination 13 -> output switch 3 only
    probes[1].delete();
    probe(1, 2, 13);
    wait_ans(1, 2, ANS_ACK, 50, took);
    check(in_ans[1][2] == ANS_ACK && out_req[1] == 4'b1000, "middle stage routes to output 3");
    release_all();
    mode[1][3] = ANS_BACK;
    probe(1, 0, 14);
    wait_ans(1, 0, ANS_BACK, 50, took);
    check(in_ans[1][0] == ANS_BACK, "middle stage returns Back");
    check(probes[1].size() == 2 && probes[1][1] == 3, "middle stage tried no other output");
    release_all();

    // --- last stage: destination 6 -> port 2
    probe(2, 1, 6);
    wait_ans(2, 1, ANS_ACK, 50, took);
    check(in_ans[2][1] == ANS_ACK && out_req[2] == 4'b0100, "last stage routes to port 2");
    release_all();

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
