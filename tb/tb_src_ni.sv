// tb_src_ni: the bench plays the network behind one source interface.
// For each command it first answers Back (the source must release, back off
// and probe again), then nAck for a few cycles, then Ack; during the
// transfer it drops to nAck at random. Checked: the probe carries the
// destination with dv = 0, the back-off gap, that no word is taken while
// the answer is not Ack, that exactly cmd_len words arrive in order, that
// Req falls after the last word and that done, ev_back and ev_nack pulse.
module tb_src_ni;
  import clos_pkg::*;
  localparam int unsigned BACKOFF = 4;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0;
  int failures = 0;

  logic              cmd_valid, cmd_ready, tx_valid, tx_ready, req, busy, done, ev_back, ev_nack;
  logic [ADDR_W-1:0] cmd_dest;
  logic [7:0]        cmd_len;
  logic [DATA_W-1:0] tx_data;
  flit_t             flit;
  ans_t              ans;

  src_ni dut (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd_dest, .cmd_len,
    .tx_valid, .tx_ready, .tx_data, .req, .flit, .ans,
    .busy, .done, .ev_back, .ev_nack);

  int n_done = 0, n_back = 0, n_nack = 0;
  always @(posedge clk) begin
    if (rst_n && done) n_done++;
    if (rst_n && ev_back) n_back++;
    if (rst_n && ev_nack) n_nack++;
    if (rst_n && tx_valid && tx_ready) tx_data <= tx_data + 1;
    if (rst_n && tx_ready && ans != ANS_ACK) begin
      failures++;
      $display("FAIL tx_ready without Ack");
    end
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  initial begin
    cmd_valid = 1'b0; cmd_dest = '0; cmd_len = '0; tx_valid = 1'b1; ans = ANS_IDLE;
    tx_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 20; k++) begin
      int len, got, gap;
      logic [DATA_W-1:0] first;
      len = $urandom_range(10, 1);
      @(negedge clk);
      check(cmd_ready, "cmd_ready when idle");
      cmd_valid = 1'b1; cmd_dest = ADDR_W'(k); cmd_len = 8'(len);
      @(negedge clk);
      cmd_valid = 1'b0;
      check(req && !flit.dv && flit.payload[ADDR_W-1:0] == ADDR_W'(k), "probe on the link");
      // first attempt: blocked
      @(negedge clk); ans = ANS_BACK;
      @(negedge clk);
      @(negedge clk);
      check(!req, "release after Back");
      ans = ANS_IDLE;
      gap = 0;
      while (!req && gap < 100) begin @(negedge clk); gap++; end
      check(gap > BACKOFF, "back-off before the new probe");
      check(req && !flit.dv && flit.payload[ADDR_W-1:0] == ADDR_W'(k), "second probe");
      // destination not ready, then ready
      ans = ANS_NACK;
      repeat (3) @(negedge clk);
      check(req && cmd_ready == 1'b0, "path kept under nAck");
      first = tx_data;
      ans = ANS_ACK;
      got = 0;
      for (int c = 0; c < 200 && req; c++) begin
        @(negedge clk);
        if (flit.dv) begin
          check(flit.payload == first + DATA_W'(got), "word order");
          got++;
        end
        ans = ($urandom_range(3, 0) == 0) ? ANS_NACK : ANS_ACK;
      end
      check(!req, "release after the last word");
      check(got == len, $sformatf("word count %0d of %0d", got, len));
      ans = ANS_IDLE;
      repeat (3) @(negedge clk);
    end
    check(n_done == 20, "done pulses");
    check(n_back == 20, "ev_back pulses");
    check(n_nack == 20, "ev_nack pulses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
