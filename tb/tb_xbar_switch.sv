// tb_xbar_switch: random traffic on the five-port switch against a
// reference model with one round-robin pointer per output. Checks grants,
// output valid and output data every cycle; contention and credit stalls
// must both occur.
module tb_xbar_switch;
  localparam int unsigned N = 5;
  localparam int unsigned W = 54;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0;
  int failures = 0;
  int n_contend = 0;
  int n_stall = 0;

  logic [N-1:0]        in_valid, in_gnt, out_credit, out_valid;
  logic [N-1:0][2:0]   in_dest;
  logic [N-1:0][W-1:0] in_data, out_data;
  int ptr [N];

  xbar_switch dut (.clk, .rst_n, .in_valid, .in_dest, .in_data, .in_gnt,
                   .out_credit, .out_valid, .out_data);

  initial begin
    in_valid = '0; in_dest = '0; in_data = '0; out_credit = '0;
    for (int o = 0; o < N; o++) ptr[o] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 3000; c++) begin
      logic [N-1:0] eg;
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        in_valid[i]   = ($urandom_range(2, 0) != 0);
        in_dest[i]    = 3'($urandom_range(N - 1, 0));
        in_data[i]    = {22'($urandom), $urandom};
        out_credit[i] = ($urandom_range(4, 0) != 0);
      end
      #1;
      eg = '0;
      for (int o = 0; o < N; o++) begin
        int win, nreq;
        win = -1; nreq = 0;
        for (int k = 0; k < N; k++) begin
          int i;
          i = (ptr[o] + k) % N;
          if (in_valid[i] && int'(in_dest[i]) == o) begin
            nreq++;
            if (win < 0) win = i;
          end
        end
        if (nreq > 1) n_contend++;
        if (nreq > 0 && !out_credit[o]) n_stall++;
        checks++;
        if (win >= 0 && out_credit[o]) begin
          eg[win] = 1'b1;
          if (!out_valid[o] || out_data[o] !== in_data[win]) begin
            failures++;
            $display("FAIL output %0d expected input %0d", o, win);
          end
          ptr[o] = (win + 1) % N;
        end else if (out_valid[o]) begin
          failures++;
          $display("FAIL output %0d valid without a winner", o);
        end
      end
      checks++;
      if (in_gnt !== eg) begin
        failures++;
        $display("FAIL grants %b expected %b", in_gnt, eg);
      end
    end
    checks += 2;
    if (n_contend == 0) failures++;
    if (n_stall == 0) failures++;
    $display("contention=%0d credit_stalls=%0d", n_contend, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
