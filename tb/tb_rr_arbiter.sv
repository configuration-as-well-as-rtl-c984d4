// tb_rr_arbiter: random requests and credit against a round-robin reference
// model; checks the grant vector and the next-priority pointer every cycle,
// and that a continuously requesting input waits at most N-1 grants.
module tb_rr_arbiter;
  localparam int unsigned N = 5;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0;
  int failures = 0;

  logic [N-1:0] req, gnt;
  logic         credit;
  logic [2:0]   next_p;
  int           ptr;

  rr_arbiter dut (.clk, .rst_n, .req, .credit, .gnt, .next_p);

  initial begin
    req = '0; credit = 1'b0; ptr = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 3000; c++) begin
      logic [N-1:0] eg;
      int win;
      @(negedge clk);
      req    = (c < 1000) ? N'($urandom) : ((c < 2000) ? '1 : N'($urandom) | 5'b00001);
      credit = (c % 7) != 3;
      #1;
      eg = '0; win = -1;
      for (int k = 0; k < N; k++)
        if (win < 0 && req[(ptr + k) % N]) win = (ptr + k) % N;
      if (win >= 0 && credit) eg[win] = 1'b1;
      checks += 2;
      if (gnt !== eg) begin
        failures++;
        $display("FAIL cycle %0d req %b ptr %0d gnt %b expected %b", c, req, ptr, gnt, eg);
      end
      if (int'(next_p) != ptr) begin
        failures++;
        $display("FAIL next_p %0d expected %0d", next_p, ptr);
      end
      if (win >= 0 && credit) ptr = (win + 1) % N;
    end
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
