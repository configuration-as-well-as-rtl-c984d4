// tb_dst_ni: drives Req, flits and rx_ready at random and checks, one cycle
// later, the answer code (Idle / Ack / nAck) and the delivered word.
module tb_dst_ni;
  import clos_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0;
  int failures = 0;

  logic              req, rx_ready, rx_valid;
  flit_t             flit;
  ans_t              ans;
  logic [DATA_W-1:0] rx_data;

  dst_ni dut (.clk, .rst_n, .req, .flit, .ans, .rx_ready, .rx_valid, .rx_data);

  initial begin
    req = 1'b0; flit = '0; rx_ready = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 2000; c++) begin
      logic  r, rdy;
      flit_t f;
      ans_t  ea;
      @(negedge clk);
      r = $urandom_range(3, 0) != 0;
      rdy = $urandom_range(3, 0) != 0;
      f.dv = $urandom_range(1, 0) == 1;
      f.payload = $urandom;
      req = r; rx_ready = rdy; flit = f;
      @(negedge clk);
      ea = !r ? ANS_IDLE : (rdy ? ANS_ACK : ANS_NACK);
      checks += 2;
      if (ans !== ea) begin
        failures++;
        $display("FAIL ans %b expected %b", ans, ea);
      end
      if (rx_valid !== (r && f.dv) || (rx_valid && rx_data !== f.payload)) begin
        failures++;
        $display("FAIL rx_valid %b data %h", rx_valid, rx_data);
      end
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
