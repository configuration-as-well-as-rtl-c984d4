// rr_arbiter: round-robin arbiter with a credit gate.
//
// Requests R (req) compete for one resource; at most one grant G (gnt) is
// given per cycle, and only while `credit` says the resource can take a
// transfer. The request/grant naming, the five-request default and the
// credit input follow the published arbiter; the round-robin rule is this
// design's choice. The search starts at the index held in the next-priority
// register `next_p`; after a grant to index k, next_p becomes k+1 (mod N), so
// the winner has lowest priority in the next cycle.
//
// Timing: gnt is combinational from req, credit and next_p (same cycle);
// next_p updates on the clock edge after a grant. Active-low synchronous
// reset sets next_p to 0.
module rr_arbiter #(
  parameter int unsigned N = 5
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         req,
  input  logic                 credit,
  output logic [N-1:0]         gnt,
  output logic [$clog2(N)-1:0] next_p
);
  localparam int unsigned PW = $clog2(N);

  logic [PW-1:0] ptr_q;
  logic [PW-1:0] win;
  logic          any;

  always_comb begin
    gnt = '0;
    win = '0;
    any = 1'b0;
    for (int unsigned k = 0; k < N; k++) begin
      logic [PW-1:0] idx;
      idx = PW'((int'(ptr_q) + k) % N);
      if (!any && req[idx]) begin
        any = 1'b1;
        win = idx;
      end
    end
    if (any && credit) gnt[win] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)                ptr_q <= '0;
    else if (any && credit)    ptr_q <= (int'(win) == N - 1) ? '0 : win + 1'b1;
  end

  assign next_p = ptr_q;

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
  a_gnt_req: assert property (@(posedge clk) disable iff (!rst_n) (gnt & ~req) == '0);
endmodule
