// xbar_switch: five-port switch built from one arbiter per output and a
// crossbar.
//
// Each input i presents a word with a valid flag and the index of the output
// it wants. For every output o an rr_arbiter collects the requests aimed at
// o, gated by that output's credit (downstream can take a word); the granted
// input's word is steered through the crossbar to o and the input sees its
// grant in the same cycle. Arbiter (R/G/credit/next-priority) and crossbar
// follow the published parts; joining them this way, one word per granted
// input per cycle, is this design's choice.
//
// Timing: grants and outputs are combinational in the request cycle; the
// arbiters' priority pointers advance at the clock edge.
module xbar_switch #(
  parameter int unsigned N = 5,
  parameter int unsigned W = 54
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [N-1:0]                 in_valid,
  input  logic [N-1:0][$clog2(N)-1:0]  in_dest,
  input  logic [N-1:0][W-1:0]          in_data,
  output logic [N-1:0]                 in_gnt,
  input  logic [N-1:0]                 out_credit,
  output logic [N-1:0]                 out_valid,
  output logic [N-1:0][W-1:0]          out_data
);
  localparam int unsigned SW = $clog2(N);

  logic [N-1:0][N-1:0]  r;     // r[o][i]: input i requests output o
  logic [N-1:0][N-1:0]  g;     // g[o][i]: output o granted to input i
  logic [N-1:0][SW-1:0] sel;
  logic [N-1:0][SW-1:0] np_unused;

  always_comb begin
    for (int unsigned o = 0; o < N; o++)
      for (int unsigned i = 0; i < N; i++)
        r[o][i] = in_valid[i] && (int'(in_dest[i]) == int'(o));
  end

  for (genvar o = 0; o < N; o++) begin : g_arb
    rr_arbiter #(.N(N)) u_arb (
      .clk, .rst_n,
      .req(r[o]), .credit(out_credit[o]), .gnt(g[o]), .next_p(np_unused[o])
    );
  end

  always_comb begin
    in_gnt = '0;
    for (int unsigned o = 0; o < N; o++) begin
      out_valid[o] = |g[o];
      sel[o] = '0;
      for (int unsigned i = 0; i < N; i++)
        if (g[o][i]) begin
          sel[o] = SW'(i);
          in_gnt[i] = 1'b1;
        end
    end
  end

  crossbar #(.N_IN(N), .N_OUT(N), .W(W)) u_xbar (
    .in_data(in_data), .sel(sel), .sel_en(out_valid), .out_data(out_data)
  );
endmodule
