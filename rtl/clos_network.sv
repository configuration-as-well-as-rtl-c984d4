// clos_network: the three-stage Clos permutation network C(n, m, p) =
// C(4, 4, 4) with 16 inputs and 16 outputs.
//
// Switches are numbered as in the published network drawing: SW1-SW4 form
// the input stage, SW5-SW8 the middle stage and SW9-SW12 the output stage
// (index s = 0..11 below is SW(s+1)). Network input t enters input switch
// t/4 on port t%4; output port m of input switch a goes to input port a of
// middle switch m; output port b of middle switch m goes to input port m of
// output switch b; output switch b serves network outputs 4b..4b+3. Every
// input therefore has four alternative paths to any output, one through each
// middle switch. With m = n = 4 the network is rearrangeable, and the
// backtracking search in the switches tries all four.
//
// Each sw_fault bit makes the corresponding switch dead, to show rerouting
// around a failed switch. Timing: one register stage per switch in each
// direction, so an established path has a forward latency of three cycles.
module clos_network
  import clos_pkg::*;
#(
  parameter int unsigned TIMEOUT = 32
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic  [3*CLOS_P-1:0]                sw_fault,
  input  logic  [NUM_TERM-1:0]                in_req,
  input  flit_t [NUM_TERM-1:0]                in_flit,
  output ans_t  [NUM_TERM-1:0]                in_ans,
  output logic  [NUM_TERM-1:0]                out_req,
  output flit_t [NUM_TERM-1:0]                out_flit,
  input  ans_t  [NUM_TERM-1:0]                out_ans,
  output logic  [3*CLOS_P-1:0][CLOS_N-1:0]    link_fault,
  output logic  [3*CLOS_P-1:0][CLOS_N-1:0]    ev_back,
  output logic  [3*CLOS_P-1:0][CLOS_N-1:0]    ev_timeout
);
  localparam int unsigned N = CLOS_N;
  localparam int unsigned M = CLOS_M;
  localparam int unsigned P = CLOS_P;

  // stage-to-stage links, indexed [switch][port] on the sending side
  logic  [P-1:0][M-1:0] s1_req;   // input stage -> middle
  flit_t [P-1:0][M-1:0] s1_flit;
  ans_t  [P-1:0][M-1:0] s1_ans;
  logic  [M-1:0][P-1:0] s2_req;   // middle -> output stage
  flit_t [M-1:0][P-1:0] s2_flit;
  ans_t  [M-1:0][P-1:0] s2_ans;

  // the same links seen from the receiving side
  logic  [M-1:0][P-1:0] m_in_req;
  flit_t [M-1:0][P-1:0] m_in_flit;
  ans_t  [M-1:0][P-1:0] m_in_ans;
  logic  [P-1:0][M-1:0] o_in_req;
  flit_t [P-1:0][M-1:0] o_in_flit;
  ans_t  [P-1:0][M-1:0] o_in_ans;

  for (genvar a = 0; a < P; a++) begin : g_x1
    for (genvar m = 0; m < M; m++) begin : g_y1
      assign m_in_req[m][a]  = s1_req[a][m];
      assign m_in_flit[m][a] = s1_flit[a][m];
      assign s1_ans[a][m]    = m_in_ans[m][a];
      assign o_in_req[a][m]  = s2_req[m][a];
      assign o_in_flit[a][m] = s2_flit[m][a];
      assign s2_ans[m][a]    = o_in_ans[a][m];
    end
  end

  for (genvar a = 0; a < P; a++) begin : g_in
    clos_switch #(.STAGE(STAGE_IN), .N(N), .TIMEOUT(TIMEOUT)) u_sw (
      .clk, .rst_n, .fault_inj(sw_fault[a]),
      .in_req(in_req[a*N +: N]), .in_flit(in_flit[a*N +: N]), .in_ans(in_ans[a*N +: N]),
      .out_req(s1_req[a]), .out_flit(s1_flit[a]), .out_ans(s1_ans[a]),
      .link_fault(link_fault[a]), .ev_back(ev_back[a]), .ev_timeout(ev_timeout[a])
    );
  end

  for (genvar m = 0; m < M; m++) begin : g_mid
    clos_switch #(.STAGE(STAGE_MID), .N(P), .TIMEOUT(TIMEOUT)) u_sw (
      .clk, .rst_n, .fault_inj(sw_fault[P+m]),
      .in_req(m_in_req[m]), .in_flit(m_in_flit[m]), .in_ans(m_in_ans[m]),
      .out_req(s2_req[m]), .out_flit(s2_flit[m]), .out_ans(s2_ans[m]),
      .link_fault(link_fault[P+m]), .ev_back(ev_back[P+m]), .ev_timeout(ev_timeout[P+m])
    );
  end

  for (genvar b = 0; b < P; b++) begin : g_out
    clos_switch #(.STAGE(STAGE_OUT), .N(M), .TIMEOUT(TIMEOUT)) u_sw (
      .clk, .rst_n, .fault_inj(sw_fault[2*P+b]),
      .in_req(o_in_req[b]), .in_flit(o_in_flit[b]), .in_ans(o_in_ans[b]),
      .out_req(out_req[b*N +: N]), .out_flit(out_flit[b*N +: N]), .out_ans(out_ans[b*N +: N]),
      .link_fault(link_fault[2*P+b]), .ev_back(ev_back[2*P+b]), .ev_timeout(ev_timeout[2*P+b])
    );
  end
endmodule
