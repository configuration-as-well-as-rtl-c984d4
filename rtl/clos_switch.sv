// clos_switch: one N x N switch of the pipelined circuit-switched Clos
// network, usable in any of the three stages.
//
// Each input port runs the path-setup protocol. When Req rises, the port
// captures the destination from the probe on its data bus and searches its
// profitable outputs: every output in the first stage (one per middle
// switch), the single output toward the destination's last-stage switch in
// the middle stage, and the destination's own port in the last stage. It
// takes the lowest-numbered profitable output that is free, not yet tried
// and not marked faulty (outputs wanted by several inputs at once go through
// one rr_arbiter per output), and forwards Req and the probe. The answer
// from downstream decides what happens next:
//   Ack  - the path is set up; Ack is passed upstream and the port turns
//          into a plain pipelined wire (Req, data forward; Ans backward).
//   nAck - passed upstream; the path is kept until the source releases it.
//   Back - the link ahead is blocked: the port releases that output, marks
//          it tried and searches again (backtracking). When no profitable
//          output is left it answers Back upstream itself and waits for Req
//          to fall. This is the exhaustive profitable backtracking search.
//   Idle for TIMEOUT cycles - the switch ahead is taken as dead: the output
//          is marked faulty for good and the search goes on without it.
//          This is how traffic is steered around a failed middle switch.
// Req = 0 releases the path at any point.
//
// Follows the document: Req/Ans codes, the three phases, backtracking over
// the profitable paths, rerouting around a faulty switch. This design's own
// choices: lowest-index-first search order, round-robin arbitration between
// inputs, the timeout fault detector, treating a busy output as blocked, and
// the `fault_inj` input that makes the whole switch dead (all outputs 0) to
// emulate a failed switch.
//
// Timing: every output (out_req, out_flit, in_ans) is a register, so each
// switch adds one cycle forward and one cycle backward. An input port needs
// one cycle from Req to search and one more to be granted. Active-low
// synchronous reset.
module clos_switch
  import clos_pkg::*;
#(
  parameter stage_t      STAGE   = STAGE_IN,
  parameter int unsigned N       = 4,
  parameter int unsigned TIMEOUT = 32
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   fault_inj,
  // upstream side (input ports)
  input  logic  [N-1:0]          in_req,
  input  flit_t [N-1:0]          in_flit,
  output ans_t  [N-1:0]          in_ans,
  // downstream side (output ports)
  output logic  [N-1:0]          out_req,
  output flit_t [N-1:0]          out_flit,
  input  ans_t  [N-1:0]          out_ans,
  // status
  output logic  [N-1:0]          link_fault,  // outputs found dead
  output logic  [N-1:0]          ev_back,     // input port got Back this cycle
  output logic  [N-1:0]          ev_timeout   // input port timed out this cycle
);
  localparam int unsigned PW = $clog2(N);
  localparam int unsigned TW = $clog2(TIMEOUT + 1);
  localparam int unsigned LW = $clog2(CLOS_N);   // terminal-in-switch bits

  typedef enum logic [2:0] {S_IDLE, S_SEEK, S_PROBE, S_CONN, S_BLOCK} pst_t;

  // state
  pst_t  [N-1:0]          st_q,    st_n;
  logic  [N-1:0][ADDR_W-1:0] hdr_q, hdr_n;
  logic  [N-1:0][N-1:0]   tried_q, tried_n;
  logic  [N-1:0][PW-1:0]  osel_q,  osel_n;
  logic  [N-1:0][TW-1:0]  tmr_q,   tmr_n;
  ans_t  [N-1:0]          ans_q,   ans_n;
  logic  [N-1:0]          own_q,   own_n;     // output is held
  logic  [N-1:0][PW-1:0]  owner_q, owner_n;   // by which input
  logic  [N-1:0]          flt_q,   flt_n;
  logic  [N-1:0]          oreq_q,  oreq_n;
  flit_t [N-1:0]          oflit_q, oflit_n;

  // search
  logic  [N-1:0][N-1:0]   prof, fa;
  logic  [N-1:0][N-1:0]   r;                  // r[o][i]
  logic  [N-1:0][N-1:0]   g;                  // g[o][i]
  logic  [N-1:0]          ofree;
  logic  [N-1:0][PW-1:0]  np_unused;

  always_comb begin
    for (int unsigned o = 0; o < N; o++)
      ofree[o] = !own_q[o] && !oreq_q[o] && (out_ans[o] == ANS_IDLE) && !flt_q[o];
  end

  always_comb begin
    r = '0;
    for (int unsigned i = 0; i < N; i++) begin
      prof[i] = '0;
      unique case (STAGE)
        STAGE_IN:  prof[i] = '1;
        STAGE_MID: prof[i][int'(hdr_q[i][ADDR_W-1:LW]) % N] = 1'b1;
        default:   prof[i][int'(hdr_q[i][LW-1:0]) % N] = 1'b1;
      endcase
      fa[i]   = prof[i] & ~tried_q[i] & ~flt_q & ofree;
    end
    // each searching input asks for its lowest free profitable output
    r = '0;
    for (int unsigned i = 0; i < N; i++) begin
      if (st_q[i] == S_SEEK && in_req[i]) begin
        logic found;
        found = 1'b0;
        for (int unsigned k = 0; k < N; k++)
          if (!found && fa[i][k]) begin
            found = 1'b1;
            r[k][i] = 1'b1;
          end
      end
    end
  end

  for (genvar o = 0; o < N; o++) begin : g_arb
    rr_arbiter #(.N(N)) u_arb (
      .clk, .rst_n,
      .req(r[o]), .credit(ofree[o]), .gnt(g[o]), .next_p(np_unused[o])
    );
  end

  always_comb begin
    st_n    = st_q;
    hdr_n   = hdr_q;
    tried_n = tried_q;
    osel_n  = osel_q;
    tmr_n   = tmr_q;
    ans_n   = ans_q;
    own_n   = own_q;
    owner_n = owner_q;
    flt_n   = flt_q;
    ev_back    = '0;
    ev_timeout = '0;

    for (int unsigned i = 0; i < N; i++) begin
      unique case (st_q[i])
        S_IDLE: begin
          ans_n[i] = ANS_IDLE;
          if (in_req[i]) begin
            hdr_n[i]   = in_flit[i].payload[ADDR_W-1:0];
            tried_n[i] = '0;
            st_n[i]    = S_SEEK;
          end
        end
        S_SEEK: begin
          if (!in_req[i]) begin
            st_n[i] = S_IDLE;
          end else if (fa[i] == '0) begin
            st_n[i]  = S_BLOCK;
            ans_n[i] = ANS_BACK;
          end else begin
            for (int unsigned o = 0; o < N; o++)
              if (g[o][i]) begin
                osel_n[i]  = PW'(o);
                own_n[o]   = 1'b1;
                owner_n[o] = PW'(i);
                tmr_n[i]   = '0;
                st_n[i]    = S_PROBE;
              end
          end
        end
        S_PROBE: begin
          if (!in_req[i]) begin
            own_n[osel_q[i]] = 1'b0;
            ans_n[i] = ANS_IDLE;
            st_n[i]  = S_IDLE;
          end else begin
            unique case (out_ans[osel_q[i]])
              ANS_ACK: begin
                ans_n[i] = ANS_ACK;
                st_n[i]  = S_CONN;
              end
              ANS_NACK: begin
                ans_n[i] = ANS_NACK;
                tmr_n[i] = '0;
              end
              ANS_BACK: begin
                own_n[osel_q[i]]       = 1'b0;
                tried_n[i][osel_q[i]]  = 1'b1;
                ev_back[i]             = 1'b1;
                st_n[i]                = S_SEEK;
              end
              default: begin
                if (int'(tmr_q[i]) == TIMEOUT - 1) begin
                  own_n[osel_q[i]] = 1'b0;
                  flt_n[osel_q[i]] = 1'b1;
                  ev_timeout[i]    = 1'b1;
                  st_n[i]          = S_SEEK;
                end else begin
                  tmr_n[i] = tmr_q[i] + 1'b1;
                end
              end
            endcase
          end
        end
        S_CONN: begin
          if (!in_req[i]) begin
            own_n[osel_q[i]] = 1'b0;
            ans_n[i] = ANS_IDLE;
            st_n[i]  = S_IDLE;
          end else begin
            ans_n[i] = out_ans[osel_q[i]];
          end
        end
        default: begin // S_BLOCK
          ans_n[i] = ANS_BACK;
          if (!in_req[i]) begin
            ans_n[i] = ANS_IDLE;
            st_n[i]  = S_IDLE;
          end
        end
      endcase
    end

    for (int unsigned o = 0; o < N; o++) begin
      oreq_n[o]  = own_n[o];
      oflit_n[o] = own_n[o] ? in_flit[owner_n[o]] : '0;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n || fault_inj) begin
      st_q    <= {N{S_IDLE}};
      hdr_q   <= '0;
      tried_q <= '0;
      osel_q  <= '0;
      tmr_q   <= '0;
      ans_q   <= {N{ANS_IDLE}};
      own_q   <= '0;
      owner_q <= '0;
      flt_q   <= '0;
      oreq_q  <= '0;
      oflit_q <= '0;
    end else begin
      st_q    <= st_n;
      hdr_q   <= hdr_n;
      tried_q <= tried_n;
      osel_q  <= osel_n;
      tmr_q   <= tmr_n;
      ans_q   <= ans_n;
      own_q   <= own_n;
      owner_q <= owner_n;
      flt_q   <= flt_n;
      oreq_q  <= oreq_n;
      oflit_q <= oflit_n;
    end
  end

  assign in_ans     = ans_q;
  assign out_req    = oreq_q;
  assign out_flit   = oflit_q;
  assign link_fault = flt_q;

  // An output is never held by two inputs: each granted output is unique.
  for (genvar o = 0; o < N; o++) begin : g_chk
    a_one_grant: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(g[o]));
    a_grant_free: assert property (@(posedge clk) disable iff (!rst_n) (g[o] != '0) |-> ofree[o]);
  end
endmodule
