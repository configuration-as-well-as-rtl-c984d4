// clos_noc_top: on-chip permutation network for a 16-core MPSoC.
//
// Sixteen source interfaces (src_ni) feed the C(4,4,4) circuit-switched Clos
// network (clos_network); its sixteen outputs end in destination interfaces
// (dst_ni). A core starts a transfer with a command (destination, number of
// words) and streams the words once its path has been set up; any
// permutation of sources to destinations can be set up at run time, and a
// failed switch (sw_fault) is detected and avoided while paths are set up.
//
// Beside the network, and not connected to it, sits the five-port
// arbiter-plus-crossbar switch (xbar_switch), whose ports are brought out
// unchanged with the x_ prefix.
//
// Timing: see src_ni, clos_network and dst_ni. One clock, active-low
// synchronous reset.
module clos_noc_top
  import clos_pkg::*;
#(
  parameter int unsigned LEN_W   = 8,
  parameter int unsigned TIMEOUT = 32,
  parameter int unsigned XN      = 5,
  parameter int unsigned XW      = 54
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  logic [3*CLOS_P-1:0]                    sw_fault,
  // source side
  input  logic [NUM_TERM-1:0]                    cmd_valid,
  output logic [NUM_TERM-1:0]                    cmd_ready,
  input  logic [NUM_TERM-1:0][ADDR_W-1:0]        cmd_dest,
  input  logic [NUM_TERM-1:0][LEN_W-1:0]         cmd_len,
  input  logic [NUM_TERM-1:0]                    tx_valid,
  output logic [NUM_TERM-1:0]                    tx_ready,
  input  logic [NUM_TERM-1:0][DATA_W-1:0]        tx_data,
  output logic [NUM_TERM-1:0]                    src_busy,
  output logic [NUM_TERM-1:0]                    src_done,
  output logic [NUM_TERM-1:0]                    src_back,
  output logic [NUM_TERM-1:0]                    src_nack,
  // destination side
  input  logic [NUM_TERM-1:0]                    rx_ready,
  output logic [NUM_TERM-1:0]                    rx_valid,
  output logic [NUM_TERM-1:0][DATA_W-1:0]        rx_data,
  // network status
  output logic [3*CLOS_P-1:0][CLOS_N-1:0]        link_fault,
  output logic [3*CLOS_P-1:0][CLOS_N-1:0]        ev_back,
  output logic [3*CLOS_P-1:0][CLOS_N-1:0]        ev_timeout,
  // five-port arbiter/crossbar switch
  input  logic [XN-1:0]                          x_in_valid,
  input  logic [XN-1:0][$clog2(XN)-1:0]          x_in_dest,
  input  logic [XN-1:0][XW-1:0]                  x_in_data,
  output logic [XN-1:0]                          x_in_gnt,
  input  logic [XN-1:0]                          x_out_credit,
  output logic [XN-1:0]                          x_out_valid,
  output logic [XN-1:0][XW-1:0]                  x_out_data
);
  logic  [NUM_TERM-1:0] n_in_req,  n_out_req;
  flit_t [NUM_TERM-1:0] n_in_flit, n_out_flit;
  ans_t  [NUM_TERM-1:0] n_in_ans,  n_out_ans;

  for (genvar t = 0; t < NUM_TERM; t++) begin : g_ni
    src_ni #(.ID(t), .LEN_W(LEN_W)) u_src (
      .clk, .rst_n,
      .cmd_valid(cmd_valid[t]), .cmd_ready(cmd_ready[t]),
      .cmd_dest(cmd_dest[t]), .cmd_len(cmd_len[t]),
      .tx_valid(tx_valid[t]), .tx_ready(tx_ready[t]), .tx_data(tx_data[t]),
      .req(n_in_req[t]), .flit(n_in_flit[t]), .ans(n_in_ans[t]),
      .busy(src_busy[t]), .done(src_done[t]), .ev_back(src_back[t]), .ev_nack(src_nack[t])
    );
    dst_ni u_dst (
      .clk, .rst_n,
      .req(n_out_req[t]), .flit(n_out_flit[t]), .ans(n_out_ans[t]),
      .rx_ready(rx_ready[t]), .rx_valid(rx_valid[t]), .rx_data(rx_data[t])
    );
  end

  clos_network #(.TIMEOUT(TIMEOUT)) u_net (
    .clk, .rst_n, .sw_fault,
    .in_req(n_in_req), .in_flit(n_in_flit), .in_ans(n_in_ans),
    .out_req(n_out_req), .out_flit(n_out_flit), .out_ans(n_out_ans),
    .link_fault, .ev_back, .ev_timeout
  );

  xbar_switch #(.N(XN), .W(XW)) u_xsw (
    .clk, .rst_n,
    .in_valid(x_in_valid), .in_dest(x_in_dest), .in_data(x_in_data), .in_gnt(x_in_gnt),
    .out_credit(x_out_credit), .out_valid(x_out_valid), .out_data(x_out_data)
  );
endmodule
