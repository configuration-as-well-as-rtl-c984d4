// clos_pkg: types and constants shared by the circuit-switched Clos network.
//
// A link between two switches (or between an interface and a switch) carries
// three things: a 1-bit Req from upstream, a 2-bit Ans from downstream, and a
// data bus from upstream. Req = 1 requests the link during setup and holds it
// during transfer; Req = 0 releases it. The Ans codes are those of the
// published handshake table: 00 Idle, 01 Ack (path set up, destination
// ready), 10 Back (link blocked, back pressure for the path search), 11 nAck
// (destination not ready). The data bus is this design's choice: a data-valid
// flag plus a DATA_W-bit payload. While dv = 0 and Req = 1 the payload carries
// the probe (setup flit), whose low ADDR_W bits are the destination port.
package clos_pkg;

  // Network size: C(n, m, p) = C(4, 4, 4), 16 terminals.
  localparam int unsigned CLOS_N = 4;   // inputs per first-stage switch
  localparam int unsigned CLOS_M = 4;   // middle-stage switches
  localparam int unsigned CLOS_P = 4;   // first-stage (and last-stage) switches
  localparam int unsigned NUM_TERM = CLOS_N * CLOS_P;
  localparam int unsigned ADDR_W = $clog2(NUM_TERM);

  // Payload width of a data word (not given; chosen).
  localparam int unsigned DATA_W = 32;

  typedef enum logic [1:0] {
    ANS_IDLE = 2'b00,
    ANS_ACK  = 2'b01,
    ANS_BACK = 2'b10,
    ANS_NACK = 2'b11
  } ans_t;

  typedef struct packed {
    logic              dv;       // 1: payload is a data word; 0: probe / bubble
    logic [DATA_W-1:0] payload;
  } flit_t;

  // Stage of a switch in the three-stage network.
  typedef enum logic [1:0] {
    STAGE_IN  = 2'd0,
    STAGE_MID = 2'd1,
    STAGE_OUT = 2'd2
  } stage_t;

endpackage
