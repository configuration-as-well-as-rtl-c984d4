// src_ni: source-side interface of one network input.
//
// Runs the three phases of a pipelined circuit-switched transfer for the
// core behind it. Setup: on a command (destination, word count) it raises
// Req and holds the probe (dv = 0, payload = destination) on the data bus
// until an answer returns. Ack starts the transfer; nAck means the
// destination is not ready, so it keeps the path and waits; Back means no
// path could be found right now, so it releases (Req = 0), waits until the
// answer returns to Idle, backs off for BACKOFF + (ID mod 4) cycles and
// tries again. Transfer: one word per cycle from the tx stream while the
// answer is Ack; while it is nAck, no new word is sent. Release: after the
// last word Req falls and the interface waits for Idle before taking the
// next command.
//
// The phases and the meaning of the Ans codes follow the document; the
// command/stream interface, holding the probe, the back-off and stopping
// on nAck are this design's choices.
//
// Timing: req and flit are registers. tx_ready is combinational (state and
// ans). cmd_ready is high in the idle state. `done` pulses for one cycle
// when a transfer has been released.
module src_ni
  import clos_pkg::*;
#(
  parameter int unsigned ID      = 0,
  parameter int unsigned LEN_W   = 8,
  parameter int unsigned BACKOFF = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  // command from the core
  input  logic              cmd_valid,
  output logic              cmd_ready,
  input  logic [ADDR_W-1:0] cmd_dest,
  input  logic [LEN_W-1:0]  cmd_len,
  // words to send
  input  logic              tx_valid,
  output logic              tx_ready,
  input  logic [DATA_W-1:0] tx_data,
  // network link
  output logic              req,
  output flit_t             flit,
  input  ans_t              ans,
  // status
  output logic              busy,
  output logic              done,
  output logic              ev_back,    // a Back was received (pulse)
  output logic              ev_nack     // an nAck was seen during setup (pulse)
);
  typedef enum logic [2:0] {N_IDLE, N_SETUP, N_XFER, N_REL, N_WAIT} nst_t;

  localparam int unsigned BW = $clog2(BACKOFF + 4);

  nst_t              st_q;
  logic [ADDR_W-1:0] dest_q;
  logic [LEN_W-1:0]  rem_q;
  logic              retry_q;
  logic              nacked_q;
  logic [BW-1:0]     wait_q;
  logic              req_q;
  flit_t             flit_q;

  assign cmd_ready = (st_q == N_IDLE);
  assign tx_ready  = (st_q == N_XFER) && (ans == ANS_ACK) && (rem_q != '0);
  assign busy      = (st_q != N_IDLE);
  assign req       = req_q;
  assign flit      = flit_q;

  always_ff @(posedge clk) begin
    done    <= 1'b0;
    ev_back <= 1'b0;
    ev_nack <= 1'b0;
    if (!rst_n) begin
      st_q     <= N_IDLE;
      dest_q   <= '0;
      rem_q    <= '0;
      retry_q  <= 1'b0;
      nacked_q <= 1'b0;
      wait_q   <= '0;
      req_q    <= 1'b0;
      flit_q   <= '0;
    end else begin
      unique case (st_q)
        N_IDLE: begin
          if (cmd_valid) begin
            dest_q   <= cmd_dest;
            rem_q    <= cmd_len;
            nacked_q <= 1'b0;
            req_q    <= 1'b1;
            flit_q   <= '{dv: 1'b0, payload: DATA_W'(cmd_dest)};
            st_q     <= N_SETUP;
          end
        end
        N_SETUP: begin
          unique case (ans)
            ANS_ACK: begin
              flit_q <= '0;
              st_q   <= N_XFER;
            end
            ANS_BACK: begin
              ev_back <= 1'b1;
              req_q   <= 1'b0;
              flit_q  <= '0;
              retry_q <= 1'b1;
              st_q    <= N_REL;
            end
            ANS_NACK: begin
              if (!nacked_q) ev_nack <= 1'b1;
              nacked_q <= 1'b1;
            end
            default: ;
          endcase
        end
        N_XFER: begin
          if (tx_valid && tx_ready) begin
            flit_q <= '{dv: 1'b1, payload: tx_data};
            rem_q  <= rem_q - 1'b1;
          end else begin
            flit_q <= '0;
          end
          if (rem_q == '0) begin
            req_q   <= 1'b0;
            flit_q  <= '0;
            retry_q <= 1'b0;
            st_q    <= N_REL;
          end
        end
        N_REL: begin
          if (ans == ANS_IDLE) begin
            if (retry_q) begin
              wait_q <= BW'(BACKOFF + (ID % 4));
              st_q   <= N_WAIT;
            end else begin
              done <= 1'b1;
              st_q <= N_IDLE;
            end
          end
        end
        default: begin // N_WAIT: back-off before a new setup
          if (wait_q == '0) begin
            req_q  <= 1'b1;
            flit_q <= '{dv: 1'b0, payload: DATA_W'(dest_q)};
            st_q   <= N_SETUP;
          end else begin
            wait_q <= wait_q - 1'b1;
          end
        end
      endcase
    end
  end
endmodule
