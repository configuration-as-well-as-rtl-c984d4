// dst_ni: destination-side interface of one network output.
//
// While Req is high it answers Ack (01) if the core behind it can take data
// (rx_ready) and nAck (11) if it cannot; while Req is low it answers Idle
// (00). Every word that arrives on the link (Req high, dv set) is handed to
// the core on rx_valid/rx_data. The answer codes follow the document; the
// stream interface is this design's choice. nAck only stops the source from
// sending new words: words already in the pipeline (up to one round trip
// through the network) still arrive, so a core must deassert rx_ready with
// that much buffer space left.
//
// Timing: ans, rx_valid and rx_data are registers, one cycle after the link
// inputs.
module dst_ni
  import clos_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req,
  input  flit_t             flit,
  output ans_t              ans,
  input  logic              rx_ready,
  output logic              rx_valid,
  output logic [DATA_W-1:0] rx_data
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ans      <= ANS_IDLE;
      rx_valid <= 1'b0;
      rx_data  <= '0;
    end else begin
      ans      <= !req ? ANS_IDLE : (rx_ready ? ANS_ACK : ANS_NACK);
      rx_valid <= req && flit.dv;
      rx_data  <= flit.payload;
    end
  end
endmodule
