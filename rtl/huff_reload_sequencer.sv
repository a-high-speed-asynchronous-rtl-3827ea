// huff_reload_sequencer: input side 4-phase handshake of the decoder.
//
// The program memory offers a compressed word by raising in_rqst with the
// data valid. When the input buffer is empty the sequencer loads the word
// (one-cycle load pulse), waits for the buffer to report full, and raises
// in_ack. The memory then drops in_rqst, and the sequencer drops in_ack,
// completing the four phases. A new word is taken only after that.
// The published design names this block and its job (fetch more data when
// the buffer is empty); the three-state sequence is this design's own.
module huff_reload_sequencer (
  input  logic clk,
  input  logic rst,
  input  logic in_rqst,
  output logic in_ack,
  input  logic empty,
  input  logic full,
  output logic load
);

  typedef enum logic [1:0] {WAIT_REQ, LOADED, ACKED} state_t;
  state_t state;

  assign load   = (state == WAIT_REQ) && in_rqst && empty;
  assign in_ack = (state == ACKED);

  always_ff @(posedge clk) begin
    if (rst) state <= WAIT_REQ;
    else unique case (state)
      WAIT_REQ: if (load)     state <= LOADED;
      LOADED:   if (full)     state <= ACKED;
      ACKED:    if (!in_rqst) state <= WAIT_REQ;
      default:                state <= WAIT_REQ;
    endcase
  end

endmodule
