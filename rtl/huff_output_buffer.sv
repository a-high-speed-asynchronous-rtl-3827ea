// huff_output_buffer: packs decoded bytes into 32-bit words.
//
// Four byte registers, each with a full bit. A write (wr) stores the symbol
// in the first empty register, so the first byte of a word ends up in
// out_data[31:24]. When all four are full, out_rqst is raised (4-phase
// handshake). On out_ack the full bits are cleared, which drops out_rqst;
// the receiver then drops out_ack. room is high when a symbol can be stored:
// some register is empty and out_ack is low.
// Function and handshake follow the published design; the register-level
// organisation is this design's own.
module huff_output_buffer
  import huff_pkg::*;
#(
  parameter int unsigned NBYTES = OUT_W / SYM_W
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              wr,
  input  logic [SYM_W-1:0]  sym,
  output logic              room,
  output logic [OUT_W-1:0]  out_data,
  output logic              out_rqst,
  input  logic              out_ack
);

  logic [SYM_W-1:0]  byte_q [NBYTES];
  logic [NBYTES-1:0] full_q;
  logic [NBYTES-1:0] wr_sel;   // first empty register, one-hot

  assign out_rqst = &full_q;
  assign room     = ~(&full_q) & ~out_ack;

  always_comb begin
    logic seen_empty;
    seen_empty = 1'b0;
    for (int i = 0; i < NBYTES; i++) begin
      out_data[OUT_W-1-SYM_W*i -: SYM_W] = byte_q[i];
      wr_sel[i]  = ~full_q[i] & ~seen_empty;
      seen_empty = seen_empty | ~full_q[i];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      full_q <= '0;
      for (int i = 0; i < NBYTES; i++) byte_q[i] <= '0;
    end else if (out_ack && out_rqst) begin
      full_q <= '0;
    end else if (wr) begin
      for (int i = 0; i < NBYTES; i++)
        if (wr_sel[i]) begin
          byte_q[i] <= sym;
          full_q[i] <= 1'b1;
        end
    end
  end

  always_ff @(posedge clk)
    if (!rst) assert (!(wr && !room)) else $error("symbol written without room");

endmodule
