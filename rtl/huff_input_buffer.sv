// huff_input_buffer: seven-byte input buffer of the Huffman decoder.
//
// Registers R0..R6 hold bytes of the compressed stream, R0 the oldest. The
// right four (R3..R6) are loaded in parallel from a 32-bit word (load) and
// each carries a status bit that is set on load. A shift (one pulse of the
// shift clock) moves every byte one register to the left, so the stream
// advances by 8 bits; a zero byte and a false status bit enter R6.
//   full       = all four status bits set (the word has been taken)
//   empty      = no status bit set (time to fetch the next word)
//   head_valid = status of R3: a shift would move valid data into R2
// The 21 leftmost bits (R0, R1 and the top five bits of R2) feed the
// alignment network: window[0] is the first bit of the stream.
// Byte order: data_in[31:24] goes to R3, i.e. it is the first byte.
// The register structure and the status bits follow the published design;
// the synchronous load/shift on clk and the byte order are this model's.
// load and shift are never asserted together (the reload sequencer only
// loads an empty buffer and the shift sequencer only shifts a non-empty one).
module huff_input_buffer
  import huff_pkg::*;
#(
  parameter int unsigned NREG  = 7,
  parameter int unsigned NSTAT = 4
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          load,
  input  logic [IN_W-1:0] data_in,
  input  logic          shift,
  output window_t       window,
  output logic          full,
  output logic          empty,
  output logic          head_valid
);

  localparam int unsigned FIRST_STAT = NREG - NSTAT;

  logic [7:0] r    [NREG];
  logic       stat [NSTAT];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREG; i++) r[i] <= '0;
      for (int i = 0; i < NSTAT; i++) stat[i] <= 1'b0;
    end else if (load) begin
      for (int i = 0; i < NSTAT; i++) begin
        r[FIRST_STAT+i] <= data_in[IN_W-1-8*i -: 8];
        stat[i]         <= 1'b1;
      end
    end else if (shift) begin
      for (int i = 0; i < NREG-1; i++) r[i] <= r[i+1];
      r[NREG-1] <= '0;
      for (int i = 0; i < NSTAT-1; i++) stat[i] <= stat[i+1];
      stat[NSTAT-1] <= 1'b0;
    end
  end

  always_comb begin
    full  = 1'b1;
    empty = 1'b1;
    for (int i = 0; i < NSTAT; i++) begin
      full  = full & stat[i];
      empty = empty & ~stat[i];
    end
    head_valid = stat[0];
    window = {r[0], r[1], r[2][7 -: (WIN-16)]};
  end

endmodule
