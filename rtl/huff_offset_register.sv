// huff_offset_register: bit offset of the next code word inside the window.
//
// Holds the 3-bit alignment offset that steers the alignment network. It is
// loaded with the adder's remainder when an evaluation ends (reg_clk of the
// published design, here the load enable) and cleared by reset, so the first
// code word after reset starts at the first bit of the first byte.
module huff_offset_register
  import huff_pkg::*;
#(
  parameter int unsigned W = OFF_W
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         load,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst)       q <= '0;
    else if (load) q <= d;
  end

endmodule
