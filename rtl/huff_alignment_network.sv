// huff_alignment_network: barrel shifter that extracts the next code word.
//
// The input buffer only moves in whole bytes, so the next code word may start
// up to 7 bits into the 21-bit window. Three stages of 2-1 multiplexers,
// steered by the three offset bits, shift the window left by 1, 2 and 4
// bits (20, 18 and 14 multiplexers) and deliver 14 aligned bits, the length
// of the longest code word. Bits are numbered in stream order from the MSB
// (d0 = d[20], b0 = b[13]), and b0 = d(sel).
// Purely combinational. The stage structure follows the published design;
// its dual-rail domino implementation is replaced by plain multiplexers.
module huff_alignment_network
  import huff_pkg::*;
(
  input  window_t           d,
  input  logic [OFF_W-1:0]  sel,
  output aligned_t          b
);

  logic [WIN-2:0] s0;  // 20 bits after the 1-bit stage
  logic [WIN-4:0] s1;  // 18 bits after the 2-bit stage

  always_comb begin
    s0 = sel[0] ? d[WIN-2:0]  : d[WIN-1:1];
    s1 = sel[1] ? s0[WIN-4:0] : s0[WIN-2:2];
    b  = sel[2] ? s1[MAX_LEN-1:0] : s1[WIN-4:4];
  end

endmodule
