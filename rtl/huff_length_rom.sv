// huff_length_rom: code word length of the matched class.
//
// A small ROM with one 4-bit word per match class; the one-hot class line
// selects the word (an OR of the selected rows). done follows the class
// lines: it is high when exactly one row is selected.
// Purely combinational. Function and width follow the published design.
module huff_length_rom
  import huff_pkg::*;
(
  input  class_onehot_t     m,
  output logic [LEN_W-1:0]  len,
  output logic              done
);

  always_comb begin
    logic any, multi;
    len   = '0;
    any   = 1'b0;
    multi = 1'b0;
    for (int c = 0; c < NUM_CLASSES; c++) begin
      if (m[c]) len = len | CLASSES[c].len;
      multi = multi | (any & m[c]);
      any   = any | m[c];
    end
    done = any & ~multi;
  end

endmodule
