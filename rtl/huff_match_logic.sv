// huff_match_logic: finds the match class of the next code word.
//
// Each class of huff_pkg::CLASSES is recognised by a short prefix of the
// aligned bits. The classes are tried in table order, the first match wins,
// so a class only needs to test the bits that separate it from the classes
// after it (the table order puts the short, frequent codes first, as the
// published match tree does). Output m is one-hot; done is high when a class
// was found, which for a complete code is always the case.
// Purely combinational. The priority-matching idea follows the published
// design; the class table is this design's reconstruction (30 classes).
module huff_match_logic
  import huff_pkg::*;
(
  input  aligned_t      b,
  output class_onehot_t m,
  output logic          done
);

  class_onehot_t hit;

  always_comb begin
    for (int c = 0; c < NUM_CLASSES; c++)
      hit[c] = (head_bits(b, CLASSES[c].plen) == CLASSES[c].prefix);
  end

  // Priority: a class fires only if no earlier class matched.
  always_comb begin
    logic taken;
    taken = 1'b0;
    for (int c = 0; c < NUM_CLASSES; c++) begin
      m[c]  = hit[c] & ~taken;
      taken = taken | hit[c];
    end
    done = taken;
  end

endmodule
