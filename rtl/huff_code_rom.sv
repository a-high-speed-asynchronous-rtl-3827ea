// huff_code_rom: output symbol lookup.
//
// While the match logic is still working, every class decodes its own
// enumerating bits from the aligned input into a potential ROM word
// (base + enum - eoff). The one-hot class line then enables exactly one of
// these word lines. The 256 words are held in three banks, whose outputs are
// merged by an OR. The most frequent code word (class 0) stands for the
// all-zero byte; it bypasses the ROM and drives the merged output to zero
// directly. done is the completion (a word line or the bypass was enabled).
// Purely combinational. Parallel decoding, class enables, three merged banks
// and the zero bypass follow the published design; the bank split by word
// index and the per-class (unshared) decoders are this design's choices.
module huff_code_rom
  import huff_pkg::*;
#(
  parameter int unsigned NBANKS = 3
) (
  input  aligned_t          b,
  input  class_onehot_t     m,
  output logic [SYM_W-1:0]  sym,
  output logic              done
);

  localparam int unsigned BANK_WORDS = (NUM_SYMBOLS + NBANKS - 1) / NBANKS;

  logic [7:0] word_idx [NUM_CLASSES];   // potential word of each class
  logic [NUM_SYMBOLS-1:0] word_line;    // enabled word line (one-hot)
  logic [SYM_W-1:0] bank_out [NBANKS];
  logic bypass_zero;

  // Enumerating bits of each class, decoded in parallel with matching.
  always_comb begin
    for (int c = 0; c < NUM_CLASSES; c++) begin
      logic [MAX_LEN-1:0] code_v;
      logic [7:0] enum_v;
      code_v = head_bits(b, CLASSES[c].len);
      enum_v = code_v[7:0] & ((8'd1 << CLASSES[c].nenum) - 8'd1);
      word_idx[c] = CLASSES[c].base + enum_v - {3'b000, CLASSES[c].eoff};
    end
  end

  // Class 0 (the all-zero byte) bypasses the ROM.
  assign bypass_zero = m[0];

  always_comb begin
    word_line = '0;
    for (int c = 1; c < NUM_CLASSES; c++)
      if (m[c]) word_line[word_idx[c]] = 1'b1;
  end

  always_comb begin
    for (int k = 0; k < NBANKS; k++) begin
      bank_out[k] = '0;
      for (int w = k * BANK_WORDS; w < (k + 1) * BANK_WORDS && w < NUM_SYMBOLS; w++)
        if (word_line[w]) bank_out[k] = bank_out[k] | SYMBOLS[w];
    end
    sym = '0;
    if (!bypass_zero)
      for (int k = 0; k < NBANKS; k++) sym = sym | bank_out[k];
    done = bypass_zero | (|word_line);
  end

endmodule
