// tb_huff_ref_pkg: reference model of the Huffman code for the testbenches.
//
// Builds the canonical code directly from the number of code words of each
// length (independently of the match-class table used by the RTL): walking
// the symbols in ROM order, each code word is the previous one plus one,
// shifted left when the length grows. Provides encoding of a symbol index
// and a bit-serial reference decoder.
package tb_huff_ref_pkg;

  // Number of code words of each length 0..14.
  localparam int LEN_COUNT [15] = '{0, 0, 1, 0, 0, 4, 12, 15, 38, 50, 46, 39, 34, 15, 2};

  typedef struct {
    int unsigned code [256];
    int unsigned len  [256];
  } code_table_t;

  function automatic code_table_t build_code();
    code_table_t t;
    int unsigned c, prev, i;
    i = 0;
    c = 0;
    prev = 0;
    for (int l = 1; l <= 14; l++)
      for (int k = 0; k < LEN_COUNT[l]; k++) begin
        if (i != 0) c = (c + 1) << (l - prev);
        prev = l;
        t.code[i] = c;
        t.len[i]  = l;
        i++;
      end
    return t;
  endfunction

  // Index of the code word that starts a 14-bit field (MSB first), or -1.
  function automatic int ref_decode(code_table_t t, logic [13:0] bits);
    for (int i = 0; i < 256; i++)
      if ((32'(bits) >> (14 - t.len[i])) == t.code[i]) return i;
    return -1;
  endfunction

  // Index of a symbol value in ROM order.
  function automatic int index_of(logic [7:0] sym);
    for (int i = 0; i < 256; i++) if (huff_pkg::SYMBOLS[i] == sym) return i;
    return -1;
  endfunction

endpackage
