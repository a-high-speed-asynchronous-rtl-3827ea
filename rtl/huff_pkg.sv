// huff_pkg: constants, types and code tables shared by the Huffman decoder.
//
// The decoder translates a fixed Huffman code for 8-bit instruction bytes
// (code words of 2 to 14 bits) back into bytes. The code is canonical: taken
// in the order of SYMBOLS, every code word is the previous one plus one,
// shifted left by the growth in length. The number of code words per length
// is 1, 4, 12, 15, 38, 50, 46, 39, 34, 15 and 2 for the lengths 2, 5, 6, 7,
// 8, 9, 10, 11, 12, 13 and 14 (Kraft sum exactly 1, so every bit string of
// 14 bits starts with exactly one code word).
//
// The code words are grouped into match classes. A class is a bit prefix of
// PLEN bits followed by NENUM enumerating bits; all its members have the same
// length. Classes are tried in table order and the first one whose prefix
// matches wins, so a class prefix may also cover code words of earlier classes
// (EOFF counts those skipped slots). The symbol of a code word is
// SYMBOLS[BASE + enum - EOFF], where enum is the value of the enumerating bits.
// The symbol order and the byte-serial, priority-matched class structure
// follow the published code; the code lengths beyond 11 bits and the exact
// class split (30 classes rather than 31) are this design's reconstruction.
package huff_pkg;

  localparam int unsigned IN_W        = 32;  // input word width
  localparam int unsigned OUT_W       = 32;  // output word width
  localparam int unsigned SYM_W       = 8;   // decoded symbol width
  localparam int unsigned MAX_LEN     = 14;  // longest code word
  localparam int unsigned OFF_W       = 3;   // bit offset inside a byte
  localparam int unsigned LEN_W       = 4;   // code length field
  localparam int unsigned WIN         = MAX_LEN + 7;  // 21 bits to the aligner
  localparam int unsigned NUM_CLASSES = 30;
  localparam int unsigned NUM_SYMBOLS = 256;

  typedef logic [MAX_LEN-1:0] aligned_t;   // MSB (b0) is the first bit of the stream
  typedef logic [WIN-1:0]     window_t;    // MSB (d0) is the first bit of the stream
  typedef logic [NUM_CLASSES-1:0] class_onehot_t;

  typedef struct packed {
    logic [3:0]  len;     // code word length
    logic [3:0]  plen;    // number of prefix bits tested
    logic [13:0] prefix;  // prefix value, right-aligned
    logic [2:0]  nenum;   // number of enumerating bits (0..5)
    logic [7:0]  base;    // ROM word of the first member
    logic [4:0]  eoff;    // enumeration values taken by earlier classes
  } class_t;

  localparam class_t CLASSES [NUM_CLASSES] = '{
    '{len: 4'd2, plen: 4'd2, prefix: 14'b00, nenum: 3'd0, base: 8'd0, eoff: 5'd0},  // class 0: 1 code word
    '{len: 4'd5, plen: 4'd3, prefix: 14'b010, nenum: 3'd2, base: 8'd1, eoff: 5'd0},  // class 1: 4 code words
    '{len: 4'd6, plen: 4'd3, prefix: 14'b011, nenum: 3'd3, base: 8'd5, eoff: 5'd0},  // class 2: 8 code words
    '{len: 4'd6, plen: 4'd4, prefix: 14'b1000, nenum: 3'd2, base: 8'd13, eoff: 5'd0},  // class 3: 4 code words
    '{len: 4'd7, plen: 4'd4, prefix: 14'b1001, nenum: 3'd3, base: 8'd17, eoff: 5'd0},  // class 4: 8 code words
    '{len: 4'd7, plen: 4'd5, prefix: 14'b10100, nenum: 3'd2, base: 8'd25, eoff: 5'd0},  // class 5: 4 code words
    '{len: 4'd7, plen: 4'd6, prefix: 14'b101010, nenum: 3'd1, base: 8'd29, eoff: 5'd0},  // class 6: 2 code words
    '{len: 4'd7, plen: 4'd7, prefix: 14'b1010110, nenum: 3'd0, base: 8'd31, eoff: 5'd0},  // class 7: 1 code word
    '{len: 4'd8, plen: 4'd3, prefix: 14'b101, nenum: 3'd5, base: 8'd32, eoff: 5'd14},  // class 8: 18 code words
    '{len: 4'd8, plen: 4'd4, prefix: 14'b1100, nenum: 3'd4, base: 8'd50, eoff: 5'd0},  // class 9: 16 code words
    '{len: 4'd8, plen: 4'd6, prefix: 14'b110100, nenum: 3'd2, base: 8'd66, eoff: 5'd0},  // class 10: 4 code words
    '{len: 4'd9, plen: 4'd4, prefix: 14'b1101, nenum: 3'd5, base: 8'd70, eoff: 5'd8},  // class 11: 24 code words
    '{len: 4'd9, plen: 4'd5, prefix: 14'b11100, nenum: 3'd4, base: 8'd94, eoff: 5'd0},  // class 12: 16 code words
    '{len: 4'd9, plen: 4'd6, prefix: 14'b111010, nenum: 3'd3, base: 8'd110, eoff: 5'd0},  // class 13: 8 code words
    '{len: 4'd9, plen: 4'd8, prefix: 14'b11101100, nenum: 3'd1, base: 8'd118, eoff: 5'd0},  // class 14: 2 code words
    '{len: 4'd10, plen: 4'd6, prefix: 14'b111011, nenum: 3'd4, base: 8'd120, eoff: 5'd4},  // class 15: 12 code words
    '{len: 4'd10, plen: 4'd5, prefix: 14'b11110, nenum: 3'd5, base: 8'd132, eoff: 5'd0},  // class 16: 32 code words
    '{len: 4'd10, plen: 4'd9, prefix: 14'b111110000, nenum: 3'd1, base: 8'd164, eoff: 5'd0},  // class 17: 2 code words
    '{len: 4'd11, plen: 4'd6, prefix: 14'b111110, nenum: 3'd5, base: 8'd166, eoff: 5'd4},  // class 18: 28 code words
    '{len: 4'd11, plen: 4'd8, prefix: 14'b11111100, nenum: 3'd3, base: 8'd194, eoff: 5'd0},  // class 19: 8 code words
    '{len: 4'd11, plen: 4'd10, prefix: 14'b1111110100, nenum: 3'd1, base: 8'd202, eoff: 5'd0},  // class 20: 2 code words
    '{len: 4'd11, plen: 4'd11, prefix: 14'b11111101010, nenum: 3'd0, base: 8'd204, eoff: 5'd0},  // class 21: 1 code word
    '{len: 4'd12, plen: 4'd8, prefix: 14'b11111101, nenum: 3'd4, base: 8'd205, eoff: 5'd6},  // class 22: 10 code words
    '{len: 4'd12, plen: 4'd8, prefix: 14'b11111110, nenum: 3'd4, base: 8'd215, eoff: 5'd0},  // class 23: 16 code words
    '{len: 4'd12, plen: 4'd9, prefix: 14'b111111110, nenum: 3'd3, base: 8'd231, eoff: 5'd0},  // class 24: 8 code words
    '{len: 4'd13, plen: 4'd10, prefix: 14'b1111111110, nenum: 3'd3, base: 8'd239, eoff: 5'd0},  // class 25: 8 code words
    '{len: 4'd13, plen: 4'd11, prefix: 14'b11111111110, nenum: 3'd2, base: 8'd247, eoff: 5'd0},  // class 26: 4 code words
    '{len: 4'd13, plen: 4'd12, prefix: 14'b111111111110, nenum: 3'd1, base: 8'd251, eoff: 5'd0},  // class 27: 2 code words
    '{len: 4'd13, plen: 4'd13, prefix: 14'b1111111111110, nenum: 3'd0, base: 8'd253, eoff: 5'd0},  // class 28: 1 code word
    '{len: 4'd14, plen: 4'd13, prefix: 14'b1111111111111, nenum: 3'd1, base: 8'd254, eoff: 5'd0}   // class 29: 2 code words
  };

  // Decoded bytes in code word order (ROM contents).
  localparam logic [7:0] SYMBOLS [NUM_SYMBOLS] = '{
    8'h00, 8'h8f, 8'h24, 8'h01, 8'h10, 8'h46, 8'h25, 8'h80, 8'h08, 8'h03, 8'h21, 8'h0c, 8'h04, 8'h20, 8'hff, 8'h02,
    8'haf, 8'hc0, 8'h8c, 8'h8e, 8'h84, 8'h82, 8'he0, 8'h28, 8'hc4, 8'h30, 8'h18, 8'hc7, 8'h14, 8'h40, 8'h27, 8'h3c,
    8'h12, 8'h48, 8'h42, 8'h41, 8'h07, 8'h85, 8'h19, 8'h78, 8'h34, 8'hb8, 8'h70, 8'h2c, 8'hb0, 8'h09, 8'hf8, 8'he7,
    8'ha8, 8'hae, 8'h88, 8'h90, 8'he4, 8'h50, 8'h2a, 8'h44, 8'hbd, 8'h06, 8'ha5, 8'hbf, 8'h1c, 8'h8d, 8'h38, 8'h11,
    8'h26, 8'ha4, 8'hac, 8'ha0, 8'h05, 8'h60, 8'h2e, 8'hab, 8'h63, 8'h29, 8'h92, 8'h8b, 8'hd8, 8'hb1, 8'h94, 8'hd0,
    8'hc6, 8'ha1, 8'h16, 8'hb4, 8'h54, 8'hf0, 8'h86, 8'h43, 8'hb9, 8'h8a, 8'h6c, 8'h32, 8'ha9, 8'h0b, 8'h4c, 8'haa,
    8'h13, 8'h64, 8'h0d, 8'h68, 8'h22, 8'h2b, 8'ha7, 8'ha3, 8'h89, 8'hfc, 8'had, 8'hc8, 8'h23, 8'h31, 8'h87, 8'h81,
    8'h15, 8'h58, 8'h98, 8'h0a, 8'h0f, 8'h83, 8'ha2, 8'ha6, 8'h0e, 8'h73, 8'h6e, 8'h2d, 8'hc2, 8'hcc, 8'h4a, 8'hbc,
    8'h59, 8'hb6, 8'hfe, 8'he2, 8'he6, 8'hef, 8'hd4, 8'hce, 8'h7f, 8'h4b, 8'h4e, 8'h39, 8'h2f, 8'hdc, 8'h45, 8'h51,
    8'hb3, 8'h62, 8'h9c, 8'hcf, 8'h4f, 8'hf4, 8'h52, 8'h91, 8'h99, 8'h5c, 8'hc5, 8'h17, 8'hc1, 8'h7c, 8'h61, 8'hb5,
    8'hb2, 8'he8, 8'h74, 8'hec, 8'h37, 8'hea, 8'hd6, 8'h72, 8'he3, 8'h1d, 8'hd9, 8'h6d, 8'hfd, 8'h7e, 8'h65, 8'h67,
    8'hf7, 8'h71, 8'h3a, 8'h9e, 8'h7b, 8'h6b, 8'h6a, 8'hc3, 8'h1b, 8'h66, 8'h35, 8'h4d, 8'h79, 8'h1e, 8'h3e, 8'hbe,
    8'h47, 8'he1, 8'h1f, 8'hb7, 8'h49, 8'h33, 8'h6f, 8'h36, 8'he5, 8'h93, 8'hf9, 8'h1a, 8'hee, 8'h76, 8'hde, 8'h3f,
    8'h5a, 8'h5b, 8'hf1, 8'hd1, 8'hf3, 8'hcb, 8'h3d, 8'hfa, 8'hf5, 8'h56, 8'hd2, 8'hcd, 8'hf6, 8'hed, 8'h5e, 8'h77,
    8'hf2, 8'h97, 8'hc9, 8'h7d, 8'h55, 8'hca, 8'he9, 8'h95, 8'h9b, 8'h9f, 8'hfb, 8'h69, 8'h53, 8'heb, 8'h96, 8'hd7,
    8'hda, 8'hd3, 8'hbb, 8'hd5, 8'h9d, 8'h5d, 8'h9a, 8'h75, 8'h5f, 8'h7a, 8'h57, 8'hba, 8'h3b, 8'hdf, 8'hdd, 8'hdb
  };

  // Value of the first n bits of an aligned field, right-aligned.
  function automatic logic [MAX_LEN-1:0] head_bits(aligned_t b, logic [3:0] n);
    logic [MAX_LEN-1:0] v;
    v = b;
    return (n == 4'd0) ? '0 : (v >> (4'(MAX_LEN) - n));
  endfunction

endpackage
