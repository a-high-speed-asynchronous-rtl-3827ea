// tb_huff_length_rom: drives the match logic with every code word (plus
// random trailing bits) and checks the length ROM output against the length
// of the reference code word, and its completion output.
module tb_huff_length_rom;
  import huff_pkg::*;
  import tb_huff_ref_pkg::*;

  aligned_t         b;
  class_onehot_t    m;
  logic             mdone, done;
  logic [LEN_W-1:0] len;
  int checks = 0, failures = 0;

  huff_match_logic u_match (.b, .m, .done(mdone));
  huff_length_rom  dut (.m, .len, .done);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    code_table_t t;
    t = build_code();
    for (int rep = 0; rep < 4; rep++)
      for (int i = 0; i < 256; i++) begin
        b = 14'((t.code[i] << (14 - t.len[i])) | ($urandom & ((1 << (14 - t.len[i])) - 1)));
        #1;
        checks++;
        if (!done || len != t.len[i]) begin
          failures++;
          $display("code %0d: len=%0d done=%b, expected %0d", i, len, done, t.len[i]);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
