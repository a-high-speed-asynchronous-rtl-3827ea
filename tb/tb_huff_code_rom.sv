// tb_huff_code_rom: drives the match logic with every code word (plus random
// trailing bits) and checks the code ROM's byte against the reference
// table, including the all-zero byte that bypasses the ROM.
module tb_huff_code_rom;
  import huff_pkg::*;
  import tb_huff_ref_pkg::*;

  aligned_t         b;
  class_onehot_t    m;
  logic             mdone, done;
  logic [SYM_W-1:0] sym;
  int checks = 0, failures = 0, zeros = 0;

  huff_match_logic u_match (.b, .m, .done(mdone));
  huff_code_rom    dut (.b, .m, .sym, .done);

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
        if (SYMBOLS[i] == 8'h00) zeros++;
        if (!done || sym !== SYMBOLS[i]) begin
          failures++;
          $display("code %0d: sym=%h done=%b, expected %h", i, sym, done, SYMBOLS[i]);
        end
      end
    checks++;
    if (zeros == 0) begin failures++; $display("zero byte never decoded"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
