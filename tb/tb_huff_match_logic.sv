// tb_huff_match_logic: every code word, followed by random bits, must select
// exactly one class, and that class must have the code word's length and
// cover its ROM index. Expected values come from the canonical reference code.
module tb_huff_match_logic;
  import huff_pkg::*;
  import tb_huff_ref_pkg::*;

  aligned_t      b;
  class_onehot_t m;
  logic          done;
  int checks = 0, failures = 0;

  huff_match_logic dut (.b, .m, .done);

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
    for (int rep = 0; rep < 8; rep++)
      for (int i = 0; i < 256; i++) begin
        int cls;
        logic [13:0] r;
        r = 14'($urandom);
        b = 14'((t.code[i] << (14 - t.len[i])) | (r & ((14'd1 << (14 - t.len[i])) - 1)));
        #1;
        checks++;
        cls = -1;
        for (int c = 0; c < NUM_CLASSES; c++) if (m[c]) cls = c;
        if (!done || !$onehot(m) || cls < 0) begin
          failures++;
          $display("code %0d: no unique class (m=%b)", i, m);
        end else if (CLASSES[cls].len != t.len[i] || i < CLASSES[cls].base) begin
          failures++;
          $display("code %0d: class %0d has length %0d, expected %0d", i, cls, CLASSES[cls].len, t.len[i]);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
