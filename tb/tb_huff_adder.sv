// tb_huff_adder: all offsets 0..7 and code lengths 1..14; checks the next
// offset, the one-hot byte shift and the completion output.
module tb_huff_adder;
  import huff_pkg::*;

  logic [OFF_W-1:0] offset, new_offset;
  logic [LEN_W-1:0] len;
  logic len_valid, shift0, shift8, shift16, done;
  int checks = 0, failures = 0;

  huff_adder dut (.offset, .len, .len_valid, .new_offset, .shift0, .shift8, .shift16, .done);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int o = 0; o < 8; o++)
      for (int l = 1; l <= 14; l++) begin
        int bytes;
        offset = 3'(o);
        len = 4'(l);
        len_valid = 1'b1;
        #1;
        bytes = (o + l) / 8;
        checks++;
        if (new_offset != 3'((o + l) % 8) || shift0 != (bytes == 0) ||
            shift8 != (bytes == 1) || shift16 != (bytes == 2) || !done) begin
          failures++;
          $display("off=%0d len=%0d: new=%0d s0=%b s8=%b s16=%b", o, l, new_offset, shift0, shift8, shift16);
        end
      end
    len_valid = 1'b0;
    #1;
    checks++;
    if (done) begin failures++; $display("done without a valid length"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
