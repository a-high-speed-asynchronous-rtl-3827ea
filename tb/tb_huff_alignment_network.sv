// tb_huff_alignment_network: random windows at every offset; the 14 aligned
// bits must be window bits offset .. offset+13 in stream order.
module tb_huff_alignment_network;
  import huff_pkg::*;

  window_t          d;
  logic [OFF_W-1:0] sel;
  aligned_t         b;
  int checks = 0, failures = 0;

  huff_alignment_network dut (.d, .sel, .b);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      logic [13:0] exp_b;
      d   = 21'($urandom);
      sel = 3'(n % 8);
      #1;
      // Expected: stream bit k of the window is d[20-k].
      for (int k = 0; k < 14; k++) exp_b[13-k] = d[20 - (k + int'(sel))];
      checks++;
      if (b !== exp_b) begin
        failures++;
        $display("d=%b sel=%0d b=%b expected %b", d, sel, b, exp_b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
