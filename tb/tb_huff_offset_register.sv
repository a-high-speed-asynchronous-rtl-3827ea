// tb_huff_offset_register: reset value, load and hold behaviour.
module tb_huff_offset_register;
  logic clk = 0, rst = 1, load = 0;
  logic [2:0] d = '0, q;
  logic [2:0] model;
  int checks = 0, failures = 0;

  huff_offset_register dut (.clk, .rst, .load, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk);
    #1 rst = 0;
    model = 3'd0;
    checks++;
    if (q != 0) begin failures++; $display("reset value %0d", q); end
    for (int n = 0; n < 200; n++) begin
      load = 1'($urandom);
      d    = 3'($urandom);
      @(posedge clk);
      if (load) model = d;
      #1;
      checks++;
      if (q != model) begin failures++; $display("q=%0d expected %0d", q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
