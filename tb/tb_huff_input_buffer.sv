// tb_huff_input_buffer: loads words and shifts bytes at random, keeping a
// byte-level model of the seven registers and four status bits; checks the
// 21-bit window and the full / empty / head_valid flags after every step.
module tb_huff_input_buffer;
  import huff_pkg::*;

  logic clk = 0, rst = 1, load = 0, shift = 0;
  logic [31:0] data_in = '0;
  window_t window;
  logic full, empty, head_valid;
  logic [7:0] r [7];
  logic       st [4];
  int checks = 0, failures = 0, loads = 0, shifts = 0;

  huff_input_buffer dut (.clk, .rst, .load, .data_in, .shift, .window, .full, .empty, .head_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    window_t exp_w;
    exp_w = {r[0], r[1], r[2][7:3]};
    checks++;
    if (window !== exp_w || full != (st[0] & st[1] & st[2] & st[3]) ||
        empty != !(st[0] | st[1] | st[2] | st[3]) || head_valid != st[0]) begin
      failures++;
      $display("window=%h expected %h full=%b empty=%b head=%b", window, exp_w, full, empty, head_valid);
    end
  endtask

  initial begin
    for (int i = 0; i < 7; i++) r[i] = 0;
    for (int i = 0; i < 4; i++) st[i] = 0;
    @(posedge clk);
    #1 rst = 0;
    check();
    for (int n = 0; n < 1000; n++) begin
      // Load only when empty, shift only when there is data (as in the design).
      load  = empty && ($urandom % 2 == 0);
      shift = !load && head_valid && ($urandom % 3 != 0);
      data_in = $urandom;
      @(posedge clk);
      if (load) begin
        for (int i = 0; i < 4; i++) begin r[3+i] = data_in[31-8*i -: 8]; st[i] = 1; end
        loads++;
      end else if (shift) begin
        for (int i = 0; i < 6; i++) r[i] = r[i+1];
        r[6] = 0;
        for (int i = 0; i < 3; i++) st[i] = st[i+1];
        st[3] = 0;
        shifts++;
      end
      #1;
      load = 0;
      shift = 0;
      check();
    end
    checks++;
    if (loads == 0 || shifts == 0) failures++;
    $display("loads=%0d shifts=%0d", loads, shifts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
