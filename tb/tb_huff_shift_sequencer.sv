// tb_huff_shift_sequencer: after reset and after each shift request counts
// the shift pulses and the clocks until shift_done. Expected: 3 pulses after
// reset, 2 for shift16, 1 for shift8, none for shift0, and 2n-1 clocks for n shifts
// when data is always available. Also checks that shifts wait for
// shift_enable and that phi masks shift_done.
module tb_huff_shift_sequencer;
  logic clk = 0, rst = 1;
  logic start = 0, shift0 = 0, shift8 = 0, shift16 = 0, phi = 0, shift_enable = 1;
  logic in_clk, shift_done, shift_ack;
  int checks = 0, failures = 0;

  huff_shift_sequencer dut (.clk, .rst, .start, .shift0, .shift8, .shift16, .phi,
                            .shift_enable, .in_clk, .shift_done, .shift_ack);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Waits for shift_done, counting pulses and clocks; random enable gaps if asked.
  task automatic run(input int exp_pulses, input bit gaps, input string what, input int exp_clocks);
    int pulses, clocks, stalls;
    pulses = 0; clocks = 0; stalls = 0;
    while (!shift_done) begin
      shift_enable = gaps ? 1'($urandom % 3 != 0) : 1'b1;
      #1;
      if (!shift_enable && !in_clk) stalls++;
      if (in_clk && !shift_enable) begin failures++; $display("%s: shift without enable", what); end
      if (in_clk) pulses++;
      @(posedge clk);
      #1;
      clocks++;
    end
    checks++;
    if (pulses != exp_pulses) begin failures++; $display("%s: %0d pulses, expected %0d", what, pulses, exp_pulses); end
    if (!gaps) begin
      checks++;
      if (clocks != exp_clocks) begin failures++; $display("%s: %0d clocks, expected %0d", what, clocks, exp_clocks); end
    end
  endtask

  task automatic request(input int bytes);
    @(negedge clk);
    shift16 = (bytes == 2); shift8 = (bytes == 1); shift0 = (bytes == 0);
    start = 1;
    @(posedge clk);
    #1 start = 0;
    checks++;
    if (!shift_ack) begin failures++; $display("no shift_ack after request %0d", bytes); end
  endtask

  initial begin
    @(posedge clk);
    #1 rst = 0;
    run(3, 0, "reset", 5);
    for (int n = 0; n < 300; n++) begin
      int bytes;
      bit gaps;
      bytes = $urandom % 3;
      gaps = n >= 150;
      request(bytes);
      if (bytes == 0) begin
        // shift_done right away, masked while phi is high.
        phi = 1; #1;
        checks++;
        if (shift_done) begin failures++; $display("shift_done not masked by phi"); end
        phi = 0; #1;
      end
      run(bytes, gaps, "request", bytes == 0 ? 0 : 2 * bytes - 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
