// tb_huff_output_buffer: writes random bytes whenever there is room; a
// receiver model acknowledges each word after a random delay. Checks every
// delivered word against the bytes written, in order, and the 4-phase rules.
module tb_huff_output_buffer;
  logic clk = 0, rst = 1, wr = 0, out_ack = 0;
  logic [7:0] sym = 0;
  logic room, out_rqst;
  logic [31:0] out_data;
  logic [7:0] sent [$];
  int checks = 0, failures = 0, words = 0, full_waits = 0;

  huff_output_buffer dut (.clk, .rst, .wr, .sym, .room, .out_data, .out_rqst, .out_ack);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Writer.
  initial begin
    @(posedge clk);
    #1 rst = 0;
    forever begin
      wr  = room && ($urandom % 4 != 0);
      sym = 8'($urandom);
      if (!room) full_waits++;
      @(posedge clk);
      if (wr) sent.push_back(sym);
      #1;
    end
  end

  // Receiver.
  initial begin
    @(posedge clk);
    #2;
    while (words < 300) begin
      logic [31:0] exp_w;
      while (!out_rqst) @(posedge clk);
      repeat ($urandom % 5) @(posedge clk);
      #2;
      for (int i = 0; i < 4; i++) exp_w[31-8*i -: 8] = sent.pop_front();
      checks++;
      if (out_data !== exp_w) begin failures++; $display("word %h expected %h", out_data, exp_w); end
      out_ack = 1;
      @(posedge clk);
      #2;
      checks++;
      if (out_rqst) begin failures++; $display("request not released after ack"); end
      repeat ($urandom % 3) @(posedge clk);
      #2 out_ack = 0;
      words++;
    end
    checks++;
    if (full_waits == 0) begin failures++; $display("buffer never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
