// tb_huff_reload_sequencer: a memory model offers words with random gaps and
// a buffer model empties itself after random times. Checks that a word is
// loaded only into an empty buffer and only while requested, exactly once
// per request, and that in_ack follows the 4-phase rules.
module tb_huff_reload_sequencer;
  logic clk = 0, rst = 1;
  logic in_rqst = 0, in_ack, empty, full, load;
  int checks = 0, failures = 0, requests = 0, loads = 0, loads_this_req = 0;
  int hold;

  huff_reload_sequencer dut (.clk, .rst, .in_rqst, .in_ack, .empty, .full, .load);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Buffer model: full after a load, empty again some cycles later.
  always_ff @(posedge clk) begin
    if (rst) begin
      empty <= 1'b1; full <= 1'b0; hold <= 0;
    end else if (load) begin
      empty <= 1'b0; full <= 1'b1; hold <= 2 + int'($urandom % 12);
    end else if (!empty) begin
      full <= 1'b0;
      if (hold == 0) empty <= 1'b1; else hold <= hold - 1;
    end
  end

  // Protocol checks on every clock.
  always @(posedge clk) if (!rst) begin
    checks++;
    if (load && (!in_rqst || !empty)) begin failures++; $display("load without request or into a full buffer"); end
    if (load) begin loads++; loads_this_req++; end
    if (in_ack && loads_this_req == 0) begin failures++; $display("ack before load"); end
    if (loads_this_req > 1) begin failures++; $display("two loads for one request"); end
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 200; n++) begin
      repeat ($urandom % 4) @(posedge clk);
      #1 in_rqst = 1;
      requests++;
      loads_this_req = 0;
      while (!in_ack) @(posedge clk);
      #1 in_rqst = 0;
      @(posedge clk);
      #1;
      checks++;
      if (in_ack) begin failures++; $display("ack not released"); end
    end
    checks++;
    if (loads != requests) begin failures++; $display("loads=%0d requests=%0d", loads, requests); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
