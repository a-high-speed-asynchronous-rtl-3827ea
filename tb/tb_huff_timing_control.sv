// tb_huff_timing_control: random completion, shift and room signals; a
// cycle model predicts phi and eval_end. Also counts that both the shift
// wait and the output wait held phi low at least once.
module tb_huff_timing_control;
  logic clk = 0, rst = 1;
  logic add_done = 0, code_done = 0, shift_done = 0, out_room = 0;
  logic phi, eval_end, exp_phi;
  int checks = 0, failures = 0, evals = 0, wait_shift = 0, wait_room = 0;

  huff_timing_control dut (.clk, .rst, .add_done, .code_done, .shift_done, .out_room, .phi, .eval_end);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk);
    #1 rst = 0;
    exp_phi = 0;
    for (int n = 0; n < 3000; n++) begin
      add_done   = 1'($urandom % 4 != 0);
      code_done  = 1'($urandom % 4 != 0);
      shift_done = 1'($urandom % 3 != 0);
      out_room   = 1'($urandom % 3 != 0);
      #1;
      checks++;
      if (phi != exp_phi || eval_end != (exp_phi & add_done & code_done)) begin
        failures++;
        $display("phi=%b eval_end=%b expected %b", phi, eval_end, exp_phi);
      end
      if (!exp_phi && !shift_done) wait_shift++;
      if (!exp_phi && shift_done && !out_room) wait_room++;
      if (eval_end) evals++;
      @(posedge clk);
      if (!exp_phi) exp_phi = shift_done & out_room;
      else          exp_phi = !(add_done & code_done);
      #1;
    end
    checks++;
    if (evals == 0 || wait_shift == 0 || wait_room == 0) failures++;
    $display("evals=%0d shift waits=%0d room waits=%0d", evals, wait_shift, wait_room);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
