// huff_timing_control: generates the global phase phi of the decoder core.
//
// phi low is the precharge phase: the input buffer is shifted and the
// output buffer may be emptied. phi rises (evaluate) once the shift
// sequencer reports shift_done and the output buffer has room for a symbol.
// While phi is high the alignment network, match logic, length ROM, code ROM
// and adder evaluate; when both the adder (add_done) and the code ROM
// (code_done) report completion phi falls, and in that same clock eval_end
// stores the symbol in the output buffer, loads the new offset and hands the
// shift request to the shift sequencer. One symbol per phi cycle; the cycle
// is 2 clocks with no byte shift, 3 with one and 5 with two.
// The conditions of both phi edges follow the published C-element based
// control; modelling it as a phase register with a one-clock evaluation is
// this design's own choice.
module huff_timing_control (
  input  logic clk,
  input  logic rst,
  input  logic add_done,
  input  logic code_done,
  input  logic shift_done,
  input  logic out_room,
  output logic phi,
  output logic eval_end
);

  assign eval_end = phi & add_done & code_done;

  always_ff @(posedge clk) begin
    if (rst)                          phi <= 1'b0;
    else if (!phi && shift_done && out_room) phi <= 1'b1;
    else if (eval_end)                phi <= 1'b0;
  end

endmodule
