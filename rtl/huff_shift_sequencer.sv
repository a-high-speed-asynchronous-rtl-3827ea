// huff_shift_sequencer: performs the 0, 1, 2 or 3 byte shifts of the input
// buffer that a decode step (or reset) asks for.
//
// Six flip-flops F0..F5 hold one token. Reset puts it in F0; at the end of an
// evaluation the adder's one-hot request puts it in F2 (shift16), F4 (shift8)
// or F5 (shift0). A token in F0, F2 or F4 moves on while emitting one shift
// clock pulse (in_clk), provided the buffer holds data to shift in
// (shift_enable); a token in F1 or F3 moves on one clock later, which stands
// for the feedback of the shift clock that marks a finished shift. So reset
// gives three shifts (to fill the processing registers), shift16 two and
// shift8 one; n shifts take 2n-1 clocks when data is available (the last
// shift lands the token in F5 directly). F5 is shift_done; it is masked while
// the global phase phi is high. shift_ack tells the timing control that a
// request has been taken (the token sits in F2, F4 or F5).
// The flip-flop chain and its set inputs follow the published design; the
// two-clock shift step is this synchronous model's own timing.
module huff_shift_sequencer #(
  parameter int unsigned NSTAGES = 6
) (
  input  logic clk,
  input  logic rst,
  input  logic start,
  input  logic shift0,
  input  logic shift8,
  input  logic shift16,
  input  logic phi,
  input  logic shift_enable,
  output logic in_clk,
  output logic shift_done,
  output logic shift_ack
);

  logic [NSTAGES-1:0] f;

  // A token in an even stage waits for data, then shifts.
  assign in_clk     = (f[0] | f[2] | f[4]) & shift_enable;
  assign shift_done = f[5] & ~phi;
  assign shift_ack  = f[2] | f[4] | f[5];

  always_ff @(posedge clk) begin
    if (rst) begin
      f <= NSTAGES'(1);
    end else if (start) begin
      f <= {shift0, shift8, 1'b0, shift16, 2'b00};
    end else if (in_clk || f[1] || f[3]) begin
      f <= {f[NSTAGES-2:0], 1'b0};
    end
  end

  always_ff @(posedge clk)
    if (!rst && start) assert ((2'(shift0) + 2'(shift8) + 2'(shift16)) == 2'd1)
      else $error("shift request is not one-hot");

endmodule
