// huffman_decoder: instruction decompressor for a compressed-code processor.
//
// Programs are stored with every instruction byte replaced by a Huffman code
// word of 2 to 14 bits; the decoder restores the bytes while the instruction
// cache is being refilled. Compressed 32-bit words arrive over a 4-phase
// handshake (in_rqst / in_ack, data valid with in_rqst), decoded bytes leave
// as 32-bit words over a second 4-phase handshake (out_rqst / out_ack). The
// refill logic resets the decoder (rst) after each 8-word cache line.
//
// One code word is decoded per cycle of the global phase phi. In the
// evaluation phase the alignment network picks the 14 bits at the current
// bit offset out of the input buffer, the match logic finds the class of the
// code word, the length ROM gives its length, the code ROM its byte, and the
// adder the new offset and the number of whole bytes (0, 1 or 2) by which the
// input buffer must move on. In the precharge phase the shift sequencer
// shifts the input buffer, and the reload sequencer refills it when its four
// loading registers have run empty, in parallel with decoding. So the decode
// rate varies with the code word: 2 clocks per symbol without a byte shift,
// 3 with one and 5 with two, plus any wait for input words or for the
// output side.
//
// The block structure follows the published asynchronous design. Its
// self-timed, clockless control is modelled here with one clock: every phase
// change, shift pulse and handshake edge happens at a rising edge of clk, and
// in_rqst / out_ack are sampled on that clock (synchronise them outside if
// they come from another clock domain).
module huffman_decoder
  import huff_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic [IN_W-1:0]  in_data,
  input  logic             in_rqst,
  output logic             in_ack,
  output logic [OUT_W-1:0] out_data,
  output logic             out_rqst,
  input  logic             out_ack
);

  // Input side
  logic    ib_load, ib_shift, ib_full, ib_empty, ib_head_valid;
  window_t window;

  // Core datapath
  logic [OFF_W-1:0] offset, new_offset;
  aligned_t         aligned;
  class_onehot_t    match;
  logic             match_done, len_done;
  logic [LEN_W-1:0] code_len;
  logic [SYM_W-1:0] sym;
  logic             code_done, add_done;
  logic             shift0, shift8, shift16;

  // Control
  logic phi, eval_end, shift_done, shift_ack, out_room;

  huff_reload_sequencer u_reload (
    .clk, .rst, .in_rqst, .in_ack,
    .empty(ib_empty), .full(ib_full), .load(ib_load)
  );

  huff_input_buffer u_inbuf (
    .clk, .rst, .load(ib_load), .data_in(in_data), .shift(ib_shift),
    .window, .full(ib_full), .empty(ib_empty), .head_valid(ib_head_valid)
  );

  huff_offset_register u_offset (
    .clk, .rst, .load(eval_end), .d(new_offset), .q(offset)
  );

  huff_alignment_network u_align (.d(window), .sel(offset), .b(aligned));

  huff_match_logic u_match (.b(aligned), .m(match), .done(match_done));

  huff_length_rom u_lenrom (.m(match), .len(code_len), .done(len_done));

  huff_code_rom u_coderom (.b(aligned), .m(match), .sym, .done(code_done));

  huff_adder u_adder (
    .offset, .len(code_len), .len_valid(len_done & match_done),
    .new_offset, .shift0, .shift8, .shift16, .done(add_done)
  );

  huff_shift_sequencer u_shseq (
    .clk, .rst, .start(eval_end), .shift0, .shift8, .shift16, .phi,
    .shift_enable(ib_head_valid), .in_clk(ib_shift),
    .shift_done, .shift_ack
  );

  huff_timing_control u_timing (
    .clk, .rst, .add_done(add_done & shift_ack), .code_done,
    .shift_done, .out_room, .phi, .eval_end
  );

  huff_output_buffer u_outbuf (
    .clk, .rst, .wr(eval_end), .sym, .room(out_room),
    .out_data, .out_rqst, .out_ack
  );

  // The datapath must never shift while the buffer is being loaded.
  always_ff @(posedge clk)
    if (!rst) assert (!(ib_load && ib_shift)) else $error("load and shift together");

endmodule
