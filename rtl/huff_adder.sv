// huff_adder: next offset and byte shift of the input buffer.
//
// Adds the length of the code word just decoded to the current bit offset.
// The low three bits of the sum are the offset of the next code word; the
// carry part (sum / 8, at most 2 since 7 + 14 < 24) says by how many bytes
// the input buffer must be shifted, given one-hot as shift0, shift8 and
// shift16. done is the completion: the length input is valid and one of
// the three one-hot shift outputs has fired, as a dual-rail adder signals
// completion once every output has taken a value. Purely combinational;
// the add-then-carry scheme follows the published design, the completion
// detector on the one-hot outputs is this design's single-rail stand-in.
module huff_adder
  import huff_pkg::*;
(
  input  logic [OFF_W-1:0] offset,
  input  logic [LEN_W-1:0] len,
  input  logic             len_valid,
  output logic [OFF_W-1:0] new_offset,
  output logic             shift0,
  output logic             shift8,
  output logic             shift16,
  output logic             done
);

  logic [LEN_W:0] sum;

  always_comb begin
    sum        = {2'b00, offset} + {1'b0, len};
    new_offset = sum[OFF_W-1:0];
    shift0     = (sum[LEN_W:OFF_W] == 2'd0);
    shift8     = (sum[LEN_W:OFF_W] == 2'd1);
    shift16    = (sum[LEN_W:OFF_W] == 2'd2);
    done       = len_valid & (shift0 | shift8 | shift16);
  end

endmodule
