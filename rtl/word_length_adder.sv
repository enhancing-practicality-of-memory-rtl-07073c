// word_length_adder: start positions of the compressed words.
//
// Because every tag has a fixed size, the payload lengths of all words are
// known as soon as the tags are decoded. This unit forms the exclusive
// running sum of the lengths, offset by the size of the fixed header
// (BASE), so starts[j] is the bit at which payload j begins; total is the
// size of the whole compressed image. Used by both the decompressor (start
// positions for the parallel shifters) and the compressor's concatenation.
// Written as a linear running sum that synthesis is free to restructure.
// Purely combinational.
module word_length_adder
  import comp_pkg::*;
#(
  parameter int unsigned NSYM = BPC_NSYM,
  parameter int unsigned BASE = BPC_HDR_W
) (
  input  logic [NSYM-1:0][LEN_W-1:0] lens,
  output logic [NSYM-1:0][POS_W-1:0] starts,
  output logic [POS_W-1:0]           total
);

  always_comb begin
    logic [POS_W-1:0] acc;
    acc = POS_W'(BASE);
    for (int j = 0; j < NSYM; j++) begin
      starts[j] = acc;
      acc = acc + POS_W'(lens[j]);
    end
    total = acc;
  end

endmodule
