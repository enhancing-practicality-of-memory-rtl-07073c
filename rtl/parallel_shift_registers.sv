// parallel_shift_registers: extracts compressed words from an image.
//
// One right shifter per word moves the image by that word's start position
// and keeps the low PW bits, so all NSYM words come out at once; bits above
// the word's own length are don't-care and are dropped by the pattern
// decoders. A shift past the end of the image reads zeros. Realised as
// combinational barrel shifters (no clocked shift chain), a choice of this
// implementation.
module parallel_shift_registers
  import comp_pkg::*;
#(
  parameter int unsigned NSYM = BPC_NSYM,
  parameter int unsigned PW   = BPC_PW,
  parameter int unsigned IN_W = BPC_MAX_BITS
) (
  input  logic [IN_W-1:0]            in_data,
  input  logic [NSYM-1:0][POS_W-1:0] starts,
  output logic [NSYM-1:0][PW-1:0]    words
);

  always_comb begin
    for (int j = 0; j < NSYM; j++) begin
      words[j] = PW'(in_data >> starts[j]);
    end
  end

endmodule
