// tag_decoder: decodes the fixed-size tag section into payload lengths.
//
// All NSYM 3-bit tags are decoded in parallel, one small lookup per tag:
// the BPC table (0, 5, 10 or 31 bits) when ALGO is ALGO_BPC, the FPC table
// (0, 4, 8, 16 or 32 bits) when ALGO is ALGO_FPC. tags[j] is the tag of
// symbol j. Purely combinational.
module tag_decoder
  import comp_pkg::*;
#(
  parameter algo_e       ALGO = ALGO_BPC,
  parameter int unsigned NSYM = BPC_NSYM
) (
  input  logic [NSYM-1:0][TAG_W-1:0] tags,
  output logic [NSYM-1:0][LEN_W-1:0] lens
);

  always_comb begin
    for (int j = 0; j < NSYM; j++) begin
      lens[j] = (ALGO == ALGO_BPC) ? bpc_len(tags[j]) : fpc_len(tags[j]);
    end
  end

endmodule
