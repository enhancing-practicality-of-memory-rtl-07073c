// bit_concatenator: packs variable-length payloads behind a fixed header.
//
// The header (tag section, plus the base word for BPC) sits at bit 0. Each
// payload j is placed at the exclusive running sum of the lengths before it,
// computed by word_length_adder; its bits above len[j] are ignored. The image
// is the OR of all shifted, masked payloads, so there is no sequential
// packing loop and all words are placed in one step. out_bits is the size of
// the image in bits. Purely combinational; the compressor registers the
// result.
module bit_concatenator
  import comp_pkg::*;
#(
  parameter int unsigned NSYM  = BPC_NSYM,
  parameter int unsigned PW    = BPC_PW,
  parameter int unsigned HDR_W = BPC_HDR_W,
  parameter int unsigned OUT_W = BPC_MAX_BITS
) (
  input  logic [HDR_W-1:0]           hdr,
  input  logic [NSYM-1:0][LEN_W-1:0] lens,
  input  logic [NSYM-1:0][PW-1:0]    payloads,
  output logic [OUT_W-1:0]           out_data,
  output logic [POS_W-1:0]           out_bits
);

  logic [NSYM-1:0][POS_W-1:0] starts;

  word_length_adder #(.NSYM(NSYM), .BASE(HDR_W)) u_adder (
    .lens  (lens),
    .starts(starts),
    .total (out_bits)
  );

  always_comb begin
    logic [PW-1:0] mask;
    out_data = OUT_W'(hdr);
    for (int j = 0; j < NSYM; j++) begin
      mask = PW'((64'd1 << lens[j]) - 64'd1);
      out_data = out_data | (OUT_W'(payloads[j] & mask) << starts[j]);
    end
  end

endmodule
