// bpc_symbol_encoder: pattern matcher for one 31-bit DBX plane.
//
// Classifies the plane into one of the eight 3-bit codes of the BPC tag
// table and produces the payload that goes with it (a 5-bit position, two
// positions, or the raw plane). With no zero-run encoding every plane gets
// exactly one fixed-size tag. When several codes match, the shortest one is
// taken (3-bit codes before 8-bit, 8-bit before 13-bit); that ordering and
// placing the lower position in the lower payload bits are choices of this
// implementation. Purely combinational.
//
//   dbx      : DBX plane            tag     : code (comp_pkg::bpc_tag_e)
//   dbp_zero : DBP plane is zero    len     : payload length in bits
//                                   payload : payload, LSB aligned
module bpc_symbol_encoder
  import comp_pkg::*;
(
  input  logic [BPC_PW-1:0] dbx,
  input  logic              dbp_zero,
  output logic [TAG_W-1:0]  tag,
  output logic [LEN_W-1:0]  len,
  output logic [BPC_PW-1:0] payload
);

  logic [5:0] ones, zeros;
  logic [4:0] lo1, hi1, lo0;

  always_comb begin
    ones = '0;
    lo1  = '0;
    hi1  = '0;
    lo0  = '0;
    // scan from the top so that the last hit is the lowest position
    for (int b = BPC_PW-1; b >= 0; b--) begin
      if (dbx[b])  lo1 = 5'(b);
      if (!dbx[b]) lo0 = 5'(b);
    end
    for (int b = 0; b < BPC_PW; b++) begin
      ones = ones + 6'(dbx[b]);
      if (dbx[b]) hi1 = 5'(b);
    end
    zeros = 6'(BPC_PW) - ones;

    payload = '0;
    if (dbx == '0) begin
      tag = BPC_ZERO;
    end else if (zeros == 0) begin
      tag = BPC_ALL_ONES;
    end else if (dbp_zero) begin
      tag = BPC_DBP_ZERO;
    end else if (ones == 1) begin
      tag = BPC_SINGLE_1;
      payload[4:0] = lo1;
    end else if (ones == 2 && hi1 == lo1 + 5'd1) begin
      tag = BPC_TWO_CONS;
      payload[4:0] = lo1;
    end else if (zeros == 1) begin
      tag = BPC_SINGLE_0;
      payload[4:0] = lo0;
    end else if (ones == 2) begin
      tag = BPC_TWO_1S;
      payload[9:0] = {hi1, lo1};
    end else begin
      tag = BPC_RAW;
      payload = dbx;
    end
    len = bpc_len(tag);
  end

endmodule
