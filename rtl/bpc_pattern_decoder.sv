// bpc_pattern_decoder: rebuilds one 31-bit DBX plane from tag and payload.
//
// Inverse of bpc_symbol_encoder. Position codes set (or, for the single-0
// code, clear) bits of a constant plane; the DBP-zero code yields no plane
// bits here, because that plane is rebuilt by the back transform from its
// neighbour instead. Purely combinational.
module bpc_pattern_decoder
  import comp_pkg::*;
(
  input  logic [TAG_W-1:0]  tag,
  input  logic [BPC_PW-1:0] payload,
  output logic [BPC_PW-1:0] dbx
);

  logic [4:0] p0, p1;

  always_comb begin
    p0 = payload[4:0];
    p1 = payload[9:5];
    dbx = '0;
    unique case (bpc_tag_e'(tag))
      BPC_ZERO:     dbx = '0;
      BPC_ALL_ONES: dbx = '1;
      BPC_DBP_ZERO: dbx = '0;
      BPC_SINGLE_1: dbx[p0] = 1'b1;
      BPC_TWO_CONS: begin dbx[p0] = 1'b1; dbx[p0 + 5'd1] = 1'b1; end
      BPC_TWO_1S:   begin dbx[p0] = 1'b1; dbx[p1] = 1'b1; end
      BPC_SINGLE_0: begin dbx = '1; dbx[p0] = 1'b0; end
      default:      dbx = payload;
    endcase
  end

endmodule
