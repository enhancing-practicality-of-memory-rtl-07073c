// bpc_dbx_back_transform: DBX planes back to 32 data words.
//
// Walks the planes from the top (plane 32) down: each DBP plane is the DBX
// plane XOR the DBP plane above it, except where the tag said the DBP plane
// itself is zero (dbp_zero), in which case it is zero. Plane bit i-1 of
// plane j is bit j of delta i; word i is word i-1 plus delta i, starting
// from the base. Purely combinational; written as a ripple over planes and a
// running sum over words.
module bpc_dbx_back_transform
  import comp_pkg::*;
(
  input  logic [WORD_BITS-1:0]            base,
  input  logic [BPC_NSYM-1:0][BPC_PW-1:0] dbx,
  input  logic [BPC_NSYM-1:0]             dbp_zero,
  output logic [BLOCK_BITS-1:0]           out_block
);

  logic [BPC_NSYM-1:0][BPC_PW-1:0] dbp;
  logic [NWORDS-1:0][WORD_BITS-1:0] w;

  always_comb begin
    logic [WORD_BITS-1:0] acc, d;
    dbp[BPC_NSYM-1] = dbp_zero[BPC_NSYM-1] ? '0 : dbx[BPC_NSYM-1];
    for (int j = BPC_NSYM-2; j >= 0; j--) begin
      dbp[j] = dbp_zero[j] ? '0 : (dbx[j] ^ dbp[j+1]);
    end
    acc  = base;
    w[0] = base;
    for (int i = 1; i < NWORDS; i++) begin
      for (int j = 0; j < WORD_BITS; j++) d[j] = dbp[j][i-1];
      acc  = acc + d;
      w[i] = acc;
    end
    out_block = w;
  end

endmodule
