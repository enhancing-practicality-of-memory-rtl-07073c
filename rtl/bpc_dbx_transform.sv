// bpc_dbx_transform: Delta-BitPlane-XOR (DBX) transform of one 128-byte block.
//
// Word 0 becomes the base. The 31 differences w[i]-w[i-1] (i = 1..31) are
// formed as 33-bit signed deltas. Bit plane j (DBP j) collects bit j of all
// 31 deltas (delta i -> plane bit i-1), giving 33 planes of 31 bits. Each
// DBX plane is the XOR of a DBP plane and the next higher one; the top plane
// is kept as is. The transform makes blocks of similar values look like
// mostly-zero planes. The flag dbp_zero[j] tells the encoder that the DBP
// plane itself is zero, which the decoder can exploit.
// Purely combinational; the compressor registers its outputs. The transform
// follows the classic BPC definition, which the design uses unchanged.
module bpc_dbx_transform
  import comp_pkg::*;
(
  input  logic [BLOCK_BITS-1:0]           in_block,
  output logic [WORD_BITS-1:0]            base,
  output logic [BPC_NSYM-1:0][BPC_PW-1:0] dbx,
  output logic [BPC_NSYM-1:0]             dbp_zero
);

  logic [NWORDS-1:1][BPC_NSYM-1:0]  delta;
  logic [BPC_NSYM-1:0][BPC_PW-1:0]  dbp;

  always_comb begin
    base = in_block[0 +: WORD_BITS];
    for (int i = 1; i < NWORDS; i++) begin
      delta[i] = {in_block[WORD_BITS*i + WORD_BITS-1], in_block[WORD_BITS*i +: WORD_BITS]}
               - {in_block[WORD_BITS*(i-1) + WORD_BITS-1], in_block[WORD_BITS*(i-1) +: WORD_BITS]};
    end
    for (int j = 0; j < BPC_NSYM; j++) begin
      for (int i = 1; i < NWORDS; i++) begin
        dbp[j][i-1] = delta[i][j];
      end
      dbp_zero[j] = (dbp[j] == '0);
    end
    for (int j = 0; j < BPC_NSYM-1; j++) begin
      dbx[j] = dbp[j] ^ dbp[j+1];
    end
    dbx[BPC_NSYM-1] = dbp[BPC_NSYM-1];
  end

endmodule
