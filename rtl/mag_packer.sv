// mag_packer: decides how a block is stored in 32-byte memory-access granules.
//
// Off-chip memory is read and written in whole MAGs, so a compressed image is
// worth only the number of MAGs it fills: nmag = ceil(comp_bits / 256). If
// that is fewer than the 4 MAGs of a raw 128-byte block, the compressed image
// is stored (is_comp = 1); otherwise compression saves no transfer, the raw
// block is stored in 4 MAGs and is_comp = 0, so the read path can skip the
// decompressor. Rounding to whole MAGs follows the design; the raw fall-back
// is this implementation's choice. Purely combinational. Only the low 1024
// bits of comp are used: an image that does not fit in them needs 4 or more
// MAGs and is never stored.
module mag_packer
  import comp_pkg::*;
#(
  parameter int unsigned MAG_W = MAG_BITS,
  parameter int unsigned CW    = BPC_MAX_BITS
) (
  input  logic [BLOCK_BITS-1:0] raw,
  input  logic [CW-1:0]         comp,
  input  logic [POS_W-1:0]      comp_bits,
  output logic [BLOCK_BITS-1:0] data,
  output logic [2:0]            nmag,
  output logic                  is_comp
);

  localparam int unsigned NMAX = BLOCK_BITS / MAG_W;

  logic [POS_W-1:0] mags;

  always_comb begin
    mags    = (comp_bits + POS_W'(MAG_W - 1)) / POS_W'(MAG_W);
    is_comp = (mags < POS_W'(NMAX));
    if (is_comp) begin
      nmag = 3'(mags);
      data = BLOCK_BITS'(comp);
    end else begin
      nmag = 3'(NMAX);
      data = raw;
    end
  end

endmodule
