// gpu_mc_compression: memory-controller compression for a GPU, with the
// high-throughput BPC and FPC engines side by side.
//
// Each channel sits between the GPU L2 cache and off-chip DRAM: blocks from
// L2 are compressed before they are written and decompressed after they are
// read, and each block moves over the DRAM bus as 1 to 4 granules of 32
// bytes instead of always 4. The BPC channel uses Bit-Plane Compression with
// fixed 3-bit tags; the FPC channel uses Frequent Pattern Compression with
// fixed 3-bit prefixes. Neither uses zero-run encoding, so every
// word of a block is compressed and decompressed in parallel, 128 bytes per
// cycle at NUM_WC = 32.
//
// The two techniques are alternatives for the same place in a GPU, so the two
// channels do not interact: each has its own L2 and DRAM ports (prefix bpc_
// or fpc_). See mc_comp_channel for the port protocol. L2 and DRAM are
// outside this design.
module gpu_mc_compression
  import comp_pkg::*;
#(
  parameter int unsigned NUM_WC     = 32,
  parameter int unsigned FIFO_DEPTH = 4,
  parameter int unsigned ID_W       = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // ---- BPC channel ----
  input  logic                  bpc_l2_wr_valid,
  output logic                  bpc_l2_wr_ready,
  input  logic [ID_W-1:0]       bpc_l2_wr_id,
  input  logic [BLOCK_BITS-1:0] bpc_l2_wr_block,
  output logic                  bpc_dram_wr_valid,
  input  logic                  bpc_dram_wr_ready,
  output logic [ID_W-1:0]       bpc_dram_wr_id,
  output logic [MAG_BITS-1:0]   bpc_dram_wr_data,
  output logic [2:0]            bpc_dram_wr_nmag,
  output logic                  bpc_dram_wr_comp,
  output logic                  bpc_dram_wr_last,
  input  logic                  bpc_dram_rd_valid,
  output logic                  bpc_dram_rd_ready,
  input  logic [ID_W-1:0]       bpc_dram_rd_id,
  input  logic [MAG_BITS-1:0]   bpc_dram_rd_data,
  input  logic [2:0]            bpc_dram_rd_nmag,
  input  logic                  bpc_dram_rd_comp,
  input  logic                  bpc_dram_rd_last,
  output logic                  bpc_l2_rd_valid,
  input  logic                  bpc_l2_rd_ready,
  output logic [ID_W-1:0]       bpc_l2_rd_id,
  output logic [BLOCK_BITS-1:0] bpc_l2_rd_block,
  // ---- FPC channel ----
  input  logic                  fpc_l2_wr_valid,
  output logic                  fpc_l2_wr_ready,
  input  logic [ID_W-1:0]       fpc_l2_wr_id,
  input  logic [BLOCK_BITS-1:0] fpc_l2_wr_block,
  output logic                  fpc_dram_wr_valid,
  input  logic                  fpc_dram_wr_ready,
  output logic [ID_W-1:0]       fpc_dram_wr_id,
  output logic [MAG_BITS-1:0]   fpc_dram_wr_data,
  output logic [2:0]            fpc_dram_wr_nmag,
  output logic                  fpc_dram_wr_comp,
  output logic                  fpc_dram_wr_last,
  input  logic                  fpc_dram_rd_valid,
  output logic                  fpc_dram_rd_ready,
  input  logic [ID_W-1:0]       fpc_dram_rd_id,
  input  logic [MAG_BITS-1:0]   fpc_dram_rd_data,
  input  logic [2:0]            fpc_dram_rd_nmag,
  input  logic                  fpc_dram_rd_comp,
  input  logic                  fpc_dram_rd_last,
  output logic                  fpc_l2_rd_valid,
  input  logic                  fpc_l2_rd_ready,
  output logic [ID_W-1:0]       fpc_l2_rd_id,
  output logic [BLOCK_BITS-1:0] fpc_l2_rd_block
);

  mc_comp_channel #(
    .ALGO      (ALGO_BPC),
    .NUM_WC    (NUM_WC),
    .FIFO_DEPTH(FIFO_DEPTH),
    .ID_W      (ID_W)
  ) u_bpc_channel (
    .clk, .rst_n,
    .l2_wr_valid  (bpc_l2_wr_valid),
    .l2_wr_ready  (bpc_l2_wr_ready),
    .l2_wr_id     (bpc_l2_wr_id),
    .l2_wr_block  (bpc_l2_wr_block),
    .dram_wr_valid(bpc_dram_wr_valid),
    .dram_wr_ready(bpc_dram_wr_ready),
    .dram_wr_id   (bpc_dram_wr_id),
    .dram_wr_data (bpc_dram_wr_data),
    .dram_wr_nmag (bpc_dram_wr_nmag),
    .dram_wr_comp (bpc_dram_wr_comp),
    .dram_wr_last (bpc_dram_wr_last),
    .dram_rd_valid(bpc_dram_rd_valid),
    .dram_rd_ready(bpc_dram_rd_ready),
    .dram_rd_id   (bpc_dram_rd_id),
    .dram_rd_data (bpc_dram_rd_data),
    .dram_rd_nmag (bpc_dram_rd_nmag),
    .dram_rd_comp (bpc_dram_rd_comp),
    .dram_rd_last (bpc_dram_rd_last),
    .l2_rd_valid  (bpc_l2_rd_valid),
    .l2_rd_ready  (bpc_l2_rd_ready),
    .l2_rd_id     (bpc_l2_rd_id),
    .l2_rd_block  (bpc_l2_rd_block)
  );

  mc_comp_channel #(
    .ALGO      (ALGO_FPC),
    .NUM_WC    (NUM_WC),
    .FIFO_DEPTH(FIFO_DEPTH),
    .ID_W      (ID_W)
  ) u_fpc_channel (
    .clk, .rst_n,
    .l2_wr_valid  (fpc_l2_wr_valid),
    .l2_wr_ready  (fpc_l2_wr_ready),
    .l2_wr_id     (fpc_l2_wr_id),
    .l2_wr_block  (fpc_l2_wr_block),
    .dram_wr_valid(fpc_dram_wr_valid),
    .dram_wr_ready(fpc_dram_wr_ready),
    .dram_wr_id   (fpc_dram_wr_id),
    .dram_wr_data (fpc_dram_wr_data),
    .dram_wr_nmag (fpc_dram_wr_nmag),
    .dram_wr_comp (fpc_dram_wr_comp),
    .dram_wr_last (fpc_dram_wr_last),
    .dram_rd_valid(fpc_dram_rd_valid),
    .dram_rd_ready(fpc_dram_rd_ready),
    .dram_rd_id   (fpc_dram_rd_id),
    .dram_rd_data (fpc_dram_rd_data),
    .dram_rd_nmag (fpc_dram_rd_nmag),
    .dram_rd_comp (fpc_dram_rd_comp),
    .dram_rd_last (fpc_dram_rd_last),
    .l2_rd_valid  (fpc_l2_rd_valid),
    .l2_rd_ready  (fpc_l2_rd_ready),
    .l2_rd_id     (fpc_l2_rd_id),
    .l2_rd_block  (fpc_l2_rd_block)
  );

endmodule
