// tb_gpu_mc_compression: end-to-end test of the whole design at its default
// parameters (32 parallel word (de)compressors, 4-entry queues, 8-bit ids).
//
// Both channels run at once, each driven by chan_harness: NBLK blocks of all
// data kinds are written through the compressor into a behavioural DRAM,
// checked there against the reference compressor (MAG count, compressed
// flag, stored beats), read back in random order through the decompressor or
// the bypass, and compared with the originals. Every mechanism of the channel
// (1, 2, 3 and 4-MAG blocks, raw fall-back, read bypass, stalls on all four
// ports) must happen at least once per channel.
module tb_gpu_mc_compression;
  import comp_pkg::*;

  localparam int ID_W = 8;
  localparam int NBLK = 200;
  localparam int WATCHDOG = 60000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic bpc_l2_wr_valid;
  logic bpc_l2_wr_ready;
  logic [ID_W-1:0] bpc_l2_wr_id;
  logic [BLOCK_BITS-1:0] bpc_l2_wr_block;
  logic bpc_dram_wr_valid;
  logic bpc_dram_wr_ready;
  logic [ID_W-1:0] bpc_dram_wr_id;
  logic [MAG_BITS-1:0] bpc_dram_wr_data;
  logic [2:0] bpc_dram_wr_nmag;
  logic bpc_dram_wr_comp;
  logic bpc_dram_wr_last;
  logic bpc_dram_rd_valid;
  logic bpc_dram_rd_ready;
  logic [ID_W-1:0] bpc_dram_rd_id;
  logic [MAG_BITS-1:0] bpc_dram_rd_data;
  logic [2:0] bpc_dram_rd_nmag;
  logic bpc_dram_rd_comp;
  logic bpc_dram_rd_last;
  logic bpc_l2_rd_valid;
  logic bpc_l2_rd_ready;
  logic [ID_W-1:0] bpc_l2_rd_id;
  logic [BLOCK_BITS-1:0] bpc_l2_rd_block;
  logic fpc_l2_wr_valid;
  logic fpc_l2_wr_ready;
  logic [ID_W-1:0] fpc_l2_wr_id;
  logic [BLOCK_BITS-1:0] fpc_l2_wr_block;
  logic fpc_dram_wr_valid;
  logic fpc_dram_wr_ready;
  logic [ID_W-1:0] fpc_dram_wr_id;
  logic [MAG_BITS-1:0] fpc_dram_wr_data;
  logic [2:0] fpc_dram_wr_nmag;
  logic fpc_dram_wr_comp;
  logic fpc_dram_wr_last;
  logic fpc_dram_rd_valid;
  logic fpc_dram_rd_ready;
  logic [ID_W-1:0] fpc_dram_rd_id;
  logic [MAG_BITS-1:0] fpc_dram_rd_data;
  logic [2:0] fpc_dram_rd_nmag;
  logic fpc_dram_rd_comp;
  logic fpc_dram_rd_last;
  logic fpc_l2_rd_valid;
  logic fpc_l2_rd_ready;
  logic [ID_W-1:0] fpc_l2_rd_id;
  logic [BLOCK_BITS-1:0] fpc_l2_rd_block;
  int chk_b, chk_f, fl_b, fl_f;
  logic done_b, done_f;

  gpu_mc_compression dut (
    .clk, .rst_n,
    .bpc_l2_wr_valid(bpc_l2_wr_valid),
    .bpc_l2_wr_ready(bpc_l2_wr_ready),
    .bpc_l2_wr_id(bpc_l2_wr_id),
    .bpc_l2_wr_block(bpc_l2_wr_block),
    .bpc_dram_wr_valid(bpc_dram_wr_valid),
    .bpc_dram_wr_ready(bpc_dram_wr_ready),
    .bpc_dram_wr_id(bpc_dram_wr_id),
    .bpc_dram_wr_data(bpc_dram_wr_data),
    .bpc_dram_wr_nmag(bpc_dram_wr_nmag),
    .bpc_dram_wr_comp(bpc_dram_wr_comp),
    .bpc_dram_wr_last(bpc_dram_wr_last),
    .bpc_dram_rd_valid(bpc_dram_rd_valid),
    .bpc_dram_rd_ready(bpc_dram_rd_ready),
    .bpc_dram_rd_id(bpc_dram_rd_id),
    .bpc_dram_rd_data(bpc_dram_rd_data),
    .bpc_dram_rd_nmag(bpc_dram_rd_nmag),
    .bpc_dram_rd_comp(bpc_dram_rd_comp),
    .bpc_dram_rd_last(bpc_dram_rd_last),
    .bpc_l2_rd_valid(bpc_l2_rd_valid),
    .bpc_l2_rd_ready(bpc_l2_rd_ready),
    .bpc_l2_rd_id(bpc_l2_rd_id),
    .bpc_l2_rd_block(bpc_l2_rd_block),
    .fpc_l2_wr_valid(fpc_l2_wr_valid),
    .fpc_l2_wr_ready(fpc_l2_wr_ready),
    .fpc_l2_wr_id(fpc_l2_wr_id),
    .fpc_l2_wr_block(fpc_l2_wr_block),
    .fpc_dram_wr_valid(fpc_dram_wr_valid),
    .fpc_dram_wr_ready(fpc_dram_wr_ready),
    .fpc_dram_wr_id(fpc_dram_wr_id),
    .fpc_dram_wr_data(fpc_dram_wr_data),
    .fpc_dram_wr_nmag(fpc_dram_wr_nmag),
    .fpc_dram_wr_comp(fpc_dram_wr_comp),
    .fpc_dram_wr_last(fpc_dram_wr_last),
    .fpc_dram_rd_valid(fpc_dram_rd_valid),
    .fpc_dram_rd_ready(fpc_dram_rd_ready),
    .fpc_dram_rd_id(fpc_dram_rd_id),
    .fpc_dram_rd_data(fpc_dram_rd_data),
    .fpc_dram_rd_nmag(fpc_dram_rd_nmag),
    .fpc_dram_rd_comp(fpc_dram_rd_comp),
    .fpc_dram_rd_last(fpc_dram_rd_last),
    .fpc_l2_rd_valid(fpc_l2_rd_valid),
    .fpc_l2_rd_ready(fpc_l2_rd_ready),
    .fpc_l2_rd_id(fpc_l2_rd_id),
    .fpc_l2_rd_block(fpc_l2_rd_block)
  );
  chan_harness #(.ALGO(ALGO_BPC), .NBLK(NBLK)) h_bpc (
    .clk, .rst_n,
    .l2_wr_valid(bpc_l2_wr_valid),
    .l2_wr_ready(bpc_l2_wr_ready),
    .l2_wr_id(bpc_l2_wr_id),
    .l2_wr_block(bpc_l2_wr_block),
    .dram_wr_valid(bpc_dram_wr_valid),
    .dram_wr_ready(bpc_dram_wr_ready),
    .dram_wr_id(bpc_dram_wr_id),
    .dram_wr_data(bpc_dram_wr_data),
    .dram_wr_nmag(bpc_dram_wr_nmag),
    .dram_wr_comp(bpc_dram_wr_comp),
    .dram_wr_last(bpc_dram_wr_last),
    .dram_rd_valid(bpc_dram_rd_valid),
    .dram_rd_ready(bpc_dram_rd_ready),
    .dram_rd_id(bpc_dram_rd_id),
    .dram_rd_data(bpc_dram_rd_data),
    .dram_rd_nmag(bpc_dram_rd_nmag),
    .dram_rd_comp(bpc_dram_rd_comp),
    .dram_rd_last(bpc_dram_rd_last),
    .l2_rd_valid(bpc_l2_rd_valid),
    .l2_rd_ready(bpc_l2_rd_ready),
    .l2_rd_id(bpc_l2_rd_id),
    .l2_rd_block(bpc_l2_rd_block),
    .checks(chk_b), .failures(fl_b), .done(done_b)
  );
  chan_harness #(.ALGO(ALGO_FPC), .NBLK(NBLK)) h_fpc (
    .clk, .rst_n,
    .l2_wr_valid(fpc_l2_wr_valid),
    .l2_wr_ready(fpc_l2_wr_ready),
    .l2_wr_id(fpc_l2_wr_id),
    .l2_wr_block(fpc_l2_wr_block),
    .dram_wr_valid(fpc_dram_wr_valid),
    .dram_wr_ready(fpc_dram_wr_ready),
    .dram_wr_id(fpc_dram_wr_id),
    .dram_wr_data(fpc_dram_wr_data),
    .dram_wr_nmag(fpc_dram_wr_nmag),
    .dram_wr_comp(fpc_dram_wr_comp),
    .dram_wr_last(fpc_dram_wr_last),
    .dram_rd_valid(fpc_dram_rd_valid),
    .dram_rd_ready(fpc_dram_rd_ready),
    .dram_rd_id(fpc_dram_rd_id),
    .dram_rd_data(fpc_dram_rd_data),
    .dram_rd_nmag(fpc_dram_rd_nmag),
    .dram_rd_comp(fpc_dram_rd_comp),
    .dram_rd_last(fpc_dram_rd_last),
    .l2_rd_valid(fpc_l2_rd_valid),
    .l2_rd_ready(fpc_l2_rd_ready),
    .l2_rd_id(fpc_l2_rd_id),
    .l2_rd_block(fpc_l2_rd_block),
    .checks(chk_f), .failures(fl_f), .done(done_f)
  );

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done_b && done_f);
    $display("TB_RESULT checks=%0d failures=%0d", chk_b + chk_f, fl_b + fl_f);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", chk_b + chk_f, fl_b + fl_f + 1);
    $finish;
  end
endmodule
