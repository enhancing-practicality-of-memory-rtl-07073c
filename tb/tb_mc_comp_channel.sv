// tb_mc_comp_channel: end-to-end test of one memory-controller channel.
//
// A BPC channel and an FPC channel (NUM_WC = 32, and the BPC one also with
// NUM_WC = 16) are each driven by chan_harness: blocks of every data kind
// are written, their stored MAG count, flag and beats checked against the
// reference compressor, then read back in random order under random stalls
// and compared with the originals. Each harness fails if any mechanism (1 to
// 4 MAGs, raw fall-back and bypass, stalls on every port) never happened.
module tb_mc_comp_channel;
  import comp_pkg::*;

  localparam int ID_W = 8;
  localparam int NBLK = 60;
  localparam int WATCHDOG = 40000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic a_l2_wr_valid;
  logic a_l2_wr_ready;
  logic [ID_W-1:0] a_l2_wr_id;
  logic [BLOCK_BITS-1:0] a_l2_wr_block;
  logic a_dram_wr_valid;
  logic a_dram_wr_ready;
  logic [ID_W-1:0] a_dram_wr_id;
  logic [MAG_BITS-1:0] a_dram_wr_data;
  logic [2:0] a_dram_wr_nmag;
  logic a_dram_wr_comp;
  logic a_dram_wr_last;
  logic a_dram_rd_valid;
  logic a_dram_rd_ready;
  logic [ID_W-1:0] a_dram_rd_id;
  logic [MAG_BITS-1:0] a_dram_rd_data;
  logic [2:0] a_dram_rd_nmag;
  logic a_dram_rd_comp;
  logic a_dram_rd_last;
  logic a_l2_rd_valid;
  logic a_l2_rd_ready;
  logic [ID_W-1:0] a_l2_rd_id;
  logic [BLOCK_BITS-1:0] a_l2_rd_block;
  logic b_l2_wr_valid;
  logic b_l2_wr_ready;
  logic [ID_W-1:0] b_l2_wr_id;
  logic [BLOCK_BITS-1:0] b_l2_wr_block;
  logic b_dram_wr_valid;
  logic b_dram_wr_ready;
  logic [ID_W-1:0] b_dram_wr_id;
  logic [MAG_BITS-1:0] b_dram_wr_data;
  logic [2:0] b_dram_wr_nmag;
  logic b_dram_wr_comp;
  logic b_dram_wr_last;
  logic b_dram_rd_valid;
  logic b_dram_rd_ready;
  logic [ID_W-1:0] b_dram_rd_id;
  logic [MAG_BITS-1:0] b_dram_rd_data;
  logic [2:0] b_dram_rd_nmag;
  logic b_dram_rd_comp;
  logic b_dram_rd_last;
  logic b_l2_rd_valid;
  logic b_l2_rd_ready;
  logic [ID_W-1:0] b_l2_rd_id;
  logic [BLOCK_BITS-1:0] b_l2_rd_block;
  logic c_l2_wr_valid;
  logic c_l2_wr_ready;
  logic [ID_W-1:0] c_l2_wr_id;
  logic [BLOCK_BITS-1:0] c_l2_wr_block;
  logic c_dram_wr_valid;
  logic c_dram_wr_ready;
  logic [ID_W-1:0] c_dram_wr_id;
  logic [MAG_BITS-1:0] c_dram_wr_data;
  logic [2:0] c_dram_wr_nmag;
  logic c_dram_wr_comp;
  logic c_dram_wr_last;
  logic c_dram_rd_valid;
  logic c_dram_rd_ready;
  logic [ID_W-1:0] c_dram_rd_id;
  logic [MAG_BITS-1:0] c_dram_rd_data;
  logic [2:0] c_dram_rd_nmag;
  logic c_dram_rd_comp;
  logic c_dram_rd_last;
  logic c_l2_rd_valid;
  logic c_l2_rd_ready;
  logic [ID_W-1:0] c_l2_rd_id;
  logic [BLOCK_BITS-1:0] c_l2_rd_block;
  int chk_a, chk_b, chk_c, fl_a, fl_b, fl_c;
  logic done_a, done_b, done_c;

  mc_comp_channel #(.ALGO(ALGO_BPC), .NUM_WC(32)) dut_a (
    .clk, .rst_n,
    .l2_wr_valid(a_l2_wr_valid),
    .l2_wr_ready(a_l2_wr_ready),
    .l2_wr_id(a_l2_wr_id),
    .l2_wr_block(a_l2_wr_block),
    .dram_wr_valid(a_dram_wr_valid),
    .dram_wr_ready(a_dram_wr_ready),
    .dram_wr_id(a_dram_wr_id),
    .dram_wr_data(a_dram_wr_data),
    .dram_wr_nmag(a_dram_wr_nmag),
    .dram_wr_comp(a_dram_wr_comp),
    .dram_wr_last(a_dram_wr_last),
    .dram_rd_valid(a_dram_rd_valid),
    .dram_rd_ready(a_dram_rd_ready),
    .dram_rd_id(a_dram_rd_id),
    .dram_rd_data(a_dram_rd_data),
    .dram_rd_nmag(a_dram_rd_nmag),
    .dram_rd_comp(a_dram_rd_comp),
    .dram_rd_last(a_dram_rd_last),
    .l2_rd_valid(a_l2_rd_valid),
    .l2_rd_ready(a_l2_rd_ready),
    .l2_rd_id(a_l2_rd_id),
    .l2_rd_block(a_l2_rd_block)
  );
  chan_harness #(.ALGO(ALGO_BPC), .NBLK(NBLK)) h_a (
    .clk, .rst_n,
    .l2_wr_valid(a_l2_wr_valid),
    .l2_wr_ready(a_l2_wr_ready),
    .l2_wr_id(a_l2_wr_id),
    .l2_wr_block(a_l2_wr_block),
    .dram_wr_valid(a_dram_wr_valid),
    .dram_wr_ready(a_dram_wr_ready),
    .dram_wr_id(a_dram_wr_id),
    .dram_wr_data(a_dram_wr_data),
    .dram_wr_nmag(a_dram_wr_nmag),
    .dram_wr_comp(a_dram_wr_comp),
    .dram_wr_last(a_dram_wr_last),
    .dram_rd_valid(a_dram_rd_valid),
    .dram_rd_ready(a_dram_rd_ready),
    .dram_rd_id(a_dram_rd_id),
    .dram_rd_data(a_dram_rd_data),
    .dram_rd_nmag(a_dram_rd_nmag),
    .dram_rd_comp(a_dram_rd_comp),
    .dram_rd_last(a_dram_rd_last),
    .l2_rd_valid(a_l2_rd_valid),
    .l2_rd_ready(a_l2_rd_ready),
    .l2_rd_id(a_l2_rd_id),
    .l2_rd_block(a_l2_rd_block),
    .checks(chk_a), .failures(fl_a), .done(done_a)
  );
  mc_comp_channel #(.ALGO(ALGO_BPC), .NUM_WC(16)) dut_b (
    .clk, .rst_n,
    .l2_wr_valid(b_l2_wr_valid),
    .l2_wr_ready(b_l2_wr_ready),
    .l2_wr_id(b_l2_wr_id),
    .l2_wr_block(b_l2_wr_block),
    .dram_wr_valid(b_dram_wr_valid),
    .dram_wr_ready(b_dram_wr_ready),
    .dram_wr_id(b_dram_wr_id),
    .dram_wr_data(b_dram_wr_data),
    .dram_wr_nmag(b_dram_wr_nmag),
    .dram_wr_comp(b_dram_wr_comp),
    .dram_wr_last(b_dram_wr_last),
    .dram_rd_valid(b_dram_rd_valid),
    .dram_rd_ready(b_dram_rd_ready),
    .dram_rd_id(b_dram_rd_id),
    .dram_rd_data(b_dram_rd_data),
    .dram_rd_nmag(b_dram_rd_nmag),
    .dram_rd_comp(b_dram_rd_comp),
    .dram_rd_last(b_dram_rd_last),
    .l2_rd_valid(b_l2_rd_valid),
    .l2_rd_ready(b_l2_rd_ready),
    .l2_rd_id(b_l2_rd_id),
    .l2_rd_block(b_l2_rd_block)
  );
  chan_harness #(.ALGO(ALGO_BPC), .NBLK(NBLK)) h_b (
    .clk, .rst_n,
    .l2_wr_valid(b_l2_wr_valid),
    .l2_wr_ready(b_l2_wr_ready),
    .l2_wr_id(b_l2_wr_id),
    .l2_wr_block(b_l2_wr_block),
    .dram_wr_valid(b_dram_wr_valid),
    .dram_wr_ready(b_dram_wr_ready),
    .dram_wr_id(b_dram_wr_id),
    .dram_wr_data(b_dram_wr_data),
    .dram_wr_nmag(b_dram_wr_nmag),
    .dram_wr_comp(b_dram_wr_comp),
    .dram_wr_last(b_dram_wr_last),
    .dram_rd_valid(b_dram_rd_valid),
    .dram_rd_ready(b_dram_rd_ready),
    .dram_rd_id(b_dram_rd_id),
    .dram_rd_data(b_dram_rd_data),
    .dram_rd_nmag(b_dram_rd_nmag),
    .dram_rd_comp(b_dram_rd_comp),
    .dram_rd_last(b_dram_rd_last),
    .l2_rd_valid(b_l2_rd_valid),
    .l2_rd_ready(b_l2_rd_ready),
    .l2_rd_id(b_l2_rd_id),
    .l2_rd_block(b_l2_rd_block),
    .checks(chk_b), .failures(fl_b), .done(done_b)
  );
  mc_comp_channel #(.ALGO(ALGO_FPC), .NUM_WC(32)) dut_c (
    .clk, .rst_n,
    .l2_wr_valid(c_l2_wr_valid),
    .l2_wr_ready(c_l2_wr_ready),
    .l2_wr_id(c_l2_wr_id),
    .l2_wr_block(c_l2_wr_block),
    .dram_wr_valid(c_dram_wr_valid),
    .dram_wr_ready(c_dram_wr_ready),
    .dram_wr_id(c_dram_wr_id),
    .dram_wr_data(c_dram_wr_data),
    .dram_wr_nmag(c_dram_wr_nmag),
    .dram_wr_comp(c_dram_wr_comp),
    .dram_wr_last(c_dram_wr_last),
    .dram_rd_valid(c_dram_rd_valid),
    .dram_rd_ready(c_dram_rd_ready),
    .dram_rd_id(c_dram_rd_id),
    .dram_rd_data(c_dram_rd_data),
    .dram_rd_nmag(c_dram_rd_nmag),
    .dram_rd_comp(c_dram_rd_comp),
    .dram_rd_last(c_dram_rd_last),
    .l2_rd_valid(c_l2_rd_valid),
    .l2_rd_ready(c_l2_rd_ready),
    .l2_rd_id(c_l2_rd_id),
    .l2_rd_block(c_l2_rd_block)
  );
  chan_harness #(.ALGO(ALGO_FPC), .NBLK(NBLK)) h_c (
    .clk, .rst_n,
    .l2_wr_valid(c_l2_wr_valid),
    .l2_wr_ready(c_l2_wr_ready),
    .l2_wr_id(c_l2_wr_id),
    .l2_wr_block(c_l2_wr_block),
    .dram_wr_valid(c_dram_wr_valid),
    .dram_wr_ready(c_dram_wr_ready),
    .dram_wr_id(c_dram_wr_id),
    .dram_wr_data(c_dram_wr_data),
    .dram_wr_nmag(c_dram_wr_nmag),
    .dram_wr_comp(c_dram_wr_comp),
    .dram_wr_last(c_dram_wr_last),
    .dram_rd_valid(c_dram_rd_valid),
    .dram_rd_ready(c_dram_rd_ready),
    .dram_rd_id(c_dram_rd_id),
    .dram_rd_data(c_dram_rd_data),
    .dram_rd_nmag(c_dram_rd_nmag),
    .dram_rd_comp(c_dram_rd_comp),
    .dram_rd_last(c_dram_rd_last),
    .l2_rd_valid(c_l2_rd_valid),
    .l2_rd_ready(c_l2_rd_ready),
    .l2_rd_id(c_l2_rd_id),
    .l2_rd_block(c_l2_rd_block),
    .checks(chk_c), .failures(fl_c), .done(done_c)
  );

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done_a && done_b && done_c);
    $display("TB_RESULT checks=%0d failures=%0d", chk_a + chk_b + chk_c, fl_a + fl_b + fl_c);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", chk_a + chk_b + chk_c, fl_a + fl_b + fl_c + 1);
    $finish;
  end
endmodule
