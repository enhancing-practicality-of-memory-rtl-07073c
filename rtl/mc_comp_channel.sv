// mc_comp_channel: one memory-controller channel with inline compression.
//
// Write path: a 128-byte block from L2 enters the compressor (BPC or FPC,
// chosen by ALGO). mag_packer rounds the compressed size up to whole 32-byte
// MAGs and keeps the compressed image if it needs fewer than 4 MAGs, the raw
// block otherwise. The result waits in the write queue and is sent to DRAM
// as nmag beats of 32 bytes (dram_wr_last on the final beat); every beat
// carries the block id, nmag and the compressed flag as metadata.
//
// Read path: DRAM returns a block as nmag beats with the same metadata. The
// beats are gathered into a block buffer. A compressed block goes through the
// decompressor; a raw block bypasses it, but only once the decompressor is
// empty so that blocks leave in arrival order. Finished blocks wait in the
// return queue and go to L2 as one 128-byte transfer.
//
// The raw block and the id of each block in the compressor (and the id of
// each block in the decompressor) travel in small side queues, because the
// engines carry data only. Queue depths, the beat format and the metadata
// that travels with the beats are choices of this implementation; the
// compressor/decompressor placement, the queues and the N x 32-byte transfers
// follow the design. All handshakes are valid/ready.
module mc_comp_channel
  import comp_pkg::*;
#(
  parameter algo_e       ALGO       = ALGO_BPC,
  parameter int unsigned NUM_WC     = 32,
  parameter int unsigned FIFO_DEPTH = 4,
  parameter int unsigned ID_W       = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // L2 -> MC write requests
  input  logic                  l2_wr_valid,
  output logic                  l2_wr_ready,
  input  logic [ID_W-1:0]       l2_wr_id,
  input  logic [BLOCK_BITS-1:0] l2_wr_block,
  // MC -> DRAM write beats
  output logic                  dram_wr_valid,
  input  logic                  dram_wr_ready,
  output logic [ID_W-1:0]       dram_wr_id,
  output logic [MAG_BITS-1:0]   dram_wr_data,
  output logic [2:0]            dram_wr_nmag,
  output logic                  dram_wr_comp,
  output logic                  dram_wr_last,
  // DRAM -> MC read beats
  input  logic                  dram_rd_valid,
  output logic                  dram_rd_ready,
  input  logic [ID_W-1:0]       dram_rd_id,
  input  logic [MAG_BITS-1:0]   dram_rd_data,
  input  logic [2:0]            dram_rd_nmag,
  input  logic                  dram_rd_comp,
  input  logic                  dram_rd_last,
  // MC -> L2 read returns
  output logic                  l2_rd_valid,
  input  logic                  l2_rd_ready,
  output logic [ID_W-1:0]       l2_rd_id,
  output logic [BLOCK_BITS-1:0] l2_rd_block
);

  localparam int unsigned CW = (ALGO == ALGO_BPC) ? BPC_MAX_BITS : FPC_MAX_BITS;

  typedef struct packed {
    logic [ID_W-1:0]       id;
    logic [BLOCK_BITS-1:0] block;
  } side_t;

  typedef struct packed {
    logic [ID_W-1:0]       id;
    logic [2:0]            nmag;
    logic                  comp;
    logic [BLOCK_BITS-1:0] data;
  } wq_t;

  // ======================= write path =======================
  logic              c_in_valid, c_in_ready, c_out_valid, c_out_ready;
  logic [CW-1:0]     c_out_data;
  logic [POS_W-1:0]  c_out_bits;
  logic              ws_in_ready, ws_out_valid;
  side_t             ws_in, ws_out;

  assign c_in_valid  = l2_wr_valid && ws_in_ready;
  assign l2_wr_ready = c_in_ready && ws_in_ready;
  assign ws_in       = '{id: l2_wr_id, block: l2_wr_block};

  sync_fifo #(.W($bits(side_t)), .DEPTH(FIFO_DEPTH)) u_wside (
    .clk, .rst_n,
    .in_valid (l2_wr_valid && c_in_ready),
    .in_ready (ws_in_ready),
    .in_data  (ws_in),
    .out_valid(ws_out_valid),
    .out_ready(c_out_valid && c_out_ready),
    .out_data (ws_out)
  );

  if (ALGO == ALGO_BPC) begin : g_bpc_comp
    bpc_opt_compressor #(.NUM_WC(NUM_WC)) u_comp (
      .clk, .rst_n,
      .in_valid (c_in_valid),
      .in_ready (c_in_ready),
      .in_block (l2_wr_block),
      .out_valid(c_out_valid),
      .out_ready(c_out_ready),
      .out_data (c_out_data),
      .out_bits (c_out_bits)
    );
  end else begin : g_fpc_comp
    fpc_opt_compressor #(.NUM_WC(NUM_WC)) u_comp (
      .clk, .rst_n,
      .in_valid (c_in_valid),
      .in_ready (c_in_ready),
      .in_block (l2_wr_block),
      .out_valid(c_out_valid),
      .out_ready(c_out_ready),
      .out_data (c_out_data),
      .out_bits (c_out_bits)
    );
  end

  wq_t wq_in, wq_out;
  logic wq_in_ready, wq_out_valid, wq_pop;

  mag_packer #(.MAG_W(MAG_BITS), .CW(CW)) u_mag (
    .raw      (ws_out.block),
    .comp     (c_out_data),
    .comp_bits(c_out_bits),
    .data     (wq_in.data),
    .nmag     (wq_in.nmag),
    .is_comp  (wq_in.comp)
  );
  assign wq_in.id    = ws_out.id;
  assign c_out_ready = wq_in_ready;

  sync_fifo #(.W($bits(wq_t)), .DEPTH(FIFO_DEPTH)) u_wq (
    .clk, .rst_n,
    .in_valid (c_out_valid),
    .in_ready (wq_in_ready),
    .in_data  (wq_in),
    .out_valid(wq_out_valid),
    .out_ready(wq_pop),
    .out_data (wq_out)
  );

  // serializer: nmag beats of one MAG each
  logic [1:0] wbeat_q;
  assign dram_wr_valid = wq_out_valid;
  assign dram_wr_id    = wq_out.id;
  assign dram_wr_nmag  = wq_out.nmag;
  assign dram_wr_comp  = wq_out.comp;
  assign dram_wr_data  = wq_out.data[32'(wbeat_q) * MAG_BITS +: MAG_BITS];
  assign dram_wr_last  = (3'(wbeat_q) + 3'd1 == wq_out.nmag);
  assign wq_pop        = dram_wr_valid && dram_wr_ready && dram_wr_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                           wbeat_q <= '0;
    else if (wq_pop)                      wbeat_q <= '0;
    else if (dram_wr_valid && dram_wr_ready) wbeat_q <= wbeat_q + 2'd1;
  end

  // ======================= read path =======================
  logic [BLOCK_BITS-1:0] rbuf_q;
  logic [ID_W-1:0]       rid_q;
  logic                  rcomp_q, rfull_q;
  logic [1:0]            rbeat_q;

  logic d_in_valid, d_in_ready, d_out_valid, d_out_ready;
  logic [BLOCK_BITS-1:0] d_out_block;
  logic rs_in_ready, rs_out_valid;
  logic [ID_W-1:0] rs_out;
  logic [2:0] inflight_q;
  logic bypass, rbuf_take;
  logic rq_in_valid, rq_in_ready;
  side_t rq_in, rq_out;

  assign dram_rd_ready = !rfull_q;
  assign d_in_valid    = rfull_q && rcomp_q && rs_in_ready;
  assign bypass        = rfull_q && !rcomp_q && (inflight_q == '0);
  assign rbuf_take     = (d_in_valid && d_in_ready) || (bypass && rq_in_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rbuf_q  <= '0;
      rid_q   <= '0;
      rcomp_q <= 1'b0;
      rfull_q <= 1'b0;
      rbeat_q <= '0;
    end else begin
      if (rbuf_take) rfull_q <= 1'b0;
      if (dram_rd_valid && dram_rd_ready) begin
        if (rbeat_q == '0) rbuf_q <= BLOCK_BITS'(dram_rd_data);
        else rbuf_q[32'(rbeat_q) * MAG_BITS +: MAG_BITS] <= dram_rd_data;
        rid_q   <= dram_rd_id;
        rcomp_q <= dram_rd_comp;
        if (dram_rd_last) begin
          rfull_q <= 1'b1;
          rbeat_q <= '0;
        end else begin
          rbeat_q <= rbeat_q + 2'd1;
        end
      end
    end
  end

  sync_fifo #(.W(ID_W), .DEPTH(FIFO_DEPTH)) u_rside (
    .clk, .rst_n,
    .in_valid (d_in_valid && d_in_ready),
    .in_ready (rs_in_ready),
    .in_data  (rid_q),
    .out_valid(rs_out_valid),
    .out_ready(d_out_valid && d_out_ready),
    .out_data (rs_out)
  );

  if (ALGO == ALGO_BPC) begin : g_bpc_decomp
    bpc_opt_decompressor #(.NUM_WC(NUM_WC)) u_decomp (
      .clk, .rst_n,
      .in_valid (d_in_valid),
      .in_ready (d_in_ready),
      .in_data  (CW'(rbuf_q)),
      .out_valid(d_out_valid),
      .out_ready(d_out_ready),
      .out_block(d_out_block)
    );
  end else begin : g_fpc_decomp
    fpc_opt_decompressor #(.NUM_WC(NUM_WC)) u_decomp (
      .clk, .rst_n,
      .in_valid (d_in_valid),
      .in_ready (d_in_ready),
      .in_data  (CW'(rbuf_q)),
      .out_valid(d_out_valid),
      .out_ready(d_out_ready),
      .out_block(d_out_block)
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) inflight_q <= '0;
    else inflight_q <= inflight_q + 3'(d_in_valid && d_in_ready) - 3'(d_out_valid && d_out_ready);
  end

  assign d_out_ready = rq_in_ready;
  assign rq_in_valid = d_out_valid || bypass;
  assign rq_in       = d_out_valid ? side_t'{id: rs_out, block: d_out_block}
                                   : side_t'{id: rid_q,  block: rbuf_q};

  sync_fifo #(.W($bits(side_t)), .DEPTH(FIFO_DEPTH)) u_rq (
    .clk, .rst_n,
    .in_valid (rq_in_valid),
    .in_ready (rq_in_ready),
    .in_data  (rq_in),
    .out_valid(l2_rd_valid),
    .out_ready(l2_rd_ready),
    .out_data (rq_out)
  );
  assign l2_rd_id    = rq_out.id;
  assign l2_rd_block = rq_out.block;

  a_rd_last: assert property (@(posedge clk) disable iff (!rst_n)
    dram_rd_valid |-> dram_rd_last == (3'(rbeat_q) + 3'd1 == dram_rd_nmag));
  a_side_sync: assert property (@(posedge clk) disable iff (!rst_n) c_out_valid |-> ws_out_valid);
  a_rside_sync: assert property (@(posedge clk) disable iff (!rst_n) d_out_valid |-> rs_out_valid);

endmodule
