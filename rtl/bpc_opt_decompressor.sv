// bpc_opt_decompressor: high-throughput BPC decompressor.
//
// Stage 1 (start positions): the fixed-size tag section is read straight
// from the incoming image; tag_decoder turns the 33 tags into payload
// lengths and word_length_adder into payload start positions. The image,
// tags and start positions are registered. Stage 2 (parallel word
// decompression): parallel_shift_registers pull every payload out at its
// start position, bpc_pattern_decoder rebuilds each DBX plane, and
// bpc_dbx_back_transform turns base and planes back into the 32 words,
// which are registered at the output.
//
// NUM_WC = 32: all 33 planes in one cycle; one block per cycle, output valid
// 2 cycles after the input handshake. NUM_WC = 16: stage 2 runs over two
// cycles (17 planes per pass, results of the first pass held in a register);
// one block every 2 cycles, latency 3. These latencies are the design's; the
// handshake and the raw base word are this implementation's choices.
//
// Interface: in_valid/in_ready/in_data (compressed image as produced by
// bpc_opt_compressor; bits past its end are ignored), out_valid/out_ready/
// out_block. out_block holds while out_valid is high and out_ready low.
module bpc_opt_decompressor
  import comp_pkg::*;
#(
  parameter int unsigned NUM_WC = 32
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic [BPC_MAX_BITS-1:0] in_data,
  output logic                    out_valid,
  input  logic                    out_ready,
  output logic [BLOCK_BITS-1:0]   out_block
);

  localparam int unsigned PASSES = NWORDS / NUM_WC;
  localparam int unsigned MPP    = (BPC_NSYM + PASSES - 1) / PASSES;

  if (NUM_WC == 0 || NWORDS % NUM_WC != 0) begin : g_bad_cfg
    $error("NUM_WC must divide the 32 words of a block");
  end

  // ---- stage 1: tag decoding and start positions ----
  logic [BPC_NSYM-1:0][TAG_W-1:0] in_tags;
  logic [BPC_NSYM-1:0][LEN_W-1:0] in_lens;
  logic [BPC_NSYM-1:0][POS_W-1:0] in_starts;
  logic [POS_W-1:0]               in_total;

  assign in_tags = in_data[BPC_BASE_W +: BPC_NSYM*TAG_W];

  tag_decoder #(.ALGO(ALGO_BPC), .NSYM(BPC_NSYM)) u_tagdec (
    .tags(in_tags),
    .lens(in_lens)
  );

  word_length_adder #(.NSYM(BPC_NSYM), .BASE(BPC_HDR_W)) u_wla (
    .lens  (in_lens),
    .starts(in_starts),
    .total (in_total)
  );

  logic [BPC_MAX_BITS-1:0]         data_q;
  logic [BPC_NSYM-1:0][TAG_W-1:0]  tags_q;
  logic [BPC_NSYM-1:0][POS_W-1:0]  starts_q;
  logic [BPC_NSYM-1:0][BPC_PW-1:0] dbx_q;    // planes decoded in earlier passes
  logic                            s0_v;
  logic [2:0]                      pass_q;

  logic last_pass, fin, accept;
  assign last_pass = (32'(pass_q) == PASSES - 1);
  assign fin       = s0_v && last_pass && (!out_valid || out_ready);
  assign in_ready  = !s0_v || fin;
  assign accept    = in_valid && in_ready;

  // ---- stage 2: shift out, decode, back-transform ----
  logic [MPP-1:0][5:0]        m_idx;
  logic [MPP-1:0]             m_ok;
  logic [MPP-1:0][POS_W-1:0]  m_start;
  logic [MPP-1:0][BPC_PW-1:0] m_word;
  logic [MPP-1:0][BPC_PW-1:0] m_dbx;

  always_comb begin
    for (int k = 0; k < MPP; k++) begin
      m_idx[k]   = 6'(32'(pass_q) * MPP + k);
      m_ok[k]    = (32'(m_idx[k]) < BPC_NSYM);
      m_start[k] = m_ok[k] ? starts_q[m_idx[k]] : POS_W'(BPC_MAX_BITS);
    end
  end

  parallel_shift_registers #(.NSYM(MPP), .PW(BPC_PW), .IN_W(BPC_MAX_BITS)) u_psr (
    .in_data(data_q),
    .starts (m_start),
    .words  (m_word)
  );

  for (genvar k = 0; k < MPP; k++) begin : g_dec
    bpc_pattern_decoder u_pdec (
      .tag    (m_ok[k] ? tags_q[m_idx[k]] : TAG_W'(BPC_ZERO)),
      .payload(m_word[k]),
      .dbx    (m_dbx[k])
    );
  end

  logic [BPC_NSYM-1:0][BPC_PW-1:0] all_dbx;
  logic [BPC_NSYM-1:0]             all_dbpz;
  logic [BLOCK_BITS-1:0]           bt_block;

  always_comb begin
    all_dbx = dbx_q;
    for (int k = 0; k < MPP; k++) begin
      if (m_ok[k]) all_dbx[m_idx[k]] = m_dbx[k];
    end
    for (int j = 0; j < BPC_NSYM; j++) begin
      all_dbpz[j] = (tags_q[j] == TAG_W'(BPC_DBP_ZERO));
    end
  end

  bpc_dbx_back_transform u_bt (
    .base     (data_q[0 +: BPC_BASE_W]),
    .dbx      (all_dbx),
    .dbp_zero (all_dbpz),
    .out_block(bt_block)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s0_v      <= 1'b0;
      pass_q    <= '0;
      data_q    <= '0;
      tags_q    <= '0;
      starts_q  <= '0;
      dbx_q     <= '0;
      out_valid <= 1'b0;
      out_block <= '0;
    end else begin
      // output register
      if (fin) begin
        out_valid <= 1'b1;
        out_block <= bt_block;
      end else if (out_ready) begin
        out_valid <= 1'b0;
      end
      // pass sequencing
      if (s0_v && !last_pass) begin
        dbx_q  <= all_dbx;
        pass_q <= pass_q + 3'd1;
      end
      if (fin) begin
        pass_q <= '0;
        s0_v   <= 1'b0;
      end
      // stage 1 register
      if (accept) begin
        s0_v     <= 1'b1;
        data_q   <= in_data;
        tags_q   <= in_tags;
        starts_q <= in_starts;
      end
    end
  end

  a_size: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> in_total <= POS_W'(BPC_MAX_BITS));
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_block));

endmodule
