// bpc_opt_compressor: high-throughput Bit-Plane Compression (BPC) compressor.
//
// Stage 1 (pattern matching): the block goes through the DBX transform and
// every DBX plane is classified by a bpc_symbol_encoder into a fixed 3-bit
// tag, a payload length and a payload. Stage 2 (concatenation): the base
// word and the 33 tags form a fixed 131-bit header; bit_concatenator packs
// the payloads behind it. There is no zero-run encoding of the tags, which
// is what lets every word be handled in parallel.
//
// NUM_WC is the number of parallel word compressors. With NUM_WC = 32 the
// 33 planes are encoded in one cycle and the unit accepts one block per
// cycle (fully pipelined); the output is valid 2 cycles after the input
// handshake (1 matching + 1 concatenation). With NUM_WC = 16 the encoders
// are reused over two cycles (17 planes per pass), a small pass counter
// sequences them, a block is accepted every 2 cycles, and the latency is 3
// cycles. These latencies are the ones the design specifies; the 33rd
// plane, the raw base word and the valid/ready handshake are choices of
// this implementation.
//
// Interface: in_valid/in_ready/in_block (128-byte block), out_valid/
// out_ready/out_data (compressed image, LSB first) and out_bits (its size).
// out_data and out_bits hold while out_valid is high and out_ready low.
module bpc_opt_compressor
  import comp_pkg::*;
#(
  parameter int unsigned NUM_WC = 32
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic [BLOCK_BITS-1:0]   in_block,
  output logic                    out_valid,
  input  logic                    out_ready,
  output logic [BPC_MAX_BITS-1:0] out_data,
  output logic [POS_W-1:0]        out_bits
);

  localparam int unsigned PASSES = NWORDS / NUM_WC;
  localparam int unsigned MPP    = (BPC_NSYM + PASSES - 1) / PASSES; // encoders per pass

  if (NUM_WC == 0 || NWORDS % NUM_WC != 0) begin : g_bad_cfg
    $error("NUM_WC must divide the 32 words of a block");
  end

  // ---- DBX transform of the incoming block ----
  logic [WORD_BITS-1:0]            in_base;
  logic [BPC_NSYM-1:0][BPC_PW-1:0] in_dbx;
  logic [BPC_NSYM-1:0]             in_dbpz;

  bpc_dbx_transform u_dbx (
    .in_block(in_block),
    .base    (in_base),
    .dbx     (in_dbx),
    .dbp_zero(in_dbpz)
  );

  // ---- stage 1 state: transformed block and match results ----
  logic [WORD_BITS-1:0]            base_q;
  logic [BPC_NSYM-1:0][BPC_PW-1:0] dbx_q;
  logic [BPC_NSYM-1:0]             dbpz_q;
  logic [BPC_NSYM-1:0][TAG_W-1:0]  tag_q;
  logic [BPC_NSYM-1:0][LEN_W-1:0]  len_q;
  logic [BPC_NSYM-1:0][BPC_PW-1:0] pl_q;
  logic                            s1_v;
  logic [2:0]                      pass_q;   // FSM: 0 = idle/first pass

  logic busy, s1_adv, accept, last_pass;
  assign busy      = (pass_q != '0);
  assign s1_adv    = s1_v && (!out_valid || out_ready);
  assign in_ready  = !busy && (!s1_v || s1_adv);
  assign accept    = in_valid && in_ready;
  assign last_pass = (32'(pass_q) == PASSES - 1);

  // ---- the NUM_WC-wide bank of symbol encoders, reused on each pass ----
  logic [MPP-1:0][TAG_W-1:0]  m_tag;
  logic [MPP-1:0][LEN_W-1:0]  m_len;
  logic [MPP-1:0][BPC_PW-1:0] m_pl;
  logic [MPP-1:0][5:0]        m_idx;
  logic [MPP-1:0]             m_ok;

  for (genvar k = 0; k < MPP; k++) begin : g_enc
    logic [BPC_PW-1:0] src;
    logic              srcz;
    always_comb begin
      m_idx[k] = 6'(32'(pass_q) * MPP + k);
      m_ok[k]  = (32'(m_idx[k]) < BPC_NSYM);
      src  = '0;
      srcz = 1'b1;
      if (m_ok[k]) begin
        src  = busy ? dbx_q[m_idx[k]]  : in_dbx[m_idx[k]];
        srcz = busy ? dbpz_q[m_idx[k]] : in_dbpz[m_idx[k]];
      end
    end
    bpc_symbol_encoder u_enc (
      .dbx     (src),
      .dbp_zero(srcz),
      .tag     (m_tag[k]),
      .len     (m_len[k]),
      .payload (m_pl[k])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_v   <= 1'b0;
      pass_q <= '0;
      base_q <= '0;
      dbx_q  <= '0;
      dbpz_q <= '0;
      tag_q  <= '0;
      len_q  <= '0;
      pl_q   <= '0;
    end else begin
      if (s1_adv) s1_v <= 1'b0;
      if (accept || busy) begin
        if (accept) begin
          base_q <= in_base;
          dbx_q  <= in_dbx;
          dbpz_q <= in_dbpz;
        end
        for (int k = 0; k < MPP; k++) begin
          if (m_ok[k]) begin
            tag_q[m_idx[k]] <= m_tag[k];
            len_q[m_idx[k]] <= m_len[k];
            pl_q[m_idx[k]]  <= m_pl[k];
          end
        end
        if (last_pass) begin
          pass_q <= '0;
          s1_v   <= 1'b1;
        end else begin
          pass_q <= pass_q + 3'd1;
        end
      end
    end
  end

  // ---- stage 2: concatenation ----
  logic [BPC_MAX_BITS-1:0] cat_data;
  logic [POS_W-1:0]        cat_bits;

  bit_concatenator #(
    .NSYM (BPC_NSYM),
    .PW   (BPC_PW),
    .HDR_W(BPC_HDR_W),
    .OUT_W(BPC_MAX_BITS)
  ) u_cat (
    .hdr     ({tag_q, base_q}),
    .lens    (len_q),
    .payloads(pl_q),
    .out_data(cat_data),
    .out_bits(cat_bits)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
      out_bits  <= '0;
    end else if (s1_adv) begin
      out_valid <= 1'b1;
      out_data  <= cat_data;
      out_bits  <= cat_bits;
    end else if (out_ready) begin
      out_valid <= 1'b0;
    end
  end

  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_data) && $stable(out_bits));

endmodule
