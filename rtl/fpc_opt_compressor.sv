// fpc_opt_compressor: high-throughput Frequent Pattern Compression (FPC)
// compressor.
//
// Stage 1 (pattern matching): every 32-bit word is tested by an
// fpc_pattern_matcher against the static frequent patterns and gets a 3-bit
// prefix, a payload length and a payload. Stage 2 (concatenation): the 32
// prefixes form a fixed 96-bit tag section at the start of the image and
// bit_concatenator packs the payloads behind it. Zero words are not
// run-length encoded, so every word has its own tag.
//
// NUM_WC is the number of parallel word compressors. NUM_WC = 32: one block
// per cycle, output valid 2 cycles after the input handshake. NUM_WC = 16:
// the matchers are reused over two cycles under a pass counter, one block
// every 2 cycles, latency 3 cycles. These latencies are the design's; the
// valid/ready handshake is this implementation's choice.
//
// Interface: in_valid/in_ready/in_block, out_valid/out_ready/out_data
// (compressed image, LSB first) and out_bits (its size in bits). Outputs hold
// while out_valid is high and out_ready low.
module fpc_opt_compressor
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
  output logic [FPC_MAX_BITS-1:0] out_data,
  output logic [POS_W-1:0]        out_bits
);

  localparam int unsigned PASSES = NWORDS / NUM_WC;
  localparam int unsigned MPP    = NUM_WC;   // matchers per pass

  if (NUM_WC == 0 || NWORDS % NUM_WC != 0) begin : g_bad_cfg
    $error("NUM_WC must divide the 32 words of a block");
  end

  logic [NWORDS-1:0][WORD_BITS-1:0] in_words, blk_q;
  logic [FPC_NSYM-1:0][TAG_W-1:0]   tag_q;
  logic [FPC_NSYM-1:0][LEN_W-1:0]   len_q;
  logic [FPC_NSYM-1:0][FPC_PW-1:0]  pl_q;
  logic                             s1_v;
  logic [2:0]                       pass_q;   // FSM: 0 = idle/first pass

  assign in_words = in_block;

  logic busy, s1_adv, accept, last_pass;
  assign busy      = (pass_q != '0);
  assign s1_adv    = s1_v && (!out_valid || out_ready);
  assign in_ready  = !busy && (!s1_v || s1_adv);
  assign accept    = in_valid && in_ready;
  assign last_pass = (32'(pass_q) == PASSES - 1);

  logic [MPP-1:0][TAG_W-1:0]  m_tag;
  logic [MPP-1:0][LEN_W-1:0]  m_len;
  logic [MPP-1:0][FPC_PW-1:0] m_pl;
  logic [MPP-1:0][4:0]        m_idx;

  for (genvar k = 0; k < MPP; k++) begin : g_match
    logic [WORD_BITS-1:0] src;
    always_comb begin
      m_idx[k] = 5'(32'(pass_q) * MPP + k);
      src      = busy ? blk_q[m_idx[k]] : in_words[m_idx[k]];
    end
    fpc_pattern_matcher u_match (
      .word   (src),
      .tag    (m_tag[k]),
      .len    (m_len[k]),
      .payload(m_pl[k])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_v   <= 1'b0;
      pass_q <= '0;
      blk_q  <= '0;
      tag_q  <= '0;
      len_q  <= '0;
      pl_q   <= '0;
    end else begin
      if (s1_adv) s1_v <= 1'b0;
      if (accept || busy) begin
        if (accept) blk_q <= in_words;
        for (int k = 0; k < MPP; k++) begin
          tag_q[m_idx[k]] <= m_tag[k];
          len_q[m_idx[k]] <= m_len[k];
          pl_q[m_idx[k]]  <= m_pl[k];
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

  logic [FPC_MAX_BITS-1:0] cat_data;
  logic [POS_W-1:0]        cat_bits;

  bit_concatenator #(
    .NSYM (FPC_NSYM),
    .PW   (FPC_PW),
    .HDR_W(FPC_HDR_W),
    .OUT_W(FPC_MAX_BITS)
  ) u_cat (
    .hdr     (tag_q),
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
