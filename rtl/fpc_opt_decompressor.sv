// fpc_opt_decompressor: high-throughput FPC decompressor.
//
// The four steps of parallel FPC decompression: (1) tag_decoder turns the 32
// prefixes of the fixed 96-bit tag section into payload lengths, (2)
// word_length_adder turns the lengths into start positions (both in stage 1,
// registered together with the image), (3) parallel_shift_registers extract
// every payload at its start position and (4) fpc_pattern_decoder rebuilds
// each word (stage 2, registered at the output).
//
// NUM_WC = 32: one block per cycle, output valid 2 cycles after the input
// handshake. NUM_WC = 16: stage 2 is reused over two cycles, 16 words each,
// the first half held in a register; one block every 2 cycles, latency 3.
// Latencies follow the design; the handshake is this implementation's
// choice.
//
// Interface: in_valid/in_ready/in_data (image as produced by
// fpc_opt_compressor; bits past its end are ignored), out_valid/out_ready/
// out_block. out_block holds while out_valid is high and out_ready low.
module fpc_opt_decompressor
  import comp_pkg::*;
#(
  parameter int unsigned NUM_WC = 32
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic [FPC_MAX_BITS-1:0] in_data,
  output logic                    out_valid,
  input  logic                    out_ready,
  output logic [BLOCK_BITS-1:0]   out_block
);

  localparam int unsigned PASSES = NWORDS / NUM_WC;
  localparam int unsigned MPP    = NUM_WC;

  if (NUM_WC == 0 || NWORDS % NUM_WC != 0) begin : g_bad_cfg
    $error("NUM_WC must divide the 32 words of a block");
  end

  logic [FPC_NSYM-1:0][TAG_W-1:0] in_tags;
  logic [FPC_NSYM-1:0][LEN_W-1:0] in_lens;
  logic [FPC_NSYM-1:0][POS_W-1:0] in_starts;
  logic [POS_W-1:0]               in_total;

  assign in_tags = in_data[0 +: FPC_HDR_W];

  tag_decoder #(.ALGO(ALGO_FPC), .NSYM(FPC_NSYM)) u_tagdec (
    .tags(in_tags),
    .lens(in_lens)
  );

  word_length_adder #(.NSYM(FPC_NSYM), .BASE(FPC_HDR_W)) u_wla (
    .lens  (in_lens),
    .starts(in_starts),
    .total (in_total)
  );

  logic [FPC_MAX_BITS-1:0]          data_q;
  logic [FPC_NSYM-1:0][TAG_W-1:0]   tags_q;
  logic [FPC_NSYM-1:0][POS_W-1:0]   starts_q;
  logic [NWORDS-1:0][WORD_BITS-1:0] words_q;   // words decoded in earlier passes
  logic                             s0_v;
  logic [2:0]                       pass_q;

  logic last_pass, fin, accept;
  assign last_pass = (32'(pass_q) == PASSES - 1);
  assign fin       = s0_v && last_pass && (!out_valid || out_ready);
  assign in_ready  = !s0_v || fin;
  assign accept    = in_valid && in_ready;

  logic [MPP-1:0][4:0]           m_idx;
  logic [MPP-1:0][POS_W-1:0]     m_start;
  logic [MPP-1:0][FPC_PW-1:0]    m_word;
  logic [MPP-1:0][WORD_BITS-1:0] m_dec;

  always_comb begin
    for (int k = 0; k < MPP; k++) begin
      m_idx[k]   = 5'(32'(pass_q) * MPP + k);
      m_start[k] = starts_q[m_idx[k]];
    end
  end

  parallel_shift_registers #(.NSYM(MPP), .PW(FPC_PW), .IN_W(FPC_MAX_BITS)) u_psr (
    .in_data(data_q),
    .starts (m_start),
    .words  (m_word)
  );

  for (genvar k = 0; k < MPP; k++) begin : g_dec
    fpc_pattern_decoder u_pdec (
      .tag    (tags_q[m_idx[k]]),
      .payload(m_word[k]),
      .word   (m_dec[k])
    );
  end

  logic [NWORDS-1:0][WORD_BITS-1:0] all_words;
  always_comb begin
    all_words = words_q;
    for (int k = 0; k < MPP; k++) all_words[m_idx[k]] = m_dec[k];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s0_v      <= 1'b0;
      pass_q    <= '0;
      data_q    <= '0;
      tags_q    <= '0;
      starts_q  <= '0;
      words_q   <= '0;
      out_valid <= 1'b0;
      out_block <= '0;
    end else begin
      if (fin) begin
        out_valid <= 1'b1;
        out_block <= all_words;
      end else if (out_ready) begin
        out_valid <= 1'b0;
      end
      if (s0_v && !last_pass) begin
        words_q <= all_words;
        pass_q  <= pass_q + 3'd1;
      end
      if (fin) begin
        pass_q <= '0;
        s0_v   <= 1'b0;
      end
      if (accept) begin
        s0_v     <= 1'b1;
        data_q   <= in_data;
        tags_q   <= in_tags;
        starts_q <= in_starts;
      end
    end
  end

  a_size: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> in_total <= POS_W'(FPC_MAX_BITS));
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_block));

endmodule
