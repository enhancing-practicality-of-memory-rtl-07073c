// fpc_pattern_matcher: frequent-pattern matcher for one 32-bit word.
//
// Tests the word against the static FPC patterns in parallel and emits the
// shortest matching 3-bit prefix, the payload length and the LSB-aligned
// payload. Prefix 000 is one zero word: the zero-run length field of the
// original FPC is gone, so every word has exactly one tag. The pattern set
// is the classic FPC one (see comp_pkg). Purely combinational.
module fpc_pattern_matcher
  import comp_pkg::*;
(
  input  logic [WORD_BITS-1:0] word,
  output logic [TAG_W-1:0]     tag,
  output logic [LEN_W-1:0]     len,
  output logic [FPC_PW-1:0]    payload
);

  logic is_se4, is_se8, is_se16, is_hi16, is_two8, is_rep8;

  always_comb begin
    is_se4  = (word[31:3]  == {29{word[3]}});
    is_se8  = (word[31:7]  == {25{word[7]}});
    is_se16 = (word[31:15] == {17{word[15]}});
    is_hi16 = (word[15:0]  == 16'h0);
    is_two8 = (word[31:23] == {9{word[23]}}) && (word[15:7] == {9{word[7]}});
    is_rep8 = (word[31:24] == word[7:0]) && (word[23:16] == word[7:0]) && (word[15:8] == word[7:0]);

    payload = '0;
    if (word == '0) begin
      tag = FPC_ZERO;
    end else if (is_se4) begin
      tag = FPC_SE4;
      payload[3:0] = word[3:0];
    end else if (is_se8) begin
      tag = FPC_SE8;
      payload[7:0] = word[7:0];
    end else if (is_rep8) begin
      tag = FPC_REP8;
      payload[7:0] = word[7:0];
    end else if (is_se16) begin
      tag = FPC_SE16;
      payload[15:0] = word[15:0];
    end else if (is_hi16) begin
      tag = FPC_HI16;
      payload[15:0] = word[31:16];
    end else if (is_two8) begin
      tag = FPC_TWO_SE8;
      payload[15:0] = {word[23:16], word[7:0]};
    end else begin
      tag = FPC_RAW;
      payload = word;
    end
    len = fpc_len(tag);
  end

endmodule
