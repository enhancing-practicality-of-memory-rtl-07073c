// fpc_pattern_decoder: rebuilds one 32-bit word from its FPC prefix.
//
// Inverse of fpc_pattern_matcher: sign-extends 4-, 8- and 16-bit payloads,
// puts a padded halfword back in the upper half, sign-extends two bytes into
// two halfwords, or replicates a byte four times. Purely combinational.
module fpc_pattern_decoder
  import comp_pkg::*;
(
  input  logic [TAG_W-1:0]     tag,
  input  logic [FPC_PW-1:0]    payload,
  output logic [WORD_BITS-1:0] word
);

  always_comb begin
    unique case (fpc_tag_e'(tag))
      FPC_ZERO:    word = '0;
      FPC_SE4:     word = {{28{payload[3]}}, payload[3:0]};
      FPC_SE8:     word = {{24{payload[7]}}, payload[7:0]};
      FPC_SE16:    word = {{16{payload[15]}}, payload[15:0]};
      FPC_HI16:    word = {payload[15:0], 16'h0};
      FPC_TWO_SE8: word = {{8{payload[15]}}, payload[15:8], {8{payload[7]}}, payload[7:0]};
      FPC_REP8:    word = {4{payload[7:0]}};
      default:     word = payload;
    endcase
  end

endmodule
