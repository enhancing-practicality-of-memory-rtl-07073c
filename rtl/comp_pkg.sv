// comp_pkg: shared sizes, tag encodings and length tables for the
// high-throughput BPC and FPC memory compressors.
//
// A memory block is 128 bytes = 32 words of 32 bits; word i sits at bits
// [32*i +: 32]. Off-chip transfers happen in 32-byte memory-access
// granules (MAGs). Both compressors use fixed 3-bit tags, so the tag
// section of a compressed block has a fixed size and all word positions can
// be computed in parallel.
//
// BPC image layout (LSB first): 32-bit raw base word, 33 tags of 3 bits
// (tag j at bit 32+3j), then the payloads of DBX planes 0..32 back to back.
// FPC image layout: 32 tags of 3 bits (tag i at bit 3i), then payloads of
// words 0..31 back to back.
//
// The BPC tag table follows the updated 3-bit table of the design; the
// uncompressed code is 3 tag bits plus a 31-bit plane. The FPC prefixes are
// the classic frequent-pattern set with prefix 000 standing for a single
// zero word (no zero-run length field). Storing the BPC base word raw is a
// choice of this implementation.
package comp_pkg;

  localparam int unsigned WORD_BITS  = 32;
  localparam int unsigned NWORDS     = 32;
  localparam int unsigned BLOCK_BITS = WORD_BITS * NWORDS;   // 1024
  localparam int unsigned MAG_BITS   = 256;                  // 32 bytes
  localparam int unsigned NMAG_MAX   = BLOCK_BITS / MAG_BITS; // 4
  localparam int unsigned TAG_W      = 3;
  localparam int unsigned LEN_W      = 6;                    // lengths 0..32
  localparam int unsigned POS_W      = 11;                   // bit positions 0..2047

  // BPC: 33 DBX planes of 31 bits each
  localparam int unsigned BPC_NSYM    = 33;
  localparam int unsigned BPC_PW      = 31;
  localparam int unsigned BPC_BASE_W  = 32;
  localparam int unsigned BPC_HDR_W   = BPC_BASE_W + BPC_NSYM * TAG_W;   // 131
  localparam int unsigned BPC_MAX_BITS = BPC_HDR_W + BPC_NSYM * BPC_PW;  // 1154

  // FPC: 32 words
  localparam int unsigned FPC_NSYM    = 32;
  localparam int unsigned FPC_PW      = 32;
  localparam int unsigned FPC_HDR_W   = FPC_NSYM * TAG_W;                // 96
  localparam int unsigned FPC_MAX_BITS = FPC_HDR_W + FPC_NSYM * FPC_PW;  // 1120

  typedef enum logic [TAG_W-1:0] {
    BPC_ZERO      = 3'b000,  // plane is all zero              (3 bits)
    BPC_ALL_ONES  = 3'b001,  // plane is all ones              (3 bits)
    BPC_DBP_ZERO  = 3'b010,  // DBX != 0 but DBP plane == 0    (3 bits)
    BPC_SINGLE_1  = 3'b011,  // one 1, its position            (8 bits)
    BPC_TWO_CONS  = 3'b100,  // two adjacent 1s, lower position (8 bits)
    BPC_TWO_1S    = 3'b101,  // two 1s, both positions         (13 bits)
    BPC_SINGLE_0  = 3'b110,  // one 0, its position            (8 bits)
    BPC_RAW       = 3'b111   // plane stored as is             (34 bits)
  } bpc_tag_e;

  typedef enum logic [TAG_W-1:0] {
    FPC_ZERO      = 3'b000,  // zero word                      (0 payload bits)
    FPC_SE4       = 3'b001,  // 4-bit sign-extended            (4)
    FPC_SE8       = 3'b010,  // byte sign-extended             (8)
    FPC_SE16      = 3'b011,  // halfword sign-extended         (16)
    FPC_HI16      = 3'b100,  // halfword padded with zero low halfword (16)
    FPC_TWO_SE8   = 3'b101,  // two halfwords, each a sign-extended byte (16)
    FPC_REP8      = 3'b110,  // four repeated bytes            (8)
    FPC_RAW       = 3'b111   // uncompressed                   (32)
  } fpc_tag_e;

  typedef enum logic {ALGO_BPC = 1'b0, ALGO_FPC = 1'b1} algo_e;

  // payload length (without the tag) of a BPC symbol
  function automatic logic [LEN_W-1:0] bpc_len(input logic [TAG_W-1:0] t);
    unique case (t)
      3'b000, 3'b001, 3'b010: bpc_len = 6'd0;
      3'b011, 3'b100, 3'b110: bpc_len = 6'd5;
      3'b101:                 bpc_len = 6'd10;
      default:                bpc_len = 6'd31;
    endcase
  endfunction

  // payload length (without the tag) of an FPC word
  function automatic logic [LEN_W-1:0] fpc_len(input logic [TAG_W-1:0] t);
    unique case (t)
      3'b000:                 fpc_len = 6'd0;
      3'b001:                 fpc_len = 6'd4;
      3'b010, 3'b110:         fpc_len = 6'd8;
      3'b011, 3'b100, 3'b101: fpc_len = 6'd16;
      default:                fpc_len = 6'd32;
    endcase
  endfunction

endpackage
