// comp_ref_pkg: bit-serial reference models and stimulus for the testbenches.
//
// The models build compressed images one bit at a time, in the most direct
// way, so that they share no structure with the parallel RTL: the BPC model
// forms deltas, bit planes and DBX planes with plain loops and picks each
// plane's code by counting ones and zeros; the FPC model tests each word
// against the patterns by re-extending candidate payloads. gen_block makes
// blocks of several data kinds (zeros, constants, strides, small integers,
// sparse values, repeated bytes, random data).
package comp_ref_pkg;
  import comp_pkg::*;

  typedef logic [BLOCK_BITS-1:0]   block_t;
  typedef logic [BPC_MAX_BITS-1:0] bpc_img_t;
  typedef logic [FPC_MAX_BITS-1:0] fpc_img_t;

  // ---------------- BPC ----------------
  function automatic void ref_dbx(input block_t b, output logic [31:0] base,
                                  output logic [32:0][30:0] dbx, output logic [32:0] dbpz);
    logic signed [32:0] d [1:31];
    logic [30:0] dbp [0:32];
    base = b[31:0];
    for (int i = 1; i < 32; i++)
      d[i] = $signed({b[32*i+31], b[32*i +: 32]}) - $signed({b[32*(i-1)+31], b[32*(i-1) +: 32]});
    for (int j = 0; j < 33; j++) begin
      for (int i = 1; i < 32; i++) dbp[j][i-1] = d[i][j];
      dbpz[j] = (dbp[j] == 0);
    end
    for (int j = 0; j < 33; j++) dbx[j] = (j == 32) ? dbp[j] : (dbp[j] ^ dbp[j+1]);
  endfunction

  // reference symbol code: returns tag, payload, length
  function automatic void ref_bpc_sym(input logic [30:0] x, input logic dz,
                                      output logic [2:0] tag, output logic [30:0] pl, output int len);
    int n1, p[$], q[$];
    n1 = 0;
    for (int b = 0; b < 31; b++) begin
      if (x[b]) begin n1++; p.push_back(b); end
      else q.push_back(b);
    end
    pl = 0;
    if (n1 == 0)                                   begin tag = 3'b000; len = 0;  end
    else if (n1 == 31)                             begin tag = 3'b001; len = 0;  end
    else if (dz)                                   begin tag = 3'b010; len = 0;  end
    else if (n1 == 1)                              begin tag = 3'b011; len = 5;  pl = 31'(p[0]); end
    else if (n1 == 2 && p[1] == p[0] + 1)          begin tag = 3'b100; len = 5;  pl = 31'(p[0]); end
    else if (n1 == 30)                             begin tag = 3'b110; len = 5;  pl = 31'(q[0]); end
    else if (n1 == 2)                              begin tag = 3'b101; len = 10; pl = 31'(p[0]) | (31'(p[1]) << 5); end
    else                                           begin tag = 3'b111; len = 31; pl = x; end
  endfunction

  function automatic void ref_bpc_compress(input block_t b, output bpc_img_t img, output int bits);
    logic [31:0] base; logic [32:0][30:0] dbx; logic [32:0] dbpz;
    logic [2:0] tag; logic [30:0] pl; int len;
    ref_dbx(b, base, dbx, dbpz);
    img = 0; bits = 0;
    for (int k = 0; k < 32; k++) img[bits++] = base[k];
    for (int j = 0; j < 33; j++) begin
      ref_bpc_sym(dbx[j], dbpz[j], tag, pl, len);
      for (int k = 0; k < 3; k++) img[bits++] = tag[k];
    end
    for (int j = 0; j < 33; j++) begin
      ref_bpc_sym(dbx[j], dbpz[j], tag, pl, len);
      for (int k = 0; k < len; k++) img[bits++] = pl[k];
    end
  endfunction

  // ---------------- FPC ----------------
  function automatic void ref_fpc_word(input logic [31:0] w, output logic [2:0] tag,
                                       output logic [31:0] pl, output int len);
    pl = 0;
    if (w == 0)                                     begin tag = 3'b000; len = 0; end
    else if ($signed(w) == $signed(w[3:0]))         begin tag = 3'b001; len = 4;  pl = 32'(w[3:0]); end
    else if ($signed(w) == $signed(w[7:0]))         begin tag = 3'b010; len = 8;  pl = 32'(w[7:0]); end
    else if (w == {4{w[7:0]}})                      begin tag = 3'b110; len = 8;  pl = 32'(w[7:0]); end
    else if ($signed(w) == $signed(w[15:0]))        begin tag = 3'b011; len = 16; pl = 32'(w[15:0]); end
    else if (w[15:0] == 0)                          begin tag = 3'b100; len = 16; pl = 32'(w[31:16]); end
    else if ($signed(w[31:16]) == $signed(w[23:16]) && $signed(w[15:0]) == $signed(w[7:0]))
                                                    begin tag = 3'b101; len = 16; pl = {16'h0, w[23:16], w[7:0]}; end
    else                                            begin tag = 3'b111; len = 32; pl = w; end
  endfunction

  function automatic void ref_fpc_compress(input block_t b, output fpc_img_t img, output int bits);
    logic [2:0] tag; logic [31:0] pl; int len;
    img = 0; bits = 0;
    for (int i = 0; i < 32; i++) begin
      ref_fpc_word(b[32*i +: 32], tag, pl, len);
      for (int k = 0; k < 3; k++) img[bits++] = tag[k];
    end
    for (int i = 0; i < 32; i++) begin
      ref_fpc_word(b[32*i +: 32], tag, pl, len);
      for (int k = 0; k < len; k++) img[bits++] = pl[k];
    end
  endfunction

  // ---------------- stimulus ----------------
  localparam int NKINDS = 10;
  function automatic block_t gen_block(input int kind);
    block_t b;
    logic [31:0] s, st, v;
    s  = $urandom;
    st = $urandom_range(0, 64) - 32;
    for (int i = 0; i < 32; i++) begin
      v = $urandom;
      unique case (kind)
        0: b[32*i +: 32] = 0;                                    // zero block
        1: b[32*i +: 32] = s;                                    // constant
        2: b[32*i +: 32] = s + 32'(i) * st;                      // stride (arrays of indices)
        3: b[32*i +: 32] = 32'($signed(v[7:0]));                 // small signed integers
        4: b[32*i +: 32] = (v[3:0] == 0) ? $urandom : 0;         // sparse
        5: b[32*i +: 32] = {4{v[7:0]}};                          // repeated bytes
        6: b[32*i +: 32] = {v[15:0], 16'h0};                     // padded halfwords
        7: b[32*i +: 32] = s + (32'(i) << 4) + 32'(v[1:0]);      // pointer-like, noisy stride
        8: b[32*i +: 32] = {s[31:12], v[11:0]};                  // similar upper bits
        default: b[32*i +: 32] = v;                              // random
      endcase
    end
    return b;
  endfunction

endpackage
