// chan_harness: drives and checks one memory-controller compression channel.
//
// Plays the L2 cache and, through dram_model, the DRAM. Write phase: NBLK
// blocks of all data kinds are written with ids 0..NBLK-1; for each the
// stored MAG count, compressed flag and stored beats are compared with the
// bit-serial reference compressor (ALGO selects BPC or FPC). Read phase: the
// blocks are read back in a random order and must reach L2 unchanged and in
// request order. L2 read-ready stalls at random. The harness counts how often
// each mechanism happened (1, 2, 3 and 4-MAG blocks, raw fall-back, read
// bypass, stalls on each port) and counts a failure for any that never did.
module chan_harness
  import comp_pkg::*;
  import comp_ref_pkg::*;
#(
  parameter algo_e ALGO  = ALGO_BPC,
  parameter int    NBLK  = 64,
  parameter int    ID_W  = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  output logic                  l2_wr_valid,
  input  logic                  l2_wr_ready,
  output logic [ID_W-1:0]       l2_wr_id,
  output logic [BLOCK_BITS-1:0] l2_wr_block,
  input  logic                  dram_wr_valid,
  output logic                  dram_wr_ready,
  input  logic [ID_W-1:0]       dram_wr_id,
  input  logic [MAG_BITS-1:0]   dram_wr_data,
  input  logic [2:0]            dram_wr_nmag,
  input  logic                  dram_wr_comp,
  input  logic                  dram_wr_last,
  output logic                  dram_rd_valid,
  input  logic                  dram_rd_ready,
  output logic [ID_W-1:0]       dram_rd_id,
  output logic [MAG_BITS-1:0]   dram_rd_data,
  output logic [2:0]            dram_rd_nmag,
  output logic                  dram_rd_comp,
  output logic                  dram_rd_last,
  input  logic                  l2_rd_valid,
  output logic                  l2_rd_ready,
  input  logic [ID_W-1:0]       l2_rd_id,
  input  logic [BLOCK_BITS-1:0] l2_rd_block,
  output int                    checks,
  output int                    failures,
  output logic                  done
);
  logic rd_req_valid;
  logic [ID_W-1:0] rd_req_id;

  dram_model #(.ID_W(ID_W), .MAG_W(MAG_BITS)) u_dram (
    .clk, .rst_n,
    .wr_valid(dram_wr_valid), .wr_ready(dram_wr_ready), .wr_id(dram_wr_id),
    .wr_data(dram_wr_data), .wr_nmag(dram_wr_nmag), .wr_comp(dram_wr_comp), .wr_last(dram_wr_last),
    .rd_req_valid, .rd_req_id,
    .rd_valid(dram_rd_valid), .rd_ready(dram_rd_ready), .rd_id(dram_rd_id),
    .rd_data(dram_rd_data), .rd_nmag(dram_rd_nmag), .rd_comp(dram_rd_comp), .rd_last(dram_rd_last)
  );

  block_t orig [NBLK];
  int nwritten = 0, nstored = 0, nread = 0;
  int n_mag [5];
  int n_rd_blocks = 0, n_raw_behind = 0;
  int n_bypass = 0, n_decomp = 0, n_in_stall = 0, n_wr_stall = 0, n_rd_stall = 0, n_l2_stall = 0;
  logic [ID_W-1:0] exp_rd[$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL [%s]: %s", ALGO == ALGO_BPC ? "BPC" : "FPC", what); end
  endtask

  function automatic void expect_image(input block_t b, output logic [BPC_MAX_BITS-1:0] img, output int bits);
    bpc_img_t bi; fpc_img_t fi;
    if (ALGO == ALGO_BPC) begin ref_bpc_compress(b, bi, bits); img = bi; end
    else begin ref_fpc_compress(b, fi, bits); img = BPC_MAX_BITS'(fi); end
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (l2_wr_valid && !l2_wr_ready) n_in_stall++;
    if (dram_wr_valid && !dram_wr_ready) n_wr_stall++;
    if (dram_rd_valid && !dram_rd_ready) n_rd_stall++;
    if (l2_rd_valid && !l2_rd_ready) n_l2_stall++;
    if (l2_wr_valid && l2_wr_ready) nwritten++;
    if (dram_wr_valid && dram_wr_ready && dram_wr_last) begin
      logic [BPC_MAX_BITS-1:0] img; int bits, m;
      expect_image(orig[dram_wr_id], img, bits);
      m = (bits + MAG_BITS - 1) / MAG_BITS;
      if (m < 4) begin
        check(dram_wr_comp && int'(dram_wr_nmag) == m,
              $sformatf("block %0d: %0d bits should take %0d MAGs, got %0d", dram_wr_id, bits, m, dram_wr_nmag));
      end else begin
        check(!dram_wr_comp && dram_wr_nmag == 3'd4, $sformatf("block %0d should be stored raw", dram_wr_id));
      end
      n_mag[dram_wr_nmag]++;
      nstored++;
    end
    if (dram_rd_valid && dram_rd_ready && dram_rd_last) begin
      if (dram_rd_comp) n_decomp++; else n_bypass++;
      if (!dram_rd_comp && n_rd_blocks > nread) n_raw_behind++;
      n_rd_blocks++;
    end
    if (l2_rd_valid && l2_rd_ready) begin
      logic [ID_W-1:0] e;
      e = exp_rd.pop_front();
      check(l2_rd_id == e, $sformatf("read returned id %0d, expected %0d", l2_rd_id, e));
      check(l2_rd_block == orig[l2_rd_id], $sformatf("block %0d corrupted on the way back", l2_rd_id));
      nread++;
    end
  end

  // after the last beat of each block, compare the stored beats with the expected image
  task automatic check_stored();
    for (int i = 0; i < NBLK; i++) begin
      logic [BPC_MAX_BITS-1:0] img; int bits, m;
      expect_image(orig[i], img, bits);
      m = int'(u_dram.mem_nmag[i]);
      check(u_dram.mem_beats[i] == m, $sformatf("block %0d: %0d beats for %0d MAGs", i, u_dram.mem_beats[i], m));
      for (int k = 0; k < m * MAG_BITS; k++) begin
        if (u_dram.mem_data[i][k] !== (u_dram.mem_comp[i] ? img[k] : orig[i][k])) begin
          check(1'b0, $sformatf("block %0d: stored bit %0d wrong", i, k));
          break;
        end
      end
      checks++;
    end
  endtask

  initial begin
    checks = 0; failures = 0; done = 0;
    l2_wr_valid = 0; l2_wr_id = '0; l2_wr_block = '0; l2_rd_ready = 1;
    rd_req_valid = 0; rd_req_id = '0;
    wait (rst_n);
    @(negedge clk);
    // write phase, back to back
    for (int i = 0; i < NBLK; i++) begin
      orig[i] = gen_block(i % NKINDS);
      l2_wr_block = orig[i]; l2_wr_id = ID_W'(i); l2_wr_valid = 1;
      do @(negedge clk); while (nwritten != i + 1);
    end
    l2_wr_valid = 0;
    while (nstored != NBLK) @(negedge clk);
    check_stored();
    // read phase, random order, L2 stalls at random
    fork
      begin
        int perm[$];
        for (int i = 0; i < NBLK; i++) perm.push_back(i);
        perm.shuffle();
        foreach (perm[i]) begin
          rd_req_valid = 1; rd_req_id = ID_W'(perm[i]); exp_rd.push_back(ID_W'(perm[i]));
          @(negedge clk);
        end
        rd_req_valid = 0;
      end
      begin
        // stretches of 24 cycles with L2 not ready fill the return queue
        for (int c = 0; nread != NBLK; c++) begin
          l2_rd_ready = ((c / 24) % 2 == 0) && ($urandom_range(0, 2) != 0);
          @(negedge clk);
        end
        l2_rd_ready = 1;
      end
    join
    // every mechanism must have happened at least once
    for (int m = 1; m <= 4; m++) check(n_mag[m] > 0, $sformatf("no block took %0d MAG(s)", m));
    check(n_bypass > 0, "raw blocks never bypassed the decompressor");
    check(n_decomp > 0, "no block was decompressed");
    check(n_raw_behind > 0, "no raw block ever arrived behind blocks still inside the channel");
    check(n_in_stall > 0, "the L2 write port never stalled");
    check(n_wr_stall > 0, "the DRAM write port never stalled");
    check(n_rd_stall > 0, "the DRAM read port never stalled");
    check(n_l2_stall > 0, "the L2 read port never stalled");
    $display("[%s] blocks=%0d MAGs 1:%0d 2:%0d 3:%0d 4:%0d  write beats %0d of %0d raw  bypass=%0d (behind others %0d) decompressed=%0d stalls in/wr/rd/l2=%0d/%0d/%0d/%0d",
             ALGO == ALGO_BPC ? "BPC" : "FPC", NBLK, n_mag[1], n_mag[2], n_mag[3], n_mag[4],
             u_dram.wr_beats, 4 * NBLK, n_bypass, n_raw_behind, n_decomp, n_in_stall, n_wr_stall, n_rd_stall, n_l2_stall);
    done = 1;
  end
endmodule
