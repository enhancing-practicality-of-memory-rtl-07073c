// tb_bpc_opt_decompressor: self-checking test of the BPC decompressor.
//
// Blocks of every data kind are compressed by the bit-serial reference model
// and fed to two decompressors (32 and 16 parallel word decompressors); each
// output must equal the original block. Checked as well: the latency of a
// lone block (2 and 3 cycles), the accept interval of a back-to-back stream
// (1 and 2 cycles per block), and correct results under random stalls.
module tb_bpc_opt_decompressor;
  import comp_pkg::*;
  import comp_ref_pkg::*;

  localparam int NRAND = 120;
  localparam int NSTREAM = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int done_cnt = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  for (genvar g = 0; g < 2; g++) begin : g_dut
    localparam int NWC  = (g == 0) ? 32 : 16;
    localparam int LAT  = (g == 0) ? 2 : 3;
    localparam int PASS = 32 / NWC;

    logic in_valid, in_ready, out_valid, out_ready;
    bpc_img_t in_data;
    block_t out_block;

    bpc_opt_decompressor #(.NUM_WC(NWC)) dut (
      .clk, .rst_n, .in_valid, .in_ready, .in_data,
      .out_valid, .out_ready, .out_block
    );

    block_t exp_q[$];
    block_t cur;
    longint acc_cyc[$];
    longint first_acc, last_acc;
    int nacc = 0;
    bit measure_lat = 0;

    task automatic load(input int kind);
      int bits;
      cur = gen_block(kind);
      ref_bpc_compress(cur, in_data, bits);
    endtask

    always @(posedge clk) begin
      if (rst_n && in_valid && in_ready) begin
        exp_q.push_back(cur);
        acc_cyc.push_back(cyc);
        if (nacc == 0) first_acc = cyc;
        last_acc = cyc;
        nacc++;
      end
      if (rst_n && out_valid && out_ready) begin
        block_t b;
        longint t;
        b = exp_q.pop_front();
        t = acc_cyc.pop_front();
        check(out_block == b, $sformatf("NUM_WC=%0d block mismatch", NWC));
        if (measure_lat)
          check(cyc - t == LAT, $sformatf("NUM_WC=%0d latency %0d expected %0d", NWC, cyc - t, LAT));
      end
    end

    initial begin
      in_valid = 0; out_ready = 1; in_data = '0;
      wait (rst_n);
      @(negedge clk);
      measure_lat = 1;
      load(7); in_valid = 1;
      do @(negedge clk); while (nacc != 1);
      in_valid = 0;
      repeat (6) @(negedge clk);
      measure_lat = 0;
      nacc = 0;
      for (int i = 0; i < NSTREAM; i++) begin
        load(i % NKINDS); in_valid = 1;
        do @(negedge clk); while (nacc != i + 1);
      end
      in_valid = 0;
      check(last_acc - first_acc == longint'((NSTREAM - 1) * PASS),
            $sformatf("NUM_WC=%0d stream took %0d cycles", NWC, last_acc - first_acc));
      repeat (6) @(negedge clk);
      nacc = 0;
      fork
        begin
          for (int i = 0; i < NRAND; i++) begin
            while ($urandom_range(0, 3) == 0) begin in_valid = 0; @(negedge clk); end
            load($urandom_range(0, NKINDS - 1)); in_valid = 1;
            do @(negedge clk); while (nacc != i + 1);
          end
          in_valid = 0;
        end
        begin
          repeat (NRAND * 8) begin out_ready = ($urandom_range(0, 2) != 0); @(negedge clk); end
          out_ready = 1;
        end
      join
      repeat (10) @(negedge clk);
      check(exp_q.size() == 0, $sformatf("NUM_WC=%0d %0d blocks never came out", NWC, exp_q.size()));
      done_cnt++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done_cnt == 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
