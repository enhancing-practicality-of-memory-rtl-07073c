// tb_fpc_opt_compressor: self-checking test of the FPC compressor.
//
// Two instances run side by side, one with 32 and one with 16 parallel word
// compressors. Each gets (1) a lone block, to measure the latency (2 and 3
// cycles), (2) a back-to-back stream with the output always ready, to
// measure the accept interval (1 and 2 cycles per block), and (3) blocks of
// every data kind under random valid/ready stalls. Every image and size is
// compared with the bit-serial reference model.
module tb_fpc_opt_compressor;
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
    block_t in_block;
    fpc_img_t out_data;
    logic [POS_W-1:0] out_bits;

    fpc_opt_compressor #(.NUM_WC(NWC)) dut (
      .clk, .rst_n, .in_valid, .in_ready, .in_block,
      .out_valid, .out_ready, .out_data, .out_bits
    );

    block_t exp_q[$];
    longint acc_cyc[$];
    longint first_acc, last_acc;
    int nacc = 0;
    bit measure_lat = 0;

    always @(posedge clk) begin
      if (rst_n && in_valid && in_ready) begin
        exp_q.push_back(in_block);
        acc_cyc.push_back(cyc);
        if (nacc == 0) first_acc = cyc;
        last_acc = cyc;
        nacc++;
      end
      if (rst_n && out_valid && out_ready) begin
        fpc_img_t img; int bits;
        block_t b;
        longint t;
        b = exp_q.pop_front();
        t = acc_cyc.pop_front();
        ref_fpc_compress(b, img, bits);
        check(out_data == img, $sformatf("NUM_WC=%0d image mismatch", NWC));
        check(int'(out_bits) == bits, $sformatf("NUM_WC=%0d size %0d expected %0d", NWC, out_bits, bits));
        if (measure_lat)
          check(cyc - t == LAT, $sformatf("NUM_WC=%0d latency %0d expected %0d", NWC, cyc - t, LAT));
      end
    end

    initial begin
      in_valid = 0; out_ready = 1; in_block = '0;
      wait (rst_n);
      // (1) latency of a lone block
      @(negedge clk);
      measure_lat = 1;
      in_block = gen_block(2); in_valid = 1;
      do @(negedge clk); while (!(nacc == 1));
      in_valid = 0;
      repeat (6) @(negedge clk);
      measure_lat = 0;
      // (2) back-to-back stream
      nacc = 0;
      for (int i = 0; i < NSTREAM; i++) begin
        in_block = gen_block(i % NKINDS); in_valid = 1;
        do @(negedge clk); while (nacc != i + 1);
      end
      in_valid = 0;
      check(last_acc - first_acc == longint'((NSTREAM - 1) * PASS),
            $sformatf("NUM_WC=%0d stream took %0d cycles", NWC, last_acc - first_acc));
      repeat (6) @(negedge clk);
      // (3) random stalls
      nacc = 0;
      fork
        begin
          for (int i = 0; i < NRAND; i++) begin
            while ($urandom_range(0, 3) == 0) begin in_valid = 0; @(negedge clk); end
            in_block = gen_block($urandom_range(0, NKINDS - 1)); in_valid = 1;
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
