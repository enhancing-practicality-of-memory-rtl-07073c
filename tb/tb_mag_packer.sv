// tb_mag_packer: self-checking test of mag_packer.
//
// Every compressed size from 0 to 1154 bits; the MAG count must be the size
// rounded up to 256-bit granules, and blocks of 4 or more granules must fall
// back to the raw block with the compressed flag clear.
module tb_mag_packer;
  import comp_pkg::*;
  import comp_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end


  block_t raw, data;
  logic [BPC_MAX_BITS-1:0] comp;
  logic [POS_W-1:0] comp_bits;
  logic [2:0] nmag;
  logic is_comp;
  mag_packer dut (.raw, .comp, .comp_bits, .data, .nmag, .is_comp);

  initial begin
    for (int s = 0; s <= BPC_MAX_BITS; s++) begin
      int m;
      for (int k = 0; k < 1024; k++) raw[k] = 1'($urandom);
      for (int k = 0; k < BPC_MAX_BITS; k++) comp[k] = 1'($urandom);
      comp_bits = 11'(s);
      @(posedge clk);
      m = (s + 255) / 256;
      if (m < 4) begin
        check(is_comp && int'(nmag) == m, $sformatf("size %0d: nmag %0d", s, nmag));
        check(data == comp[1023:0], "compressed image kept");
      end else begin
        check(!is_comp && nmag == 3'd4, $sformatf("size %0d: raw fall-back", s));
        check(data == raw, "raw block kept");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
