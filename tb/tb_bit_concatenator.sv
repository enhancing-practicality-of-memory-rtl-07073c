// tb_bit_concatenator: self-checking test of bit_concatenator.
//
// Random headers, lengths (0..31) and payloads, with junk above each length,
// are packed; image and size are compared with a bit-by-bit append.
module tb_bit_concatenator;
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


  logic [BPC_HDR_W-1:0] hdr;
  logic [BPC_NSYM-1:0][LEN_W-1:0] lens;
  logic [BPC_NSYM-1:0][BPC_PW-1:0] payloads;
  logic [BPC_MAX_BITS-1:0] out_data, exp_data;
  logic [POS_W-1:0] out_bits;
  bit_concatenator dut (.hdr, .lens, .payloads, .out_data, .out_bits);

  initial begin
    for (int n = 0; n < 500; n++) begin
      int p;
      for (int k = 0; k < BPC_HDR_W; k++) hdr[k] = 1'($urandom);
      for (int j = 0; j < BPC_NSYM; j++) begin
        lens[j] = (n % 3 == 0) ? 6'd31 : 6'($urandom_range(0, 31));
        payloads[j] = 31'($urandom);
      end
      @(posedge clk);
      exp_data = '0; p = 0;
      for (int k = 0; k < BPC_HDR_W; k++) exp_data[p++] = hdr[k];
      for (int j = 0; j < BPC_NSYM; j++)
        for (int k = 0; k < int'(lens[j]); k++) exp_data[p++] = payloads[j][k];
      check(out_data == exp_data, "packed image");
      check(int'(out_bits) == p, "size");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
