// tb_tag_decoder: self-checking test of tag_decoder.
//
// Random tag sections are decoded by a BPC and an FPC instance; every length
// is compared with the code tables written out here.
module tb_tag_decoder;
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


  logic [BPC_NSYM-1:0][TAG_W-1:0] btags;
  logic [BPC_NSYM-1:0][LEN_W-1:0] blens;
  logic [FPC_NSYM-1:0][TAG_W-1:0] ftags;
  logic [FPC_NSYM-1:0][LEN_W-1:0] flens;
  int btab [8] = '{0, 0, 0, 5, 5, 10, 5, 31};
  int ftab [8] = '{0, 4, 8, 16, 16, 16, 8, 32};
  tag_decoder #(.ALGO(ALGO_BPC), .NSYM(BPC_NSYM)) dut (.tags(btags), .lens(blens));
  tag_decoder #(.ALGO(ALGO_FPC), .NSYM(FPC_NSYM)) dut_f (.tags(ftags), .lens(flens));

  initial begin
    for (int n = 0; n < 200; n++) begin
      for (int j = 0; j < BPC_NSYM; j++) btags[j] = 3'($urandom);
      for (int j = 0; j < FPC_NSYM; j++) ftags[j] = 3'($urandom);
      @(posedge clk);
      for (int j = 0; j < BPC_NSYM; j++) check(int'(blens[j]) == btab[btags[j]], "BPC length");
      for (int j = 0; j < FPC_NSYM; j++) check(int'(flens[j]) == ftab[ftags[j]], "FPC length");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
