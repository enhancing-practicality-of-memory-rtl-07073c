// tb_word_length_adder: self-checking test of word_length_adder.
//
// Random length vectors; each start position must be the header size plus
// the sum of all earlier lengths, and the total the sum of all.
module tb_word_length_adder;
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


  logic [BPC_NSYM-1:0][LEN_W-1:0] lens;
  logic [BPC_NSYM-1:0][POS_W-1:0] starts;
  logic [POS_W-1:0] total;
  word_length_adder dut (.lens, .starts, .total);

  initial begin
    for (int n = 0; n < 500; n++) begin
      int s;
      for (int j = 0; j < BPC_NSYM; j++) lens[j] = (n % 4 == 0) ? 6'd31 : 6'($urandom_range(0, 31));
      @(posedge clk);
      s = BPC_HDR_W;
      for (int j = 0; j < BPC_NSYM; j++) begin
        check(int'(starts[j]) == s, $sformatf("start %0d", j));
        s += int'(lens[j]);
      end
      check(int'(total) == s, "total");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
