// tb_parallel_shift_registers: self-checking test of parallel_shift_registers.
//
// Random images and start positions (including ones near and past the end);
// every extracted word is compared with a bit-by-bit read of the image.
module tb_parallel_shift_registers;
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


  logic [BPC_MAX_BITS-1:0] in_data;
  logic [BPC_NSYM-1:0][POS_W-1:0] starts;
  logic [BPC_NSYM-1:0][BPC_PW-1:0] words;
  parallel_shift_registers dut (.in_data, .starts, .words);

  initial begin
    for (int n = 0; n < 300; n++) begin
      for (int k = 0; k < BPC_MAX_BITS; k++) in_data[k] = 1'($urandom);
      for (int j = 0; j < BPC_NSYM; j++) starts[j] = 11'($urandom_range(0, BPC_MAX_BITS + 40));
      @(posedge clk);
      for (int j = 0; j < BPC_NSYM; j++) begin
        logic [30:0] e;
        for (int k = 0; k < 31; k++) begin
          int p;
          p = int'(starts[j]) + k;
          e[k] = (p < BPC_MAX_BITS) ? in_data[p] : 1'b0;
        end
        check(words[j] == e, $sformatf("word %0d at %0d", j, starts[j]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
