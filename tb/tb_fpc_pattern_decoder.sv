// tb_fpc_pattern_decoder: self-checking test of fpc_pattern_decoder.
//
// Words of every pattern are encoded by the reference model and decoded by
// the block; each must come back unchanged.
module tb_fpc_pattern_decoder;
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


  logic [2:0] tag;
  logic [31:0] payload, word, w;
  fpc_pattern_decoder dut (.tag, .payload, .word);

  initial begin
    for (int n = 0; n < 3000; n++) begin
      logic [31:0] v, pl; logic [2:0] t; int len;
      v = $urandom;
      case (n % 8)
        0: w = 0;
        1: w = 32'($signed(v[3:0]));
        2: w = 32'($signed(v[7:0]));
        3: w = 32'($signed(v[15:0]));
        4: w = {v[31:16] | 16'h8000, 16'h0};
        5: w = {{8{v[23]}}, v[23:16], {8{v[7]}}, v[7:0]};
        6: w = {4{v[7:0]}};
        default: w = v;
      endcase
      ref_fpc_word(w, t, pl, len);
      tag = t; payload = pl;
      @(posedge clk);
      check(word == w, $sformatf("prefix %b word %h got %h", t, w, word));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
