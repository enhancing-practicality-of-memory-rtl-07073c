// tb_fpc_pattern_matcher: self-checking test of fpc_pattern_matcher.
//
// Words built for every FPC pattern plus random words are matched; prefix,
// length and payload are compared with the reference, and every prefix must
// have been seen.
module tb_fpc_pattern_matcher;
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


  logic [31:0] word, pl, rpl;
  logic [2:0] tag, rtag;
  logic [5:0] len;
  int rlen;
  int seen [8];
  fpc_pattern_matcher dut (.word, .tag, .len, .payload(pl));

  initial begin
    for (int n = 0; n < 3000; n++) begin
      logic [31:0] v;
      v = $urandom;
      case (n % 8)
        0: word = 0;
        1: word = 32'($signed(v[3:0]));
        2: word = 32'($signed(v[7:0]));
        3: word = 32'($signed(v[15:0]));
        4: word = {v[31:16] | 16'h8000, 16'h0};
        5: word = {{8{v[23]}}, v[23:16], {8{v[7]}}, v[7:0]};
        6: word = {4{v[7:0]}};
        default: word = v;
      endcase
      @(posedge clk);
      ref_fpc_word(word, rtag, rpl, rlen);
      check(tag == rtag, $sformatf("tag %b expected %b for %h", tag, rtag, word));
      check(int'(len) == rlen, "length");
      check(pl == rpl, "payload");
      seen[tag]++;
    end
    for (int t = 0; t < 8; t++) check(seen[t] > 0, $sformatf("prefix %0d never produced", t));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
