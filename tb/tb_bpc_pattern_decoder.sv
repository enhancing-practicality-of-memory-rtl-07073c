// tb_bpc_pattern_decoder: self-checking test of bpc_pattern_decoder.
//
// Planes hitting every code are encoded by the reference model and decoded by
// the block; the plane must come back unchanged (all zero for the DBP-zero
// code, whose plane the back transform rebuilds).
module tb_bpc_pattern_decoder;
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
  logic [30:0] payload, dbx, x;
  bpc_pattern_decoder dut (.tag, .payload, .dbx);

  initial begin
    for (int n = 0; n < 3000; n++) begin
      int a, b, len; logic dz; logic [2:0] t; logic [30:0] pl;
      a = $urandom_range(0, 30); b = $urandom_range(0, 29);
      case (n % 7)
        0: x = 0;
        1: x = '1;
        2: x = 31'(1) << a;
        3: x = 31'(3) << b;
        4: x = (31'(1) << a) | (31'(1) << b);
        5: x = ~(31'(1) << a);
        default: x = 31'($urandom);
      endcase
      dz = ($urandom_range(0, 4) == 0);
      ref_bpc_sym(x, dz, t, pl, len);
      tag = t;
      payload = pl | ((len < 31) ? (31'($urandom) << len) : 31'(0));  // junk above the payload
      @(posedge clk);
      check(dbx == ((t == 3'b010) ? 31'(0) : x), $sformatf("tag %b plane %h got %h", t, x, dbx));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
