// tb_bpc_symbol_encoder: self-checking test of bpc_symbol_encoder.
//
// Planes built to hit every code of the BPC tag table (zero, all ones,
// DBP-zero, single 1 at every position, adjacent 1s, two 1s, single 0,
// random) are encoded; tag, length and the payload bits below the length are
// compared with the reference, and every code must have been seen.
module tb_bpc_symbol_encoder;
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


  logic [30:0] dbx, pl, rpl;
  logic dbp_zero;
  logic [2:0] tag, rtag;
  logic [5:0] len;
  int rlen;
  int seen [8];
  bpc_symbol_encoder dut (.dbx, .dbp_zero, .tag, .len, .payload(pl));

  function automatic logic [30:0] mk(input int k);
    int a, b;
    a = $urandom_range(0, 30); b = $urandom_range(0, 30);
    case (k)
      0: return 0;
      1: return '1;
      2: return 31'(1) << a;
      3: return (a < 30) ? (31'(3) << a) : 31'(3);
      4: return (31'(1) << a) | (31'(1) << b);
      5: return ~(31'(1) << a);
      default: return 31'($urandom);
    endcase
  endfunction

  initial begin
    for (int n = 0; n < 3000; n++) begin
      dbx = mk(n % 7);
      dbp_zero = ($urandom_range(0, 3) == 0);
      @(posedge clk);
      ref_bpc_sym(dbx, dbp_zero, rtag, rpl, rlen);
      check(tag == rtag, $sformatf("tag %b expected %b for %h", tag, rtag, dbx));
      check(int'(len) == rlen, "length");
      check((pl & ((31'(1) << rlen) - 1)) == (rpl & ((31'(1) << rlen) - 1)) || rlen == 31 && pl == rpl, "payload");
      seen[tag]++;
    end
    for (int t = 0; t < 8; t++) check(seen[t] > 0, $sformatf("code %0d never produced", t));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
