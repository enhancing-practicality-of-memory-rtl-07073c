// tb_bpc_dbx_back_transform: self-checking test of bpc_dbx_back_transform.
//
// Blocks of every data kind are transformed by the reference model; planes
// whose DBP plane is zero (and would get the DBP-zero code) are handed over
// as zero with their flag set, the way the decompressor does. The rebuilt
// block must equal the original.
module tb_bpc_dbx_back_transform;
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


  logic [31:0] base;
  logic [BPC_NSYM-1:0][BPC_PW-1:0] dbx;
  logic [BPC_NSYM-1:0] dbp_zero;
  block_t out_block, b;
  int nz = 0;
  bpc_dbx_back_transform dut (.base, .dbx, .dbp_zero, .out_block);

  initial begin
    for (int n = 0; n < 400; n++) begin
      logic [31:0] rb; logic [32:0][30:0] rd; logic [32:0] rz;
      b = gen_block(n % NKINDS);
      ref_dbx(b, rb, rd, rz);
      base = rb;
      for (int j = 0; j < 33; j++) begin
        logic [2:0] t; logic [30:0] pl; int len;
        ref_bpc_sym(rd[j], rz[j], t, pl, len);
        dbp_zero[j] = (t == 3'b010);
        dbx[j] = dbp_zero[j] ? 31'(0) : rd[j];
        if (dbp_zero[j]) nz++;
      end
      @(posedge clk);
      check(out_block == b, $sformatf("kind %0d block mismatch", n % NKINDS));
    end
    check(nz > 0, "DBP-zero planes never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
