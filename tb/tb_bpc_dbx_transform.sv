// tb_bpc_dbx_transform: self-checking test of bpc_dbx_transform.
//
// Blocks of every data kind go through the transform; base, all 33 DBX
// planes and the DBP-zero flags are compared with the bit-serial reference.
// A constant block must give all-zero DBX planes.
module tb_bpc_dbx_transform;
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


  block_t in_block;
  logic [31:0] base;
  logic [BPC_NSYM-1:0][BPC_PW-1:0] dbx;
  logic [BPC_NSYM-1:0] dbp_zero;
  bpc_dbx_transform dut (.in_block, .base, .dbx, .dbp_zero);

  initial begin
    logic [31:0] rb; logic [32:0][30:0] rd; logic [32:0] rz;
    for (int n = 0; n < 400; n++) begin
      in_block = gen_block(n % NKINDS);
      @(posedge clk);
      ref_dbx(in_block, rb, rd, rz);
      check(base == rb, "base");
      check(dbx == rd, $sformatf("dbx planes, kind %0d", n % NKINDS));
      check(dbp_zero == rz, "dbp_zero flags");
      if (n % NKINDS == 1) check(dbx == '0 && dbp_zero == '1, "constant block gives zero planes");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
