// tb_sync_fifo: self-checking test of sync_fifo.
//
// Random pushes and pops against a queue model: the data order, in_ready
// (low exactly when DEPTH entries are held) and out_valid (high exactly when
// not empty) are checked every cycle; the queue must have been full and empty
// at least once each.
module tb_sync_fifo;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int nfull = 0, nempty = 0;

  localparam int W = 16, DEPTH = 4;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [W-1:0] in_data, out_data;
  logic [W-1:0] model[$];

  sync_fifo #(.W(W), .DEPTH(DEPTH)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_data,
                                        .out_valid, .out_ready, .out_data);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    check(in_ready == (model.size() < DEPTH), "in_ready");
    check(out_valid == (model.size() > 0), "out_valid");
    if (model.size() == DEPTH) nfull++;
    if (model.size() == 0) nempty++;
    if (out_valid && out_ready) begin
      check(out_data == model[0], "data order");
      void'(model.pop_front());
    end
    if (in_valid && in_ready) model.push_back(in_data);
  end

  initial begin
    in_valid = 0; out_ready = 0; in_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      in_valid  = ($urandom_range(0, 99) < ((n / 500) % 2 ? 30 : 70));
      out_ready = ($urandom_range(0, 99) < ((n / 500) % 2 ? 70 : 30));
      in_data   = W'($urandom);
    end
    check(nfull > 0 && nempty > 0, "full and empty both reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
