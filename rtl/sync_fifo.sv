// sync_fifo: synchronous first-in first-out queue with valid/ready ports.
//
// Decouples the compressor from the DRAM write port and the decompressor from
// the L2 return port. DEPTH entries of W bits in a register array, a read and
// a write pointer and an occupancy count; a push and a pop may happen in the
// same cycle. in_ready is low when full, out_valid high when not empty, and
// out_data shows the oldest entry (no extra latency beyond the write edge).
// Depth and handshake are choices of this implementation.
module sync_fifo #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [W-1:0] out_data
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [DEPTH-1:0][W-1:0] mem;
  logic [AW-1:0]           wp, rp;
  logic [AW:0]             cnt;

  logic push, pop;
  assign in_ready  = (cnt != (AW+1)'(DEPTH));
  assign out_valid = (cnt != '0);
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;
  assign out_data  = mem[rp];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mem <= '0;
      wp  <= '0;
      rp  <= '0;
      cnt <= '0;
    end else begin
      if (push) begin
        mem[wp] <= in_data;
        wp      <= (32'(wp) == DEPTH-1) ? '0 : wp + AW'(1);
      end
      if (pop) begin
        rp <= (32'(rp) == DEPTH-1) ? '0 : rp + AW'(1);
      end
      cnt <= cnt + (AW+1)'(push) - (AW+1)'(pop);
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) cnt <= (AW+1)'(DEPTH));

endmodule
