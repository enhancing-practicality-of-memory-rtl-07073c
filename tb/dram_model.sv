// dram_model: behavioural off-chip memory for the channel testbenches.
//
// Not synthesizable. Stores each written block (by id) as the beats it
// arrived in, with its MAG count and compressed flag, and counts the beats.
// Read requests (rd_req_valid/rd_req_id) are queued and answered in order
// with the stored beats and metadata. With STALL set, wr_ready and rd_valid
// drop at random to create back-pressure.
module dram_model #(
  parameter int ID_W  = 8,
  parameter int MAG_W = 256,
  parameter bit STALL = 1'b1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_valid,
  output logic             wr_ready,
  input  logic [ID_W-1:0]  wr_id,
  input  logic [MAG_W-1:0] wr_data,
  input  logic [2:0]       wr_nmag,
  input  logic             wr_comp,
  input  logic             wr_last,
  input  logic             rd_req_valid,
  input  logic [ID_W-1:0]  rd_req_id,
  output logic             rd_valid,
  input  logic             rd_ready,
  output logic [ID_W-1:0]  rd_id,
  output logic [MAG_W-1:0] rd_data,
  output logic [2:0]       rd_nmag,
  output logic             rd_comp,
  output logic             rd_last
);
  logic [4*MAG_W-1:0] mem_data [2**ID_W];
  logic [2:0]         mem_nmag [2**ID_W];
  logic               mem_comp [2**ID_W];
  int                 mem_beats[2**ID_W];
  int                 wr_beats = 0, rd_beats = 0;

  logic [ID_W-1:0] req_q[$];
  int rbeat = 0, wbeat = 0;
  bit go;

  always @(posedge clk) begin
    if (rst_n && wr_valid && wr_ready) begin
      mem_data[wr_id][wbeat*MAG_W +: MAG_W] <= wr_data;
      mem_nmag[wr_id] <= wr_nmag;
      mem_comp[wr_id] <= wr_comp;
      wr_beats++;
      if (wr_last) begin mem_beats[wr_id] <= wbeat + 1; wbeat = 0; end
      else wbeat++;
    end
    if (rst_n && rd_valid && rd_ready) begin
      rd_beats++;
      if (rd_last) begin void'(req_q.pop_front()); rbeat = 0; end
      else rbeat++;
    end
    if (rd_req_valid) req_q.push_back(rd_req_id);
  end

  always @(negedge clk) begin
    wr_ready <= !STALL || ($urandom_range(0, 3) != 0);
    go = (req_q.size() > 0) && (!STALL || ($urandom_range(0, 3) != 0));
    rd_valid <= go;
    if (req_q.size() > 0) begin
      rd_id   <= req_q[0];
      rd_data <= mem_data[req_q[0]][rbeat*MAG_W +: MAG_W];
      rd_nmag <= mem_nmag[req_q[0]];
      rd_comp <= mem_comp[req_q[0]];
      rd_last <= (rbeat + 1 == int'(mem_nmag[req_q[0]]));
    end
  end

  initial begin
    wr_ready = 0; rd_valid = 0; rd_id = '0; rd_data = '0; rd_nmag = '0; rd_comp = 0; rd_last = 0;
  end
endmodule
