// Write buffer between the L1 data cache and L2.
//
// A FIFO of evicted dirty lines (line address and data) waiting to be written
// to L2. When it is full the cache cannot evict a dirty line; an expiring
// dirty line is then refreshed in place instead, which keeps its data alive.
// The depth is this design's choice.
//
// Interface: `in_valid`/`in_ready` accept a line; `out_valid`/`out_ready`
// hand the oldest line to L2. A line can be accepted while one leaves in the
// same cycle. `full` and `count` report the occupancy.
module write_buffer #(
  parameter int unsigned DEPTH = 8,
  parameter int unsigned AW    = 26,
  parameter int unsigned DW    = 512,
  localparam int unsigned PTR_W = $clog2(DEPTH),
  localparam int unsigned CNT_W = $clog2(DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [AW-1:0]    in_addr,
  input  logic [DW-1:0]    in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [AW-1:0]    out_addr,
  output logic [DW-1:0]    out_data,
  output logic             full,
  output logic [CNT_W-1:0] count
);
  logic [AW-1:0]    addr_q [DEPTH];
  logic [DW-1:0]    data_q [DEPTH];
  logic [PTR_W-1:0] rd_ptr, wr_ptr;

  wire push = in_valid && in_ready;
  wire pop  = out_valid && out_ready;

  assign full      = (count == CNT_W'(DEPTH));
  assign in_ready  = !full;
  assign out_valid = (count != '0);
  assign out_addr  = addr_q[rd_ptr];
  assign out_data  = data_q[rd_ptr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= (wr_ptr == PTR_W'(DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
      if (pop)  rd_ptr <= (rd_ptr == PTR_W'(DEPTH - 1)) ? '0 : rd_ptr + 1'b1;
      count <= count + CNT_W'(push) - CNT_W'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) begin
      addr_q[wr_ptr] <= in_addr;
      data_q[wr_ptr] <= in_data;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) out_valid && !out_ready |=> out_valid);
endmodule
