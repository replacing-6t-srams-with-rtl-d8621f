// Cache refresh row-ID generation for the global-refresh scheme.
//
// On each refresh pulse this block walks every row (set) of the L1 data array
// once, issuing one refresh request per row. A refresh is a read of the row
// followed by a write-back of the same data on the next cycle, done on a port
// taken away from the processor. Rows are issued ROW_CYCLES apart: with 8
// cycles per row and 256 rows a sweep takes 2048 cycles, the document's figure
// for a full refresh (476.3 ns at 4.3 GHz). While a sweep is in progress
// `block_port` tells the processor that one read/write port is taken.
//
// Interface: `req_valid`/`req_set` is a request held until `req_ready`. The
// next request is issued ROW_CYCLES cycles after the previous one was issued,
// or when it is accepted if that is later. A pulse that arrives during a sweep
// is remembered and starts a new sweep right after. `sweep_done` pulses when
// the last row has been accepted. The valid/ready handshake and the pulse
// memory are this design's choice.
module refresh_row_gen #(
  parameter int unsigned ROWS       = 256,
  parameter int unsigned ROW_CYCLES = 8,
  localparam int unsigned ROW_W     = $clog2(ROWS),
  localparam int unsigned GAP_W     = $clog2(ROW_CYCLES + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             pulse,
  output logic             req_valid,
  output logic [ROW_W-1:0] req_set,
  input  logic             req_ready,
  output logic             block_port,
  output logic             sweep_done
);
  logic             active;
  logic             pending;
  logic [GAP_W-1:0] gap;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active     <= 1'b0;
      pending    <= 1'b0;
      gap        <= '0;
      req_valid  <= 1'b0;
      req_set    <= '0;
      sweep_done <= 1'b0;
    end else begin
      sweep_done <= 1'b0;
      if (gap != '0) gap <= gap - 1'b1;
      if (pulse && active) pending <= 1'b1;

      if (!active) begin
        if (pulse || pending) begin
          active    <= 1'b1;
          pending   <= 1'b0;
          req_set   <= '0;
          req_valid <= 1'b1;
          gap       <= GAP_W'(ROW_CYCLES);
        end
      end else if (req_valid) begin
        if (req_ready) begin
          req_valid <= 1'b0;
          if (req_set == ROW_W'(ROWS - 1)) begin
            active     <= 1'b0;
            sweep_done <= 1'b1;
          end else begin
            req_set <= req_set + 1'b1;
          end
        end
      end else if (gap <= 1) begin
        req_valid <= 1'b1;
        gap       <= GAP_W'(ROW_CYCLES);
      end
    end
  end

  assign block_port = active;

  // A request is held stable until it is accepted.
  assert property (@(posedge clk) disable iff (!rst_n)
                   req_valid && !req_ready |=> req_valid && $stable(req_set));
endmodule
