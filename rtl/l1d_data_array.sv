// L1 data cache array (3T1D cells), one row per set, all ways side by side.
//
// A read returns every way of a set one cycle after `rd_en`. A write stores
// the ways marked in `wr_mask` of one set. Writing a line is what refreshes
// its 3T1D cells; the retention bookkeeping for that lives in
// line_counter_bank, so the array itself is a plain synchronous memory here.
// Reading and writing the same set in one cycle returns the old data. Port
// structure (one read and one write port, whole-set width) is this design's
// choice; the document does not fix the array organisation.
module l1d_data_array
  import l1d_pkg::*;
#(
  parameter int unsigned N_SETS = SETS,
  parameter int unsigned N_WAYS = WAYS,
  parameter int unsigned LBITS  = LINE_BITS,
  localparam int unsigned SET_W = $clog2(N_SETS)
) (
  input  logic              clk,
  input  logic              rd_en,
  input  logic [SET_W-1:0]  rd_set,
  output logic [LBITS-1:0]  rd_data [N_WAYS],
  input  logic              wr_en,
  input  logic [SET_W-1:0]  wr_set,
  input  logic [N_WAYS-1:0] wr_mask,
  input  logic [LBITS-1:0]  wr_data [N_WAYS]
);
  for (genvar w = 0; w < N_WAYS; w++) begin : g_way
    logic [LBITS-1:0] mem [N_SETS];
    always_ff @(posedge clk) begin
      if (rd_en) rd_data[w] <= mem[rd_set];
      if (wr_en && wr_mask[w]) mem[wr_set] <= wr_data[w];
    end
  end
endmodule
