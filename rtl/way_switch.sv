// Way-switch multiplexers of the retention-sensitive placement schemes.
//
// One multiplexer per way selects what is written into that way of a set: the
// block arriving from the data crossbar, or the block currently held in any
// way of the same set. This lets a set's blocks shift between ways in one
// row write. The selects come from repl_unit. Combinational; the element type
// is a parameter so the same mux serves the data lines and the tags.
module way_switch #(
  parameter int unsigned NWAYS = 4,
  parameter type         elem_t = logic [511:0],
  localparam int unsigned WAY_W = $clog2(NWAYS)
) (
  input  elem_t            cur     [NWAYS],
  input  elem_t            incoming,
  input  logic             sel_new [NWAYS],
  input  logic [WAY_W-1:0] sel_src [NWAYS],
  output elem_t            out     [NWAYS]
);
  always_comb begin
    for (int w = 0; w < NWAYS; w++)
      out[w] = sel_new[w] ? incoming : cur[sel_src[w]];
  end
endmodule
