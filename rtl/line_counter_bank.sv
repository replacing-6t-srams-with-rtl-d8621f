// Line counters and retention table for the line-level retention schemes.
//
// Every cache line carries its own retention time, the shortest retention of
// the cells in that line, measured after manufacture and written here in
// ticks (one tick = N clock cycles, see line_tick_gen). Each line also has an
// age counter, cleared whenever the line is written (load, refresh or a move
// between ways) and advanced by the global tick, and a life counter, cleared
// only when a new block is loaded, which the partial-refresh policy uses to
// tell how long the block has lived.
//
// Because ticks are global, a line whose age is A has been unrefreshed for
// less than (A+1)*N cycles, so it is usable while A < R, R being its stored
// retention. It is flagged `due` once A reaches R-1: the tick that would
// make A = R is then at least N cycles away, which is the time the controller
// has to refresh or evict it. A line stored with R < 2 is dead: the next tick
// may come one cycle after it is written, so its counter can never promise it
// a usable interval, and refreshing it would not lengthen it. `refresh_ok`
// tells whether the refresh policy allows a due line to be refreshed (full
// refresh: always; partial refresh: only lines whose retention is below the
// threshold, and only while the block has lived less than the threshold; no
// refresh: never).
//
// Interface: one row operation per cycle on `op_set`: `op_age_clr` clears the
// age of the marked ways, `op_load` clears age and life of the marked ways.
// Retention values are written one line at a time through `rt_we`. All
// outputs are registered state or simple compares of it, valid in the cycle
// after an update. Counters saturate. The due point, the dead rule for R < 2
// and the life counter are this design's reading of the document's
// conservative counter setting; the document calls a line dead when its
// retention is below one tick.
module line_counter_bank
  import l1d_pkg::*;
#(
  parameter int unsigned N_SETS = SETS,
  parameter int unsigned N_WAYS = WAYS,
  localparam int unsigned SET_W = $clog2(N_SETS),
  localparam int unsigned WAY_W = $clog2(N_WAYS)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                tick,
  // Retention programming.
  input  logic                rt_we,
  input  logic [SET_W-1:0]    rt_set,
  input  logic [WAY_W-1:0]    rt_way,
  input  logic [CNT_W-1:0]    rt_value,
  // Row operations.
  input  logic [SET_W-1:0]    op_set,
  input  logic [N_WAYS-1:0]   op_age_clr,
  input  logic [N_WAYS-1:0]   op_load,
  // Policy.
  input  refresh_pol_e        policy,
  input  logic [CNT_W-1:0]    threshold,
  // Per-line status.
  output logic [CNT_W-1:0]    retention [N_SETS][N_WAYS],
  output logic                dead      [N_SETS][N_WAYS],
  output logic                expired   [N_SETS][N_WAYS],
  output logic                due       [N_SETS][N_WAYS],
  output logic                refresh_ok[N_SETS][N_WAYS]
);
  logic [CNT_W-1:0] age  [N_SETS][N_WAYS];
  logic [CNT_W-1:0] life [N_SETS][N_WAYS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < N_SETS; s++)
        for (int w = 0; w < N_WAYS; w++) begin
          age[s][w]       <= '0;
          life[s][w]      <= '0;
          retention[s][w] <= '1;
        end
    end else begin
      for (int s = 0; s < N_SETS; s++)
        for (int w = 0; w < N_WAYS; w++) begin
          if (tick && age[s][w] != '1)  age[s][w]  <= age[s][w] + 1'b1;
          if (tick && life[s][w] != '1) life[s][w] <= life[s][w] + 1'b1;
          if (op_set == SET_W'(s) && (op_age_clr[w] || op_load[w])) age[s][w] <= '0;
          if (op_set == SET_W'(s) && op_load[w]) life[s][w] <= '0;
          if (rt_we && rt_set == SET_W'(s) && rt_way == WAY_W'(w)) retention[s][w] <= rt_value;
        end
    end
  end

  always_comb begin
    for (int s = 0; s < N_SETS; s++)
      for (int w = 0; w < N_WAYS; w++) begin
        dead[s][w]    = (retention[s][w] < 2);
        expired[s][w] = ({1'b0, age[s][w]} >= {1'b0, retention[s][w]});
        due[s][w]     = ({1'b0, age[s][w]} + 1 >= {1'b0, retention[s][w]});
        unique case (policy)
          REF_FULL:    refresh_ok[s][w] = !dead[s][w];
          REF_PARTIAL: refresh_ok[s][w] = !dead[s][w] && (retention[s][w] < threshold)
                                        && (life[s][w] < threshold);
          default:     refresh_ok[s][w] = 1'b0;
        endcase
      end
  end
endmodule
