// 3T1D-DRAM L1 data cache with retention-time management.
//
// A 64 KB, 4-way, 64-byte-line L1 data cache whose array is built from
// 3T1D dynamic cells. Such a cell is as fast as a 6T SRAM cell only for a
// limited retention time after it was written, and process variation shows up
// as a spread of that retention time rather than as a slower clock. The cache
// keeps correct data by one of two schemes, chosen at run time:
//   global    refresh_pulse_gen raises a pulse once per programmed period and
//             refresh_row_gen sweeps all 256 rows, one every 8 cycles, through
//             a read/write-back on the cache port (`block_port` is high while
//             a sweep runs);
//   line      every line has a retention time (programmed after test) and an
//             age counter ticking at 1/N of the clock; lines about to expire
//             are refreshed or evicted according to the refresh policy (none,
//             partial with a threshold, full), and the replacement policy (LRU,
//             dead-sensitive DSP, retention-sorted RSP-FIFO / RSP-LRU) decides
//             where new blocks go.
// The recommended configuration is the line scheme with partial refresh and
// DSP replacement.
//
// Interfaces: a processor port carrying one 64-bit access at a time
// (valid/ready request, one-cycle response pulse), an L2 read port (line
// address request with valid/ready, then one response beat carrying the
// line), an L2 write port fed by the write buffer (valid/ready), the
// retention-table write port, configuration inputs (change them only while
// the cache is idle and empty), and one-cycle event pulses for statistics.
// Timing of each part is given in its own module.
module l1d_3t1d_cache
  import l1d_pkg::*;
#(
  parameter int unsigned WB_DEPTH   = 8,
  parameter int unsigned ROW_CYCLES = 8,
  localparam int unsigned SET_W  = $clog2(SETS),
  localparam int unsigned WAY_W  = $clog2(WAYS),
  localparam int unsigned LA_W   = ADDR_W - $clog2(LINE_BYTES),
  localparam int unsigned WBC_W  = $clog2(WB_DEPTH + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // Configuration.
  input  scheme_e              cfg_scheme,
  input  refresh_pol_e         cfg_refresh,
  input  repl_pol_e            cfg_repl,
  input  logic [15:0]          cfg_tick_div,
  input  logic [CNT_W-1:0]     cfg_threshold,
  input  logic [23:0]          cfg_gref_period,
  // Retention table.
  input  logic                 rt_we,
  input  logic [SET_W-1:0]     rt_set,
  input  logic [WAY_W-1:0]     rt_way,
  input  logic [CNT_W-1:0]     rt_value,
  // Processor port.
  input  logic                 req_valid,
  output logic                 req_ready,
  input  logic                 req_we,
  input  logic [ADDR_W-1:0]    req_addr,
  input  logic [WORD_BITS-1:0] req_wdata,
  output logic                 resp_valid,
  output logic                 resp_hit,
  output logic [WORD_BITS-1:0] resp_rdata,
  output logic                 block_port,
  output logic                 sched_pulse,
  // L2 read port.
  output logic                 l2_req_valid,
  input  logic                 l2_req_ready,
  output logic [LA_W-1:0]      l2_req_addr,
  input  logic                 l2_resp_valid,
  input  logic [LINE_BITS-1:0] l2_resp_data,
  // L2 write port.
  output logic                 l2_wr_valid,
  input  logic                 l2_wr_ready,
  output logic [LA_W-1:0]      l2_wr_addr,
  output logic [LINE_BITS-1:0] l2_wr_data,
  // Status and events.
  output logic [WBC_W-1:0]     wb_count,
  output logic                 ev_hit,
  output logic                 ev_miss,
  output logic                 ev_gref,
  output logic                 ev_sweep_done,
  output logic                 ev_line_refresh,
  output logic                 ev_expire_evict,
  output logic                 ev_expire_wb,
  output logic                 ev_stall_refresh,
  output logic                 ev_victim_wb,
  output logic                 ev_bypass,
  output logic                 ev_shuffle,
  output logic                 ev_lost
);
  logic tick, pulse;
  logic gref_valid, gref_ready;
  logic [SET_W-1:0] gref_set;

  refresh_pulse_gen u_pulse (
    .clk        (clk),
    .rst_n      (rst_n),
    .en         (cfg_scheme == SCHEME_GLOBAL),
    .period     (cfg_gref_period),
    .pulse      (pulse),
    .sched_pulse(sched_pulse)
  );

  refresh_row_gen #(.ROWS(SETS), .ROW_CYCLES(ROW_CYCLES)) u_rows (
    .clk       (clk),
    .rst_n     (rst_n),
    .pulse     (pulse),
    .req_valid (gref_valid),
    .req_set   (gref_set),
    .req_ready (gref_ready),
    .block_port(block_port),
    .sweep_done(ev_sweep_done)
  );

  line_tick_gen u_tick (
    .clk  (clk),
    .rst_n(rst_n),
    .div  (cfg_tick_div),
    .tick (tick)
  );

  logic [CNT_W-1:0] retention  [SETS][WAYS];
  logic             dead       [SETS][WAYS];
  logic             expired    [SETS][WAYS];
  logic             due        [SETS][WAYS];
  logic             refresh_ok [SETS][WAYS];
  logic [SET_W-1:0] op_set;
  logic [WAYS-1:0]  op_age_clr, op_load;

  line_counter_bank u_counters (
    .clk       (clk),
    .rst_n     (rst_n),
    .tick      (tick),
    .rt_we     (rt_we),
    .rt_set    (rt_set),
    .rt_way    (rt_way),
    .rt_value  (rt_value),
    .op_set    (op_set),
    .op_age_clr(op_age_clr),
    .op_load   (op_load),
    .policy    (cfg_refresh),
    .threshold (cfg_threshold),
    .retention (retention),
    .dead      (dead),
    .expired   (expired),
    .due       (due),
    .refresh_ok(refresh_ok)
  );

  logic                 wb_valid, wb_ready, wb_full;
  logic [LA_W-1:0]      wb_addr;
  logic [LINE_BITS-1:0] wb_data;

  write_buffer #(.DEPTH(WB_DEPTH), .AW(LA_W), .DW(LINE_BITS)) u_wbuf (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (wb_valid),
    .in_ready (wb_ready),
    .in_addr  (wb_addr),
    .in_data  (wb_data),
    .out_valid(l2_wr_valid),
    .out_ready(l2_wr_ready),
    .out_addr (l2_wr_addr),
    .out_data (l2_wr_data),
    .full     (wb_full),
    .count    (wb_count)
  );

  l1d_ctrl u_ctrl (
    .clk             (clk),
    .rst_n           (rst_n),
    .cfg_scheme      (cfg_scheme),
    .cfg_repl        (cfg_repl),
    .req_valid       (req_valid),
    .req_ready       (req_ready),
    .req_we          (req_we),
    .req_addr        (req_addr),
    .req_wdata       (req_wdata),
    .resp_valid      (resp_valid),
    .resp_hit        (resp_hit),
    .resp_rdata      (resp_rdata),
    .l2_req_valid    (l2_req_valid),
    .l2_req_ready    (l2_req_ready),
    .l2_req_addr     (l2_req_addr),
    .l2_resp_valid   (l2_resp_valid),
    .l2_resp_data    (l2_resp_data),
    .wb_valid        (wb_valid),
    .wb_ready        (wb_ready),
    .wb_addr         (wb_addr),
    .wb_data         (wb_data),
    .gref_valid      (gref_valid),
    .gref_set        (gref_set),
    .gref_ready      (gref_ready),
    .retention       (retention),
    .dead            (dead),
    .expired         (expired),
    .due             (due),
    .refresh_ok      (refresh_ok),
    .op_set          (op_set),
    .op_age_clr      (op_age_clr),
    .op_load         (op_load),
    .ev_hit          (ev_hit),
    .ev_miss         (ev_miss),
    .ev_gref         (ev_gref),
    .ev_line_refresh (ev_line_refresh),
    .ev_expire_evict (ev_expire_evict),
    .ev_expire_wb    (ev_expire_wb),
    .ev_stall_refresh(ev_stall_refresh),
    .ev_victim_wb    (ev_victim_wb),
    .ev_bypass       (ev_bypass),
    .ev_shuffle      (ev_shuffle),
    .ev_lost         (ev_lost)
  );

  // The write buffer's full flag is what turns an expiring dirty line into a
  // refresh; it is the complement of its ready.
  assert property (@(posedge clk) disable iff (!rst_n) wb_full == !wb_ready);
endmodule
