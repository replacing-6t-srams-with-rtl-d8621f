// Runs the eight line-level retention strategies (LRU, DSP x no / partial /
// full refresh, RSP-FIFO, RSP-LRU) on three synthetic chips with the same
// access trace, on the full-size cache, and prints the miss count and the
// refresh and eviction traffic of each run.
//
// Chips (retention per line in ticks of N = 32 cycles):
//   good    150..600 ticks, no dead lines
//   median  20..300 ticks, about 3% dead lines
//   bad     about 30% dead lines, the rest 2..100 ticks
// The trace re-uses one of the 16 most recent addresses 70% of the time and
// otherwise picks a new one from 32 sets x 16 tags. The partial-refresh
// threshold is 188 ticks (about 6,000 cycles). Self-checks: every load
// returns the last value stored (against a reference memory), no dirty line
// ever expires, and on the bad chip DSP and RSP never place a block into a
// dead way while LRU does (it shows up as bypassed accesses in sets that
// still have live ways).
module tb_retention_schemes;
  import l1d_pkg::*;

  localparam int unsigned SET_W = $clog2(SETS);
  localparam int unsigned WAY_W = $clog2(WAYS);
  localparam int unsigned LA_W  = ADDR_W - $clog2(LINE_BYTES);
  localparam int NACC = 3000;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  scheme_e          cfg_scheme;
  refresh_pol_e     cfg_refresh;
  repl_pol_e        cfg_repl;
  logic [15:0]      cfg_tick_div;
  logic [CNT_W-1:0] cfg_threshold;
  logic [23:0]      cfg_gref_period;
  logic             rt_we;
  logic [SET_W-1:0] rt_set;
  logic [WAY_W-1:0] rt_way;
  logic [CNT_W-1:0] rt_value;
  logic             req_valid, req_ready, req_we;
  logic [ADDR_W-1:0] req_addr;
  logic [WORD_BITS-1:0] req_wdata;
  logic             resp_valid, resp_hit;
  logic [WORD_BITS-1:0] resp_rdata;
  logic             block_port, sched_pulse;
  logic             l2_req_valid, l2_req_ready;
  logic [LA_W-1:0]  l2_req_addr;
  logic             l2_resp_valid;
  logic [LINE_BITS-1:0] l2_resp_data;
  logic             l2_wr_valid, l2_wr_ready;
  logic [LA_W-1:0]  l2_wr_addr;
  logic [LINE_BITS-1:0] l2_wr_data;
  logic [3:0]       wb_count;
  logic ev_hit, ev_miss, ev_gref, ev_sweep_done, ev_line_refresh, ev_expire_evict;
  logic ev_expire_wb, ev_stall_refresh, ev_victim_wb, ev_bypass, ev_shuffle, ev_lost;

  l1d_3t1d_cache dut (.*);

  int checks = 0;
  int failures = 0;

  // Reference memory and L2 model.
  function automatic logic [63:0] init_word(logic [28:0] waddr);
    return {waddr[15:0] ^ 16'h3c3c, 3'b0, waddr, 16'h1234} * 64'd11400714819323198485;
  endfunction
  logic [63:0]          ref_mem [logic [28:0]];
  logic [LINE_BITS-1:0] l2_mem  [logic [LA_W-1:0]];
  function automatic logic [63:0] ref_read(logic [28:0] waddr);
    return ref_mem.exists(waddr) ? ref_mem[waddr] : init_word(waddr);
  endfunction
  function automatic logic [LINE_BITS-1:0] l2_line(logic [LA_W-1:0] la);
    logic [LINE_BITS-1:0] l;
    if (l2_mem.exists(la)) return l2_mem[la];
    for (int i = 0; i < 8; i++) l[i*64 +: 64] = init_word({la, 3'(i)});
    return l;
  endfunction

  int l2_lat;
  bit l2_busy = 1'b0;
  logic [LA_W-1:0] l2_pend;
  initial begin
    l2_resp_valid = 1'b0;
    l2_resp_data  = '0;
    l2_req_ready  = 1'b1;
    l2_wr_ready   = 1'b1;
  end
  always @(negedge clk) begin
    l2_resp_valid <= 1'b0;
    l2_wr_ready   <= ($urandom_range(0, 1) != 0);
    if (l2_busy) begin
      if (l2_lat == 0) begin
        l2_busy = 1'b0;
        l2_resp_valid <= 1'b1;
        l2_resp_data  <= l2_line(l2_pend);
      end else l2_lat--;
    end else if (l2_req_valid) begin
      l2_busy = 1'b1;
      l2_pend = l2_req_addr;
      l2_lat  = 5;
    end
  end
  always @(posedge clk) if (l2_wr_valid && l2_wr_ready) l2_mem[l2_wr_addr] = l2_wr_data;

  // Counters of the current run.
  int n_miss, n_lref, n_xev, n_byp, n_lost;
  always @(posedge clk) if (rst_n) begin
    n_miss += int'(ev_miss);
    n_lref += int'(ev_line_refresh);
    n_xev  += int'(ev_expire_evict);
    n_byp  += int'(ev_bypass);
    n_lost += int'(ev_lost);
  end

  // Chips and trace, generated once.
  int unsigned chip_ret [3][SETS][WAYS];
  logic [ADDR_W-1:0] tr_addr [NACC];
  bit                tr_we   [NACC];
  logic [63:0]       tr_data [NACC];
  int                tr_idle [NACC];

  function automatic bit set_has_live(int c, logic [ADDR_W-1:0] a);
    int s;
    s = int'(a[13:6]);
    for (int w = 0; w < WAYS; w++) if (chip_ret[c][s][w] >= 2) return 1'b1;
    return 1'b0;
  endfunction

  task automatic access(input bit we, input logic [ADDR_W-1:0] a, input logic [63:0] d);
    @(negedge clk);
    req_valid = 1'b1; req_we = we; req_addr = a; req_wdata = d;
    do @(posedge clk); while (!req_ready);
    @(negedge clk);
    req_valid = 1'b0;
    while (!resp_valid) @(negedge clk);
    if (!we) begin
      checks++;
      if (resp_rdata !== ref_read(a[31:3])) begin
        failures++;
        $display("FAIL read %h got %h exp %h", a, resp_rdata, ref_read(a[31:3]));
      end
    end else ref_mem[a[31:3]] = d;
  endtask

  task automatic run(int c, refresh_pol_e rp, repl_pol_e rl, output int misses, output int byp_live);
    @(negedge clk);
    rst_n = 1'b0;
    cfg_refresh = rp; cfg_repl = rl;
    ref_mem.delete(); l2_mem.delete();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < SETS; s++)
      for (int w = 0; w < WAYS; w++) begin
        @(negedge clk);
        rt_we = 1'b1; rt_set = SET_W'(s); rt_way = WAY_W'(w); rt_value = CNT_W'(chip_ret[c][s][w]);
      end
    @(negedge clk);
    rt_we = 1'b0;
    n_miss = 0; n_lref = 0; n_xev = 0; n_byp = 0; n_lost = 0;
    byp_live = 0;
    for (int i = 0; i < NACC; i++) begin
      int b0;
      b0 = n_byp;
      access(tr_we[i], tr_addr[i], tr_data[i]);
      repeat (tr_idle[i]) @(negedge clk);
      if (n_byp != b0 && set_has_live(c, tr_addr[i])) byp_live++;
    end
    misses = n_miss;
    checks++;
    if (n_lost != 0) begin
      failures++;
      $display("FAIL %0d dirty lines expired", n_lost);
    end
  endtask

  initial begin
    repeat (5_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    string chip_name [3] = '{"good", "median", "bad"};
    string strat_name [8] = '{"LRU/none", "LRU/partial", "LRU/full", "DSP/none",
                              "DSP/partial", "DSP/full", "RSP-FIFO", "RSP-LRU"};
    refresh_pol_e rp [8] = '{REF_NONE, REF_PARTIAL, REF_FULL, REF_NONE, REF_PARTIAL, REF_FULL,
                             REF_NONE, REF_NONE};
    repl_pol_e rl [8] = '{REPL_LRU, REPL_LRU, REPL_LRU, REPL_DSP, REPL_DSP, REPL_DSP,
                          REPL_RSP_FIFO, REPL_RSP_LRU};
    logic [ADDR_W-1:0] recent [16];

    rst_n = 1'b0;
    req_valid = 1'b0; req_we = 1'b0; req_addr = '0; req_wdata = '0;
    rt_we = 1'b0; rt_set = '0; rt_way = '0; rt_value = '0;
    cfg_scheme = SCHEME_LINE; cfg_refresh = REF_NONE; cfg_repl = REPL_LRU;
    cfg_tick_div = 16'd32;
    cfg_threshold = CNT_W'(188);
    cfg_gref_period = 24'd3000;

    for (int s = 0; s < SETS; s++)
      for (int w = 0; w < WAYS; w++) begin
        chip_ret[0][s][w] = $urandom_range(150, 600);
        chip_ret[1][s][w] = ($urandom_range(0, 99) < 3) ? 0 : $urandom_range(20, 300);
        chip_ret[2][s][w] = ($urandom_range(0, 99) < 30) ? 0 : $urandom_range(2, 100);
      end
    for (int k = 0; k < 16; k++) recent[k] = '0;
    for (int i = 0; i < NACC; i++) begin
      if (i >= 16 && $urandom_range(0, 99) < 70) tr_addr[i] = recent[$urandom_range(0, 15)];
      else tr_addr[i] = {18'($urandom_range(0, 15)), 8'($urandom_range(0, 31)),
                         3'($urandom_range(0, 7)), 3'b000};
      recent[i % 16] = tr_addr[i];
      tr_we[i]   = ($urandom_range(0, 99) < 30);
      tr_data[i] = {$urandom, $urandom};
      tr_idle[i] = $urandom_range(0, 30);
    end

    for (int c = 0; c < 3; c++) begin
      for (int k = 0; k < 8; k++) begin
        int m, bl;
        run(c, rp[k], rl[k], m, bl);
        $display("chip %-6s %-12s misses=%0d line_refreshes=%0d expiry_evictions=%0d bypass_in_live_sets=%0d",
                 chip_name[c], strat_name[k], m, n_lref, n_xev, bl);
        // Retention-aware placement never wastes a block on a dead way.
        if (k >= 3) begin
          checks++;
          if (bl != 0) begin
            failures++;
            $display("FAIL %s placed a block in a dead way", strat_name[k]);
          end
        end else if (c == 2 && k == 0) begin
          checks++;
          if (bl == 0) begin
            failures++;
            $display("FAIL LRU on the bad chip never hit a dead way");
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
