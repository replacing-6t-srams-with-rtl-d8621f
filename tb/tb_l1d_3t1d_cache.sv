// End-to-end test of the 3T1D L1 data cache at its full size (256 sets x
// 4 ways x 64-byte lines).
//
// An L2 model behind the cache holds every line (initial contents are a hash
// of the address) and takes write-backs; a reference memory in the testbench
// records every store. Random loads and stores on a small footprint are run
// under several configurations, and every load is checked against the
// reference. Per line, retention times are drawn at random with dead, short
// and long lines, so lines expire, get refreshed, evicted and written back.
// Phases:
//   1 line scheme, partial refresh, DSP  (recommended configuration), with a
//     spell of L2 write back-pressure so the write buffer fills up
//   2 line scheme, full refresh, LRU
//   3 line scheme, no refresh, RSP-FIFO
//   4 line scheme, no refresh, RSP-LRU
//   5 global refresh scheme, every line's retention just above the period
//   6 global refresh with too long a period, which must lose dirty lines
// Every mechanism (hit, miss, global row refresh, completed sweep, line
// refresh, expiry eviction with and without write-back, refresh because the
// write buffer was full, victim write-back, bypass of an all-dead set, way
// shuffle) must happen at least once; in phases 1-5 a dirty line must never
// expire (ev_lost), and a hit must answer exactly 2 cycles after it was accepted.
module tb_l1d_3t1d_cache;
  import l1d_pkg::*;

  localparam int unsigned SET_W = $clog2(SETS);
  localparam int unsigned WAY_W = $clog2(WAYS);
  localparam int unsigned LA_W  = ADDR_W - $clog2(LINE_BYTES);

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
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // ---------------------------------------------------------------------------
  // Memory image: reference (per 64-bit word) and L2 (per line).
  function automatic logic [63:0] init_word(logic [28:0] waddr);
    return {waddr[15:0] ^ 16'h5a5a, 3'b0, waddr, 16'hc0de} * 64'd2654435761;
  endfunction

  logic [63:0]        ref_mem [logic [28:0]];
  logic [LINE_BITS-1:0] l2_mem [logic [LA_W-1:0]];

  function automatic logic [63:0] ref_read(logic [28:0] waddr);
    return ref_mem.exists(waddr) ? ref_mem[waddr] : init_word(waddr);
  endfunction

  function automatic logic [LINE_BITS-1:0] l2_line(logic [LA_W-1:0] la);
    logic [LINE_BITS-1:0] l;
    if (l2_mem.exists(la)) return l2_mem[la];
    for (int i = 0; i < 8; i++) l[i*64 +: 64] = init_word({la, 3'(i)});
    return l;
  endfunction

  // L2 read model: fixed latency after the request.
  int          l2_lat;
  bit          l2_busy;
  logic [LA_W-1:0] l2_pend;
  bit          l2_wr_block;
  initial begin
    l2_resp_valid = 1'b0;
    l2_resp_data  = '0;
    l2_req_ready  = 1'b1;
    l2_busy       = 1'b0;
    l2_wr_block   = 1'b0;
  end
  always @(negedge clk) begin
    l2_resp_valid <= 1'b0;
    l2_wr_ready   <= !l2_wr_block && ($urandom_range(0, 3) != 0);
    if (l2_busy) begin
      if (l2_lat == 0) begin
        l2_busy = 1'b0;
        l2_resp_valid <= 1'b1;
        l2_resp_data  <= l2_line(l2_pend);
      end else begin
        l2_lat--;
      end
    end else if (l2_req_valid) begin
      l2_busy = 1'b1;
      l2_pend = l2_req_addr;
      l2_lat  = 3 + int'($urandom_range(0, 3));
    end
  end
  always @(posedge clk) begin
    if (l2_wr_valid && l2_wr_ready) l2_mem[l2_wr_addr] = l2_wr_data;
  end

  // ---------------------------------------------------------------------------
  // Event counters.
  int n_hit, n_miss, n_gref, n_sweep, n_lref, n_xev, n_xwb, n_stall, n_vwb, n_byp, n_shuf;
  int n_lost, n_block;
  always @(posedge clk) if (rst_n) begin
    n_hit   += int'(ev_hit);
    n_miss  += int'(ev_miss);
    n_gref  += int'(ev_gref);
    n_sweep += int'(ev_sweep_done);
    n_lref  += int'(ev_line_refresh);
    n_xev   += int'(ev_expire_evict);
    n_xwb   += int'(ev_expire_wb);
    n_stall += int'(ev_stall_refresh);
    n_vwb   += int'(ev_victim_wb);
    n_byp   += int'(ev_bypass);
    n_shuf  += int'(ev_shuffle);
    n_lost  += int'(ev_lost);
    n_block += int'(block_port);
  end

  // ---------------------------------------------------------------------------
  // Processor side.
  task automatic access(input bit we, input logic [ADDR_W-1:0] a, input logic [63:0] d);
    longint t_acc;
    @(negedge clk);
    req_valid = 1'b1;
    req_we    = we;
    req_addr  = a;
    req_wdata = d;
    do @(posedge clk); while (!req_ready);
    t_acc = cycle;
    @(negedge clk);
    req_valid = 1'b0;
    while (!resp_valid) @(negedge clk);
    if (resp_hit) begin
      checks++;
      if (cycle - t_acc != 2) begin
        failures++;
        $display("FAIL hit latency %0d at %h", cycle - t_acc, a);
      end
    end
    if (!we) begin
      checks++;
      if (resp_rdata !== ref_read(a[31:3])) begin
        failures++;
        $display("FAIL read %h got %h exp %h (hit=%0b)", a, resp_rdata, ref_read(a[31:3]), resp_hit);
      end
    end else begin
      ref_mem[a[31:3]] = d;
    end
  endtask

  function automatic logic [ADDR_W-1:0] rand_addr(int nsets, int ntags);
    logic [17:0] tag;
    logic [7:0]  set;
    logic [2:0]  w;
    tag = 18'($urandom_range(0, ntags - 1));
    set = 8'($urandom_range(0, nsets - 1));
    w   = 3'($urandom_range(0, 7));
    return {tag, set, w, 3'b000};
  endfunction

  task automatic run_traffic(int n, int nsets, int ntags, int wr_pct, int idle_max);
    for (int i = 0; i < n; i++) begin
      bit we;
      we = ($urandom_range(0, 99) < wr_pct);
      access(we, rand_addr(nsets, ntags), {$urandom, $urandom});
      repeat ($urandom_range(0, idle_max)) @(negedge clk);
    end
  endtask

  // Program the retention table; `mode` 0: random mix; 1: all equal to `fixed`.
  task automatic program_retention(int mode, int fixed, int thr);
    for (int s = 0; s < SETS; s++)
      for (int w = 0; w < WAYS; w++) begin
        int r, k;
        if (mode == 1) r = fixed;
        else begin
          k = $urandom_range(0, 9);
          if (s == 3) r = 0;                       // a set with every way dead
          else if (k == 0) r = 0;                  // dead line
          else if (k <= 4) r = $urandom_range(4, thr - 1);   // short
          else r = $urandom_range(thr, 3 * thr);   // long
        end
        @(negedge clk);
        rt_we    = 1'b1;
        rt_set   = SET_W'(s);
        rt_way   = WAY_W'(w);
        rt_value = CNT_W'(r);
      end
    @(negedge clk);
    rt_we = 1'b0;
  endtask

  task automatic reset_phase(scheme_e sc, refresh_pol_e rp, repl_pol_e rl);
    @(negedge clk);
    rst_n = 1'b0;
    cfg_scheme  = sc;
    cfg_refresh = rp;
    cfg_repl    = rl;
    ref_mem.delete();
    l2_mem.delete();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
  endtask

  task automatic drain(int cyc);
    repeat (cyc) @(negedge clk);
  endtask

  task automatic expect_seen(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  // Watchdog.
  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    req_valid = 1'b0; req_we = 1'b0; req_addr = '0; req_wdata = '0;
    rt_we = 1'b0; rt_set = '0; rt_way = '0; rt_value = '0;
    cfg_tick_div    = 16'd32;
    cfg_threshold   = CNT_W'(40);
    cfg_gref_period = 24'd3000;
    cfg_scheme = SCHEME_LINE; cfg_refresh = REF_PARTIAL; cfg_repl = REPL_DSP;

    // 1: partial refresh + DSP.
    reset_phase(SCHEME_LINE, REF_PARTIAL, REPL_DSP);
    program_retention(0, 0, 40);
    run_traffic(3000, 8, 6, 50, 6);
    fork                                     // L2 stops taking write-backs
      begin
        l2_wr_block = 1'b1;
        drain(4000);
        l2_wr_block = 1'b0;
      end
    join_none
    run_traffic(600, 16, 12, 90, 2);
    drain(2000);
    run_traffic(1000, 8, 6, 50, 6);
    $display("phase 1: hit=%0d miss=%0d lref=%0d xev=%0d xwb=%0d stall=%0d vwb=%0d byp=%0d",
             n_hit, n_miss, n_lref, n_xev, n_xwb, n_stall, n_vwb, n_byp);

    // 2: full refresh + LRU.
    reset_phase(SCHEME_LINE, REF_FULL, REPL_LRU);
    program_retention(0, 0, 40);
    run_traffic(2000, 8, 6, 50, 6);

    // 3: no refresh + RSP-FIFO.
    reset_phase(SCHEME_LINE, REF_NONE, REPL_RSP_FIFO);
    program_retention(0, 0, 40);
    run_traffic(2000, 8, 6, 50, 6);

    // 4: no refresh + RSP-LRU.
    reset_phase(SCHEME_LINE, REF_NONE, REPL_RSP_LRU);
    program_retention(0, 0, 40);
    run_traffic(2000, 8, 6, 50, 6);
    $display("phase 4: shuffle=%0d", n_shuf);

    // 5: global refresh. Every line holds 255 ticks of 16 cycles (>= 4064
    // cycles); a sweep starts every 3000 cycles and takes 2048.
    cfg_tick_div = 16'd16;
    reset_phase(SCHEME_GLOBAL, REF_NONE, REPL_LRU);
    program_retention(1, 255, 40);
    run_traffic(3000, 16, 6, 60, 6);
    drain(4000);
    run_traffic(500, 16, 6, 60, 6);
    $display("phase 5: gref=%0d sweeps=%0d block_cycles=%0d", n_gref, n_sweep, n_block);

    checks++;
    if (n_lost != 0) begin
      failures++;
      $display("FAIL %0d dirty lines expired", n_lost);
    end

    // 6: global refresh with a period longer than the retention: dirty lines
    // must be seen to expire (the loss detection works). No loads follow.
    cfg_gref_period = 24'd12000;
    reset_phase(SCHEME_GLOBAL, REF_NONE, REPL_LRU);
    program_retention(1, 255, 40);
    run_traffic(300, 16, 4, 100, 2);
    drain(13000);
    checks++;
    if (n_lost == 0) begin
      failures++;
      $display("FAIL too long a refresh period went unnoticed");
    end
    expect_seen("hit", n_hit);
    expect_seen("miss", n_miss);
    expect_seen("global row refresh", n_gref);
    expect_seen("global sweep completed", n_sweep);
    expect_seen("line refresh", n_lref);
    expect_seen("expiry eviction", n_xev);
    expect_seen("expiry write-back", n_xwb);
    expect_seen("refresh on full write buffer", n_stall);
    expect_seen("victim write-back", n_vwb);
    expect_seen("bypass of dead ways", n_byp);
    expect_seen("way shuffle", n_shuf);
    $display("events: hit=%0d miss=%0d gref=%0d sweep=%0d lref=%0d xev=%0d xwb=%0d stall=%0d vwb=%0d byp=%0d shuf=%0d lost=%0d",
             n_hit, n_miss, n_gref, n_sweep, n_lref, n_xev, n_xwb, n_stall, n_vwb, n_byp, n_shuf, n_lost);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
