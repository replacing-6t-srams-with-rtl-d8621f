// Directed test of l1d_ctrl on its own. The line-counter status arrays are
// driven by the testbench, so each decision of the controller can be forced:
//   - a store miss fetches the line from L2, fills a way (op_load) and a load
//     of the same word then hits two cycles after acceptance with the data;
//   - a due line that may be refreshed is read and written back (op_age_clr);
//   - a due dirty line that may not be refreshed is refreshed anyway while
//     the write buffer is full, and pushed to it with its data once it has
//     room, after which a load of it misses;
//   - DSP with three dead ways puts every block in the live way;
//   - in the global scheme a row request clears the age of all four ways.
module tb_l1d_ctrl;
  import l1d_pkg::*;
  localparam int LA_W = 26;

  logic clk = 1'b0, rst_n;
  always #5 clk = ~clk;

  scheme_e   cfg_scheme;
  repl_pol_e cfg_repl;
  logic req_valid, req_ready, req_we, resp_valid, resp_hit;
  logic [31:0] req_addr;
  logic [63:0] req_wdata, resp_rdata;
  logic l2_req_valid, l2_req_ready, l2_resp_valid;
  logic [LA_W-1:0] l2_req_addr;
  logic [511:0] l2_resp_data;
  logic wb_valid, wb_ready;
  logic [LA_W-1:0] wb_addr;
  logic [511:0] wb_data;
  logic gref_valid, gref_ready;
  logic [7:0] gref_set;
  logic [CNT_W-1:0] retention [SETS][WAYS];
  logic dead [SETS][WAYS], expired [SETS][WAYS], due [SETS][WAYS], refresh_ok [SETS][WAYS];
  logic [7:0] op_set;
  logic [3:0] op_age_clr, op_load;
  logic ev_hit, ev_miss, ev_gref, ev_line_refresh, ev_expire_evict, ev_expire_wb;
  logic ev_stall_refresh, ev_victim_wb, ev_bypass, ev_shuffle, ev_lost;

  l1d_ctrl dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic logic [511:0] l2_line(logic [LA_W-1:0] la);
    logic [511:0] l;
    for (int i = 0; i < 8; i++) l[i*64 +: 64] = {la, 3'(i), 3'b0, 32'hfeed0000 + 32'(i)};
    return l;
  endfunction

  // L2: answers a request 3 cycles later.
  int l2_n = 0;
  always @(negedge clk) begin
    l2_resp_valid <= 1'b0;
    if (l2_req_valid && l2_req_ready) begin
      l2_n++;
      fork
        begin
          logic [LA_W-1:0] a;
          a = l2_req_addr;
          repeat (3) @(negedge clk);
          l2_resp_valid <= 1'b1;
          l2_resp_data  <= l2_line(a);
        end
      join_none
    end
  end

  // Observed row operations.
  logic [3:0] last_load, last_clr;
  logic [7:0] last_op_set;
  int n_wb;
  logic [LA_W-1:0] last_wb_addr;
  logic [511:0] last_wb_data;
  always @(posedge clk) begin
    if (op_load != 0)    begin last_load <= op_load; last_op_set <= op_set; end
    if (op_age_clr != 0) begin last_clr  <= op_age_clr; last_op_set <= op_set; end
    if (wb_valid && wb_ready) begin
      n_wb++;
      last_wb_addr <= wb_addr;
      last_wb_data <= wb_data;
    end
  end

  task automatic access(bit we, logic [31:0] a, logic [63:0] d, output bit hit,
                        output logic [63:0] rd, output int lat);
    int t0;
    @(negedge clk);
    req_valid = 1; req_we = we; req_addr = a; req_wdata = d;
    do @(posedge clk); while (!req_ready);
    t0 = cyc;
    @(negedge clk);
    req_valid = 0;
    while (!resp_valid) @(negedge clk);
    hit = resp_hit; rd = resp_rdata; lat = cyc - t0;
  endtask

  function automatic int onehot_idx(logic [3:0] m);
    for (int i = 0; i < 4; i++) if (m == 4'(1 << i)) return i;
    return -1;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit hit;
    logic [63:0] rd;
    int lat, way_a;
    logic [31:0] A;
    rst_n = 0; cfg_scheme = SCHEME_LINE; cfg_repl = REPL_DSP;
    req_valid = 0; req_we = 0; req_addr = 0; req_wdata = 0;
    l2_req_ready = 1; l2_resp_valid = 0; l2_resp_data = 0; wb_ready = 1;
    gref_valid = 0; gref_set = 0; n_wb = 0;
    for (int s = 0; s < SETS; s++) for (int w = 0; w < WAYS; w++) begin
      retention[s][w] = 10'd100; dead[s][w] = 0; expired[s][w] = 0; due[s][w] = 0; refresh_ok[s][w] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;

    // Store miss, then load hit.
    A = {18'h00abc, 8'd7, 3'd5, 3'b0};
    access(1, A, 64'h1122334455667788, hit, rd, lat);
    check(!hit && l2_n == 1, "store misses and reads L2 once");
    way_a = onehot_idx(last_load);
    check(way_a == 0 && last_op_set == 8'd7, "fill loads way 0 of set 7");
    access(0, A, 0, hit, rd, lat);
    check(hit && lat == 2, "load hits 2 cycles after acceptance");
    check(rd == 64'h1122334455667788, "load returns the stored word");
    access(0, A + 8, 0, hit, rd, lat);
    check(hit && rd == l2_line(A[31:6])[6*64 +: 64], "other word of the line comes from L2");

    // Due line, refresh allowed.
    @(negedge clk);
    last_clr = 0;
    due[7][way_a] = 1; refresh_ok[7][way_a] = 1;
    repeat (3) @(negedge clk);
    due[7][way_a] = 0;
    check(last_clr == 4'(1 << way_a) && last_op_set == 8'd7 && n_wb == 0, "due line refreshed in place");

    // Due dirty line, refresh not allowed, write buffer full: refreshed.
    last_clr = 0;
    wb_ready = 0; refresh_ok[7][way_a] = 0; due[7][way_a] = 1;
    repeat (3) @(negedge clk);
    check(last_clr == 4'(1 << way_a) && n_wb == 0, "full write buffer: dirty line refreshed");
    // Write buffer has room: evicted with its data.
    wb_ready = 1;
    repeat (4) @(negedge clk);
    due[7][way_a] = 0;
    check(n_wb == 1 && last_wb_addr == A[31:6] && last_wb_data[5*64 +: 64] == 64'h1122334455667788,
          "dirty line written back with its data");
    access(0, A, 0, hit, rd, lat);
    check(!hit && rd == l2_line(A[31:6])[5*64 +: 64], "evicted line misses");

    // DSP: ways 0-2 of set 9 dead, every fill goes to way 3.
    for (int w = 0; w < 3; w++) begin dead[9][w] = 1; expired[9][w] = 1; end
    for (int t = 0; t < 4; t++) begin
      last_load = 0;
      access(0, {18'(t + 1), 8'd9, 3'd0, 3'b0}, 0, hit, rd, lat);
      check(!hit && last_load == 4'b1000, "DSP fills the only live way");
    end

    // Global scheme: a row request refreshes all four ways of the row.
    cfg_scheme = SCHEME_GLOBAL;
    last_clr = 0;
    @(negedge clk);
    gref_valid = 1; gref_set = 8'd42;
    do @(posedge clk); while (!gref_ready);
    @(negedge clk);
    gref_valid = 0;
    repeat (2) @(negedge clk);
    check(last_clr == 4'b1111 && last_op_set == 8'd42, "global row refresh clears all ways");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
