// Checks line_counter_bank (4 sets x 4 ways) against a cycle model: random
// ticks, row operations (age clear, load) and retention writes; every cycle
// the dead / expired / due flags and the refresh permission are compared for
// all three refresh policies. A directed part checks that a line of
// retention R is due after R-1 ticks and expired after R ticks; lines
// stored with R < 2 are dead.
module tb_line_counter_bank;
  import l1d_pkg::*;
  localparam int NS = 4;
  logic clk = 1'b0, rst_n, tick, rt_we;
  logic [1:0] rt_set, rt_way, op_set;
  logic [CNT_W-1:0] rt_value, threshold;
  logic [3:0] op_age_clr, op_load;
  refresh_pol_e policy;
  logic [CNT_W-1:0] retention [NS][4];
  logic dead [NS][4], expired [NS][4], due [NS][4], refresh_ok [NS][4];
  always #5 clk = ~clk;
  line_counter_bank #(.N_SETS(NS), .N_WAYS(4)) dut (.*);

  int m_age [NS][4], m_life [NS][4], m_ret [NS][4];
  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    for (int s = 0; s < NS; s++)
      for (int w = 0; w < 4; w++) begin
        bit e_dead, e_exp, e_due, e_ok;
        e_dead = (m_ret[s][w] < 2);
        e_exp  = (m_age[s][w] >= m_ret[s][w]);
        e_due  = (m_age[s][w] + 1 >= m_ret[s][w]);
        case (policy)
          REF_FULL:    e_ok = !e_dead;
          REF_PARTIAL: e_ok = !e_dead && m_ret[s][w] < int'(threshold) && m_life[s][w] < int'(threshold);
          default:     e_ok = 0;
        endcase
        checks++;
        if (dead[s][w] != e_dead || expired[s][w] != e_exp || due[s][w] != e_due ||
            refresh_ok[s][w] != e_ok || int'(retention[s][w]) != m_ret[s][w]) begin
          failures++;
          if (failures < 10)
            $display("FAIL line %0d/%0d age=%0d life=%0d ret=%0d: %b%b%b%b exp %b%b%b%b", s, w,
                     m_age[s][w], m_life[s][w], m_ret[s][w], dead[s][w], expired[s][w],
                     due[s][w], refresh_ok[s][w], e_dead, e_exp, e_due, e_ok);
        end
      end
  endtask

  task automatic model_step();
    for (int s = 0; s < NS; s++)
      for (int w = 0; w < 4; w++) begin
        if (tick) begin
          if (m_age[s][w] < 1023) m_age[s][w]++;
          if (m_life[s][w] < 1023) m_life[s][w]++;
        end
        if (int'(op_set) == s && (op_age_clr[w] || op_load[w])) m_age[s][w] = 0;
        if (int'(op_set) == s && op_load[w]) m_life[s][w] = 0;
        if (rt_we && int'(rt_set) == s && int'(rt_way) == w) m_ret[s][w] = int'(rt_value);
      end
  endtask

  initial begin
    rst_n = 0; tick = 0; rt_we = 0; rt_set = 0; rt_way = 0; rt_value = 0;
    op_set = 0; op_age_clr = 0; op_load = 0; threshold = CNT_W'(20); policy = REF_PARTIAL;
    for (int s = 0; s < NS; s++) for (int w = 0; w < 4; w++) begin
      m_age[s][w] = 0; m_life[s][w] = 0; m_ret[s][w] = 1023;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    // Directed: line 1/2 with retention 10, loaded, then ticks.
    rt_we = 1; rt_set = 1; rt_way = 2; rt_value = 10;
    @(negedge clk);
    model_step();
    rt_we = 0; op_set = 1; op_load = 4'b0100;
    @(negedge clk);
    model_step();
    op_load = 0;
    for (int k = 1; k <= 11; k++) begin
      tick = 1;
      @(negedge clk);
      model_step();
      tick = 0;
      checks++;
      if (due[1][2] != (k >= 9) || expired[1][2] != (k >= 10)) begin
        failures++;
        $display("FAIL directed after %0d ticks: due=%b expired=%b", k, due[1][2], expired[1][2]);
      end
    end
    // Random.
    for (int t = 0; t < 6000; t++) begin
      if (t % 2000 == 0) policy = refresh_pol_e'(t / 2000);
      tick       = ($urandom_range(0, 2) == 0);
      op_set     = 2'($urandom);
      op_age_clr = ($urandom_range(0, 3) == 0) ? 4'($urandom) : 4'h0;
      op_load    = ($urandom_range(0, 7) == 0) ? 4'($urandom) : 4'h0;
      rt_we      = ($urandom_range(0, 9) == 0);
      rt_set     = 2'($urandom);
      rt_way     = 2'($urandom);
      rt_value   = CNT_W'($urandom_range(0, 40));
      @(negedge clk);
      model_step();
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
