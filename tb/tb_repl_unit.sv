// Checks repl_unit against a reference written from the policy definitions:
// LRU victim is the least recent way; DSP never picks a dead way and prefers
// an empty live way; RSP ranks live ways by descending retention (ties to the
// lower way), puts a new block in the longest way and shifts each block one
// rank down, RSP-LRU on a hit moves the hit block to the longest way. The
// expected moves are applied to tagged contents and compared as contents.
module tb_repl_unit;
  import l1d_pkg::*;
  repl_pol_e policy;
  logic [CNT_W-1:0] retention [4];
  logic dead [4], valid [4];
  logic [1:0] lru_rank [4];
  logic is_hit;
  logic [1:0] hit_way, victim_way, touch_way;
  logic alloc_ok;
  logic mv_en [4], mv_new [4];
  logic [1:0] mv_src [4], lru_next [4];
  repl_unit dut (.*);

  int checks = 0, failures = 0;

  task automatic fail(string m);
    failures++;
    if (failures < 10) $display("FAIL %s policy=%0d", m, policy);
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20000; t++) begin
      int perm [4];
      int order [$];
      int live;
      int cur_c [4], new_c [4], expect_c [4];
      order.delete();
      policy = repl_pol_e'(t % 4);
      perm = '{0, 1, 2, 3};
      perm.shuffle();
      for (int w = 0; w < 4; w++) begin
        lru_rank[w]  = 2'(perm[w]);
        retention[w] = ($urandom_range(0, 4) == 0) ? '0 : CNT_W'($urandom_range(1, 12));
        dead[w]      = (retention[w] == 0);
        valid[w]     = !dead[w] && ($urandom_range(0, 3) != 0);
        cur_c[w]    = 10 + w;          // tagged contents
      end
      // A hit is only ever on a live way (a dead line never holds a block).
      hit_way   = 2'($urandom);
      is_hit    = ($urandom_range(0, 1) == 1) && !dead[hit_way];
      touch_way = 2'($urandom);
      #1;
      // LRU update.
      for (int w = 0; w < 4; w++) begin
        int e;
        e = (w == touch_way) ? 0 : (perm[w] < perm[touch_way] ? perm[w] + 1 : perm[w]);
        checks++;
        if (lru_next[w] != 2'(e)) fail("lru_next");
      end
      // Rank order by retention among live ways.
      live = 0;
      for (int w = 0; w < 4; w++) if (!dead[w]) live++;
      for (int w = 0; w < 4; w++) if (!dead[w]) order.push_back(w);
      for (int i = 0; i < order.size(); i++)
        for (int j = 0; j + 1 < order.size() - i; j++)
          if (retention[order[j+1]] > retention[order[j]] ||
              (retention[order[j+1]] == retention[order[j]] && order[j+1] < order[j])) begin
            int tmp;
            tmp = order[j]; order[j] = order[j+1]; order[j+1] = tmp;
          end
      expect_c = cur_c;
      case (policy)
        REPL_LRU: begin
          int v;
          for (int w = 0; w < 4; w++) if (perm[w] == 3) v = w;
          checks++;
          if (victim_way != 2'(v) || alloc_ok != !dead[v]) fail("lru victim");
          if (!is_hit && !dead[v]) expect_c[v] = 99;
        end
        REPL_DSP: begin
          int v;
          v = -1;
          for (int w = 0; w < 4; w++) if (v < 0 && !dead[w] && !valid[w]) v = w;
          if (v < 0) for (int w = 0; w < 4; w++)
            if (!dead[w] && (v < 0 || perm[w] > perm[v])) v = w;
          checks++;
          if (alloc_ok != (v >= 0) || (v >= 0 && victim_way != 2'(v))) fail("dsp victim");
          if (!is_hit && v >= 0) expect_c[v] = 99;
        end
        default: begin
          checks++;
          if (alloc_ok != (live > 0) || (live > 0 && victim_way != 2'(order[live-1])))
            fail("rsp victim");
          if (!is_hit && live > 0) begin
            for (int k = live - 1; k >= 1; k--) expect_c[order[k]] = cur_c[order[k-1]];
            expect_c[order[0]] = 99;
          end else if (is_hit && policy == REPL_RSP_LRU && !dead[hit_way]) begin
            int p;
            p = 0;
            for (int k = 0; k < live; k++) if (order[k] == hit_way) p = k;
            for (int k = p; k >= 1; k--) expect_c[order[k]] = cur_c[order[k-1]];
            expect_c[order[0]] = cur_c[hit_way];
          end
        end
      endcase
      for (int w = 0; w < 4; w++)
        new_c[w] = !mv_en[w] ? cur_c[w] : (mv_new[w] ? 99 : cur_c[mv_src[w]]);
      checks++;
      if (new_c != expect_c) fail("moves");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
