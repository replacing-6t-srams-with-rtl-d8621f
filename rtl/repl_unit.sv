// Retention-aware replacement for one cache set.
//
// Combinational. Given the state of the set being accessed it picks the way a
// new block goes to and, for the retention-sensitive policies, how the blocks
// already in the set move between ways:
//   LRU       true LRU over all four ways, blind to retention; a block placed
//             in a dead way is lost at once (the controller then serves the
//             access from L2 without keeping it).
//   DSP       the same LRU, but dead ways are never chosen; with every way of
//             the set dead, nothing is allocated and the access goes to L2.
//   RSP-FIFO  the live ways are ranked by descending retention; a new block
//             enters the longest-retention way, each block moves one rank
//             down, and the block in the shortest live way is evicted.
//   RSP-LRU   as RSP-FIFO on a miss; on a hit the hit block moves to the
//             longest way and the blocks ranked above it move one rank down.
// The moves are expressed as per-way mux selects for way_switch: `mv_en[w]`
// rewrites way w from way `mv_src[w]`, or from the incoming block when
// `mv_new[w]` is set. `lru_next` is the LRU state after touching `touch_way`.
// Ties in retention are broken towards the lower way number; which way is
// chosen among equals and the LRU encoding (rank 0 = most recent) are this
// design's choices.
module repl_unit
  import l1d_pkg::*;
#(
  localparam int unsigned WAY_W = $clog2(WAYS)
) (
  input  repl_pol_e        policy,
  input  logic [CNT_W-1:0] retention [WAYS],
  input  logic             dead      [WAYS],
  input  logic             valid     [WAYS],
  input  logic [WAY_W-1:0] lru_rank  [WAYS],
  // Access being resolved: a hit on hit_way, or a miss needing a block.
  input  logic             is_hit,
  input  logic [WAY_W-1:0] hit_way,
  // Allocation on a miss.
  output logic             alloc_ok,
  output logic [WAY_W-1:0] victim_way,
  // Way switching.
  output logic             mv_en  [WAYS],
  output logic             mv_new [WAYS],
  output logic [WAY_W-1:0] mv_src [WAYS],
  // LRU update.
  input  logic [WAY_W-1:0] touch_way,
  output logic [WAY_W-1:0] lru_next [WAYS]
);
  // Rank of each way by descending retention (dead ways rank last).
  logic [WAY_W-1:0] order [WAYS];   // order[k]: way at rank k
  logic [WAY_W:0]   live_cnt;

  always_comb begin
    logic [WAY_W:0] pos;
    live_cnt = '0;
    for (int w = 0; w < WAYS; w++) if (!dead[w]) live_cnt = live_cnt + 1'b1;
    for (int k = 0; k < WAYS; k++) order[k] = '0;
    for (int w = 0; w < WAYS; w++) begin
      pos = '0;
      for (int v = 0; v < WAYS; v++) begin
        if (v != w) begin
          if (dead[w] && !dead[v]) pos = pos + 1'b1;
          else if (dead[w] == dead[v] &&
                   (retention[v] > retention[w] ||
                    (retention[v] == retention[w] && v < w))) pos = pos + 1'b1;
        end
      end
      order[pos[WAY_W-1:0]] = WAY_W'(w);
    end
  end

  // Victim choice and way moves.
  always_comb begin
    logic [WAY_W:0]   best_rank;
    logic             found_inv;
    logic [WAY_W-1:0] p_hit;
    alloc_ok   = 1'b0;
    victim_way = '0;
    best_rank  = '0;
    found_inv  = 1'b0;
    p_hit      = '0;
    for (int w = 0; w < WAYS; w++) begin
      mv_en[w]  = 1'b0;
      mv_new[w] = 1'b0;
      mv_src[w] = WAY_W'(w);
    end

    unique case (policy)
      REPL_LRU: begin
        for (int w = 0; w < WAYS; w++)
          if (lru_rank[w] == WAY_W'(WAYS - 1)) victim_way = WAY_W'(w);
        alloc_ok = !dead[victim_way];
        if (!is_hit && alloc_ok) begin
          mv_en[victim_way]  = 1'b1;
          mv_new[victim_way] = 1'b1;
        end
      end
      REPL_DSP: begin
        for (int w = 0; w < WAYS; w++) begin
          if (!dead[w] && !valid[w] && !found_inv) begin
            found_inv  = 1'b1;
            victim_way = WAY_W'(w);
            alloc_ok   = 1'b1;
          end
        end
        if (!found_inv) begin
          for (int w = 0; w < WAYS; w++) begin
            if (!dead[w] && (!alloc_ok || {1'b0, lru_rank[w]} > best_rank)) begin
              best_rank  = {1'b0, lru_rank[w]};
              victim_way = WAY_W'(w);
              alloc_ok   = 1'b1;
            end
          end
        end
        if (!is_hit && alloc_ok) begin
          mv_en[victim_way]  = 1'b1;
          mv_new[victim_way] = 1'b1;
        end
      end
      default: begin   // REPL_RSP_FIFO, REPL_RSP_LRU
        alloc_ok = (live_cnt != '0);
        if (alloc_ok) victim_way = order[live_cnt[WAY_W-1:0] - 1'b1];
        if (live_cnt == (WAY_W+1)'(WAYS)) victim_way = order[WAYS-1];
        if (!is_hit && alloc_ok) begin
          mv_en[order[0]]  = 1'b1;
          mv_new[order[0]] = 1'b1;
          for (int k = 1; k < WAYS; k++) begin
            if ((WAY_W+1)'(k) < live_cnt) begin
              mv_en[order[k]]  = 1'b1;
              mv_src[order[k]] = order[k-1];
            end
          end
        end else if (is_hit && policy == REPL_RSP_LRU) begin
          for (int k = 0; k < WAYS; k++) if (order[k] == hit_way) p_hit = WAY_W'(k);
          if (p_hit != '0) begin
            mv_en[order[0]]  = 1'b1;
            mv_src[order[0]] = hit_way;
            for (int k = 1; k < WAYS; k++) begin
              if (WAY_W'(k) <= p_hit) begin
                mv_en[order[k]]  = 1'b1;
                mv_src[order[k]] = order[k-1];
              end
            end
          end
        end
      end
    endcase
  end

  // LRU state update: the touched way becomes rank 0, the ways that were more
  // recent than it age by one.
  always_comb begin
    for (int w = 0; w < WAYS; w++) begin
      if (WAY_W'(w) == touch_way)               lru_next[w] = '0;
      else if (lru_rank[w] < lru_rank[touch_way]) lru_next[w] = lru_rank[w] + 1'b1;
      else                                        lru_next[w] = lru_rank[w];
    end
  end
endmodule
