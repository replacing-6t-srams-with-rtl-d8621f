// Controller of the 3T1D L1 data cache.
//
// It owns the tag, valid, dirty and LRU state, the data array, the
// replacement unit and the way-switch muxes, and serialises four kinds of
// work on the single array port, in this priority order:
//   1. global refresh: a row request from refresh_row_gen (global scheme) is
//      read and written back on the next cycle, refreshing every way of it;
//   2. line maintenance (line-level scheme): the first valid line whose
//      retention is about to end (`due` from line_counter_bank) is refreshed
//      if the refresh policy allows it, otherwise evicted. A clean line is
//      just invalidated; a dirty one is read and pushed to the write buffer,
//      or refreshed in place when the write buffer is full;
//   3. a processor access.
// An access reads the whole set, then on a hit returns or merges the 64-bit
// word (and under RSP-LRU shifts the hit block into the longest-retention
// way). On a miss the replacement unit chooses the victim; a dirty victim goes
// to the write buffer, the line is fetched from L2, and the set is rewritten
// through the way-switch muxes (RSP policies shift the other blocks down one
// retention rank). When no way can hold the block (dead ways), the access is
// served from L2 without allocating, and a write is sent on to L2 as a full
// line through the write buffer.
// A valid line whose counter shows it has expired is invalidated at once; if
// it was dirty that is data loss and `ev_lost` pulses (it should never happen).
//
// The processor port is held off while the write buffer is full.
//
// Timing: a hit takes 2 cycles from acceptance (`req_ready` high in idle) to
// `resp_valid`; a global or line refresh occupies the port 2 cycles (read,
// write-back on consecutive cycles); a miss adds the write-buffer and L2
// handshakes. One access is outstanding at a time. The blocking organisation,
// the handshakes and the word size are this design's choices; the schemes and
// policies follow the document.
module l1d_ctrl
  import l1d_pkg::*;
#(
  localparam int unsigned SET_W  = $clog2(SETS),
  localparam int unsigned WAY_W  = $clog2(WAYS),
  localparam int unsigned OFF_W  = $clog2(LINE_BYTES),
  localparam int unsigned TAG_W  = ADDR_W - OFF_W - SET_W,
  localparam int unsigned LA_W   = ADDR_W - OFF_W,
  localparam int unsigned WSEL_W = $clog2(LINE_BITS / WORD_BITS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // Configuration.
  input  scheme_e              cfg_scheme,
  input  repl_pol_e            cfg_repl,
  // Processor port.
  input  logic                 req_valid,
  output logic                 req_ready,
  input  logic                 req_we,
  input  logic [ADDR_W-1:0]    req_addr,
  input  logic [WORD_BITS-1:0] req_wdata,
  output logic                 resp_valid,
  output logic                 resp_hit,
  output logic [WORD_BITS-1:0] resp_rdata,
  // L2 line reads.
  output logic                 l2_req_valid,
  input  logic                 l2_req_ready,
  output logic [LA_W-1:0]      l2_req_addr,
  input  logic                 l2_resp_valid,
  input  logic [LINE_BITS-1:0] l2_resp_data,
  // Write buffer (lines to L2).
  output logic                 wb_valid,
  input  logic                 wb_ready,
  output logic [LA_W-1:0]      wb_addr,
  output logic [LINE_BITS-1:0] wb_data,
  // Global refresh rows.
  input  logic                 gref_valid,
  input  logic [SET_W-1:0]     gref_set,
  output logic                 gref_ready,
  // Line counters.
  input  logic [CNT_W-1:0]     retention [SETS][WAYS],
  input  logic                 dead      [SETS][WAYS],
  input  logic                 expired   [SETS][WAYS],
  input  logic                 due       [SETS][WAYS],
  input  logic                 refresh_ok[SETS][WAYS],
  output logic [SET_W-1:0]     op_set,
  output logic [WAYS-1:0]      op_age_clr,
  output logic [WAYS-1:0]      op_load,
  // Event pulses.
  output logic                 ev_hit,
  output logic                 ev_miss,
  output logic                 ev_gref,
  output logic                 ev_line_refresh,
  output logic                 ev_expire_evict,
  output logic                 ev_expire_wb,
  output logic                 ev_stall_refresh,
  output logic                 ev_victim_wb,
  output logic                 ev_bypass,
  output logic                 ev_shuffle,
  output logic                 ev_lost
);
  typedef enum logic [3:0] {
    S_IDLE, S_LOOKUP, S_MISS_WB, S_MISS_REQ, S_MISS_WAIT, S_FILL,
    S_BYPASS_WB, S_REF_WR, S_EVICT_WB
  } state_e;

  typedef logic [LINE_BITS-1:0] line_t;

  state_e state;

  // Tag-side state.
  logic             valid_q [SETS][WAYS];
  logic             dirty_q [SETS][WAYS];
  logic [TAG_W-1:0] tag_q   [SETS][WAYS];
  logic [WAY_W-1:0] lru_q   [SETS][WAYS];

  // Current operation.
  logic                 cur_we;
  logic [ADDR_W-1:0]    cur_addr;
  logic [WORD_BITS-1:0] cur_wdata;
  logic [SET_W-1:0]     cur_set;
  logic [WAY_W-1:0]     cur_way;
  logic [WAYS-1:0]      ref_mask;
  line_t                set_buf [WAYS];
  line_t                fill_line;
  logic                 alloc_q;
  logic [WAY_W-1:0]     victim_q;
  logic                 mv_en_q  [WAYS];
  logic                 mv_new_q [WAYS];
  logic [WAY_W-1:0]     mv_src_q [WAYS];

  wire [TAG_W-1:0]  cur_tag  = cur_addr[ADDR_W-1 -: TAG_W];
  wire [WSEL_W-1:0] cur_wsel = cur_addr[OFF_W-1 -: WSEL_W];
  wire [SET_W-1:0]  req_set  = req_addr[OFF_W +: SET_W];

  // Data array.
  logic            arr_rd_en;
  logic [SET_W-1:0] arr_rd_set;
  line_t           arr_rd_data [WAYS];
  logic            arr_wr_en;
  logic [WAYS-1:0] arr_wr_mask;
  line_t           arr_wr_data [WAYS];

  l1d_data_array u_array (
    .clk    (clk),
    .rd_en  (arr_rd_en),
    .rd_set (arr_rd_set),
    .rd_data(arr_rd_data),
    .wr_en  (arr_wr_en),
    .wr_set (cur_set),
    .wr_mask(arr_wr_mask),
    .wr_data(arr_wr_data)
  );

  // ---------------------------------------------------------------------------
  // Maintenance selection: first valid line whose retention is about to end.
  logic             mnt_found;
  logic [SET_W-1:0] mnt_set;
  logic [WAY_W-1:0] mnt_way;
  always_comb begin
    mnt_found = 1'b0;
    mnt_set   = '0;
    mnt_way   = '0;
    for (int s = SETS - 1; s >= 0; s--)
      for (int w = WAYS - 1; w >= 0; w--)
        if (valid_q[s][w] && due[s][w]) begin
          mnt_found = 1'b1;
          mnt_set   = SET_W'(s);
          mnt_way   = WAY_W'(w);
        end
  end

  wire take_gref = (state == S_IDLE) && (cfg_scheme == SCHEME_GLOBAL) && gref_valid;
  wire take_mnt  = (state == S_IDLE) && !take_gref && (cfg_scheme == SCHEME_LINE) && mnt_found;
  wire mnt_ref   = refresh_ok[mnt_set][mnt_way];
  wire mnt_dirty = dirty_q[mnt_set][mnt_way];

  assign gref_ready = take_gref;
  // An access is taken only with room in the write buffer, so its own victim or
  // bypass write-back never waits and maintenance is never held up by it.
  assign req_ready  = (state == S_IDLE) && !take_gref && !take_mnt && wb_ready;

  // ---------------------------------------------------------------------------
  // Lookup on the latched request.
  logic             hit;
  logic [WAY_W-1:0] hit_way;
  always_comb begin
    hit     = 1'b0;
    hit_way = '0;
    for (int w = 0; w < WAYS; w++)
      if (valid_q[cur_set][w] && !expired[cur_set][w] && tag_q[cur_set][w] == cur_tag) begin
        hit     = 1'b1;
        hit_way = WAY_W'(w);
      end
  end

  // Replacement unit on the current set.
  logic [CNT_W-1:0] ru_ret   [WAYS];
  logic             ru_dead  [WAYS];
  logic             ru_valid [WAYS];
  logic [WAY_W-1:0] ru_lru   [WAYS];
  logic             ru_alloc;
  logic [WAY_W-1:0] ru_victim;
  logic             ru_mv_en  [WAYS];
  logic             ru_mv_new [WAYS];
  logic [WAY_W-1:0] ru_mv_src [WAYS];
  logic [WAY_W-1:0] ru_touch;
  logic [WAY_W-1:0] ru_lru_next [WAYS];

  always_comb begin
    for (int w = 0; w < WAYS; w++) begin
      ru_ret[w]   = retention[cur_set][w];
      ru_dead[w]  = dead[cur_set][w];
      ru_valid[w] = valid_q[cur_set][w] && !expired[cur_set][w];
      ru_lru[w]   = lru_q[cur_set][w];
    end
  end

  assign ru_touch = (state == S_LOOKUP) ? hit_way : victim_q;

  repl_unit u_repl (
    .policy    (cfg_repl),
    .retention (ru_ret),
    .dead      (ru_dead),
    .valid     (ru_valid),
    .lru_rank  (ru_lru),
    .is_hit    (hit),
    .hit_way   (hit_way),
    .alloc_ok  (ru_alloc),
    .victim_way(ru_victim),
    .mv_en     (ru_mv_en),
    .mv_new    (ru_mv_new),
    .mv_src    (ru_mv_src),
    .touch_way (ru_touch),
    .lru_next  (ru_lru_next)
  );

  // Word merge of a write into a line.
  function automatic line_t merge_word(line_t l, logic [WSEL_W-1:0] sel,
                                       logic [WORD_BITS-1:0] d);
    line_t r;
    r = l;
    r[sel * WORD_BITS +: WORD_BITS] = d;
    return r;
  endfunction

  // Lines entering the way switch: on a hit, the set as read with the write
  // merged into the hit way; on a fill, the buffered set.
  line_t sw_cur [WAYS];
  line_t sw_out [WAYS];
  logic  sw_new [WAYS];
  logic [WAY_W-1:0] sw_src [WAYS];

  always_comb begin
    for (int w = 0; w < WAYS; w++) begin
      if (state == S_LOOKUP) begin
        sw_cur[w] = (cur_we && hit && hit_way == WAY_W'(w))
                    ? merge_word(arr_rd_data[w], cur_wsel, cur_wdata) : arr_rd_data[w];
        sw_new[w] = ru_mv_new[w];
        sw_src[w] = ru_mv_src[w];
      end else begin
        sw_cur[w] = set_buf[w];
        sw_new[w] = mv_new_q[w];
        sw_src[w] = mv_src_q[w];
      end
    end
  end

  way_switch #(.NWAYS(WAYS), .elem_t(line_t)) u_switch (
    .cur     (sw_cur),
    .incoming(fill_line),
    .sel_new (sw_new),
    .sel_src (sw_src),
    .out     (sw_out)
  );

  // ---------------------------------------------------------------------------
  // Array, write buffer, L2 and counter-bank controls.
  always_comb begin
    arr_rd_en   = 1'b0;
    arr_rd_set  = req_set;
    arr_wr_en   = 1'b0;
    arr_wr_mask = '0;
    arr_wr_data = sw_out;
    wb_valid    = 1'b0;
    wb_addr     = {cur_tag, cur_set};
    wb_data     = fill_line;
    l2_req_valid = (state == S_MISS_REQ);
    l2_req_addr  = {cur_tag, cur_set};
    op_set      = cur_set;
    op_age_clr  = '0;
    op_load     = '0;

    unique case (state)
      S_IDLE: begin
        if (take_gref) begin
          arr_rd_en  = 1'b1;
          arr_rd_set = gref_set;
        end else if (take_mnt) begin
          if (mnt_ref || mnt_dirty) begin
            arr_rd_en  = 1'b1;
            arr_rd_set = mnt_set;
          end
        end else if (req_valid && wb_ready) begin
          arr_rd_en  = 1'b1;
          arr_rd_set = req_set;
        end
      end
      S_LOOKUP: begin
        if (hit) begin
          for (int w = 0; w < WAYS; w++)
            arr_wr_mask[w] = ru_mv_en[w] || (cur_we && hit_way == WAY_W'(w));
          arr_wr_en = |arr_wr_mask;
          for (int w = 0; w < WAYS; w++) op_load[w] = ru_mv_en[w];
        end
      end
      S_MISS_WB: begin
        wb_valid = 1'b1;
        wb_addr  = {tag_q[cur_set][victim_q], cur_set};
        wb_data  = set_buf[victim_q];
      end
      S_FILL: begin
        if (alloc_q) begin
          for (int w = 0; w < WAYS; w++) arr_wr_mask[w] = mv_en_q[w];
          arr_wr_en = 1'b1;
          op_load   = arr_wr_mask;
        end
      end
      S_BYPASS_WB: begin
        wb_valid = 1'b1;
      end
      S_REF_WR: begin
        arr_wr_en   = 1'b1;
        arr_wr_mask = ref_mask;
        arr_wr_data = arr_rd_data;
        op_age_clr  = ref_mask;
      end
      S_EVICT_WB: begin
        wb_valid = 1'b1;
        wb_addr  = {tag_q[cur_set][cur_way], cur_set};
        wb_data  = arr_rd_data[cur_way];
      end
      default: ;
    endcase
  end

  // ---------------------------------------------------------------------------
  // State machine and tag-side state.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      resp_valid <= 1'b0;
      resp_hit   <= 1'b0;
      resp_rdata <= '0;
      cur_we     <= 1'b0;
      cur_addr   <= '0;
      cur_wdata  <= '0;
      cur_set    <= '0;
      cur_way    <= '0;
      ref_mask   <= '0;
      fill_line  <= '0;
      alloc_q    <= 1'b0;
      victim_q   <= '0;
      for (int w = 0; w < WAYS; w++) begin
        set_buf[w]  <= '0;
        mv_en_q[w]  <= 1'b0;
        mv_new_q[w] <= 1'b0;
        mv_src_q[w] <= '0;
      end
      for (int s = 0; s < SETS; s++)
        for (int w = 0; w < WAYS; w++) begin
          valid_q[s][w] <= 1'b0;
          dirty_q[s][w] <= 1'b0;
          tag_q[s][w]   <= '0;
          lru_q[s][w]   <= WAY_W'(w);
        end
      ev_hit <= 1'b0; ev_miss <= 1'b0; ev_gref <= 1'b0; ev_line_refresh <= 1'b0;
      ev_expire_evict <= 1'b0; ev_expire_wb <= 1'b0; ev_stall_refresh <= 1'b0;
      ev_victim_wb <= 1'b0; ev_bypass <= 1'b0; ev_shuffle <= 1'b0; ev_lost <= 1'b0;
    end else begin
      resp_valid <= 1'b0;
      ev_hit <= 1'b0; ev_miss <= 1'b0; ev_gref <= 1'b0; ev_line_refresh <= 1'b0;
      ev_expire_evict <= 1'b0; ev_expire_wb <= 1'b0; ev_stall_refresh <= 1'b0;
      ev_victim_wb <= 1'b0; ev_bypass <= 1'b0; ev_shuffle <= 1'b0; ev_lost <= 1'b0;

      // Expired lines lose their data.
      for (int s = 0; s < SETS; s++)
        for (int w = 0; w < WAYS; w++)
          if (valid_q[s][w] && expired[s][w]) begin
            valid_q[s][w] <= 1'b0;
            if (dirty_q[s][w]) ev_lost <= 1'b1;
          end

      unique case (state)
        S_IDLE: begin
          if (take_gref) begin
            cur_set  <= gref_set;
            ref_mask <= '1;
            ev_gref  <= 1'b1;
            state    <= S_REF_WR;
          end else if (take_mnt) begin
            cur_set <= mnt_set;
            cur_way <= mnt_way;
            if (mnt_ref) begin
              ref_mask        <= WAYS'(1) << mnt_way;
              ev_line_refresh <= 1'b1;
              state           <= S_REF_WR;
            end else if (!mnt_dirty) begin
              valid_q[mnt_set][mnt_way] <= 1'b0;
              ev_expire_evict           <= 1'b1;
            end else if (wb_ready) begin
              state <= S_EVICT_WB;
            end else begin
              // Write buffer full: keep the dirty line alive by refreshing it.
              ref_mask         <= WAYS'(1) << mnt_way;
              ev_stall_refresh <= 1'b1;
              state            <= S_REF_WR;
            end
          end else if (req_valid && wb_ready) begin
            cur_we    <= req_we;
            cur_addr  <= req_addr;
            cur_wdata <= req_wdata;
            cur_set   <= req_set;
            state     <= S_LOOKUP;
          end
        end

        S_LOOKUP: begin
          for (int w = 0; w < WAYS; w++) set_buf[w] <= arr_rd_data[w];
          if (hit) begin
            ev_hit     <= 1'b1;
            resp_valid <= 1'b1;
            resp_hit   <= 1'b1;
            resp_rdata <= arr_rd_data[hit_way][cur_wsel * WORD_BITS +: WORD_BITS];
            if (cur_we) dirty_q[cur_set][hit_way] <= 1'b1;
            if (cfg_repl == REPL_LRU || cfg_repl == REPL_DSP) begin
              for (int w = 0; w < WAYS; w++) lru_q[cur_set][w] <= ru_lru_next[w];
            end
            // RSP-LRU: move tag-side state along with the data.
            for (int w = 0; w < WAYS; w++) begin
              if (ru_mv_en[w]) begin
                tag_q[cur_set][w]   <= tag_q[cur_set][ru_mv_src[w]];
                valid_q[cur_set][w] <= valid_q[cur_set][ru_mv_src[w]]
                                       && !expired[cur_set][ru_mv_src[w]];
                dirty_q[cur_set][w] <= dirty_q[cur_set][ru_mv_src[w]]
                                       || (cur_we && ru_mv_src[w] == hit_way);
                ev_shuffle          <= 1'b1;
              end
            end
            state <= S_IDLE;
          end else begin
            ev_miss  <= 1'b1;
            alloc_q  <= ru_alloc;
            victim_q <= ru_victim;
            for (int w = 0; w < WAYS; w++) begin
              mv_en_q[w]  <= ru_mv_en[w];
              mv_new_q[w] <= ru_mv_new[w];
              mv_src_q[w] <= ru_mv_src[w];
            end
            if (ru_alloc && valid_q[cur_set][ru_victim] && !expired[cur_set][ru_victim]
                && dirty_q[cur_set][ru_victim]) begin
              state <= S_MISS_WB;
            end else begin
              state <= S_MISS_REQ;
            end
          end
        end

        S_MISS_WB: begin
          if (wb_ready) begin
            ev_victim_wb                <= 1'b1;
            valid_q[cur_set][victim_q]  <= 1'b0;
            dirty_q[cur_set][victim_q]  <= 1'b0;
            state                       <= S_MISS_REQ;
          end
        end

        S_MISS_REQ: begin
          if (l2_req_ready) state <= S_MISS_WAIT;
        end

        S_MISS_WAIT: begin
          if (l2_resp_valid) begin
            fill_line <= cur_we ? merge_word(l2_resp_data, cur_wsel, cur_wdata) : l2_resp_data;
            resp_rdata <= l2_resp_data[cur_wsel * WORD_BITS +: WORD_BITS];
            state     <= S_FILL;
          end
        end

        S_FILL: begin
          if (alloc_q) begin
            for (int w = 0; w < WAYS; w++) begin
              if (mv_en_q[w]) begin
                if (mv_new_q[w]) begin
                  tag_q[cur_set][w]   <= cur_tag;
                  valid_q[cur_set][w] <= 1'b1;
                  dirty_q[cur_set][w] <= cur_we;
                end else begin
                  tag_q[cur_set][w]   <= tag_q[cur_set][mv_src_q[w]];
                  valid_q[cur_set][w] <= valid_q[cur_set][mv_src_q[w]]
                                         && !expired[cur_set][mv_src_q[w]];
                  dirty_q[cur_set][w] <= dirty_q[cur_set][mv_src_q[w]];
                  ev_shuffle          <= 1'b1;
                end
              end
            end
            resp_valid <= 1'b1;
            resp_hit   <= 1'b0;
            state      <= S_IDLE;
          end else begin
            ev_bypass <= 1'b1;
            if (cur_we) begin
              state <= S_BYPASS_WB;
            end else begin
              resp_valid <= 1'b1;
              resp_hit   <= 1'b0;
              state      <= S_IDLE;
            end
          end
          if (cfg_repl == REPL_LRU || cfg_repl == REPL_DSP) begin
            for (int w = 0; w < WAYS; w++) lru_q[cur_set][w] <= ru_lru_next[w];
          end
        end

        S_BYPASS_WB: begin
          if (wb_ready) begin
            resp_valid <= 1'b1;
            resp_hit   <= 1'b0;
            state      <= S_IDLE;
          end
        end

        S_REF_WR: begin
          state <= S_IDLE;
        end

        S_EVICT_WB: begin
          valid_q[cur_set][cur_way] <= 1'b0;
          dirty_q[cur_set][cur_way] <= 1'b0;
          ev_expire_evict           <= 1'b1;
          ev_expire_wb              <= 1'b1;
          state                     <= S_IDLE;
        end

        default: state <= S_IDLE;
      endcase
    end
  end

  // The write buffer is only used by one state at a time and never drops data.
  assert property (@(posedge clk) disable iff (!rst_n)
                   state inside {S_EVICT_WB, S_MISS_WB, S_BYPASS_WB} |-> wb_ready);
  assert property (@(posedge clk) disable iff (!rst_n)
                   resp_valid |-> $past(state) != S_IDLE);
endmodule
