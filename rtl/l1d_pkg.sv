// Shared types and constants of the 3T1D L1 data cache.
//
// The cache geometry follows the evaluated machine: 64 KB, 4-way set
// associative, 512-bit (64-byte) lines, which gives 256 sets and 1024 lines.
// Processor accesses are 64-bit words on a 32-bit byte address; that word size
// and address width are this design's own choice. The retention-scheme
// selectors below name the three refresh policies and four replacement
// policies the design supports, and the two overall schemes (one global
// refresh sweep, or per-line retention counters).
package l1d_pkg;

  localparam int unsigned CACHE_BYTES = 64 * 1024;
  localparam int unsigned LINE_BITS   = 512;
  localparam int unsigned WAYS        = 4;
  localparam int unsigned LINE_BYTES  = LINE_BITS / 8;
  localparam int unsigned SETS        = CACHE_BYTES / (LINE_BYTES * WAYS);
  localparam int unsigned ADDR_W      = 32;
  localparam int unsigned WORD_BITS   = 64;
  // Width of the per-line retention / age counters, in ticks of 1/N the clock.
  localparam int unsigned CNT_W       = 10;

  // Overall retention scheme.
  typedef enum logic {
    SCHEME_GLOBAL = 1'b0,   // periodic refresh of the whole array (typical variation)
    SCHEME_LINE   = 1'b1    // per-line counters (severe variation)
  } scheme_e;

  // Line-level refresh policy.
  typedef enum logic [1:0] {
    REF_NONE    = 2'd0,     // evict a line when its retention runs out
    REF_PARTIAL = 2'd1,     // refresh until the line has lived the threshold time
    REF_FULL    = 2'd2      // always refresh
  } refresh_pol_e;

  // Replacement policy.
  typedef enum logic [1:0] {
    REPL_LRU      = 2'd0,   // conventional LRU, blind to retention
    REPL_DSP      = 2'd1,   // LRU over the ways that are not dead
    REPL_RSP_FIFO = 2'd2,   // ways ordered by retention, new block enters the longest
    REPL_RSP_LRU  = 2'd3    // as RSP_FIFO, and every hit moves its block to the longest
  } repl_pol_e;

  // Action the maintenance logic asks for on a line whose retention is about to end.
  typedef enum logic [1:0] {
    ACT_NONE    = 2'd0,
    ACT_REFRESH = 2'd1,
    ACT_EVICT   = 2'd2
  } line_act_e;

endpackage
