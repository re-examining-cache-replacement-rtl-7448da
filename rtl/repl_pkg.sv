// Shared types and size helpers for the Shepherd-cache replacement logic.
//
// The cache keeps, for every set, a small Shepherd region (SC ways) that
// holds newly allocated lines in FIFO order, and a main region (MC ways)
// managed by a conventional baseline policy.  This package names the two
// Shepherd variants, the three baseline policies, the kinds of replacement
// decision the controller can take, and the width of each baseline's
// per-set state so that the storage can be sized from parameters.
package repl_pkg;

  // Shepherd variant.  SC_L keeps a known flag per (SC way, line); SC_XL
  // keeps one known bit per SC way and relies on baseline recency.
  typedef enum logic [0:0] {
    SC_L  = 1'b0,
    SC_XL = 1'b1
  } sc_mode_e;

  // Baseline replacement policy used among the MC ways.
  typedef enum logic [1:0] {
    BASE_LRU   = 2'd0,
    BASE_PLRU  = 2'd1,
    BASE_CLOCK = 2'd2
  } base_e;

  // What one access did to its set.
  typedef enum logic [2:0] {
    DEC_NONE       = 3'd0,  // no access this cycle
    DEC_HIT        = 3'd1,  // line present
    DEC_FILL_FREE  = 3'd2,  // miss, an invalid way was filled
    DEC_EVICT_SC   = 3'd3,  // miss, oldest SC line had unknown imminence and was evicted
    DEC_EVICT_UNK  = 3'd4,  // miss, MC line with unknown imminence evicted (SC-L only)
    DEC_EVICT_BASE = 3'd5   // miss, baseline policy picked the MC victim
  } decision_e;

  // Width of one set's baseline state.
  //   LRU  : the recency order as a number below W! (45 bits for 16 ways)
  //   PLRU : 5-bit order of four subtrees + (W/4 - 1) tree bits per subtree
  //   CLOCK: one touched bit per way + a log2(W)-bit hand
  // ceil(log2(ways!)): bits of a minimal LRU stack code (ways <= 20)
  function automatic int lru_code_w(int ways);
    longint unsigned f;
    f = 1;
    for (int i = 2; i <= ways; i++) f = f * longint'(i);
    return $clog2(f);
  endfunction

  function automatic int base_state_w(base_e base, int ways);
    case (base)
      BASE_LRU:  return lru_code_w(ways);
      BASE_PLRU: return 5 + 4 * (ways / 4 - 1);
      default:   return ways + $clog2(ways);
    endcase
  endfunction

  // Width of one set's Shepherd state.
  //   SC_L : oldest-slot pointer, known[S][W], slot pointer per way, SC flag per way
  //   SC_XL: known[S], way pointer per SC entry (entries kept in FIFO order)
  function automatic int sc_state_w(sc_mode_e mode, int ways, int sc_ways);
    if (mode == SC_L)
      return $clog2(sc_ways) + sc_ways * ways + ways * $clog2(sc_ways) + ways;
    else
      return sc_ways + sc_ways * $clog2(ways);
  endfunction


endpackage
