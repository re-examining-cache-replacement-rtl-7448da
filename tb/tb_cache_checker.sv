// Stimulus generator and scoreboard for one shepherd_l3_cache instance,
// used by the cache testbenches.
// It waits for the post-reset clearing of all sets (and checks that it takes
// exactly SETS cycles), then issues N_REQ requests to a few hot sets, with
// line tags drawn, in alternating phases of 500 requests, either from a
// re-used hot group mixed with rarely re-used cold lines, or uniformly from
// 18 lines per set, slightly more than a set holds.
// Requests are sometimes issued back to back (the second one is held while
// the cache is busy) and sometimes separated by idle cycles.  Every response
// is compared with a reference model of the set (ref_model_pkg::set_ref):
// hit, way, eviction flag, evicted line address and decision kind, and it
// must arrive exactly two clock edges after the request was accepted.  At
// the end the access and miss counters are compared, and a failure is
// counted for any mechanism that never happened.
`timescale 1ns/1ps
module tb_cache_checker
  import repl_pkg::*;
  import ref_model_pkg::*;
#(
  parameter sc_mode_e    SC_MODE     = SC_XL,
  parameter base_e       BASE        = BASE_CLOCK,
  parameter int unsigned CACHE_BYTES = 4 * 1024 * 1024,
  parameter int unsigned WAYS        = 16,
  parameter int unsigned SC_WAYS     = 4,
  parameter int unsigned ADDR_W      = 50,
  parameter int unsigned HOT_SETS    = 4,
  parameter int unsigned N_REQ       = 10000,
  localparam int unsigned SETS  = CACHE_BYTES / (64 * WAYS),
  localparam int unsigned IDX_W = (SETS > 1) ? $clog2(SETS) : 1,
  localparam int unsigned TAG_W = ADDR_W - 6 - IDX_W,
  localparam int unsigned WB    = $clog2(WAYS)
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic              req_valid,
  input  logic              req_ready,
  output logic [ADDR_W-1:0] req_addr,
  input  logic              resp_valid,
  input  logic              resp_hit,
  input  logic [WB-1:0]     resp_way,
  input  logic              resp_evict,
  input  logic [ADDR_W-1:0] resp_evict_addr,
  input  decision_e         resp_decision,
  input  logic [31:0]       access_cnt,
  input  logic [31:0]       miss_cnt,
  output bit                done,
  output int                checks,
  output int                failures
);

  set_ref    models[int];
  int        seen[decision_e];
  int        stalls, gaps, misses;
  int        hot[HOT_SETS];
  bit        phase;
  int        cur_set;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL [%s/%s] %s", SC_MODE.name(), BASE.name(), what);
    end
  endtask

  function automatic logic [TAG_W-1:0] make_tag(int k);
    return TAG_W'(longint'(k) * 64'h9E37_79B1_7F4A_7C15);
  endfunction

  function automatic logic [ADDR_W-1:0] pick_addr(output int set, output int key);
    set = hot[$urandom % HOT_SETS];
    // alternate phases: a skewed mix of re-used and one-off lines, and a
    // loop over slightly more lines than the set holds
    if (phase)
      key = int'($urandom % 18);
    else
      key = ($urandom % 10 < 7) ? int'($urandom % 14) : int'(100 + $urandom % 400);
    return {make_tag(key), IDX_W'(set), 6'($urandom)};
  endfunction

  initial begin
    int        set, key, way;
    longint    old_tag;
    bit        mhit, mev;
    decision_e mdec;
    int        init_cycles;
    logic [ADDR_W-1:0] a;
    checks = 0; failures = 0; done = 0; phase = 0; cur_set = 0;
    stalls = 0; gaps = 0; misses = 0;
    req_valid = 0; req_addr = '0;
    hot[0] = 0;
    hot[HOT_SETS-1] = SETS - 1;
    for (int i = 1; i < HOT_SETS - 1; i++) hot[i] = (i * 37) % SETS;
    foreach (hot[i]) if (!models.exists(hot[i])) models[hot[i]] = new(SC_MODE, BASE, WAYS, SC_WAYS);

    // clearing after reset
    @(posedge rst_n);
    init_cycles = 0;
    @(negedge clk);
    while (!req_ready) begin
      init_cycles++;
      @(negedge clk);
    end
    check(init_cycles == SETS || init_cycles == SETS - 1,
          $sformatf("clearing took %0d cycles for %0d sets", init_cycles, SETS));

    a = pick_addr(set, key);
    req_valid = 1;
    req_addr  = a;
    for (int i = 0; i < N_REQ; i++) begin
      // this negedge: request on the bus; accepted at the next edge if ready
      while (!req_ready) @(negedge clk);
      phase   = ((i / 500) % 2) == 1;
      set     = int'(req_addr[6 +: IDX_W]);
      cur_set = set;
      way = models[set].access(longint'(req_addr[ADDR_W-1 -: TAG_W]), mhit, mev, old_tag, mdec);
      seen[mdec]++;
      if (!mhit) misses++;
      @(negedge clk);
      check(!resp_valid && !req_ready, "busy during the lookup cycle");
      if (i + 1 < N_REQ && $urandom % 2 == 0) begin
        a = pick_addr(set, key);
        req_addr = a;          // held while the cache is busy
        stalls++;
      end else begin
        req_valid = 0;
      end
      @(negedge clk);
      check(resp_valid, $sformatf("response two edges after request %0d", i));
      check(resp_hit == mhit, $sformatf("req %0d hit %0d expected %0d", i, resp_hit, mhit));
      check(int'(resp_way) == way, $sformatf("req %0d way %0d expected %0d", i, resp_way, way));
      check(resp_decision == mdec,
            $sformatf("req %0d decision %s expected %s", i, resp_decision.name(), mdec.name()));
      check(resp_evict == mev, $sformatf("req %0d evict %0d expected %0d", i, resp_evict, mev));
      if (mev)
        check(resp_evict_addr == {TAG_W'(old_tag), IDX_W'(cur_set), 6'd0},
              $sformatf("req %0d evicted address", i));
      if (!req_valid && i + 1 < N_REQ) begin
        repeat ($urandom % 3) begin
          @(negedge clk);
          gaps++;
        end
        a = pick_addr(set, key);
        req_valid = 1;
        req_addr  = a;
      end
    end
    req_valid = 0;
    @(negedge clk);
    check(access_cnt == N_REQ, "access counter");
    check(miss_cnt == misses, $sformatf("miss counter %0d expected %0d", miss_cnt, misses));
    // every mechanism must have happened
    check(seen[DEC_HIT] > 0,        "hits occurred");
    check(seen[DEC_FILL_FREE] > 0,  "free-way fills occurred");
    check(seen[DEC_EVICT_SC] > 0,   "unused Shepherd lines evicted");
    check(seen[DEC_EVICT_BASE] > 0, "baseline evictions occurred");
    if (SC_MODE == SC_L) check(seen[DEC_EVICT_UNK] > 0, "unknown-imminence main lines evicted");
    check(stalls > 0, "requests held while busy");
    check(gaps > 0, "idle cycles between requests");
    $display("[%s/%s sets=%0d] requests %0d misses %0d: hit %0d free %0d sc %0d unk %0d base %0d; held %0d idle %0d",
             SC_MODE.name(), BASE.name(), SETS, N_REQ, misses, seen[DEC_HIT], seen[DEC_FILL_FREE],
             seen[DEC_EVICT_SC], seen[DEC_EVICT_UNK], seen[DEC_EVICT_BASE], stalls, gaps);
    done = 1;
  end

endmodule
