// Self-checking testbench for sc_l_policy, paired with the true-LRU
// baseline (16 ways, 4 Shepherd ways), driving one cache set.  The state is
// checked to be 114 bits (known row per Shepherd way, slot pointer and flag
// per line, oldest-slot pointer).
// A skewed random stream of line tags (a hot group that is re-used and a
// cold group that mostly is not) is run through a reference model of the
// set; the model's hit information drives the block, and the block's victim,
// eviction flag and decision are compared with the model every access.
// Each decision kind (hit, fill of a free way, eviction of an unused
// Shepherd line, eviction of a main line not re-used since the oldest
// Shepherd line arrived, baseline eviction) must occur.
`timescale 1ns/1ps
module tb_sc_l_policy;
  import repl_pkg::*;
  import ref_model_pkg::*;

  localparam int W   = 16;
  localparam int S   = 4;
  localparam int WB  = 4;
  localparam int SSW = 2 + S * W + W * 2 + W;
  localparam int BSW = 45;

  logic            access, hit;
  logic [WB-1:0]   hit_way;
  logic [W-1:0]    valid, cand, sc_ways;
  logic [SSW-1:0]  sc_q, sc_n;
  logic [BSW-1:0]  b_q, b_n;
  logic            sweep, den, ten, evict, found;
  logic [WB-1:0]   bvict, dway, tway, victim;
  decision_e       dec;
  int checks, failures;
  int seen[decision_e];

  sc_l_policy #(.WAYS(W), .SC_WAYS(S), .BASE(BASE_LRU)) dut (
    .access_i(access), .hit_i(hit), .hit_way_i(hit_way), .valid_i(valid),
    .state_i(sc_q), .cand_o(cand), .sweep_o(sweep), .base_victim_i(bvict),
    .demote_en_o(den), .demote_way_o(dway), .touch_en_o(ten), .touch_way_o(tway),
    .victim_o(victim), .evict_o(evict), .decision_o(dec), .sc_ways_o(sc_ways),
    .state_o(sc_n));

  lru_policy #(.WAYS(W)) u_base (
    .state_i(b_q), .cand_i(cand), .victim_o(bvict), .found_o(found),
    .demote_en_i(den), .demote_way_i(dway), .touch_en_i(ten), .touch_way_i(tway),
    .state_o(b_n));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    set_ref m;
    longint tg, old;
    bit     mhit, mev;
    int     hw, v;
    decision_e mdec;
    checks = 0; failures = 0;
    m = new(SC_L, BASE_LRU, W, S);
    sc_q = '0;
    b_q  = '0;
    access = 0; hit = 0; hit_way = 0; valid = '0;
    #1 check(dec == DEC_NONE && !ten, "idle without access");
    for (int i = 0; i < 30000; i++) begin
      tg = ($urandom % 10 < 7) ? longint'($urandom % 14) : longint'(100 + $urandom % 200);
      hw = m.lookup(tg);
      for (int w = 0; w < W; w++) valid[w] = m.valid[w];
      access  = 1;
      hit     = hw >= 0;
      hit_way = WB'(hw < 0 ? 0 : hw);
      // Shepherd ways reported by the block match the model's FIFO
      #1;
      begin
        logic [W-1:0] exp_sc;
        exp_sc = '0;
        foreach (m.fway[k]) exp_sc[m.fway[k]] = 1'b1;
        check(sc_ways == exp_sc, $sformatf("Shepherd ways %h expected %h", sc_ways, exp_sc));
      end
      v = m.access(tg, mhit, mev, old, mdec);
      seen[mdec]++;
      check(dec == mdec, $sformatf("access %0d decision %s expected %s", i, dec.name(), mdec.name()));
      if (!mhit) begin
        check(int'(victim) == v, $sformatf("access %0d victim %0d expected %0d", i, victim, v));
        check(evict == mev, "evict flag");
      end
      sc_q = sc_n;
      b_q  = b_n;
      access = 0;
      #1;
    end
    check(seen[DEC_HIT] > 0,        "hits occurred");
    check(seen[DEC_FILL_FREE] == W, "free fills at start-up");
    check(seen[DEC_EVICT_SC] > 0,   "unused Shepherd lines evicted");
    check(seen[DEC_EVICT_UNK] > 0,  "main lines of unknown imminence evicted");
    check(seen[DEC_EVICT_BASE] > 0, "baseline evictions occurred");
    check($bits(sc_n) == 114, "state width");
    $display("hits %0d fills %0d sc-evictions %0d unknown-evictions %0d baseline-evictions %0d",
             seen[DEC_HIT], seen[DEC_FILL_FREE], seen[DEC_EVICT_SC], seen[DEC_EVICT_UNK],
             seen[DEC_EVICT_BASE]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
