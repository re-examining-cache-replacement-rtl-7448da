// Self-checking testbench for plru_policy (16 ways, IBM 3033 style tree).
// Random select / demote / touch streams are compared with a model that keeps
// the four subtrees in a recency list and, per subtree, a root bit and a
// bit per pair.  Directed checks: the 17-bit state, the reset order, and the
// known weakness of the tree, where a way touched just before its neighbour
// still ranks as second most recent even after many other accesses.
`timescale 1ns/1ps
module tb_plru_policy;
  import repl_pkg::*;
  import ref_model_pkg::*;

  localparam int W  = 16;
  localparam int WB = 4;
  localparam int SW = 17;

  logic [SW-1:0] state_q, state_n;
  logic [W-1:0]  cand;
  logic [WB-1:0] victim, dway, tway;
  logic          found, den, ten;
  int checks, failures;

  plru_policy #(.WAYS(W)) dut (
    .state_i(state_q), .cand_i(cand), .victim_o(victim), .found_o(found),
    .demote_en_i(den), .demote_way_i(dway), .touch_en_i(ten), .touch_way_i(tway),
    .state_o(state_n));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic step(plru_ref m, bit d, int dw, bit t, int tw);
    den = d; dway = WB'(dw); ten = t; tway = WB'(tw);
    #1;
    if (d) m.demote(dw);
    if (t) m.touch(tw);
    state_q = state_n;
    den = 0; ten = 0;
    #1;
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    plru_ref m;
    int exp;
    int t[16];
    checks = 0; failures = 0;
    m = new(W);
    state_q = '0;
    den = 0; ten = 0; dway = 0; tway = 0;
    check($bits(state_n) == 17, "state width 17 bits for 16 ways");
    cand = '1;
    #1 check(found && int'(victim) == m.select('1, 0), "reset LRU way");
    // touch every way in order: way 15 most recent, way 0 least recent
    for (int w = 0; w < W; w++) step(m, 0, 0, 1, w);
    cand = '1;
    #1 check(victim == 0, "way 0 least recent after a full pass");
    // demote makes a way the LRU way
    step(m, 1, 9, 0, 0);
    #1 check(victim == 9, "demoted way is LRU");
    for (int i = 0; i < 20000; i++) begin
      cand = 16'($urandom);
      if (cand == 0) cand = 16'h0001 << ($urandom % 16);
      den  = ($urandom % 4) == 0;
      ten  = ($urandom % 4) != 0;
      dway = 4'($urandom);
      tway = 4'($urandom);
      #1;
      exp = m.select(64'(cand), 0);
      check(found && int'(victim) == exp,
            $sformatf("victim %0d expected %0d (cand %h)", victim, exp, cand));
      if (den) m.demote(int'(dway));
      if (ten) m.touch(int'(tway));
      state_q = state_n;
      #1;
    end
    // full order of the final state
    m.total(t);
    for (int k = 0; k < W; k++) begin
      cand = '1;
      for (int j = 0; j < k; j++) cand[t[W-1-j]] = 1'b0;
      #1 check(int'(victim) == t[W-1-k], $sformatf("order position %0d", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
