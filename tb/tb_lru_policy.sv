// Self-checking testbench for lru_policy (16 ways).
// A random stream of select / demote / touch operations is applied to the
// block, its next state is fed back as the set's stored state, and every
// victim is compared with a recency-list model.  Directed checks cover the
// 45-bit state, the reset code (way 15 is LRU) and selection from a subset;
// every stored code must stay below 16!.
`timescale 1ns/1ps
module tb_lru_policy;
  import repl_pkg::*;
  import ref_model_pkg::*;

  localparam int W  = 16;
  localparam int WB = 4;
  localparam int SW = 45;

  logic [SW-1:0] state_q, state_n;
  logic [W-1:0]  cand;
  logic [WB-1:0] victim, dway, tway;
  logic          found, den, ten;
  int checks, failures;

  lru_policy #(.WAYS(W)) dut (
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

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    lru_ref m;
    int exp;
    checks = 0; failures = 0;
    m = new(W);
    state_q = '0;
    check($bits(state_n) == 45, "state width 45 bits for 16 ways");
    // reset order: way 15 is LRU, way 0 MRU
    cand = '1; den = 0; ten = 0; dway = 0; tway = 0;
    #1 check(found && victim == 15, "reset LRU way");
    cand = 16'h0007;
    #1 check(victim == 2, "LRU of subset {0,1,2}");
    cand = '0;
    #1 check(!found, "empty candidate set");
    for (int i = 0; i < 20000; i++) begin
      cand = 16'($urandom);
      if (cand == 0) cand = 16'h8000 >> ($urandom % 16);
      den  = ($urandom % 4) == 0;
      ten  = ($urandom % 4) != 0;
      dway = 4'($urandom);
      tway = 4'($urandom);
      #1;
      exp = m.select(64'(cand), 0);
      check(found && int'(victim) == exp,
            $sformatf("victim %0d expected %0d (cand %h)", victim, exp, cand));
      check(64'(state_n) < 64'd20922789888000, "code below 16!");
      if (den) m.demote(int'(dway));
      if (ten) m.touch(int'(tway));
      state_q = state_n;
      #1;
    end
    // after the stream, the full order must match the model
    for (int k = 0; k < W; k++) begin
      cand = '1;
      for (int j = 0; j < k; j++) cand[m.order[W-1-j]] = 1'b0;
      #1 check(int'(victim) == m.order[W-1-k], $sformatf("order position %0d", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
