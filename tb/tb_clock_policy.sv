// Self-checking testbench for clock_policy (16 ways).
// The one-cycle sweep is compared with a clock hand that moves one way per
// step, for random touched bits, candidate masks (ways outside the mask are
// skipped) and sweep / demote / touch enables; victim, touched bits and hand
// are all checked.  Directed checks: 20-bit state, a sweep over an all
// touched set and a skipped way that keeps its touched bit.
`timescale 1ns/1ps
module tb_clock_policy;
  import repl_pkg::*;
  import ref_model_pkg::*;

  localparam int W  = 16;
  localparam int WB = 4;
  localparam int SW = W + WB;

  logic [SW-1:0] state_q, state_n;
  logic [W-1:0]  cand;
  logic [WB-1:0] victim, dway, tway;
  logic          found, den, ten, sweep;
  int checks, failures;

  clock_policy #(.WAYS(W)) dut (
    .state_i(state_q), .cand_i(cand), .sweep_i(sweep), .victim_o(victim),
    .found_o(found), .demote_en_i(den), .demote_way_i(dway), .touch_en_i(ten),
    .touch_way_i(tway), .state_o(state_n));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  function automatic logic [SW-1:0] pack(clock_ref m);
    logic [SW-1:0] s;
    for (int w = 0; w < W; w++) s[w] = m.t[w];
    s[SW-1:W] = WB'(m.hand);
    return s;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clock_ref m;
    int exp;
    checks = 0; failures = 0;
    m = new(W);
    den = 0; ten = 0; dway = 0; tway = 0; sweep = 0;
    check($bits(state_n) == 20, "state width 20 bits for 16 ways");
    // all touched, hand at 5, ways 5 and 6 skipped: sweep clears all
    // candidates and picks way 7; skipped ways keep their bits
    state_q = {4'd5, 16'hFFFF};
    cand    = 16'hFF9F;
    sweep   = 1;
    #1 check(found && victim == 7, "all touched: first candidate after the hand");
    check(state_n[15:0] == 16'h0060, "all touched: candidates cleared, skipped kept");
    check(state_n[19:16] == 4'd8, "hand after the victim");
    // first untouched candidate, earlier candidates cleared
    state_q = {4'd14, 16'b1100_0000_0000_0101};
    cand    = '1;
    #1 check(victim == 1, "wraps around to the first untouched way");
    check(state_n[15:0] == 16'b0000_0000_0000_0100, "passed ways cleared");
    sweep = 0;
    #1 check(state_n == state_q, "no change without sweep");
    // random
    state_q = '0;
    for (int i = 0; i < 20000; i++) begin
      for (int w = 0; w < W; w++) m.t[w] = $urandom % 3 != 0;
      m.hand  = $urandom % W;
      state_q = pack(m);
      cand  = 16'($urandom);
      if ($urandom % 8 == 0) cand = '0;
      sweep = $urandom % 2;
      den   = ($urandom % 4) == 0;
      ten   = ($urandom % 2) == 0;
      dway  = 4'($urandom);
      tway  = 4'($urandom);
      #1;
      exp = m.select(64'(cand), sweep);
      check(found == (cand != 0), "found");
      if (cand != 0) check(int'(victim) == exp,
            $sformatf("victim %0d expected %0d (cand %h)", victim, exp, cand));
      if (den) m.demote(int'(dway));
      if (ten) m.touch(int'(tway));
      check(state_n == pack(m), $sformatf("state %h expected %h", state_n, pack(m)));
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
