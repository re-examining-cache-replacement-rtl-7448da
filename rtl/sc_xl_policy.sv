// Extra-Lightweight Shepherd Cache (SC-XL) replacement control for one set,
// combinational next-state logic.
//
// Newly allocated lines enter a small FIFO of SC_WAYS Shepherd entries.  Each
// entry holds a pointer to the way the line sits in and one known bit, which
// is clear on allocation and set by any later access to that line.  The
// entries are stored in FIFO order (entry 0 is the oldest), so no separate
// order field is needed: SC_WAYS*(log2(WAYS)+1) bits per set, 20 bits for
// 16 ways and 4 Shepherd ways, on top of the baseline's own state.
//
// On a miss in a set whose ways are all valid:
//   * oldest entry not known  -> its line is the victim (DEC_EVICT_SC);
//   * oldest entry known      -> the baseline picks the victim among the main
//     (non-Shepherd) ways (DEC_EVICT_BASE), and the oldest Shepherd line joins
//     the main ways at the baseline's LRU position (or, for Clock, with its
//     touched bit cleared).
// Either way the new line takes the youngest FIFO entry.  The baseline sees a
// candidate mask (cand_o) and returns its choice on base_victim_i, in the
// same cycle.
// While the set still has invalid ways (start-up), the lowest invalid way is
// filled without eviction (DEC_FILL_FREE); once SC_WAYS lines are present the
// oldest Shepherd line moves to the main ways as above.  The number of
// occupied entries is min(SC_WAYS, valid lines), which holds because lines
// are never invalidated one at a time.
// The baseline only tracks main lines: a hit on a main line is passed on as
// a touch, while hits on Shepherd lines and fills (the new line is always a
// Shepherd line) leave the baseline alone.
// The FIFO, the known bits, the eviction rule and the untracked Shepherd
// lines follow the policy description; the start-up behaviour is this
// design's choice.
module sc_xl_policy
  import repl_pkg::*;
#(
  parameter int unsigned WAYS    = 16,
  parameter int unsigned SC_WAYS = 4,
  localparam int unsigned WB     = $clog2(WAYS),
  localparam int unsigned SSW    = SC_WAYS * (WB + 1)
) (
  input  logic            access_i,
  input  logic            hit_i,
  input  logic [WB-1:0]   hit_way_i,
  input  logic [WAYS-1:0] valid_i,
  input  logic [SSW-1:0]  state_i,
  // baseline policy handshake (same cycle)
  output logic [WAYS-1:0] cand_o,
  output logic            sweep_o,
  input  logic [WB-1:0]   base_victim_i,
  output logic            demote_en_o,
  output logic [WB-1:0]   demote_way_o,
  output logic            touch_en_o,
  output logic [WB-1:0]   touch_way_o,
  // decision
  output logic [WB-1:0]   victim_o,
  output logic            evict_o,
  output decision_e       decision_o,
  output logic [WAYS-1:0] sc_ways_o,
  output logic [SSW-1:0]  state_o
);

  logic [SC_WAYS-1:0][WB-1:0] ptr_q, ptr_d;
  logic [SC_WAYS-1:0]         known_q, known_d;
  logic [$clog2(WAYS+1)-1:0]  nvalid;
  logic [$clog2(SC_WAYS+1)-1:0] cnt;
  logic                       full, any_inv;
  logic [WB-1:0]              inv_way;
  logic [WAYS-1:0]            is_sc, mc;

  assign {known_q, ptr_q} = state_i;

  always_comb begin
    nvalid  = '0;
    any_inv = 1'b0;
    inv_way = '0;
    for (int unsigned w = 0; w < WAYS; w++) begin
      nvalid = nvalid + valid_i[w];
      if (!valid_i[w] && !any_inv) begin
        any_inv = 1'b1;
        inv_way = WB'(w);
      end
    end
    cnt  = (int'(nvalid) >= int'(SC_WAYS)) ? ($clog2(SC_WAYS+1))'(SC_WAYS)
                               : ($clog2(SC_WAYS+1))'(nvalid);
    full = (cnt == ($clog2(SC_WAYS+1))'(SC_WAYS));
    is_sc = '0;
    for (int unsigned s = 0; s < SC_WAYS; s++)
      if (s < cnt) is_sc[ptr_q[s]] = 1'b1;
    mc = valid_i & ~is_sc;
  end

  assign sc_ways_o = is_sc;

  always_comb begin
    ptr_d        = ptr_q;
    known_d      = known_q;
    cand_o       = '0;
    sweep_o      = 1'b0;
    demote_en_o  = 1'b0;
    demote_way_o = ptr_q[0];
    touch_en_o   = 1'b0;
    touch_way_o  = hit_way_i;
    victim_o     = '0;
    evict_o      = 1'b0;
    decision_o   = DEC_NONE;
    if (access_i && hit_i) begin
      decision_o = DEC_HIT;
      touch_en_o = !is_sc[hit_way_i];   // Shepherd lines are not tracked
      for (int unsigned s = 0; s < SC_WAYS; s++)
        if (s < cnt && ptr_q[s] == hit_way_i) known_d[s] = 1'b1;
    end else if (access_i) begin
      if (any_inv) begin
        decision_o = DEC_FILL_FREE;
        victim_o   = inv_way;
        demote_en_o = full;
      end else if (!known_q[0]) begin
        decision_o = DEC_EVICT_SC;
        victim_o   = ptr_q[0];
        evict_o    = 1'b1;
      end else begin
        decision_o  = DEC_EVICT_BASE;
        cand_o      = mc;
        sweep_o     = 1'b1;
        victim_o    = base_victim_i;
        evict_o     = 1'b1;
        demote_en_o = 1'b1;
      end
      // the new line takes the youngest entry
      if (full) begin
        for (int unsigned s = 0; s + 1 < SC_WAYS; s++) begin
          ptr_d[s]   = ptr_q[s+1];
          known_d[s] = known_q[s+1];
        end
        ptr_d[SC_WAYS-1]   = victim_o;
        known_d[SC_WAYS-1] = 1'b0;
      end else begin
        for (int unsigned s = 0; s < SC_WAYS; s++)
          if (s == int'(cnt)) begin
            ptr_d[s]   = victim_o;
            known_d[s] = 1'b0;
          end
      end
    end
  end

  assign state_o = {known_d, ptr_d};

endmodule
