// Lightweight Shepherd Cache (SC-L) replacement control for one set,
// combinational next-state logic.
//
// Up to SC_WAYS lines of the set are Shepherd lines.  Each line carries an SC
// flag and a slot pointer naming which of the SC_WAYS slots it owns; each
// slot owns a row of known flags, one per way of the set, cleared when the
// slot's line is allocated and set for a way whenever that way is accessed
// afterwards.  The flags record, for the slot's line, which lines of the set
// have been re-used since it arrived (their imminence is known).  Slots are
// always refilled oldest-first, so the FIFO order is a rotating pointer to
// the oldest slot.  For 16 ways and 4 Shepherd ways that is
// 2 + 64 + 32 + 16 = 114 bits per set, on top of the baseline's state.
//
// On a miss in a set whose ways are all valid, with s0 the oldest slot and
// w0 its line:
//   * known[s0][w0] clear -> w0 is evicted (DEC_EVICT_SC);
//   * else, if some main way has known[s0] clear -> one of those is evicted
//     (DEC_EVICT_UNK): the baseline's LRU among them for LRU and PLRU, the
//     lowest-numbered one for Clock;
//   * else -> the baseline picks among all main ways (DEC_EVICT_BASE; for
//     Clock a normal sweep that skips the Shepherd ways).
// In the last two cases w0 becomes a main line at the baseline's LRU position
// (Clock: touched bit cleared).  The new line takes slot s0.
// While the set has invalid ways the lowest one is filled without eviction
// (DEC_FILL_FREE); once all slots are in use the oldest Shepherd line moves
// to the main ways at the same time.
// The baseline only tracks main lines: hits on main lines are passed on as
// touches, hits on Shepherd lines and fills are not.
// The flags, the three-way decision and the Clock variant follow the policy
// description.  The rotating oldest pointer (instead of a full
// log2(SC_WAYS!)-bit order), the start-up behaviour and marking the filled
// way as accessed for the other slots are this design's choices.
// SC_WAYS must be a power of two.
module sc_l_policy
  import repl_pkg::*;
#(
  parameter int unsigned WAYS    = 16,
  parameter int unsigned SC_WAYS = 4,
  parameter base_e       BASE    = BASE_LRU,
  localparam int unsigned WB     = $clog2(WAYS),
  localparam int unsigned SB     = $clog2(SC_WAYS),
  localparam int unsigned SSW    = SB + SC_WAYS * WAYS + WAYS * SB + WAYS
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

  logic [SB-1:0]                oldest_q, oldest_d;
  logic [SC_WAYS-1:0][WAYS-1:0] known_q, known_d;
  logic [WAYS-1:0][SB-1:0]      slot_q, slot_d;
  logic [WAYS-1:0]              flag_q, flag_d;

  logic [WAYS-1:0]    is_sc, mc, unk;
  logic [SB:0]        cnt;
  logic               full, any_inv, any_unk;
  logic [WB-1:0]      inv_way, unk_way, w0;
  logic [SC_WAYS-1:0] slot_used;
  logic [SB-1:0]      new_slot;

  assign {oldest_q, known_q, slot_q, flag_q} = state_i;

  always_comb begin
    is_sc     = flag_q & valid_i;
    mc        = valid_i & ~is_sc;
    cnt       = '0;
    slot_used = '0;
    w0        = '0;
    any_inv   = 1'b0;
    inv_way   = '0;
    for (int unsigned w = 0; w < WAYS; w++) begin
      cnt = cnt + (SB+1)'(is_sc[w]);
      if (is_sc[w]) slot_used[slot_q[w]] = 1'b1;
      if (is_sc[w] && slot_q[w] == oldest_q) w0 = WB'(w);
      if (!valid_i[w] && !any_inv) begin
        any_inv = 1'b1;
        inv_way = WB'(w);
      end
    end
    full    = (cnt == (SB+1)'(SC_WAYS));
    unk     = mc & ~known_q[oldest_q];
    any_unk = 1'b0;
    unk_way = '0;
    for (int unsigned w = 0; w < WAYS; w++)
      if (unk[w] && !any_unk) begin
        any_unk = 1'b1;
        unk_way = WB'(w);
      end
  end

  assign sc_ways_o = is_sc;

  always_comb begin
    oldest_d     = oldest_q;
    known_d      = known_q;
    slot_d       = slot_q;
    flag_d       = flag_q;
    cand_o       = '0;
    sweep_o      = 1'b0;
    demote_en_o  = 1'b0;
    demote_way_o = w0;
    touch_en_o   = 1'b0;
    touch_way_o  = hit_way_i;
    victim_o     = '0;
    evict_o      = 1'b0;
    decision_o   = DEC_NONE;
    new_slot     = oldest_q;
    if (access_i && hit_i) begin
      decision_o = DEC_HIT;
      touch_en_o = !is_sc[hit_way_i];   // Shepherd lines are not tracked
      for (int unsigned s = 0; s < SC_WAYS; s++)
        if (slot_used[s]) known_d[s][hit_way_i] = 1'b1;
    end else if (access_i) begin
      if (any_inv) begin
        decision_o  = DEC_FILL_FREE;
        victim_o    = inv_way;
        demote_en_o = full;
      end else if (!known_q[oldest_q][w0]) begin
        decision_o  = DEC_EVICT_SC;
        victim_o    = w0;
        evict_o     = 1'b1;
      end else if (any_unk) begin
        decision_o  = DEC_EVICT_UNK;
        evict_o     = 1'b1;
        demote_en_o = 1'b1;
        if (BASE == BASE_CLOCK) begin
          victim_o = unk_way;
        end else begin
          cand_o   = unk;
          victim_o = base_victim_i;
        end
      end else begin
        decision_o  = DEC_EVICT_BASE;
        evict_o     = 1'b1;
        demote_en_o = 1'b1;
        cand_o      = mc;
        sweep_o     = 1'b1;
        victim_o    = base_victim_i;
      end
      if (demote_en_o) flag_d[w0] = 1'b0;
      if (full) begin
        new_slot = oldest_q;
        oldest_d = oldest_q + 1'b1;
      end else begin
        new_slot = oldest_q + SB'(cnt);
      end
      // the fill counts as an access to that way for the other slots
      for (int unsigned s = 0; s < SC_WAYS; s++)
        if (slot_used[s]) known_d[s][victim_o] = 1'b1;
      known_d[new_slot]  = '0;
      flag_d[victim_o]   = 1'b1;
      slot_d[victim_o]   = new_slot;
    end
  end

  assign state_o = {oldest_d, known_d, slot_d, flag_d};

endmodule
