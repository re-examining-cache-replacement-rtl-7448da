// Clock baseline policy for one set, combinational next-state logic.
//
// Every way has a touched bit and the set has a hand (a way index), WAYS +
// log2(WAYS) bits per set (20 for 16 ways).  The sequential clock sweep is
// done in one cycle: starting at the hand, the first candidate way whose
// touched bit is clear is the victim, and every candidate the hand passes on
// the way has its touched bit cleared.  If every candidate is touched, the
// sweep goes once round, clearing them all, and stops at the first candidate
// from the hand.  Ways outside cand_i (the Shepherd ways) are skipped: they
// are neither examined nor cleared.
//   sweep_i     - apply the sweep's side effects (cleared bits, hand moved to
//                 the way after the victim); without it the victim is only
//                 reported
//   demote_en_i - clear the touched bit of a line that moves from the
//                 Shepherd ways into the main ways (treated as a new line)
//   touch_en_i  - set the touched bit on an access to a main line
// The sweep, the skipping of Shepherd ways and the clearing on migration
// follow the policy description; advancing the hand past the victim is this
// design's choice.  Purely combinational.
module clock_policy #(
  parameter int unsigned WAYS = 16,
  localparam int unsigned WB  = $clog2(WAYS),
  localparam int unsigned SW  = WAYS + WB
) (
  input  logic [SW-1:0]   state_i,
  input  logic [WAYS-1:0] cand_i,
  input  logic            sweep_i,
  output logic [WB-1:0]   victim_o,
  output logic            found_o,
  input  logic            demote_en_i,
  input  logic [WB-1:0]   demote_way_i,
  input  logic            touch_en_i,
  input  logic [WB-1:0]   touch_way_i,
  output logic [SW-1:0]   state_o
);

  logic [WAYS-1:0] touched, swept, t_next;
  logic [WB-1:0]   hand, hand_next;
  logic            clear_found;
  logic [WB-1:0]   clear_way, first_way;
  logic [WB:0]     clear_dist;

  assign touched = state_i[WAYS-1:0];
  assign hand    = state_i[SW-1:WAYS];

  always_comb begin
    logic [WB-1:0] w;
    clear_found = 1'b0;
    clear_way   = '0;
    clear_dist  = '0;
    first_way   = '0;
    found_o     = 1'b0;
    for (int unsigned k = 0; k < WAYS; k++) begin
      w = hand + WB'(k);
      if (cand_i[w] && !found_o) begin
        found_o   = 1'b1;
        first_way = w;
      end
      if (cand_i[w] && !touched[w] && !clear_found) begin
        clear_found = 1'b1;
        clear_way   = w;
        clear_dist  = (WB+1)'(k);
      end
    end
    victim_o = clear_found ? clear_way : first_way;

    // bits cleared by the sweep
    swept = touched;
    if (!clear_found) begin
      swept = touched & ~cand_i;
    end else begin
      for (int unsigned k = 0; k < WAYS; k++) begin
        w = hand + WB'(k);
        if ((WB+1)'(k) < clear_dist && cand_i[w]) swept[w] = 1'b0;
      end
    end
  end

  always_comb begin
    t_next    = touched;
    hand_next = hand;
    if (sweep_i && found_o) begin
      t_next    = swept;
      hand_next = victim_o + 1'b1;
    end
    if (demote_en_i) t_next[demote_way_i] = 1'b0;
    if (touch_en_i)  t_next[touch_way_i]  = 1'b1;
  end

  assign state_o = {hand_next, t_next};

endmodule
