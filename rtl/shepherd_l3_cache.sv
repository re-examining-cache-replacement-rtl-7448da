// Shared last-level cache directory with Shepherd-cache replacement.
//
// A WAYS-way set-associative cache (16 ways of 64-byte lines, 4 MB by
// default) whose replacement combines a small per-set FIFO of Shepherd ways
// for newly allocated lines with a baseline policy for the remaining main
// ways.  A new line first sits in a Shepherd way; when it is the oldest
// Shepherd line and another miss needs room, it is evicted if it has not been
// re-used since it arrived, otherwise a main-way victim is chosen and the
// old Shepherd line joins the main ways as their least recently used line.
// SC_MODE picks the Shepherd variant (SC_XL: one known bit per Shepherd way;
// SC_L: per Shepherd way a known flag for every line of the set) and BASE the
// baseline policy (true LRU, tree pseudo-LRU or Clock).  The default is
// SC-XL over Clock, the lowest-overhead combination (40 bits of policy state
// per set).
//
// The block holds the tags and the replacement state; the data array is not
// part of it.  For each request it reports hit or miss, the way that holds
// (or now receives) the line, and on a miss the line address that was
// evicted, so that a data array and a memory interface can be driven from
// the response.
//
// Interface and timing:
//   * After reset the controller clears all SETS sets, one per cycle;
//     req_ready_o stays low until that is done.
//   * A request (req_valid_i && req_ready_o) carries a byte address.  The
//     set's tags and state are read at that edge; one cycle later the
//     decision is made, all three arrays are written back and the response
//     is registered.  resp_valid_o is high for one cycle, the cycle after
//     the lookup, i.e. two clock edges after the request was accepted.
//   * req_ready_o is high only in the idle state, so one request is accepted
//     every second cycle; a request to the same set right after another
//     therefore always sees the updated state.
//   * access_cnt_o and miss_cnt_o count requests and misses since reset
//     (their ratio is the cache's miss ratio).
// The replacement rules follow the policy descriptions; the request and
// response protocol, the two-cycle schedule, the address split and the
// counters are this design's choices.
module shepherd_l3_cache
  import repl_pkg::*;
#(
  parameter int unsigned CACHE_BYTES = 4 * 1024 * 1024,
  parameter int unsigned LINE_BYTES  = 64,
  parameter int unsigned WAYS        = 16,
  parameter int unsigned SC_WAYS     = 4,
  parameter int unsigned ADDR_W      = 50,
  parameter sc_mode_e    SC_MODE     = SC_XL,
  parameter base_e       BASE        = BASE_CLOCK,
  localparam int unsigned SETS  = CACHE_BYTES / (LINE_BYTES * WAYS),
  localparam int unsigned OFF_W = $clog2(LINE_BYTES),
  localparam int unsigned IDX_W = (SETS > 1) ? $clog2(SETS) : 1,
  localparam int unsigned TAG_W = ADDR_W - OFF_W - IDX_W,
  localparam int unsigned WB    = $clog2(WAYS)
) (
  input  logic              clk,
  input  logic              rst_n,
  // request
  input  logic              req_valid_i,
  output logic              req_ready_o,
  input  logic [ADDR_W-1:0] req_addr_i,
  // response
  output logic              resp_valid_o,
  output logic              resp_hit_o,
  output logic [WB-1:0]     resp_way_o,
  output logic              resp_evict_o,
  output logic [ADDR_W-1:0] resp_evict_addr_o,
  output decision_e         resp_decision_o,
  // statistics
  output logic [31:0]       access_cnt_o,
  output logic [31:0]       miss_cnt_o
);

  localparam int unsigned BSW = base_state_w(BASE, WAYS);
  localparam int unsigned SSW = sc_state_w(SC_MODE, WAYS, SC_WAYS);
  localparam int unsigned TW  = TAG_W + 1;           // valid + tag

  typedef enum logic [1:0] {S_INIT, S_IDLE, S_LOOKUP} state_e;
  state_e state_q;

  logic [IDX_W-1:0] init_idx_q, idx_q;
  logic [TAG_W-1:0] tag_q;

  // ---------------------------------------------------------------- arrays
  logic                     re;
  logic [IDX_W-1:0]         ridx;
  logic                     we;
  logic [IDX_W-1:0]         widx;
  logic [WAYS-1:0][TW-1:0]  tags_r, tags_w;
  logic [BSW-1:0]           base_r, base_w, base_next;
  logic [SSW-1:0]           sc_r, sc_w, sc_next;

  assign re   = (state_q == S_IDLE) && req_valid_i;
  assign ridx = req_addr_i[OFF_W +: IDX_W];

  set_ram #(.DEPTH(SETS), .WIDTH(WAYS*TW)) u_tag_ram (
    .clk, .re_i(re), .raddr_i(ridx), .rdata_o(tags_r),
    .we_i(we), .waddr_i(widx), .wdata_i(tags_w));

  set_ram #(.DEPTH(SETS), .WIDTH(BSW)) u_base_ram (
    .clk, .re_i(re), .raddr_i(ridx), .rdata_o(base_r),
    .we_i(we), .waddr_i(widx), .wdata_i(base_w));

  set_ram #(.DEPTH(SETS), .WIDTH(SSW)) u_sc_ram (
    .clk, .re_i(re), .raddr_i(ridx), .rdata_o(sc_r),
    .we_i(we), .waddr_i(widx), .wdata_i(sc_w));

  // ---------------------------------------------------------------- tag match
  logic [WAYS-1:0] valid;
  logic            hit;
  logic [WB-1:0]   hit_way;

  always_comb begin
    hit     = 1'b0;
    hit_way = '0;
    for (int unsigned w = 0; w < WAYS; w++) begin
      valid[w] = tags_r[w][TAG_W];
      if (tags_r[w][TAG_W] && tags_r[w][TAG_W-1:0] == tag_q && !hit) begin
        hit     = 1'b1;
        hit_way = WB'(w);
      end
    end
  end

  // ---------------------------------------------------------------- policy
  logic            access;
  logic [WAYS-1:0] cand;
  logic            sweep;
  logic [WB-1:0]   base_victim;
  logic            base_found;
  logic            demote_en, touch_en;
  logic [WB-1:0]   demote_way, touch_way;
  logic [WB-1:0]   victim;
  logic            evict;
  decision_e       decision;
  logic [WAYS-1:0] sc_ways;

  assign access = (state_q == S_LOOKUP);

  if (SC_MODE == SC_XL) begin : g_sc
    sc_xl_policy #(.WAYS(WAYS), .SC_WAYS(SC_WAYS)) u_sc (
      .access_i(access), .hit_i(hit), .hit_way_i(hit_way), .valid_i(valid),
      .state_i(sc_r), .cand_o(cand), .sweep_o(sweep),
      .base_victim_i(base_victim),
      .demote_en_o(demote_en), .demote_way_o(demote_way),
      .touch_en_o(touch_en), .touch_way_o(touch_way),
      .victim_o(victim), .evict_o(evict), .decision_o(decision),
      .sc_ways_o(sc_ways), .state_o(sc_next));
  end else begin : g_sc
    sc_l_policy #(.WAYS(WAYS), .SC_WAYS(SC_WAYS), .BASE(BASE)) u_sc (
      .access_i(access), .hit_i(hit), .hit_way_i(hit_way), .valid_i(valid),
      .state_i(sc_r), .cand_o(cand), .sweep_o(sweep),
      .base_victim_i(base_victim),
      .demote_en_o(demote_en), .demote_way_o(demote_way),
      .touch_en_o(touch_en), .touch_way_o(touch_way),
      .victim_o(victim), .evict_o(evict), .decision_o(decision),
      .sc_ways_o(sc_ways), .state_o(sc_next));
  end

  if (BASE == BASE_LRU) begin : g_base
    lru_policy #(.WAYS(WAYS)) u_base (
      .state_i(base_r), .cand_i(cand),
      .victim_o(base_victim), .found_o(base_found),
      .demote_en_i(demote_en), .demote_way_i(demote_way),
      .touch_en_i(touch_en), .touch_way_i(touch_way),
      .state_o(base_next));
  end else if (BASE == BASE_PLRU) begin : g_base
    plru_policy #(.WAYS(WAYS)) u_base (
      .state_i(base_r), .cand_i(cand),
      .victim_o(base_victim), .found_o(base_found),
      .demote_en_i(demote_en), .demote_way_i(demote_way),
      .touch_en_i(touch_en), .touch_way_i(touch_way),
      .state_o(base_next));
  end else begin : g_base
    clock_policy #(.WAYS(WAYS)) u_base (
      .state_i(base_r), .cand_i(cand), .sweep_i(sweep),
      .victim_o(base_victim), .found_o(base_found),
      .demote_en_i(demote_en), .demote_way_i(demote_way),
      .touch_en_i(touch_en), .touch_way_i(touch_way),
      .state_o(base_next));
  end

  // ---------------------------------------------------------------- write back
  always_comb begin
    we     = 1'b0;
    widx   = idx_q;
    tags_w = tags_r;
    base_w = base_next;
    sc_w   = sc_next;
    if (state_q == S_INIT) begin
      we     = 1'b1;
      widx   = init_idx_q;
      tags_w = '0;
      base_w = '0;             // reset state of every baseline
      sc_w   = '0;
    end else if (state_q == S_LOOKUP) begin
      we = 1'b1;
      if (!hit) tags_w[victim] = {1'b1, tag_q};
    end
  end

  // ---------------------------------------------------------------- control
  assign req_ready_o = (state_q == S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q           <= S_INIT;
      init_idx_q        <= '0;
      idx_q             <= '0;
      tag_q             <= '0;
      resp_valid_o      <= 1'b0;
      resp_hit_o        <= 1'b0;
      resp_way_o        <= '0;
      resp_evict_o      <= 1'b0;
      resp_evict_addr_o <= '0;
      resp_decision_o   <= DEC_NONE;
      access_cnt_o      <= '0;
      miss_cnt_o        <= '0;
    end else begin
      resp_valid_o <= 1'b0;
      case (state_q)
        S_INIT: begin
          init_idx_q <= init_idx_q + 1'b1;
          if (init_idx_q == IDX_W'(SETS - 1)) state_q <= S_IDLE;
        end
        S_IDLE: begin
          if (req_valid_i) begin
            idx_q   <= ridx;
            tag_q   <= req_addr_i[ADDR_W-1 -: TAG_W];
            state_q <= S_LOOKUP;
          end
        end
        default: begin  // S_LOOKUP
          resp_valid_o      <= 1'b1;
          resp_hit_o        <= hit;
          resp_way_o        <= hit ? hit_way : victim;
          resp_evict_o      <= !hit && evict;
          resp_evict_addr_o <= {tags_r[victim][TAG_W-1:0], idx_q, OFF_W'(0)};
          resp_decision_o   <= decision;
          access_cnt_o      <= access_cnt_o + 1'b1;
          if (!hit) miss_cnt_o <= miss_cnt_o + 1'b1;
          state_q           <= S_IDLE;
        end
      endcase
    end
  end

  // ---------------------------------------------------------------- checks
  // a baseline pick must come from a non-empty candidate set
  assert property (@(posedge clk) disable iff (!rst_n)
    (access && (|cand)) |-> base_found)
    else $error("baseline found no victim among candidates");
  // a victim never evicts a line while the set has a free way
  assert property (@(posedge clk) disable iff (!rst_n)
    (access && !hit && evict) |-> (&valid))
    else $error("eviction with an invalid way available");
  // the main ways are never empty once the set is full
  assert property (@(posedge clk) disable iff (!rst_n)
    (access && (&valid)) |-> (|(valid & ~sc_ways)))
    else $error("no main way in a full set");

endmodule
