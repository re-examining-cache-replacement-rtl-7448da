// Tree pseudo-LRU baseline policy for one set (IBM 3033 style),
// combinational next-state logic.
//
// The ways are split into four subtrees of WAYS/4 ways.  The order of the
// four subtrees is kept exactly, as a 5-bit code of the 24 possible
// orderings (a Lehmer code: digit0*6 + digit1*2 + digit2, where digit i is
// the position of the i-th most recent subtree among those not yet listed).
// Inside each subtree a binary tree of WAYS/4-1 bits records, at every node,
// which half was used more recently (1 = right half).  For 16 ways this is
// 5 + 4*3 = 17 bits per set.
//
// The tree is read as a total order: rank = subtree_rank*(WAYS/4) +
// rank_inside_subtree, where rank 0 is the MRU way.  As for true LRU, three
// operations are applied in one cycle: select (candidate with the largest
// rank), demote (make a way the LRU way by pointing every level away from
// it), touch (make a way MRU by pointing every level at it).
// The structure, the 5-bit top level and the use of the total order for
// subset selection and demotion follow the policy description; the exact
// bit encodings are this design's choice.
module plru_policy #(
  parameter int unsigned WAYS = 16,
  localparam int unsigned WB  = $clog2(WAYS),
  localparam int unsigned K   = WAYS / 4,        // ways per subtree
  localparam int unsigned KB  = $clog2(K),
  localparam int unsigned TB  = K - 1,           // tree bits per subtree
  localparam int unsigned SW  = 5 + 4 * TB
) (
  input  logic [SW-1:0]   state_i,
  input  logic [WAYS-1:0] cand_i,
  output logic [WB-1:0]   victim_o,
  output logic            found_o,
  input  logic            demote_en_i,
  input  logic [WB-1:0]   demote_way_i,
  input  logic            touch_en_i,
  input  logic [WB-1:0]   touch_way_i,
  output logic [SW-1:0]   state_o
);

  typedef logic [1:0] grank_t [4];

  // 5-bit order code -> rank of each subtree (0 = MRU)
  function automatic grank_t decode_order(logic [4:0] code);
    grank_t r;
    int     rem[4];
    int     n, d;
    int     digit[4];
    logic [4:0] c;
    c = (code > 5'd23) ? 5'd0 : code;
    digit[0] = int'(c) / 6;
    digit[1] = (int'(c) % 6) / 2;
    digit[2] = int'(c) % 2;
    digit[3] = 0;
    for (int i = 0; i < 4; i++) rem[i] = i;
    n = 4;
    for (int i = 0; i < 4; i++) begin
      d = digit[i];
      r[rem[d]] = 2'(i);
      for (int j = 0; j < 3; j++)
        if (j >= d && j < n - 1) rem[j] = rem[j+1];
      n--;
    end
    return r;
  endfunction

  // rank of each subtree -> 5-bit order code
  function automatic logic [4:0] encode_order(grank_t r);
    int rem[4];
    int n, d, g;
    int code;
    for (int i = 0; i < 4; i++) rem[i] = i;
    n    = 4;
    code = 0;
    for (int i = 0; i < 3; i++) begin
      // subtree at position i of the order
      g = 0;
      for (int k = 0; k < 4; k++) if (int'(r[k]) == i) g = k;
      g = g & 3;
      d = 0;
      for (int k = 0; k < 4; k++) if (k < n && rem[k] == g) d = k;
      code = code + d * ((i == 0) ? 6 : (i == 1) ? 2 : 1);
      for (int j = 0; j < 3; j++)
        if (j >= d && j < n - 1) rem[j] = rem[j+1];
      n--;
    end
    return 5'(code);
  endfunction

  // rank of a way inside its subtree
  function automatic int inner_rank(logic [TB-1:0] t, logic [KB-1:0] li);
    int node, rk;
    logic dir;
    node = 1;
    rk   = 0;
    for (int l = 0; l < KB; l++) begin
      dir = li[KB-1-l];
      if (t[node-1] != dir) rk = rk + (K >> (l + 1));
      node = node * 2 + int'(dir);
    end
    return rk;
  endfunction

  // point every node on the path of way li toward it (mru=1) or away (mru=0)
  function automatic logic [TB-1:0] set_path(logic [TB-1:0] t, logic [KB-1:0] li, logic mru);
    int node;
    logic dir;
    logic [TB-1:0] o;
    o    = t;
    node = 1;
    for (int l = 0; l < KB; l++) begin
      dir         = li[KB-1-l];
      o[node-1]   = mru ? dir : ~dir;
      node        = node * 2 + int'(dir);
    end
    return o;
  endfunction

  // move subtree g to the front (mru=1) or back (mru=0) of the order
  function automatic grank_t move_group(grank_t r, int g, logic mru);
    grank_t o;
    o = r;
    for (int k = 0; k < 4; k++) begin
      if (mru  && r[k] < r[g]) o[k] = r[k] + 2'd1;
      if (!mru && r[k] > r[g]) o[k] = r[k] - 2'd1;
    end
    o[g] = mru ? 2'd0 : 2'd3;
    return o;
  endfunction

  logic [3:0][TB-1:0] tree_q, tree_d, tree_t;
  grank_t gr_q, gr_d, gr_t;
  logic [WB-1:0] best_rank;

  assign tree_q = state_i[SW-1:5];
  assign gr_q   = decode_order(state_i[4:0]);

  // select the candidate latest in the total order
  always_comb begin
    int unsigned rk;
    victim_o  = '0;
    found_o   = 1'b0;
    best_rank = '0;
    for (int unsigned w = 0; w < WAYS; w++) begin
      rk = int'(gr_q[w / K]) * K + inner_rank(tree_q[w / K], KB'(w % K));
      if (cand_i[w] && (!found_o || WB'(rk) > best_rank)) begin
        found_o   = 1'b1;
        best_rank = WB'(rk);
        victim_o  = WB'(w);
      end
    end
  end

  // demote, then touch
  always_comb begin
    int dg, tg;
    dg     = int'(demote_way_i) / K;
    tg     = int'(touch_way_i) / K;
    tree_d = tree_q;
    gr_d   = gr_q;
    if (demote_en_i) begin
      tree_d[dg] = set_path(tree_q[dg], KB'(int'(demote_way_i) % K), 1'b0);
      gr_d       = move_group(gr_q, dg, 1'b0);
    end
    tree_t = tree_d;
    gr_t   = gr_d;
    if (touch_en_i) begin
      tree_t[tg] = set_path(tree_d[tg], KB'(int'(touch_way_i) % K), 1'b1);
      gr_t       = move_group(gr_d, tg, 1'b1);
    end
  end

  assign state_o = {tree_t, encode_order(gr_t)};

endmodule
