// Behavioural reference models of the replacement policies, for the
// testbenches only.  They are written the way the policies are usually
// explained, with ordered lists and step-by-step loops, rather than the
// one-cycle encodings of the RTL, so that the RTL can be compared against
// an independent description:
//   lru_ref   - recency list, front = most recently used
//   plru_ref  - list of the four subtrees in recency order plus, per
//               subtree, a root bit and one bit per pair (16 ways only)
//   clock_ref - touched bits and a hand that moves one way at a time
//   set_ref   - one cache set: valid ways, tags, the Shepherd FIFO (SC-XL:
//               a known bit per entry; SC-L: a known row per entry) and a
//               baseline model; access() returns the expected decision.
package ref_model_pkg;
  import repl_pkg::*;

  typedef logic [63:0] mask_t;

  virtual class base_ref;
    int ways;
    pure virtual function int select(mask_t cand, bit sweep);
    pure virtual function void demote(int w);
    pure virtual function void touch(int w);
  endclass

  class lru_ref extends base_ref;
    int order[$];
    function new(int w);
      ways = w;
      for (int i = 0; i < w; i++) order.push_back(i);
    endfunction
    function void remove(int w);
      foreach (order[i]) if (order[i] == w) begin order.delete(i); break; end
    endfunction
    virtual function int select(mask_t cand, bit sweep);
      for (int i = order.size() - 1; i >= 0; i--) if (cand[order[i]]) return order[i];
      return -1;
    endfunction
    virtual function void demote(int w); remove(w); order.push_back(w);  endfunction
    virtual function void touch(int w);  remove(w); order.push_front(w); endfunction
  endclass

  class plru_ref extends base_ref;
    int   grp[$];        // subtree ids, front = most recent
    bit   root[4];       // 1: upper pair (ways 2,3 of the subtree) more recent
    bit   pairb[4][2];   // 1: odd way of the pair more recent
    function new(int w);
      ways = w;
      for (int i = 0; i < 4; i++) grp.push_back(i);
      foreach (root[i]) begin root[i] = 0; pairb[i][0] = 0; pairb[i][1] = 0; end
    endfunction
    // ways of one subtree from most to least recent
    function void sub_order(int g, ref int o[4]);
      int p0, p1;
      p0 = root[g] ? 1 : 0;
      p1 = 1 - p0;
      o[0] = g*4 + p0*2 + (pairb[g][p0] ? 1 : 0);
      o[1] = g*4 + p0*2 + (pairb[g][p0] ? 0 : 1);
      o[2] = g*4 + p1*2 + (pairb[g][p1] ? 1 : 0);
      o[3] = g*4 + p1*2 + (pairb[g][p1] ? 0 : 1);
    endfunction
    function void total(ref int t[16]);
      int o[4];
      for (int i = 0; i < 4; i++) begin
        sub_order(grp[i], o);
        for (int j = 0; j < 4; j++) t[i*4 + j] = o[j];
      end
    endfunction
    function void move(int g, bit front);
      foreach (grp[i]) if (grp[i] == g) begin grp.delete(i); break; end
      if (front) grp.push_front(g); else grp.push_back(g);
    endfunction
    virtual function int select(mask_t cand, bit sweep);
      int t[16];
      total(t);
      for (int i = 15; i >= 0; i--) if (cand[t[i]]) return t[i];
      return -1;
    endfunction
    virtual function void demote(int w);
      int g, l;
      g = w / 4; l = w % 4;
      root[g] = (l >= 2) ? 0 : 1;
      pairb[g][l/2] = (l % 2) ? 0 : 1;
      move(g, 0);
    endfunction
    virtual function void touch(int w);
      int g, l;
      g = w / 4; l = w % 4;
      root[g] = (l >= 2) ? 1 : 0;
      pairb[g][l/2] = (l % 2) ? 1 : 0;
      move(g, 1);
    endfunction
  endclass

  class clock_ref extends base_ref;
    bit t[64];
    int hand;
    function new(int w);
      ways = w;
      hand = 0;
      foreach (t[i]) t[i] = 0;
    endfunction
    virtual function int select(mask_t cand, bit sweep);
      int h, v;
      bit tt[64];
      if (cand == 0) return -1;
      h  = hand;
      tt = t;
      v  = -1;
      // one way per step; a touched candidate gets another chance
      for (int step = 0; step < 3 * ways && v < 0; step++) begin
        if (cand[h]) begin
          if (!tt[h]) v = h;
          else tt[h] = 0;
        end
        if (v < 0) h = (h + 1) % ways;
      end
      if (sweep) begin
        t    = tt;
        hand = (v + 1) % ways;
      end
      return v;
    endfunction
    virtual function void demote(int w); t[w] = 0; endfunction
    virtual function void touch(int w);  t[w] = 1; endfunction
  endclass

  class set_ref;
    sc_mode_e mode;
    base_e    base;
    int       ways, sc_ways;
    base_ref  b;
    bit       valid[64];
    longint   tag[64];
    int       fway[$];     // Shepherd FIFO, front = oldest
    bit       fknown[$];   // SC-XL known bit per entry
    mask_t    frow[$];     // SC-L known row per entry

    function new(sc_mode_e m, base_e bs, int w, int s);
      mode = m; base = bs; ways = w; sc_ways = s;
      case (bs)
        BASE_LRU:  begin lru_ref   r = new(w); b = r; end
        BASE_PLRU: begin plru_ref  r = new(w); b = r; end
        default:   begin clock_ref r = new(w); b = r; end
      endcase
      foreach (valid[i]) begin valid[i] = 0; tag[i] = 0; end
    endfunction

    function int lookup(longint tg);
      for (int w = 0; w < ways; w++) if (valid[w] && tag[w] == tg) return w;
      return -1;
    endfunction

    function mask_t main_mask();
      mask_t m;
      m = 0;
      for (int w = 0; w < ways; w++) m[w] = valid[w];
      foreach (fway[i]) m[fway[i]] = 0;
      return m;
    endfunction

    function void fifo_pop();
      void'(fway.pop_front());
      void'(fknown.pop_front());
      void'(frow.pop_front());
    endfunction

    // way accessed (hit or fill): every Shepherd entry learns about it
    function void note_access(int w);
      foreach (fway[i]) begin
        if (fway[i] == w) fknown[i] = 1;
        frow[i][w] = 1;
      end
    endfunction

    // One access with tag tg.  Returns the way used; sets hit, evict, the
    // evicted tag and the decision.
    function int access(longint tg, output bit hit, output bit evict,
                        output longint old_tag, output decision_e dec);
      int    w, inv, v;
      mask_t mc, unk;
      w       = lookup(tg);
      hit     = (w >= 0);
      evict   = 0;
      old_tag = 0;
      if (hit) begin
        dec = DEC_HIT;
        if (mode == SC_XL) begin
          foreach (fway[i]) if (fway[i] == w) fknown[i] = 1;
        end else begin
          note_access(w);
        end
        // the baseline only tracks main lines
        if (!(w inside {fway})) b.touch(w);
        return w;
      end
      inv = -1;
      for (int i = ways - 1; i >= 0; i--) if (!valid[i]) inv = i;
      if (inv >= 0) begin
        dec = DEC_FILL_FREE;
        v   = inv;
        if (fway.size() == sc_ways) begin
          b.demote(fway[0]);
          fifo_pop();
        end
      end else if ((mode == SC_XL && !fknown[0]) ||
                   (mode == SC_L  && !frow[0][fway[0]])) begin
        dec = DEC_EVICT_SC;
        v   = fway[0];
        fifo_pop();
      end else begin
        mc  = main_mask();
        unk = mc & ~frow[0];
        if (mode == SC_L && unk != 0) begin
          dec = DEC_EVICT_UNK;
          if (base == BASE_CLOCK) begin
            v = -1;
            for (int i = ways - 1; i >= 0; i--) if (unk[i]) v = i;
          end else begin
            v = b.select(unk, 0);
          end
        end else begin
          dec = DEC_EVICT_BASE;
          v   = b.select(mc, 1);
        end
        b.demote(fway[0]);
        fifo_pop();
      end
      if (valid[v]) begin
        evict   = 1;
        old_tag = tag[v];
      end
      valid[v] = 1;
      tag[v]   = tg;
      if (mode == SC_L) note_access(v);
      fway.push_back(v);
      fknown.push_back(0);
      frow.push_back(0);
      return v;
    endfunction
  endclass

endpackage
