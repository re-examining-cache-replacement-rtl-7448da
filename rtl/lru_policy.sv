// True LRU baseline policy for one set (combinational next-state logic).
//
// The recency stack is worked on as one age per way: age 0 is the most
// recently used line and age WAYS-1 the least recently used, and the ages
// always form a permutation.  Three operations are applied in this order in
// one cycle:
//   1. select   - the victim is the candidate (cand_i) with the largest age,
//                 i.e. the LRU line among an arbitrary subset of the ways;
//   2. demote   - demote_way_i is moved to the LRU position (used when the
//                 oldest Shepherd line migrates into the main ways);
//   3. touch    - touch_way_i is moved to the MRU position (a hit on a main
//                 line).
// The stored state is the minimal code of the stack, ceil(log2(WAYS!)) bits
// (45 for 16 ways): the Lehmer code of the age sequence,
//   code = sum over ways w of c[w] * (WAYS-1-w)!,
//   c[w] = number of ways w' > w with age[w'] < age[w],
// so code 0 is the order way 0 (MRU) .. way WAYS-1 (LRU), the reset state.
// Decoding peels the digits off with constant comparisons and gives way w
// the c[w]-th smallest age not yet taken; every code decodes to a valid
// stack.  The stack, its minimal size and the two placement operations
// follow the policy description; the choice of code is this design's.
// Purely combinational; state_i comes from and state_o goes back to the
// per-set state memory.  WAYS may be at most 20.
module lru_policy
  import repl_pkg::*;
#(
  parameter int unsigned WAYS = 16,
  localparam int unsigned WB  = $clog2(WAYS),
  localparam int unsigned SW  = lru_code_w(WAYS)
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

  typedef logic [WAYS-1:0][WB-1:0] ages_t;

  function automatic longint unsigned fact(int n);
    longint unsigned f;
    f = 1;
    for (int i = 2; i <= n; i++) f = f * longint'(i);
    return f;
  endfunction

  function automatic ages_t decode(logic [SW-1:0] code);
    ages_t           a;
    logic [SW-1:0]   rem;
    logic [WAYS-1:0] taken;
    int              c, cnt;
    longint unsigned f;
    a     = '0;
    rem   = code;
    taken = '0;
    for (int w = 0; w < WAYS; w++) begin
      f = fact(WAYS - 1 - w);
      c = 0;
      for (int k = 1; k < WAYS - w; k++)
        if (rem >= SW'(longint'(k) * f)) c = k;
      rem = rem - SW'(longint'(c) * f);
      cnt = 0;
      for (int v = 0; v < WAYS; v++) begin
        if (!taken[v]) begin
          if (cnt == c) begin
            a[w]     = WB'(v);
            taken[v] = 1'b1;
          end
          cnt++;
        end
      end
    end
    return a;
  endfunction

  function automatic logic [SW-1:0] encode(ages_t a);
    logic [SW-1:0] code;
    int            c;
    code = '0;
    for (int w = 0; w < WAYS; w++) begin
      c = 0;
      for (int w2 = w + 1; w2 < WAYS; w2++)
        if (a[w2] < a[w]) c++;
      code = code + SW'(longint'(c) * fact(WAYS - 1 - w));
    end
    return code;
  endfunction

  ages_t         age, age_d, age_t;
  logic [WB-1:0] best_age, ref_age, ref_age2;

  assign age = decode(state_i);

  // select the oldest candidate
  always_comb begin
    victim_o = '0;
    found_o  = 1'b0;
    best_age = '0;
    for (int unsigned w = 0; w < WAYS; w++) begin
      if (cand_i[w] && (!found_o || age[w] > best_age)) begin
        found_o  = 1'b1;
        best_age = age[w];
        victim_o = WB'(w);
      end
    end
  end

  // demote to LRU, then touch to MRU
  always_comb begin
    age_d   = age;
    ref_age = age[demote_way_i];
    if (demote_en_i) begin
      for (int unsigned w = 0; w < WAYS; w++)
        if (age[w] > ref_age) age_d[w] = age[w] - 1'b1;
      age_d[demote_way_i] = WB'(WAYS - 1);
    end
    age_t    = age_d;
    ref_age2 = age_d[touch_way_i];
    if (touch_en_i) begin
      for (int unsigned w = 0; w < WAYS; w++)
        if (age_d[w] < ref_age2) age_t[w] = age_d[w] + 1'b1;
      age_t[touch_way_i] = '0;
    end
  end

  assign state_o = encode(age_t);

endmodule
