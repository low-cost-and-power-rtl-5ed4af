// cc_ref_pkg: reference model of the shared cache's tag-side state, for testbenches.
//
// cc_ref_model keeps, per set and way, the valid bit, tag, lock bit and HP bit, one
// collision entry per set and a round-robin pointer per set, and applies the
// allocation rules independently of the RTL: a load miss takes the lowest invalid
// way, else the first unlocked way from the set's pointer, else the pointer's way;
// in collision mode an LP fill over a valid HP line stores the victim's low tag bits
// and an HP fill whose low tag bits equal the set's entry is locked; in HPAL mode an
// HP fill is locked. Stores never allocate. access() returns what should happen.
// mem_word() gives the initial content of the next memory level.
package cc_ref_pkg;

  typedef struct {
    bit hit;
    bit lp_evicts_hp;
    bit ct_write;
    bit relock;
    bit forced;
    bit hpal_lock;
    int way;
  } ref_result_t;

  function automatic int unsigned mem_word(int unsigned addr);
    int unsigned a = addr & ~32'h3;
    return (a * 32'h9E37_79B1) ^ 32'h5A5A_1234 ^ (a >> 7);
  endfunction

  class cc_ref_model;
    int sets, ways, off_w, idx_w, ct_w;
    bit          valid [][];
    int unsigned tag   [][];
    bit          lock  [][];
    bit          hpb   [][];
    int unsigned ct    [];
    int          rr    [];

    function new(int sets_, int ways_, int line_bytes, int ct_w_);
      sets = sets_; ways = ways_; ct_w = ct_w_;
      off_w = $clog2(line_bytes); idx_w = $clog2(sets_);
      valid = new[sets]; tag = new[sets]; lock = new[sets]; hpb = new[sets];
      ct = new[sets]; rr = new[sets];
      foreach (valid[s]) begin
        valid[s] = new[ways]; tag[s] = new[ways]; lock[s] = new[ways]; hpb[s] = new[ways];
        foreach (valid[s][w]) begin
          valid[s][w] = 0; tag[s][w] = 0; lock[s][w] = 0; hpb[s][w] = 0;
        end
        ct[s] = 0; rr[s] = 0;
      end
    endfunction

    function int unsigned ct_mask();
      return (ct_w >= 32) ? 32'hFFFF_FFFF : ((32'd1 << ct_w) - 1);
    endfunction

    // mode: 0 collision (bit vector / tag), 1 HPAL
    function ref_result_t access(bit we, int unsigned addr, bit hp, bit mode);
      ref_result_t r;
      int s = int'((addr >> off_w) & ((1 << idx_w) - 1));
      int unsigned t = addr >> (off_w + idx_w);
      int v = -1;
      r = '{default: 0};
      r.way = -1;
      for (int w = 0; w < ways; w++)
        if (valid[s][w] && tag[s][w] == t) begin r.hit = 1; r.way = w; end
      if (r.hit || we) return r;
      for (int w = 0; w < ways && v < 0; w++) if (!valid[s][w]) v = w;
      if (v < 0) for (int k = 0; k < ways && v < 0; k++)
        if (!lock[s][(rr[s] + k) % ways]) v = (rr[s] + k) % ways;
      if (v < 0) begin v = rr[s]; r.forced = 1; end
      r.way = v;
      r.lp_evicts_hp = !hp && valid[s][v] && hpb[s][v];
      if (mode == 0) begin
        r.relock = hp && ((t & ct_mask()) == ct[s]);
        if (r.lp_evicts_hp) begin
          r.ct_write = 1;
          ct[s] = tag[s][v] & ct_mask();
        end
        lock[s][v] = r.relock;
      end else begin
        r.hpal_lock = hp;
        lock[s][v] = hp;
      end
      hpb[s][v] = hp;
      valid[s][v] = 1;
      tag[s][v] = t;
      rr[s] = (v + 1) % ways;
      return r;
    endfunction
  endclass

endpackage
