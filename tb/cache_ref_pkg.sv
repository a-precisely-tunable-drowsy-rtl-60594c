// cache_ref_pkg: reference model of one drowsy cache level, for the
// testbenches.
//
// cache_ref tracks, for a cache of the given size, associativity, line size
// and RD, which lines are present (tags, valid and dirty bits, LRU way
// order, invalid ways filled first) and which frames are awake (the RD most
// recently used frames). access() applies one access and reports whether it
// hit, whether the line it touched was drowsy, and whether a dirty line had
// to be written back (with that line's address). It models no data and no
// timing; the testbenches derive the expected latency from its answers.
package cache_ref_pkg;

  class cache_ref;
    int unsigned sets, ways, line_bytes, rd;
    bit          valid[];
    bit          dirty[];
    int unsigned tag[];
    int unsigned age[];
    int unsigned awake[$];       // frames, most recently used first
    int unsigned n_hit, n_drowsy, n_miss, n_sleep, n_wb;

    function new(int unsigned size_bytes, int unsigned n_ways, int unsigned lb, int unsigned n_rd);
      ways = n_ways;
      line_bytes = lb;
      rd = n_rd;
      sets = size_bytes / lb / n_ways;
      valid = new[sets * ways];
      dirty = new[sets * ways];
      tag = new[sets * ways];
      age = new[sets * ways];
      foreach (valid[i]) begin
        valid[i] = 1'b0;
        dirty[i] = 1'b0;
        tag[i] = 0;
        age[i] = i % ways;
      end
      n_hit = 0; n_drowsy = 0; n_miss = 0; n_sleep = 0; n_wb = 0;
    endfunction

    function bit is_awake(int unsigned frame);
      int idx[$];
      idx = awake.find_first_index(x) with (x == frame);
      return idx.size() != 0;
    endfunction

    function void access(input int unsigned addr, input bit we,
                         output bit hit, output bit drowsy,
                         output bit wb, output int unsigned wb_addr);
      int unsigned set = (addr / line_bytes) % sets;
      int unsigned t = addr / line_bytes / sets;
      int way = -1;
      int unsigned base = set * ways;
      int unsigned frame;
      int idx[$];
      wb = 1'b0;
      wb_addr = 0;
      drowsy = 1'b0;
      for (int i = 0; i < ways; i++)
        if (valid[base + i] && tag[base + i] == t) way = i;
      hit = (way >= 0);
      if (hit) begin
        n_hit++;
        drowsy = !is_awake(base + way);
        if (drowsy) n_drowsy++;
        if (we) dirty[base + way] = 1'b1;
      end else begin
        n_miss++;
        for (int i = ways - 1; i >= 0; i--) if (!valid[base + i]) way = i;
        if (way < 0)
          for (int i = 0; i < ways; i++) if (age[base + i] == ways - 1) way = i;
        if (valid[base + way] && dirty[base + way]) begin
          wb = 1'b1;
          wb_addr = (tag[base + way] * sets + set) * line_bytes;
          n_wb++;
        end
        valid[base + way] = 1'b1;
        tag[base + way] = t;
        dirty[base + way] = we;
      end
      for (int i = 0; i < ways; i++)
        if (i != way && age[base + i] < age[base + way]) age[base + i]++;
      age[base + way] = 0;
      frame = base + way;
      idx = awake.find_first_index(x) with (x == frame);
      if (idx.size() != 0) awake.delete(idx[0]);
      awake.push_front(frame);
      if (awake.size() > rd) begin
        void'(awake.pop_back());
        n_sleep++;
      end
    endfunction
  endclass

endpackage
