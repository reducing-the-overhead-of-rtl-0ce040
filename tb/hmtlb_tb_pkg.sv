// hmtlb_tb_pkg: reference model and page table for the hybrid mapped TLB
// testbenches.
//
// hmtlb_model keeps its own copy of the master table (direct mapped) and the
// slave table (fully associative, recency kept as an ordered list of ways,
// most recent first) and predicts the outcome of each access: master hit,
// slave hit (the two entries change places) or miss in both (the reloaded
// translation goes to the master, the displaced master entry to the slave:
// into the way already holding that page, else the lowest empty way, else
// the least recently used way). pt_rpn is the page table the testbenches
// reload from: a fixed scrambling of the virtual page number.
package hmtlb_tb_pkg;

  typedef enum int {OUT_MASTER = 0, OUT_SLAVE = 1, OUT_MISS = 2} outcome_e;

  function automatic longint unsigned pt_rpn(longint unsigned vpn, int rpn_w);
    longint unsigned h;
    h = (vpn * 64'd40503) ^ (vpn >> 3) ^ 64'h5a5;
    return h & ((64'd1 << rpn_w) - 1);
  endfunction

  // Master index computed from the instruction fields: bit j of the index is
  // the parity of every bit k of {reg_id, off} with k mod idx_w == j.
  function automatic int ls_index(int unsigned reg_id, int unsigned off,
                                  int reg_w, int off_w, int idx_w);
    longint unsigned cat;
    int idx;
    cat = (longint'(reg_id) << off_w) | longint'(off);
    idx = 0;
    for (int k = 0; k < reg_w + off_w; k++)
      if (cat[k]) idx = idx ^ (1 << (k % idx_w));
    return idx;
  endfunction

  class hmtlb_model;
    int m_n, s_n;
    bit              mval[];
    longint unsigned mvpn[];
    bit              sval[];
    longint unsigned svpn[];
    int              order[$];   // slave ways, most recently written first
    // statistics of the data-movement mechanisms
    int n_swap, n_insert, n_evict, n_dup;

    function new(int m_n, int s_n);
      this.m_n = m_n;
      this.s_n = s_n;
      mval = new[m_n];
      mvpn = new[m_n];
      sval = new[s_n];
      svpn = new[s_n];
      // after reset way s_n-1 is most recent and way 0 least recent
      for (int w = s_n - 1; w >= 0; w--) order.push_back(w);
    endfunction

    function void touch(int w);
      foreach (order[i]) if (order[i] == w) begin order.delete(i); break; end
      order.push_front(w);
    endfunction

    function outcome_e access(int idx, longint unsigned vpn);
      int hitw;
      if (mval[idx] && mvpn[idx] == vpn) return OUT_MASTER;
      hitw = -1;
      for (int w = 0; w < s_n; w++) if (sval[w] && svpn[w] == vpn) hitw = w;
      if (hitw >= 0) begin
        // swap; a displaced page already held elsewhere in the slave is
        // dropped and the vacated way left empty
        bit dup;
        dup = 0;
        for (int w = 0; w < s_n; w++) if (w != hitw && sval[w] && svpn[w] == mvpn[idx]) dup = 1;
        if (mval[idx] && dup) n_dup++;
        sval[hitw] = mval[idx] && !dup;
        svpn[hitw] = mvpn[idx];
        if (mval[idx] && !dup) touch(hitw);
        mval[idx] = 1;
        mvpn[idx] = vpn;
        n_swap++;
        return OUT_SLAVE;
      end
      if (mval[idx]) begin
        int w;
        w = -1;
        for (int i = 0; i < s_n; i++) if (sval[i] && svpn[i] == mvpn[idx]) w = i;
        if (w >= 0) n_dup++;
        if (w < 0) for (int i = s_n - 1; i >= 0; i--) if (!sval[i]) w = i;
        if (w < 0) begin w = order[$]; n_evict++; end
        sval[w] = 1;
        svpn[w] = mvpn[idx];
        touch(w);
        n_insert++;
      end
      mval[idx] = 1;
      mvpn[idx] = vpn;
      return OUT_MISS;
    endfunction
  endclass

endpackage
