// Reference models used by the testbenches, written independently of the RTL
// as plain integer arithmetic over whole arrays.
package tb_ref_pkg;

  // Laplacian test of bin i of a histogram, bins outside count as 0.
  function automatic bit lap_inf(input int unsigned h[], input int i, input int offset);
    longint l, r, c;
    c = h[i];
    l = (i > 0) ? h[i-1] : 0;
    r = (i < h.size() - 1) ? h[i+1] : 0;
    return (2 * c) > (l + r + offset);
  endfunction

  // Boundaries of an informative mask: for every run of non-informative bins
  // that lies between two informative bins, the first bin with the lowest count.
  function automatic void find_bounds(input int unsigned h[], input bit inf[],
                                      output int bq[$]);
    int i, j, k, best;
    int first_inf;
    bq = {};
    first_inf = -1;
    foreach (inf[n]) if (inf[n] && first_inf < 0) first_inf = n;
    if (first_inf < 0) return;
    i = first_inf;
    while (i < inf.size()) begin
      if (inf[i]) begin i++; continue; end
      j = i;
      while (j < inf.size() && !inf[j]) j++;
      if (j < inf.size()) begin
        best = i;
        for (k = i; k < j; k++) if (h[k] < h[best]) best = k;
        bq.push_back(best);
      end
      i = j;
    end
  endfunction

  // Region of a feature: number of kept boundaries at or below it. Only the
  // last nb boundaries found are kept.
  function automatic int region(input int feat, input int bq[$], input int nb);
    int n, lo;
    n  = 0;
    lo = (bq.size() > nb) ? bq.size() - nb : 0;
    for (int k = lo; k < bq.size(); k++) if (feat >= bq[k]) n++;
    return n;
  endfunction

  // Grid proximity: returns -1 if not a candidate, else the number of
  // adjacent axes.
  function automatic int grid_dist(input int ap, ah, bp, bh);
    int dp, dh;
    dp = (ap > bp) ? ap - bp : bp - ap;
    dh = (ah > bh) ? ah - bh : bh - ah;
    if (dp > 1 || dh > 1) return -1;
    return dp + dh;
  endfunction

  // Cluster CAM: usefulness 0 free, 1 outlier, 2 weak, 3 strong.
  class cam_model;
    int st[8];
    int cp[8], ch[8];
    function new(); foreach (st[i]) begin st[i] = 0; cp[i] = 0; ch[i] = 0; end endfunction
    // training step; returns 1 when a new cluster was created
    function int train(input int p, h, input bit infm, input bit leak);
      automatic int hit_i = -1, free_i = -1;
      for (int i = 0; i < 8; i++) begin
        if (st[i] != 0 && cp[i] == p && ch[i] == h) hit_i = i;
        if (st[i] == 0 && free_i < 0) free_i = i;
      end
      for (int i = 0; i < 8; i++) begin
        if (leak) begin if (st[i] > 0) st[i]--; end
        else if (infm && i == hit_i && st[i] < 3) st[i]++;
      end
      if (infm && hit_i < 0 && free_i >= 0) begin
        st[free_i] = 1; cp[free_i] = p; ch[free_i] = h; return 1;
      end
      return 0;
    endfunction
    // sorting: closest occupied cluster (lowest index on ties), -1 if none
    function int sort(input int p, h);
      automatic int best = -1, bd = 9, d;
      for (int i = 0; i < 8; i++) if (st[i] != 0) begin
        d = grid_dist(p, h, cp[i], ch[i]);
        if (d >= 0 && d < bd) begin bd = d; best = i; end
      end
      return best;
    endfunction
    function int occ();
      automatic int m = 0;
      for (int i = 0; i < 8; i++) if (st[i] != 0) m |= (1 << i);
      return m;
    endfunction
  endclass

endpackage
