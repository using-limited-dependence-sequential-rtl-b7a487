// ldse_ref_pkg: reference model used by the testbenches.
//
// Recomputes, at run time and by brute force, the connection tables the
// decompressor should have: all q-input combinations of the domain are
// listed in lexicographic order; each chain takes, among the unused ones of
// smallest total input use, the first whose time-normalised shape is new,
// or else the first one; chains beyond the number of combinations reuse
// gate (i mod combinations). Configuration c relabels input x as
// (x * m_c) mod D with m_c the (c+1)-th positive integer coprime with D.
// Also provides the linear map from a cube's free variables to scan cells.
package ldse_ref_pkg;

  // Flat table: entry [n*q + k] is input k of chain n's gate.
  typedef int unsigned tbl_t[];

  function automatic int unsigned ref_gcd(int unsigned a, int unsigned b);
    while (b != 0) begin
      int unsigned t = a % b;
      a = b;
      b = t;
    end
    return a;
  endfunction

  function automatic int unsigned ref_mult(int unsigned c, int unsigned d);
    int unsigned m = 0, seen = 0;
    while (seen <= c) begin
      m++;
      if (ref_gcd(m, d) == 1) seen++;
    end
    return m;
  endfunction

  // Shape of combination j: its inputs moved in time (w inputs per clock of
  // age) so that the newest one lies in the current slice.
  function automatic string shape_of(int unsigned combos[$], int unsigned j, int unsigned q, int unsigned w);
    int unsigned amin = '1;
    string s = "";
    for (int k = 0; k < q; k++) if (combos[j*q+k] / w < amin) amin = combos[j*q+k] / w;
    for (int k = 0; k < q; k++) s = {s, $sformatf("%0d,", combos[j*q+k] - amin * w)};
    return s;
  endfunction

  function automatic tbl_t ref_table(int unsigned d, int unsigned n, int unsigned q, int unsigned cfg,
                                     int unsigned w);
    tbl_t        t = new[n * q];
    int unsigned combos[$];   // flattened list of combinations
    int unsigned nc, code_max, uses[], m;
    bit          used[];
    bit          shapes[string];
    code_max = 1;
    for (int k = 0; k < q; k++) code_max *= d;
    // Codes counted upward with digit 0 most significant give lexicographic order.
    for (int unsigned code = 0; code < code_max; code++) begin
      int unsigned dig[] = new[q];
      int unsigned x = code;
      bit inc = 1;
      for (int k = q - 1; k >= 0; k--) begin
        dig[k] = x % d;
        x /= d;
      end
      for (int k = 1; k < q; k++) if (dig[k] <= dig[k-1]) inc = 0;
      if (inc) foreach (dig[k]) combos.push_back(dig[k]);
    end
    nc = combos.size() / q;
    uses = new[d];
    used = new[nc];
    foreach (uses[i]) uses[i] = 0;
    foreach (used[i]) used[i] = 0;
    for (int unsigned i = 0; i < n; i++) begin
      if (i < nc) begin
        int unsigned best = 0, best_cost = '1;
        bit          best_new = 0;
        for (int unsigned j = 0; j < nc; j++) begin
          if (!used[j]) begin
            int unsigned cost = 0;
            for (int k = 0; k < q; k++) cost += uses[combos[j*q+k]];
            if (cost < best_cost) best_cost = cost;
          end
        end
        // among the cheapest: first one of a new shape, else the first one
        best = nc;
        for (int unsigned j = 0; j < nc; j++) begin
          if (!used[j]) begin
            int unsigned cost = 0;
            for (int k = 0; k < q; k++) cost += uses[combos[j*q+k]];
            if (cost == best_cost) begin
              bit fresh = !shapes.exists(shape_of(combos, j, q, w));
              if (best == nc || (fresh && !best_new)) begin
                best = j;
                best_new = fresh;
              end
            end
          end
        end
        used[best] = 1;
        shapes[shape_of(combos, best, q, w)] = 1;
        for (int k = 0; k < q; k++) begin
          t[i*q+k] = combos[best*q+k];
          uses[combos[best*q+k]]++;
        end
      end else begin
        for (int k = 0; k < q; k++) t[i*q+k] = t[(i % nc)*q+k];
      end
    end
    m = ref_mult(cfg, d);
    foreach (t[i]) t[i] = (t[i] * m) % d;
    return t;
  endfunction

  // Bit mask of the domain inputs feeding chain i (inputs appearing twice cancel).
  function automatic longint unsigned ref_mask(tbl_t t, int unsigned i, int unsigned q);
    longint unsigned msk = 0;
    for (int k = 0; k < q; k++) msk ^= (64'd1 << t[i*q+k]);
    return msk;
  endfunction

endpackage
