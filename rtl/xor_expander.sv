// xor_expander: q-input XOR expansion network from a domain of free-variable
// inputs to the scan-chain inputs, one XOR gate per chain.
//
// Used twice in the decompressor. As the sequential network its domain is
// the current tester slice plus the r stored tester slices (b*(r+1) inputs);
// as the bypass network its domain is the current tester slice alone.
//
// The connections are the result of the greedy synthesis procedure, run here
// as a constant function while the design is elaborated:
//   1. enumerate all C(DOMAIN, GATE_IN) input combinations, lexicographically;
//   2. for each chain in turn, take the unused combination whose inputs have
//      so far fed the fewest gates in total (sum of the per-input use counts),
//      mark it used and build the chain's gate from it;
//   3. once every combination is used, the remaining chains share the
//      existing gates: chain i takes the gate of chain (i mod combinations),
//      so fanouts differ by at most one.
// Ties in step 2 are broken in two steps. First preference goes to a
// combination whose shape is new, the shape being the combination moved in
// time so that its newest input lies in the current slice (inputs d and
// d + SLICE_W are the same channel one clock apart). Two gates of the same
// shape drive identical functions one or more clocks apart, which makes
// cells linearly dependent. After that the lexicographically first
// combination wins. The tie-break, and the sum as the measure of
// "collective" use, are this design's reading of the procedure.
//
// Static reconfiguration: configuration c relabels the domain with the
// permutation x -> (x * m_c) mod DOMAIN, m_c being the (c+1)-th integer
// coprime with DOMAIN (1, 5, 7, 11 for a 24-input domain). Configuration 0 is
// the plain synthesis result. How the alternative configurations differ is
// this design's own choice. `cfg` must be held for a whole test cube.
//
// Interface: purely combinational, chain_in[i] = XOR of GATE_IN domain bits.
module xor_expander
  import ldse_pkg::*;
#(
  parameter int unsigned DOMAIN  = TESTER_CHANNELS * (SLICE_REGS + 1),
  parameter int unsigned SLICE_W = TESTER_CHANNELS,   // domain bits per clock of age
  parameter int unsigned CHAINS  = SCAN_CHAINS,
  parameter int unsigned GATE_IN = GATE_INPUTS,
  parameter int unsigned CONFIGS = NUM_CONFIGS
) (
  input  logic [DOMAIN-1:0]                          domain,
  input  logic [(CONFIGS > 1 ? $clog2(CONFIGS) : 1)-1:0] cfg,
  output logic [CHAINS-1:0]                          chain_in
);

  localparam int unsigned IW    = (DOMAIN > 1) ? $clog2(DOMAIN) : 1;
  localparam int unsigned NCOMB = n_choose_k(DOMAIN, GATE_IN);

  typedef logic [GATE_IN-1:0][IW-1:0] comb_t;
  typedef comb_t [CHAINS-1:0]         conn_t;
  typedef conn_t [CONFIGS-1:0]        conn_all_t;

  localparam int unsigned CODES = DOMAIN ** GATE_IN;  // used-flag space

  // Greedy synthesis. Per chain, the search looks for an unused combination
  // of minimum cost, preferring a new shape, then lexicographic order. It
  // tries target costs from the smallest conceivable one upward and, within
  // one target, walks the combinations in lexicographic order, skipping
  // every subtree whose prefix cost already exceeds the target: first
  // accepting only new shapes, then any. The result is the same as scanning
  // all combinations, at a small fraction of the evaluation effort.
  function automatic conn_t synth_conn();
    conn_t            t;
    int unsigned      uses [DOMAIN];
    logic [CODES-1:0] used;
    logic [CODES-1:0] shape_used;
    int unsigned      scode, amin;
    comb_t            cur, best;
    int unsigned      umin, lb, target, pre, code, pick;
    logic [IW-1:0]    cnt;
    logic             found, walking, pruned, adv;
    int               prune_k;
    logic [DOMAIN-1:0] taken;
    t    = '0;
    used = 0;
    shape_used = 0;
    best = '0;
    cur  = '0;
    for (int d = 0; d < int'(DOMAIN); d++) uses[d] = 0;
    for (int n = 0; n < int'(CHAINS); n++) begin
      if (n < int'(NCOMB)) begin
        // Lower bound: sum of the GATE_IN smallest use counts.
        umin = 32'hFFFF_FFFF;
        for (int d = 0; d < int'(DOMAIN); d++) if (uses[d] < umin) umin = uses[d];
        taken = '0;
        lb    = 0;
        for (int k = 0; k < int'(GATE_IN); k++) begin
          pick = 32'hFFFF_FFFF;
          cnt  = '0;
          for (int d = 0; d < int'(DOMAIN); d++)
            if (!taken[d] && uses[d] < pick) begin
              pick = uses[d];
              cnt  = IW'(d);
            end
          taken[cnt] = 1'b1;
          lb = lb + pick;
        end
        found  = 1'b0;
        target = lb;
        for (int ph = 0; ph < 512; ph++) begin
          if (!found) begin
            for (int k = 0; k < int'(GATE_IN); k++) cur[k] = IW'(k);
            walking = 1'b1;
            for (int h = 0; h < 256; h++) begin
              if (walking && !found) begin
                for (int l = 0; l < 64; l++) begin
                  if (walking && !found) begin
                    // First position whose prefix cost rules the subtree out.
                    pre     = 0;
                    prune_k = -1;
                    for (int k = 0; k < int'(GATE_IN); k++) begin
                      pre = pre + uses[cur[k]];
                      if (prune_k < 0 &&
                          pre + (GATE_IN - 1 - k) * umin > target) prune_k = k;
                    end
                    pruned = (prune_k >= 0);
                    if (!pruned) begin
                      code = 0;
                      for (int k = int'(GATE_IN) - 1; k >= 0; k--)
                        code = code * DOMAIN + int'(cur[k]);
                      // Shape: the combination moved in time so that its
                      // newest input is in the current slice.
                      amin = DOMAIN;
                      for (int k = 0; k < int'(GATE_IN); k++)
                        if (int'(cur[k]) / SLICE_W < amin) amin = int'(cur[k]) / SLICE_W;
                      scode = 0;
                      for (int k = int'(GATE_IN) - 1; k >= 0; k--)
                        scode = scode * DOMAIN + (int'(cur[k]) - amin * SLICE_W);
                      if (!used[code] && (ph[0] || !shape_used[scode])) begin
                        found = 1'b1;
                        best  = cur;
                        used[code] = 1'b1;
                        shape_used[scode] = 1'b1;
                      end
                      prune_k = int'(GATE_IN) - 1;
                    end
                    // Advance to the next combination differing at a
                    // position <= prune_k.
                    if (!found) begin
                      adv = 1'b0;
                      for (int j = int'(GATE_IN) - 1; j >= 0; j--) begin
                        if (!adv && j <= prune_k &&
                            int'(cur[j]) < int'(DOMAIN) - int'(GATE_IN) + j) begin
                          cur[j] = cur[j] + 1'b1;
                          for (int i = j + 1; i < int'(GATE_IN); i++)
                            cur[i] = cur[i-1] + 1'b1;
                          adv = 1'b1;
                        end
                      end
                      if (!adv) walking = 1'b0;
                    end
                  end
                end
              end
            end
            // Even phases admit only new shapes, odd phases any shape;
            // then the target cost goes up.
            if (ph[0]) target = target + 1;
          end
        end
        for (int k = 0; k < int'(GATE_IN); k++) uses[best[k]] = uses[best[k]] + 1;
        t[n] = best;
      end else begin
        t[n] = t[n % int'(NCOMB)];
      end
    end
    return t;
  endfunction

  function automatic conn_all_t build_all();
    conn_all_t   a;
    conn_t       base;
    int unsigned m;
    base = synth_conn();
    for (int c = 0; c < int'(CONFIGS); c++) begin
      m = cfg_multiplier(c, DOMAIN);
      for (int n = 0; n < int'(CHAINS); n++)
        for (int k = 0; k < int'(GATE_IN); k++)
          a[c][n][k] = IW'((int'(base[n][k]) * m) % DOMAIN);
    end
    return a;
  endfunction

  localparam conn_all_t CONN = build_all();

  // Input mask of chain n's gate in configuration c.
  function automatic logic [DOMAIN-1:0] gate_mask(int c, int n);
    logic [DOMAIN-1:0] m;
    m = '0;
    for (int k = 0; k < int'(GATE_IN); k++) m[CONN[c][n][k]] = 1'b1;
    return m;
  endfunction

  logic [CONFIGS-1:0][CHAINS-1:0] cfg_out;

  for (genvar c = 0; c < int'(CONFIGS); c++) begin : g_cfg
    for (genvar n = 0; n < int'(CHAINS); n++) begin : g_chain
      localparam logic [DOMAIN-1:0] MASK = gate_mask(c, n);
      assign cfg_out[c][n] = ^(domain & MASK);
    end
  end

  always_comb begin
    chain_in = cfg_out[0];
    for (int c = 1; c < int'(CONFIGS); c++)
      if (int'(cfg) == c) chain_in = cfg_out[c];
  end

endmodule
