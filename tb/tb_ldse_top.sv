// tb_ldse_top: end-to-end test of the decompression path at its default
// sizes (8 channels, 80 chains of 100 cells, 2 slice registers, 3-input
// XORs, 4 configurations).
//
// For each test cube a random set of care bits is drawn (0.5 % to 10 % of
// the 8000 cells). The cube is encoded as the tester would: every care bit
// gives one linear equation over GF(2) in the cube's free variables (8 per
// tester slice), built from a brute-force model of the connection tables,
// and the system is solved by Gauss-Jordan elimination with the free
// unknowns set at random. An encodable cube is applied in bypass or
// extra-shift mode; a cube with no solution is applied in serial mode
// straight from the tester. After each load every care bit is checked, and
// the whole scan-cell array is compared with the model's expansion of the
// applied free variables. Responses captured after a load are checked on
// scan_out while the next cube shifts in. Idle clocks inside a cube and
// back-to-back cubes are mixed in, and the load length in slices is
// checked. Every mechanism must occur at least once.
module tb_ldse_top;
  import ldse_pkg::*;
  import ldse_ref_pkg::*;
  localparam int B = TESTER_CHANNELS;
  localparam int N = SCAN_CHAINS;
  localparam int L = CHAIN_LENGTH;
  localparam int R = SLICE_REGS;
  localparam int Q = GATE_INPUTS;
  localparam int C = NUM_CONFIGS;
  localparam int SER = L * ((N + B - 1) / B);
  localparam int NV = (L + R) * B;       // free variables of one cube at most
  localparam int CUBES = 36;

  typedef bit [NV-1:0] vec_t;

  logic clk = 0, rst_n = 0;
  logic [B-1:0] tester_slice = '0;
  logic slice_valid = 0, cube_start = 0, preload_mode = 0, serial_mode = 0, capture = 0;
  logic [$clog2(C)-1:0] cfg = '0;
  logic [N-1:0][L-1:0] capture_data = '0, scan_cells;
  logic [N-1:0] scan_out;
  logic load_done, bypass_active, chain_shift;

  int checks = 0, failures = 0;
  tbl_t seq_t[C], byp_t[C];
  // mechanism counters
  int n_bypass_cubes = 0, n_extra_cubes = 0, n_serial_cubes = 0, n_bypass_clk = 0;
  int n_cfg[C], n_idle = 0, n_b2b = 0, n_capture = 0, n_scanout = 0;
  int enc_ok[int], enc_tried[int];

  ldse_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (CUBES * (SER + 200)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t: %s", $time, msg);
    end
  endtask

  // Free variables feeding chain i on tester slice s (s counted from the
  // cube's first slice).
  function automatic vec_t cell_vars(int i, int s, int c, bit extra);
    vec_t v = '0;
    if (!extra && s < R) begin
      for (int q = 0; q < Q; q++) v[s * B + byp_t[c][i*Q+q]] ^= 1'b1;
    end else begin
      for (int q = 0; q < Q; q++) begin
        automatic int d = seq_t[c][i*Q+q];
        v[(s - d / B) * B + d % B] ^= 1'b1;
      end
    end
    return v;
  endfunction

  // Drive one cube's slices; returns the number of slices until load_done.
  task automatic apply(logic [B-1:0] slices[$], bit extra, bit serial, int c,
                       bit cap_pending, logic [N-1:0][L-1:0] cap, output int took);
    automatic int shifts = 0;
    took = -1;
    for (int k = 0; k < slices.size(); k++) begin
      if (k > 0 && ($urandom % 16) == 0) begin
        @(negedge clk);
        slice_valid = 0;
        cube_start  = 0;
        #1;
        check(!chain_shift, "chains shifted on an idle clock");
        n_idle++;
      end
      @(negedge clk);
      slice_valid  = 1;
      cube_start   = (k == 0);
      tester_slice = slices[k];
      cfg          = c[$clog2(C)-1:0];
      preload_mode = extra;
      serial_mode  = serial;
      #1;
      if (bypass_active) n_bypass_clk++;
      if (chain_shift && !serial && cap_pending && shifts < L) begin
        for (int i = 0; i < N; i++)
          check(scan_out[i] == cap[i][L-1-shifts], $sformatf("scan_out chain %0d shift %0d", i, shifts));
        n_scanout++;
      end
      if (chain_shift) shifts++;
      if (load_done) took = k + 1;
    end
    @(negedge clk);
    slice_valid = 0;
    cube_start  = 0;
  endtask

  initial begin
    automatic int pct_x10[6] = '{5, 10, 20, 40, 80, 100};   // percent * 10
    automatic bit cap_pending = 0;
    automatic logic [N-1:0][L-1:0] cap = '0;
    for (int c = 0; c < C; c++) begin
      seq_t[c] = ref_table(B * (R + 1), N, Q, c, B);
      byp_t[c] = ref_table(B, N, Q, c, B);
      n_cfg[c] = 0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cube = 0; cube < CUBES; cube++) begin
      automatic int c = cube % C;
      automatic bit extra = 1'((cube / C) % 2);
      automatic int pct = pct_x10[cube % 6];
      automatic bit care[N][L], val[N][L];
      automatic vec_t rows[$];
      automatic bit rhs[$];
      automatic int piv[$];
      automatic bit ok = 1;
      automatic vec_t x;
      automatic logic [B-1:0] slices[$];
      automatic int ncare = 0, took, need;
      // draw the cube
      for (int i = 0; i < N; i++)
        for (int p = 0; p < L; p++) begin
          care[i][p] = ($urandom % 1000) < pct;
          val[i][p]  = $urandom;
          if (care[i][p]) ncare++;
        end
      // Gauss-Jordan elimination, one equation per care bit
      for (int i = 0; i < N && ok; i++)
        for (int p = 0; p < L && ok; p++) if (care[i][p]) begin
          automatic int t = L - 1 - p;                 // shift that fills cell p
          automatic vec_t v = cell_vars(i, extra ? t + R : t, c, extra);
          automatic bit r = val[i][p];
          foreach (rows[j]) if (v[piv[j]]) begin
            v ^= rows[j];
            r ^= rhs[j];
          end
          if (v == '0) begin
            if (r) ok = 0;
          end else begin
            automatic int pc = 0;
            while (!v[pc]) pc++;
            foreach (rows[j]) if (rows[j][pc]) begin
              rows[j] ^= v;
              rhs[j]  ^= r;
            end
            rows.push_back(v);
            rhs.push_back(r);
            piv.push_back(pc);
          end
        end
      if (!enc_tried.exists(pct)) begin
        enc_tried[pct] = 0;
        enc_ok[pct] = 0;
      end
      enc_tried[pct]++;
      if (ok) enc_ok[pct]++;
      n_cfg[c]++;
      if (ok) begin
        // solve: random free unknowns, pivots from their rows
        for (int w = 0; w < NV; w++) x[w] = $urandom;
        foreach (piv[j]) x[piv[j]] = 1'b0;
        foreach (piv[j]) x[piv[j]] = rhs[j] ^ (^(rows[j] & x));
        need = extra ? L + R : L;
        for (int s = 0; s < need; s++) slices.push_back(x[s*B +: B]);
        if (extra) n_extra_cubes++; else n_bypass_cubes++;
      end else begin
        // serial mode: chain ch + m*B, cell p is filled by shift SER-1-(m*L+p)
        need = SER;
        for (int s = 0; s < SER; s++) slices.push_back(B'($urandom));
        for (int i = 0; i < N; i++)
          for (int p = 0; p < L; p++) if (care[i][p])
            slices[SER - 1 - ((i / B) * L + p)][i % B] = val[i][p];
        n_serial_cubes++;
      end
      if (!cap_pending && cube > 0) n_b2b++;
      apply(slices, extra, !ok, c, cap_pending, cap, took);
      check(took == need, $sformatf("cube %0d: load took %0d slices, expected %0d", cube, took, need));
      // care bits
      for (int i = 0; i < N; i++)
        for (int p = 0; p < L; p++) if (care[i][p])
          check(scan_cells[i][p] == val[i][p], $sformatf("cube %0d care bit chain %0d cell %0d", cube, i, p));
      // whole array against the model's expansion
      if (ok) begin
        automatic logic [N-1:0][L-1:0] exp_cells;
        for (int i = 0; i < N; i++)
          for (int p = 0; p < L; p++) begin
            automatic int t = L - 1 - p;
            exp_cells[i][p] = ^(cell_vars(i, extra ? t + R : t, c, extra) & x);
          end
        check(scan_cells == exp_cells, $sformatf("cube %0d scan cells differ from the expansion", cube));
      end
      $display("cube %0d cfg %0d %s care %0d (%0d.%0d%%): %s", cube, c, extra ? "extra-shift" : "bypass",
               ncare, pct / 10, pct % 10, ok ? "encoded" : "serial mode");
      // capture responses on some cubes
      // always before a lightly specified cube, which parallel mode can take
      cap_pending = (cube % 6 == 5) || (($urandom % 2) == 1);
      if (cap_pending) begin
        @(negedge clk);
        for (int i = 0; i < N; i++) for (int p = 0; p < L; p++) cap[i][p] = $urandom;
        capture_data = cap;
        capture = 1;
        @(negedge clk);
        capture = 0;
        n_capture++;
        check(scan_cells == cap, "captured responses not in the scan cells");
      end
    end
    foreach (enc_tried[p]) $display("specified %0d.%0d%%: encoded %0d of %0d", p / 10, p % 10, enc_ok[p], enc_tried[p]);
    $display("mechanisms: bypass cubes %0d, bypass clocks %0d, extra-shift cubes %0d, serial cubes %0d, idle %0d, back-to-back %0d, captures %0d, scan-out loads %0d",
             n_bypass_cubes, n_bypass_clk, n_extra_cubes, n_serial_cubes, n_idle, n_b2b, n_capture, n_scanout);
    check(n_bypass_cubes > 0, "no bypass-mode cube");
    check(n_bypass_clk > 0, "bypass network never used");
    check(n_extra_cubes > 0, "no extra-shift cube");
    check(n_serial_cubes > 0, "no serial-mode cube");
    check(n_idle > 0, "no idle clock inside a cube");
    check(n_b2b > 0, "no back-to-back cubes");
    check(n_capture > 0 && n_scanout > 0, "no capture and scan-out");
    foreach (n_cfg[c]) check(n_cfg[c] > 0, $sformatf("configuration %0d never used", c));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
