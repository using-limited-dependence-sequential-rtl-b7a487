// tb_ldse_decompressor: drives test cubes of random tester slices through
// the decompressor in both preload modes, all configurations and serial
// mode, with idle clocks inside cubes. A reference model keeps the cube's
// slice history and computes each chain's bit from the brute-force
// connection tables: bypass table for the first r slices in bypass mode,
// sequential table otherwise (slice s-j for domain block j). Checks
// chain_in on every chain shift, the shift/bypass flags and the load length.
module tb_ldse_decompressor;
  import ldse_pkg::*;
  import ldse_ref_pkg::*;
  localparam int B = TESTER_CHANNELS;
  localparam int N = SCAN_CHAINS;
  localparam int R = SLICE_REGS;
  localparam int Q = GATE_INPUTS;
  localparam int C = NUM_CONFIGS;
  localparam int L = CHAIN_LENGTH;
  localparam int SER = L * ((N + B - 1) / B);

  logic clk = 0, rst_n = 0;
  logic [B-1:0] tester_slice = '0;
  logic slice_valid = 0, cube_start = 0, serial_mode = 0;
  logic [$clog2(C)-1:0] cfg = '0;
  preload_mode_e preload_mode = PRELOAD_BYPASS;
  logic [N-1:0] chain_in;
  logic chain_shift, load_done, bypass_active;
  int checks = 0, failures = 0;
  tbl_t seq_t[C], byp_t[C];
  int n_byp = 0, n_extra = 0, n_serial = 0, n_cfg[C];

  ldse_decompressor dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  initial begin
    for (int c = 0; c < C; c++) begin
      seq_t[c] = ref_table(B * (R + 1), N, Q, c, B);
      byp_t[c] = ref_table(B, N, Q, c, B);
      n_cfg[c] = 0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cube = 0; cube < 30; cube++) begin
      automatic int mode = (cube < 3) ? cube : int'($urandom % 3);
      automatic int c = cube % C;
      automatic int need = (mode == 0) ? L : (mode == 1) ? L + R : SER;
      automatic logic [B-1:0] hist[$];
      automatic int shifts = 0, dones = 0;
      n_cfg[c]++;
      if (mode == 0) n_byp++; else if (mode == 1) n_extra++; else n_serial++;
      for (int k = 0; k < need; k++) begin
        if (k > 0 && ($urandom % 10) == 0) begin
          @(negedge clk);
          slice_valid = 0;
          cube_start  = 0;
          tester_slice = B'($urandom);
          cfg = $clog2(C)'($urandom);   // may change while idle
          #1;
          check(!chain_shift && !bypass_active, "activity on idle clock");
        end
        @(negedge clk);
        slice_valid  = 1;
        cube_start   = (k == 0);
        cfg          = c[$clog2(C)-1:0];
        serial_mode  = (mode == 2);
        preload_mode = (mode == 1) ? PRELOAD_EXTRA_SHIFT : PRELOAD_BYPASS;
        tester_slice = B'($urandom);
        hist.push_back(tester_slice);
        #1;
        check(bypass_active == (mode == 0 && k < R), $sformatf("bypass_active k=%0d", k));
        check(chain_shift == (mode != 1 || k >= R), $sformatf("chain_shift k=%0d", k));
        if (chain_shift) shifts++;
        if (load_done) dones++;
        check(load_done == (k == need - 1), $sformatf("load_done k=%0d", k));
        if (mode != 2 && chain_shift) begin
          for (int i = 0; i < N; i++) begin
            automatic bit e = 0;
            if (mode == 0 && k < R) begin
              for (int q = 0; q < Q; q++) e ^= hist[k][byp_t[c][i*Q+q]];
            end else begin
              for (int q = 0; q < Q; q++) begin
                automatic int d = seq_t[c][i*Q+q];
                e ^= hist[k - d / B][d % B];
              end
            end
            check(chain_in[i] == e, $sformatf("cube %0d mode %0d cfg %0d slice %0d chain %0d", cube, mode, c, k, i));
          end
        end
      end
      check(shifts == ((mode == 2) ? SER : L) && dones == 1, $sformatf("cube %0d: %0d shifts, %0d done", cube, shifts, dones));
      if ($urandom % 2) begin
        @(negedge clk);
        slice_valid = 0;
        cube_start  = 0;
      end
    end
    foreach (n_cfg[c]) check(n_cfg[c] > 0, "configuration never used");
    check(n_byp > 0 && n_extra > 0 && n_serial > 0, "mode never used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
