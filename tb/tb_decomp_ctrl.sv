// tb_decomp_ctrl: runs test cubes in bypass, extra-shift and serial mode,
// with idle clocks inside cubes, back-to-back cubes and surplus slices, and
// checks every output against the per-cube slice count. The load must take
// exactly CHAIN_LENGTH slices in bypass mode, CHAIN_LENGTH + r with extra
// shifts and CHAIN_LENGTH * n/b in serial mode.
module tb_decomp_ctrl;
  import ldse_pkg::*;
  localparam int R   = SLICE_REGS;
  localparam int L   = CHAIN_LENGTH;
  localparam int SER = CHAIN_LENGTH * ((SCAN_CHAINS + TESTER_CHANNELS - 1) / TESTER_CHANNELS);

  logic clk = 0, rst_n = 0, cube_start = 0, slice_valid = 0, serial_mode = 0;
  preload_mode_e preload_mode = PRELOAD_BYPASS;
  logic bypass, regs_shift, regs_clear, chain_shift, load_done;
  int checks = 0, failures = 0;
  int n_mode[3] = '{0, 0, 0};
  int n_idle = 0, n_b2b = 0, n_surplus = 0;

  decomp_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cube = 0; cube < 40; cube++) begin
      automatic int mode = (cube < 3) ? cube : int'($urandom % 3);  // 0 bypass, 1 extra, 2 serial
      automatic int need = (mode == 0) ? L : (mode == 1) ? L + R : SER;
      automatic int total = need + (($urandom % 5 == 0) ? 1 : 0);
      automatic int shifts = 0, done_at = -1;
      n_mode[mode]++;
      if (total > need) n_surplus++;
      if (($urandom % 3) == 0 && cube > 0) begin
        repeat (1 + $urandom % 3) @(negedge clk);
      end else if (cube > 0) n_b2b++;
      for (int k = 0; k < total; k++) begin
        // optional idle clocks inside the cube
        while (k > 0 && ($urandom % 8) == 0) begin
          @(negedge clk);
          slice_valid = 0;
          cube_start  = 0;
          #1;
          check(!chain_shift && !load_done && !regs_shift, "activity on idle clock");
          n_idle++;
        end
        @(negedge clk);
        slice_valid  = 1;
        cube_start   = (k == 0);
        serial_mode  = (mode == 2);
        preload_mode = (mode == 1) ? PRELOAD_EXTRA_SHIFT : PRELOAD_BYPASS;
        #1;
        check(regs_clear == (k == 0), "regs_clear");
        check(regs_shift == (mode != 2), "regs_shift");
        check(bypass == (mode == 0 && k < R), $sformatf("bypass mode %0d k %0d", mode, k));
        check(chain_shift == ((mode == 1) ? (k >= R && k < need) : (k < need)),
              $sformatf("chain_shift mode %0d k %0d", mode, k));
        check(load_done == (k == need - 1), $sformatf("load_done mode %0d k %0d", mode, k));
        if (chain_shift) shifts++;
        if (load_done) done_at = k + 1;
      end
      check(shifts == ((mode == 2) ? SER : L), $sformatf("cube %0d shifted %0d times", cube, shifts));
      check(done_at == need, $sformatf("cube %0d load took %0d slices, expected %0d", cube, done_at, need));
      @(negedge clk);
      slice_valid = 0;
      cube_start  = 0;
    end
    check(n_mode[0] > 0 && n_mode[1] > 0 && n_mode[2] > 0 && n_idle > 0 && n_b2b > 0 && n_surplus > 0,
          "a mechanism was never exercised");
    $display("modes %0d/%0d/%0d idle %0d back-to-back %0d surplus %0d", n_mode[0], n_mode[1], n_mode[2], n_idle, n_b2b, n_surplus);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
