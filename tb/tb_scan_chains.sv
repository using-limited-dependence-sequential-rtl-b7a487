// tb_scan_chains: shifts random parallel data and, in serial mode, random
// tester data through the 80 x 100 scan chains, captures random responses,
// and compares cells and scan-outs with an array model on every clock.
module tb_scan_chains;
  import ldse_pkg::*;
  localparam int N = SCAN_CHAINS;
  localparam int L = CHAIN_LENGTH;
  localparam int B = TESTER_CHANNELS;

  logic clk = 0, shift = 0, serial_mode = 0, capture = 0;
  logic [N-1:0] par_in = '0;
  logic [B-1:0] serial_in = '0;
  logic [N-1:0][L-1:0] capture_data = '0, cells, model;
  logic [N-1:0] scan_out;
  int checks = 0, failures = 0;
  int n_par = 0, n_ser = 0, n_cap = 0, n_hold = 0;

  scan_chains dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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
    // Fill both the model and the chains with a known pattern first.
    for (int t = 0; t < 3000; t++) begin
      automatic int phase = t / 1000;  // 0: parallel, 1: serial, 2: mixed
      @(negedge clk);
      shift       = (t < L) ? 1'b1 : (($urandom % 8) != 0);
      serial_mode = (phase == 1) || (phase == 2 && ($urandom % 2));
      capture     = (t >= L) && (($urandom % 50) == 0);
      for (int i = 0; i < N; i++) par_in[i] = $urandom;
      serial_in = B'($urandom);
      for (int i = 0; i < N; i++) for (int j = 0; j < L; j++) capture_data[i][j] = $urandom;
      #1;
      if (t >= L) for (int i = 0; i < N; i++) check(scan_out[i] == model[i][L-1], "scan_out");
      @(posedge clk);
      if (shift) begin
        automatic logic [N-1:0][L-1:0] nxt;
        for (int i = 0; i < N; i++) begin
          automatic logic b = serial_mode ? ((i < B) ? serial_in[i] : model[i-B][L-1]) : par_in[i];
          nxt[i] = {model[i][L-2:0], b};
        end
        model = nxt;
        if (serial_mode) n_ser++; else n_par++;
      end else if (capture) begin
        model = capture_data;
        n_cap++;
      end else n_hold++;
      #1;
      if (t >= L - 1) check(cells == model, $sformatf("cells differ at t=%0d", t));
    end
    check(n_par > 0 && n_ser > 0 && n_cap > 0 && n_hold > 0, "a mode was never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
