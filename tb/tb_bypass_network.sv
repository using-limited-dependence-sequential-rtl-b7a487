// tb_bypass_network: the bypass network is the expander on the current
// tester slice only (8 inputs, 3-input XORs: 56 combinations for 80 chains).
// Checks every chain's inputs against the reference procedure, that all 56
// combinations are used, that fanout per gate is balanced (1 or 2 chains),
// and random slices bit by bit, for all four configurations.
module tb_bypass_network;
  import ldse_pkg::*;
  import ldse_ref_pkg::*;
  localparam int D = TESTER_CHANNELS;
  localparam int N = SCAN_CHAINS;
  localparam int Q = GATE_INPUTS;
  localparam int C = NUM_CONFIGS;

  logic [D-1:0] domain;
  logic [$clog2(C)-1:0] cfg;
  logic [N-1:0] chain_in;
  int checks = 0, failures = 0;

  xor_expander #(.DOMAIN(D), .CHAINS(N), .GATE_IN(Q), .CONFIGS(C)) dut (.domain, .cfg, .chain_in);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    for (int c = 0; c < C; c++) begin
      automatic tbl_t t = ref_table(D, N, Q, c, D);
      automatic longint unsigned msk[N];
      automatic int fan[longint unsigned];
      foreach (msk[i]) msk[i] = 0;
      cfg = c[$clog2(C)-1:0];
      for (int d = 0; d < D; d++) begin
        domain = '0;
        domain[d] = 1'b1;
        #1;
        for (int i = 0; i < N; i++) if (chain_in[i]) msk[i] |= (64'd1 << d);
      end
      for (int i = 0; i < N; i++) begin
        check(msk[i] == ref_mask(t, i, Q), $sformatf("cfg %0d chain %0d mask %h ref %h", c, i, msk[i], ref_mask(t, i, Q)));
        if (fan.exists(msk[i])) fan[msk[i]]++;
        else fan[msk[i]] = 1;
      end
      check(fan.num() == n_choose_k(D, Q), $sformatf("cfg %0d uses %0d gates", c, fan.num()));
      foreach (fan[m]) check(fan[m] == N / fan.num() || fan[m] == N / fan.num() + 1,
                             $sformatf("cfg %0d gate %h fanout %0d", c, m, fan[m]));
      for (int it = 0; it < 256; it++) begin
        domain = D'(it);
        #1;
        for (int i = 0; i < N; i++) begin
          automatic bit e = 0;
          for (int k = 0; k < Q; k++) e ^= domain[t[i*Q+k]];
          check(chain_in[i] == e, $sformatf("cfg %0d chain %0d slice %0d", c, i, it));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
