// tb_xor_expander: checks the sequential network (24-input domain, 80
// chains, 3-input XORs, 4 configurations). For every configuration the
// inputs feeding each chain are found by one-hot probing and compared with
// a brute-force rerun of the synthesis procedure; the tables must use
// distinct combinations, and input use may spread by at most two (the
// greedy choice keeps it at 9..11 uses for the default sizes); random
// domains are then checked bit by bit.
module tb_xor_expander;
  import ldse_pkg::*;
  import ldse_ref_pkg::*;
  localparam int D = TESTER_CHANNELS * (SLICE_REGS + 1);
  localparam int N = SCAN_CHAINS;
  localparam int Q = GATE_INPUTS;
  localparam int C = NUM_CONFIGS;

  logic [D-1:0] domain;
  logic [$clog2(C)-1:0] cfg;
  logic [N-1:0] chain_in;
  int checks = 0, failures = 0;

  xor_expander dut (.domain, .cfg, .chain_in);

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
      automatic tbl_t t = ref_table(D, N, Q, c, TESTER_CHANNELS);
      automatic longint unsigned msk[N];
      automatic int uses[D];
      foreach (msk[i]) msk[i] = 0;
      foreach (uses[i]) uses[i] = 0;
      cfg = c[$clog2(C)-1:0];
      for (int d = 0; d < D; d++) begin
        domain = '0;
        domain[d] = 1'b1;
        #1;
        for (int i = 0; i < N; i++) if (chain_in[i]) begin
          msk[i] |= (64'd1 << d);
          uses[d]++;
        end
      end
      for (int i = 0; i < N; i++) begin
        check(msk[i] == ref_mask(t, i, Q), $sformatf("cfg %0d chain %0d mask %h ref %h", c, i, msk[i], ref_mask(t, i, Q)));
        check($countones(msk[i]) == Q, $sformatf("cfg %0d chain %0d has %0d inputs", c, i, $countones(msk[i])));
        for (int j = 0; j < i; j++)
          if (msk[i] == msk[j]) check(0, $sformatf("cfg %0d chains %0d and %0d share a gate", c, i, j));
      end
      begin
        automatic int mn = uses[0], mx = uses[0];
        foreach (uses[d]) begin
          if (uses[d] < mn) mn = uses[d];
          if (uses[d] > mx) mx = uses[d];
        end
        check(mx - mn <= 2, $sformatf("cfg %0d unbalanced input use %0d..%0d", c, mn, mx));
      end
      for (int it = 0; it < 200; it++) begin
        domain = D'({$urandom, $urandom});
        #1;
        for (int i = 0; i < N; i++) begin
          automatic bit e = 0;
          for (int k = 0; k < Q; k++) e ^= domain[t[i*Q+k]];
          check(chain_in[i] == e, $sformatf("cfg %0d chain %0d random value", c, i));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
