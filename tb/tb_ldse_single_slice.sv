// tb_ldse_single_slice: encoding probability of one scan slice through a
// purely combinational XOR network, 16 tester channels into 160 scan chains
// (expansion ratio 10), with 2-input and with 3-input XOR gates.
//
// Both networks are the expander with no slice registers: the domain is the
// current tester slice alone, as in the bypass network. For each number k of
// specified bits, 1 to 24, it draws random scan slices (k distinct chains,
// random values) and decides by GF(2) elimination over the 16 channel bits
// whether the slice can be encoded. An encodable slice is solved, the
// solution applied to the network and the specified chains checked. For the
// first unencodable slices of each network an exhaustive search over all
// 2^16 tester slices confirms that none produces the slice. It also checks
// every chain's gate against the reference procedure, that one specified
// bit is always encodable, and that 3-input gates encode at least as many
// slices as 2-input gates over the whole run. With 2-input gates there are
// only C(16,2) = 120 combinations, so chains 120..159 share gates with
// chains 0..39, and a slice that gives two such chains different values
// cannot be encoded. The table of encoded fractions is printed at the end.
// Timing: combinational; outputs are sampled 1 time unit after each input.
module tb_ldse_single_slice;
  import ldse_ref_pkg::*;
  localparam int B      = 16;
  localparam int N      = 160;
  localparam int KMAX   = 24;
  localparam int TRIALS = 200;
  localparam int VERIFY = 3;   // unencodable slices checked exhaustively per network

  logic [B-1:0] slice;
  logic         cfg = 1'b0;
  logic [N-1:0] out2, out3;
  int checks = 0, failures = 0;

  xor_expander #(.DOMAIN(B), .SLICE_W(B), .CHAINS(N), .GATE_IN(2), .CONFIGS(1)) u_xor2
    (.domain(slice), .cfg, .chain_in(out2));
  xor_expander #(.DOMAIN(B), .SLICE_W(B), .CHAINS(N), .GATE_IN(3), .CONFIGS(1)) u_xor3
    (.domain(slice), .cfg, .chain_in(out3));

  initial begin
    #50000000;
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

  function automatic logic [N-1:0] net_out(int q);
    return (q == 2) ? out2 : out3;
  endfunction

  logic [B-1:0] msk [2][N];   // gate masks read from the networks, [0] 2-input, [1] 3-input
  int enc [2][KMAX+1];

  initial begin
    automatic int verified [2] = '{0, 0};
    automatic int total [2] = '{0, 0};
    #1;
    // read every chain's gate by driving one channel at a time
    for (int j = 0; j < B; j++) begin
      slice = B'(1) << j;
      #1;
      for (int i = 0; i < N; i++) begin
        msk[0][i][j] = out2[i];
        msk[1][i][j] = out3[i];
      end
    end
    for (int g = 0; g < 2; g++) begin
      automatic int q = g + 2;
      automatic tbl_t t = ref_table(B, N, q, 0, B);
      for (int i = 0; i < N; i++)
        check(64'(msk[g][i]) == ref_mask(t, i, q), $sformatf("%0d-xor chain %0d gate", q, i));
    end

    for (int k = 1; k <= KMAX; k++)
      for (int g = 0; g < 2; g++) begin
        enc[g][k] = 0;
        for (int trial = 0; trial < TRIALS; trial++) begin
          automatic int perm[N];
          automatic logic [B-1:0] rows[$];
          automatic bit rhs[$];
          automatic int piv[$];
          automatic bit val[N];
          automatic bit ok = 1;
          automatic logic [B-1:0] x;
          for (int i = 0; i < N; i++) perm[i] = i;
          for (int i = 0; i < k; i++) begin
            automatic int j = i + int'($urandom % 32'(N - i));
            automatic int tmp = perm[i];
            perm[i] = perm[j];
            perm[j] = tmp;
            val[perm[i]] = 1'($urandom);
          end
          // Gauss-Jordan over the 16 channel bits
          for (int e = 0; e < k; e++) begin
            automatic logic [B-1:0] v = msk[g][perm[e]];
            automatic bit r = val[perm[e]];
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
          if (ok) begin
            enc[g][k]++;
            x = B'($urandom);
            foreach (piv[j]) x[piv[j]] = 1'b0;
            foreach (piv[j]) x[piv[j]] = rhs[j] ^ (^(rows[j] & x));
            slice = x;
            #1;
            for (int e = 0; e < k; e++)
              check(net_out(g + 2)[perm[e]] == val[perm[e]],
                    $sformatf("%0d-xor k=%0d chain %0d", g + 2, k, perm[e]));
          end else if (verified[g] < VERIFY) begin
            automatic bit found = 0;
            verified[g]++;
            for (int s = 0; s < (1 << B) && !found; s++) begin
              automatic bit hit = 1;
              for (int e = 0; e < k && hit; e++)
                if ((^(msk[g][perm[e]] & B'(s))) != val[perm[e]]) hit = 0;
              found = hit;
            end
            check(!found, $sformatf("%0d-xor k=%0d: judged unencodable, but a slice produces it", g + 2, k));
          end
        end
        total[g] += enc[g][k];
      end

    $display(" k   2-xor %%   3-xor %%   (%0d random slices each)", TRIALS);
    for (int k = 1; k <= KMAX; k++)
      $display("%2d   %6.1f    %6.1f", k, 100.0 * enc[0][k] / TRIALS, 100.0 * enc[1][k] / TRIALS);
    check(enc[0][1] == TRIALS && enc[1][1] == TRIALS, "one specified bit is not always encodable");
    check(total[1] >= total[0], "3-input gates encoded fewer slices than 2-input gates");
    check(verified[0] > 0 && verified[1] > 0, "no unencodable slice was seen");
    check(enc[1][KMAX] < TRIALS, "every slice encodable even at the largest k");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
