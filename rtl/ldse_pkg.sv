// ldse_pkg: sizes, types and elaboration-time helpers shared by the limited
// dependence sequential expansion (LDSE) test-vector decompressor.
//
// The default sizes are those of the main evaluated setup: 8 tester channels
// expanding into 80 scan chains of 100 cells, two tester-slice registers and
// 3-input XOR gates in front of each chain, with four static configurations
// of the XOR network selectable per test cube. The helper functions are only
// used to compute constants while the design is elaborated.
package ldse_pkg;

  localparam int unsigned TESTER_CHANNELS = 8;    // b
  localparam int unsigned SCAN_CHAINS     = 80;   // n
  localparam int unsigned CHAIN_LENGTH    = 100;  // scan cells per chain
  localparam int unsigned SLICE_REGS      = 2;    // r
  localparam int unsigned GATE_INPUTS     = 3;    // q
  localparam int unsigned NUM_CONFIGS     = 4;    // static configurations

  // How the first r scan slices of a test cube are produced.
  //   PRELOAD_BYPASS      : the first r slices come from a combinational
  //                         network on the current tester slice only.
  //   PRELOAD_EXTRA_SHIFT : r extra tester slices fill the registers while
  //                         the scan chains hold, then every slice uses the
  //                         sequential network.
  typedef enum logic {
    PRELOAD_BYPASS      = 1'b0,
    PRELOAD_EXTRA_SHIFT = 1'b1
  } preload_mode_e;

  // Binomial coefficient C(n, k).
  function automatic int unsigned n_choose_k(int unsigned n, int unsigned k);
    longint unsigned r;
    r = 1;
    if (k > n) return 0;
    for (int unsigned i = 0; i < k; i++)
      r = r * (longint'(n) - longint'(i)) / (longint'(i) + 64'd1);
    return int'(r);
  endfunction

  function automatic int unsigned gcd(int unsigned a, int unsigned b);
    int unsigned t;
    for (int i = 0; i < 64; i++) begin
      if (b != 0) begin
        t = a % b;
        a = b;
        b = t;
      end
    end
    return a;
  endfunction

  // Multiplier that defines configuration `cfg` on a domain of `d` inputs:
  // the (cfg+1)-th positive integer that is coprime with d. Input index x is
  // mapped to (x * m) mod d, which is a permutation of the domain.
  function automatic int unsigned cfg_multiplier(int unsigned cfg, int unsigned d);
    int unsigned seen, m, res;
    seen = 0;
    res  = 1;
    m    = 1;
    for (int i = 0; i < 1024; i++) begin
      if (seen <= cfg && gcd(m, d) == 1) begin
        res  = m;
        seen = seen + 1;
      end
      m = m + 1;
    end
    return res;
  endfunction

endpackage
