# Limited dependence sequential test-vector decompressor

A tester can only push a few bits per clock into a chip (here 8 channels), while the chip's
scan chains want many bits per clock (here 80 chains). A test cube, a scan test pattern in
which only a few percent of the bits are specified, can be stored on the tester in
compressed form and expanded on chip. The expander here is a *linear* decompressor: every
scan cell receives the XOR of some tester bits, the "free variables". Loading a cube then
means solving linear equations over GF(2), one equation per specified bit.

Two families of decompressors exist:

* **Combinational networks.** Examples are fan-out broadcast (as in Illinois scan) and small
  XOR networks. Every scan cell depends on only one to three tester bits of the same clock.
  The constraints are simple enough for an ATPG tool to include them in its search. But one
  heavily specified scan slice can make a cube unencodable.
* **LFSRs or ring generators.** These keep free variables from earlier clocks, so they encode
  much more. But every cell depends on a long XOR of free variables, which an ATPG tool cannot
  handle in its search.

The design here sits in between. It keeps the last **r** tester slices in plain registers;
a tester slice is the b bits the tester sends in one clock. Each scan chain is driven by one
**q-input XOR**, with q = 2 or 3. The XOR takes its inputs from the current slice and the
stored slices. So every scan cell still depends on exactly q free variables, which keeps the
constraints as simple as a combinational network's. Those variables, however, come from up to
r+1 clocks. This gives a much larger pool of free variables, and many more distinct
combinations than a combinational network has:

* C(24,3) = 2024 combinations instead of C(8,3) = 56, for b = 8, r = 2, q = 3.

The default build has:

* 8 tester channels feeding 80 scan chains of 100 cells;
* r = 2 slice registers;
* 3-input XORs;
* four configurations of the XOR network, chosen per test cube.

## Block structure

```
tester_slice[7:0] ─┬──────────────────────────────┐
                   │   slice_regs (r x b bits)    │
                   ├──► held[0] (t-1) ─► held[1] (t-2)
                   │           │             │
                   │   {held[1], held[0], tester_slice}  (24-bit domain)
                   │           ▼
                   │   xor_expander  (sequential network, 80 x XOR3) ──┐
                   └─► xor_expander  (bypass network, current slice) ──┤ mux per chain
                                                                       ▼ (bypass)
   decomp_ctrl: slice count, bypass / extra-shift / serial, load_done   chain_in[79:0]
                                                                       ▼
   scan_chains: 80 x 100 cells; in serial mode chain i is fed from chain i-8,
                chains 0..7 straight from the tester channels
```

| File | Contents |
|---|---|
| `rtl/ldse_pkg.sv` | default sizes, `preload_mode_e`, constant-function helpers |
| `rtl/slice_regs.sv` | the r tester-slice registers, cleared per cube |
| `rtl/xor_expander.sv` | q-input XOR network; connection table computed at elaboration |
| `rtl/decomp_ctrl.sv` | per-cube sequencing |
| `rtl/ldse_decompressor.sv` | registers + sequential network + bypass network + control |
| `rtl/scan_chains.sv` | the scan chains, with parallel, serial and capture modes |
| `rtl/ldse_top.sv` | decompressor and scan chains wired together |

## How the connections are chosen

`xor_expander` computes its wiring from its parameters. It runs a greedy synthesis
procedure as a constant function, so changing b, r, q or n rebuilds the network.

The domain has D = b(r+1) inputs. Input d is channel `d mod b` of the slice that is `d / b`
clocks old: bits 0–7 are the current slice, 8–15 the previous one, 16–23 the one before.
The procedure is:

1. List all C(D, q) input combinations in lexicographic order.
2. Take the chains one at a time. For each chain, compute the cost of every unused
   combination: the sum, over its inputs, of how many gates already use that input. Take the
   cheapest combination. Mark it used, and wire the chain's XOR to it. Ties are broken in
   two steps:
   * **New shape first.** Prefer a combination whose *shape* is still unused. The shape is
     the combination moved in time until its newest input lies in the current slice. For
     example, (0,1), (8,9) and (16,17) all have the shape (0,1).
   * **Then list order.** Among the rest, take the one that comes first in the list.
3. If there are more chains than combinations, the remaining chain i reuses the gate of
   chain `i mod C(D,q)`. Fan-outs then differ by at most one.

Why the shape rule matters: two gates of the same shape compute the same function of the
free variables, one or more clocks apart. The cells they fill are then linearly dependent,
and two such cells that are specified with opposite values cannot both be met. Without the
rule, the 2-input, 2-register variant starts with (0,1), (2,3), …, (22,23). Those gates come
in groups of three equal shapes. That variant then encoded fewer cubes than the 1-register
one.

For the default sequential network the result starts like this:

* chains 0–7: (0,1,2), (3,4,5), …, (21,22,23). Every input is used once.
* chains 8–13: (0,1,3), (2,4,5), (6,7,9), (8,10,11), (12,13,15), (14,16,17), …

After all 80 chains, each input feeds exactly 10 gates, and all 80 combinations are
distinct. Note what the numbering implies: chain 0 depends only on the current slice, and
chain 7 only on the oldest one.

With 2-input XORs the same procedure gives (0,1), (2,3), (4,5), (6,7), (8,10), (9,11), …

An exhaustive scan of all combinations for all chains takes more steps than a simulator's
constant evaluator allows. The function therefore searches in a pruned way:

* It tries target costs from the smallest possible one upward.
* For each target, it walks the combinations in lexicographic order and skips any subtree
  whose prefix already costs more than the target.

The result is the same combination the exhaustive scan would pick. The testbenches check
this against a brute-force model.

**Configurations.** `cfg` selects one of `CONFIGS` wirings, held for a whole test cube.
Configuration c relabels the domain as `x -> (x * m_c) mod D`, where m_c is the (c+1)-th
integer coprime with D:

* for D = 24: m = 1, 5, 7, 11;
* for the 8-input bypass network: m = 1, 3, 5, 7.

The relabelling mixes time positions, so each configuration has a different dependence
structure. A cube that fails in one configuration may encode in another. Configuration 0 is
the plain greedy result.

## Loading a test cube

Hold `cfg`, `preload_mode` and `serial_mode` for the whole cube. Then send one slice per
clock with `slice_valid`, raising `cube_start` together with the first slice. `slice_valid`
may drop for any number of clocks: nothing moves then. A new cube may start in the clock
right after `load_done`.

The slice registers are cleared at every `cube_start`, so every cube is encoded only with its
own free variables. For the first r slices of a cube the registers are therefore not yet
filled. Two remedies are built in, selected per cube:

| `preload_mode` | first r slices | slices per cube |
|---|---|---|
| 0, bypass | chains are driven by the bypass network, an XOR network on the current slice only | `CHAIN_LEN` (100) |
| 1, extra shifts | slices only fill the registers; the chains hold | `CHAIN_LEN + r` (102) |

Bypass mode uses no more free variables than a combinational decompressor. Extra-shift mode
gets by without the bypass network, at the cost of r extra clocks per cube.

**Serial mode** is for cubes that cannot be encoded at all. The chains are concatenated into
b long chains: chain i < b takes tester channel i, and chain i ≥ b takes the scan-out of
chain i − b. The decompressor is unused, and a load takes CHAIN_LEN · ⌈n/b⌉ = 1000 slices.

`load_done` pulses in the clock of the last shift. After it, pulse `capture` for one clock
to load the circuit's responses from `capture_data`. The next load shifts them out on
`scan_out`, one cell per shift, last cell first.

**Timing.** `chain_in` depends combinationally on `tester_slice`; the chains sample it on the
same rising edge. Shift k of a cube (counted from 0) lands in cell `CHAIN_LEN-1-k`. The
following edges commit each slice:

* the edge that shifts the chains;
* the edge that writes the slice registers.

## Encoding a cube (tester side)

A slice is counted as s = 0, 1, … from the cube's first slice. Free variable `s*b + j` is
channel j of slice s. Cell p of chain i is filled by shift t = CHAIN_LEN − 1 − p. That shift
is driven by slice s = t in bypass mode and s = t + r in extra-shift mode. The cell's value
is then given by the case that applies:

* **Bypass mode, s < r.** The cell is the XOR of the current-slice inputs of bypass gate i.
* **All other shifts.** Each domain input d of sequential gate i is free variable
  `(s − d/b)*b + (d mod b)`, and the cell is the XOR of those variables.

Each specified bit gives one such equation. If the system is solvable, the don't-care
variables may take any value. `tb/tb_ldse_top.sv` contains a complete encoder (Gauss-Jordan
elimination) that does this.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `CHANNELS` | 8 | tester channels b |
| `CHAINS` | 80 | scan chains n |
| `CHAIN_LEN` | 100 | cells per chain |
| `R` | 2 | slice registers r; 0 gives a plain combinational XOR decompressor |
| `GATE_IN` | 3 | XOR inputs q per chain; 1 gives a fan-out (broadcast) network |
| `CONFIGS` | 4 | static configurations |

The defaults match an 80 × 100 scan architecture driven from 8 channels, with the
2-register, 3-input-XOR decompressor.

The industrial and benchmark cases this kind of decompressor is usually evaluated on need
other chain counts, set through the parameters:

| Circuit | Scan cells | Chain counts | Chain lengths |
|---|---|---|---|
| s38584 | 1464 | 192, 224 or 256 | 8, 7, 6 |
| circuit with 7654 scan cells | 7654 | 64, 128 or 192 | 120, 60, 40 |
| circuit with 856 scan cells | 856 | 64, 128 or 192 | 14, 7, 5 |

For every chain count the network is regenerated by the same procedure.

## Verification

Every block has a self-checking testbench in `tb/`. Each one ends with a line
`TB_RESULT checks=N failures=M`.

* `tb_xor_expander`, `tb_bypass_network`:
  * find every chain's inputs by one-hot probing, for all configurations;
  * compare them with a brute-force rerun of the procedure in `tb/ldse_ref_pkg.sv`;
  * check that combinations are distinct and input use is balanced;
  * check the fan-out of the bypass network: 56 gates for 80 chains;
  * check random inputs.
* `tb_slice_regs`: random shift and clear traffic against a queue model.
* `tb_decomp_ctrl`: all three modes, idle clocks, back-to-back cubes and surplus slices; the
  exact load length of each mode.
* `tb_ldse_decompressor`: every chain bit of every shift against a slice-history model.
* `tb_scan_chains`: cells and scan-outs against an array model in parallel, serial and
  capture modes.
* `tb_ldse_top`: end to end at the default sizes.
  * 36 random cubes with 0.5 % to 10 % specified bits are encoded with a GF(2) solver and
    loaded.
  * Unencodable cubes go through serial mode.
  * After each load it checks every specified bit and the whole cell array.
  * It checks captured responses on `scan_out`.
  * It counts each mechanism: bypass, extra shifts, serial mode, every configuration, idle
    clocks, back-to-back cubes, capture.
  * In a typical run, every cube up to 2 % specified encodes, about two thirds encode at 4 %,
    and none at 8 % or more; for 800 free variables per cube, 8 % of 8000 cells is 640
    equations.

* `tb_ldse_table_workloads` runs the same flow through `tb/ldse_encode_harness.sv`, at all
  nine benchmark-circuit sizes, 12 cubes each, at 0.5 % to 5 % specified bits:
  * s38584: 192 × 8, 224 × 7, 256 × 6;
  * the 7654-cell circuit: 64 × 120, 128 × 60, 192 × 40;
  * the 856-cell circuit: 64 × 14, 128 × 7, 192 × 5.
  At these densities nearly every cube encodes, so when none has needed serial mode the last
  cube is sent in serial mode anyway, to exercise it at every size.
* `tb_ldse_variants` runs the flow on the 80 × 100 architecture for the other members of
  the family, 40 cubes each:
  * 2-input XOR with 1 register;
  * 2-input XOR with 2 registers;
  * 3-input XOR with 1 register;
  * 3-input XOR with 2 registers, the default.

  It prints how many cubes each variant encodes at 0.5 %, 2 %, 3.5 % and 5 % specified
  bits. In a typical run:

  | Variant | 3.5 % | 5 % |
  |---|---|---|
  | 3-input XOR | about 9 of 10 | 5 to 6 of 10 |
  | 2-input XOR | about 2 of 10 | 0 |

* `tb_ldse_single_slice` treats the expander as a purely combinational network, with no slice
  registers, from 16 tester channels into 160 scan chains. It does this twice, with 2-input
  and with 3-input gates, and measures how often a single scan slice with k specified bits
  can be encoded, for k from 1 to 24.
  * Every encodable slice is solved and checked on the network.
  * The first few unencodable slices are confirmed by trying all 2^16 tester slices.
  * A typical run:

    | Specified bits | 2-input XOR | 3-input XOR |
    |---|---|---|
    | 1 to 3 | 100 % | 100 % |
    | 8 | 86 % | 98 % |
    | 12 | 53 % | 89 % |
    | 16 | 14 % | 49 % |
    | 20 | 3 % | 4 % |

  With 2-input gates there are only C(16,2) = 120 combinations for 160 chains. Some chains
  therefore share a gate, which is why those slices fail early.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Wall -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/ldse_pkg.sv tb/ldse_ref_pkg.sv tb/tb_ldse_top.sv --top-module tb_ldse_top
./obj_dir/Vtb_ldse_top
```

Replace `tb_ldse_top` with any other testbench name. The end-to-end run takes well under a
minute.

## Choices made in this implementation

These points are this design's own and are not fixed by the method:

* The cost measure and the tie-break of the synthesis procedure, including the preference
  for new shapes, and the domain numbering.
* How the alternative configurations are built (the multiplicative relabelling).
* The bypass network. It is the same XOR synthesis applied to the current slice, with the
  same configuration.
* The tester-side handshake. `slice_valid` qualifies a slice, and `cube_start` marks the
  first slice of a cube.
* In extra-shift mode the chains hold during the r pre-load slices.
* The structure of serial mode: the chain concatenation order.
* The capture port. Scan cells have no reset.
* An asynchronous, active-low reset for the slice registers and counters.
* Assertions flag a configuration or mode change inside a cube, and a configuration index
  out of range.

Not included:

* the logic of the circuit under test, which is reached through `scan_cells` and
  `capture_data`;
* the tester;
* any compaction of scan-out responses.
